// gret_ref_pkg: behavioural reference of the GRET algorithm for the
// testbenches. It is written independently of the RTL: gradient directions
// come from an arctangent, the window turn walks each ring step by step, and
// the whole pipeline is evaluated per pixel straight from a stored image.
// The image and the configuration live in package variables set by the
// testbench. Also provides a test image generator (white paper with binary
// strokes, a gray halftone patch and noise) and a sparse rule set that fires
// often, with more specific rules at higher priority.
package gret_ref_pkg;
  import gret_pkg::*;

  // ---------------------------------------------------------------- state
  byte unsigned img[];        // row-major, img[y*img_w + x]
  int           img_h, img_w;
  byte unsigned th_bin = 128, th_lo = 32, th_hi = 224;
  rule_t        rules[$];
  byte unsigned lut[16];

  function automatic byte unsigned px(int y, int x);
    if (y < 0 || y >= img_h || x < 0 || x >= img_w) return 0;
    return img[y*img_w + x];
  endfunction

  // ------------------------------------------------------------- gradients
  function automatic void ref_grad(input logic [8:0] nb, output int dir, output int amp);
    int kx[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int ky[3][3] = '{'{ 1, 2, 1}, '{ 0, 0, 0}, '{-1,-2,-1}};
    int gx = 0, gy = 0;
    real a, t;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 3; x++) begin
        gx += kx[y][x] * int'(nb[y*3+x]);
        gy += ky[y][x] * int'(nb[y*3+x]);
      end
    amp = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    if (gx == 0 && gy == 0) begin dir = 0; return; end
    a = $atan2(real'(gy), real'(gx)) * 180.0 / 3.14159265358979;
    t = $atan(0.4) * 180.0 / 3.14159265358979;
    if (a >= -t && a <= t)                 dir = 3;   // E
    else if (a > t && a < 90.0 - t)        dir = 2;   // NE
    else if (a >= 90.0 - t && a <= 90.0 + t) dir = 1; // N
    else if (a > 90.0 + t && a < 180.0 - t) dir = 8;  // NW
    else if (a >= 180.0 - t || a <= -180.0 + t) dir = 7; // W
    else if (a > -180.0 + t && a < -90.0 - t) dir = 6;   // SW
    else if (a >= -90.0 - t && a <= -90.0 + t) dir = 5;  // S
    else                                   dir = 4;   // SE
  endfunction

  // ---------------------------------------------------------- ring walking
  // Offsets of the ring of radius r, walked clockwise from the top-left.
  function automatic void ring_walk(input int r, output int dy[$], output int dx[$]);
    int y = -r, x = -r;
    int sy[4] = '{0, 1, 0, -1};
    int sx[4] = '{1, 0, -1, 0};
    dy = {}; dx = {};
    for (int side = 0; side < 4; side++)
      for (int s = 0; s < 2*r; s++) begin
        dy.push_back(y); dx.push_back(x);
        y += sy[side]; x += sx[side];
      end
  endfunction

  // Turn a side x side square counter-clockwise by k*45 degrees.
  function automatic void turn(input int side, input int k, input int src[], output int dst[]);
    int h = side / 2;
    int dy[$], dx[$];
    dst = new[side*side];
    dst[h*side + h] = src[h*side + h];
    for (int r = 1; r <= h; r++) begin
      ring_walk(r, dy, dx);
      for (int i = 0; i < 8*r; i++) begin
        int s = (i + k*r) % (8*r);
        dst[(dy[i]+h)*side + dx[i]+h] = src[(dy[s]+h)*side + dx[s]+h];
      end
    end
  endfunction

  function automatic int turn_dir(int d, int k);
    int order[8] = '{1, 2, 3, 4, 5, 6, 7, 8};
    if (d == 0) return 0;
    return order[(d - 1 - k + 8) % 8];
  endfunction

  // ------------------------------------------------------- feature model
  typedef struct {
    int pix[];
    int dir[];
    int amp[];
  } rfeat_t;

  function automatic rfeat_t ref_features(input logic [80:0] w);
    rfeat_t f;
    f.pix = new[81]; f.dir = new[49]; f.amp = new[49];
    for (int i = 0; i < 81; i++) f.pix[i] = int'(w[i]);
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++) begin
        logic [8:0] nb;
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 3; x++) nb[y*3+x] = w[(r+y)*9 + c+x];
        ref_grad(nb, f.dir[r*7+c], f.amp[r*7+c]);
      end
    return f;
  endfunction

  function automatic rfeat_t ref_rotate(input rfeat_t f);
    rfeat_t o;
    int k = (f.dir[24] == 0) ? 0 : f.dir[24] - 1;
    turn(9, k, f.pix, o.pix);
    turn(7, k, f.dir, o.dir);
    turn(7, k, f.amp, o.amp);
    foreach (o.dir[i]) o.dir[i] = turn_dir(o.dir[i], k);
    return o;
  endfunction

  function automatic bit ref_match(input rule_t ru, input rfeat_t f);
    if (!ru.en) return 0;
    for (int i = 0; i < 81; i++)
      if (ru.pix_care[i] && int'(ru.pix_val[i]) != f.pix[i]) return 0;
    for (int i = 0; i < 49; i++)
      if (ru.dir_care[i] && int'(ru.dir_val[i]) != f.dir[i]) return 0;
    return f.amp[24] >= int'(ru.amp_min);
  endfunction

  // Whole pipeline for image pixel (y, x).
  function automatic byte unsigned ref_pixel(input int y, input int x,
                                             output bit gray, output bit enh,
                                             output bit conflict);
    logic [80:0] w;
    rfeat_t f;
    int nhit = 0, first = -1;
    gray = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (px(y+dy, x+dx) > th_lo && px(y+dy, x+dx) < th_hi) gray = 1;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 9; j++) w[i*9+j] = px(y-4+i, x-4+j) >= th_bin;
    f = ref_rotate(ref_features(w));
    foreach (rules[i])
      if (ref_match(rules[i], f)) begin
        nhit++;
        if (first < 0) first = i;
      end
    enh = !gray && nhit > 0;
    conflict = !gray && nhit > 1;
    return enh ? lut[first] : px(y, x);
  endfunction

  // ------------------------------------------------------ test content
  function automatic void gen_image(int h, int w, int seed);
    int s = seed;
    img_h = h; img_w = w;
    img = new[h*w];
    foreach (img[i]) img[i] = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        byte unsigned v = 0;
        // slanted strokes and a filled disc
        if (((x + 2*y) % 23) < 5) v = 255;
        if (((3*x - y + 1000) % 31) < 3) v = 255;
        if ((x - w/2)*(x - w/2) + (y - h/2)*(y - h/2) < 16) v = 255;
        // halftone patch with gray levels
        if (x % 20 >= 13 && y % 12 >= 6) v = byte'(($urandom(s + y*w + x) % 256));
        // sparse near-binary noise
        if (($urandom(s*7 + y*w + x) % 53) == 0) v = ($urandom(s + x) % 2) ? 250 : 5;
        img[y*w + x] = v;
      end
  endfunction

  function automatic rule_t empty_rule();
    rule_t r = '0;
    r.en = 1'b1;
    return r;
  endfunction

  // Sparse rules on the turned window (centre direction is north):
  // pixel 40 is the centre, 31 above it, 49 below it.
  function automatic void std_rules();
    rule_t r;
    rules = {};
    // 0: white centre on a step corner (black above, white above-left)
    r = empty_rule();
    r.pix_care[40] = 1; r.pix_care[31] = 1; r.pix_care[30] = 1;
    r.pix_val[31] = 1; r.amp_min = 3;
    rules.push_back(r);
    // 1: white centre with black above
    r = empty_rule();
    r.pix_care[40] = 1; r.pix_care[31] = 1; r.pix_val[31] = 1; r.amp_min = 1;
    rules.push_back(r);
    // 2: black centre with white below and a north gradient
    r = empty_rule();
    r.pix_care[40] = 1; r.pix_val[40] = 1; r.pix_care[49] = 1;
    r.dir_care[24] = 1; r.dir_val[24] = 4'(DIR_N); r.amp_min = 2;
    rules.push_back(r);
    // 3: any pixel whose upper neighbour also points north
    r = empty_rule();
    r.dir_care[24] = 1; r.dir_val[24] = 4'(DIR_N);
    r.dir_care[17] = 1; r.dir_val[17] = 4'(DIR_N);
    rules.push_back(r);
    // 4: disabled rule that would match everything
    r = '0;
    rules.push_back(r);
    for (int i = 0; i < 16; i++) lut[i] = byte'(40 + 13*i);
  endfunction
endpackage
