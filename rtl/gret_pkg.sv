// gret_pkg: types, constants and the gradient look-up function shared by the
// GRET (gray resolution enhancement anti-aliasing) pipeline.
//
// Window geometry: the binary window is 9x9 pixels, flattened row-major with
// index r*9+c, r = 0 being the oldest (top) row and c = 0 the leftmost column.
// Gradients exist for the inner 7x7 pixels (index r*7+c, window pixel
// (r+1, c+1)), the pixels whose full 3x3 neighbourhood lies inside the window.
// The centre is window pixel 40 and gradient pixel 24.
//
// Directions are coded clockwise from north, with 0 meaning "no gradient":
// the eight directions and the zero direction follow the method; the code
// values, the Sobel operator and the sector limits are this design's choice.
package gret_pkg;

  localparam int WIN    = 9;            // binary window side
  localparam int GWIN   = 7;            // side of the gradient field
  localparam int NPIX   = WIN * WIN;    // 81
  localparam int NGRAD  = GWIN * GWIN;  // 49
  localparam int CGRAD  = NGRAD / 2;    // centre gradient index, 24
  localparam int DIR_BITS = 4;
  localparam int AMP_BITS = 4;

  typedef enum logic [DIR_BITS-1:0] {
    DIR_NONE = 4'd0,
    DIR_N    = 4'd1,
    DIR_NE   = 4'd2,
    DIR_E    = 4'd3,
    DIR_SE   = 4'd4,
    DIR_S    = 4'd5,
    DIR_SW   = 4'd6,
    DIR_W    = 4'd7,
    DIR_NW   = 4'd8
  } dir_e;

  typedef struct packed {
    logic [DIR_BITS-1:0] dir;   // a dir_e code
    logic [AMP_BITS-1:0] amp;   // |gx| + |gy|, 0..8
  } grad_t;

  // Everything the decision matrix looks at.
  typedef struct packed {
    logic [NPIX-1:0]                pix;  // binary pixel values
    logic [NGRAD-1:0][DIR_BITS-1:0]    dir;  // gradient directions
    logic [NGRAD-1:0][AMP_BITS-1:0]    amp;  // gradient amplitudes
  } feat_t;

  // One programmable rule of the decision matrix: a masked template.
  typedef struct packed {
    logic                           en;
    logic [NPIX-1:0]                pix_care;
    logic [NPIX-1:0]                pix_val;
    logic [NGRAD-1:0]               dir_care;
    logic [NGRAD-1:0][DIR_BITS-1:0]    dir_val;
    logic [AMP_BITS-1:0]               amp_min;  // minimum centre amplitude
  } rule_t;

  // Gradient LUT content. nb is a 3x3 binary neighbourhood, bit dy*3+dx,
  // dy = 0 the top row. gx > 0 means darker to the east, gy > 0 darker to
  // the north. A vector is axial when the smaller component is at most 2/5
  // of the larger one, diagonal otherwise.
  function automatic grad_t grad_lut(input logic [8:0] nb);
    int gx, gy, ax, ay;
    grad_t g;
    gx = (int'(nb[2]) + 2*int'(nb[5]) + int'(nb[8]))
       - (int'(nb[0]) + 2*int'(nb[3]) + int'(nb[6]));
    gy = (int'(nb[0]) + 2*int'(nb[1]) + int'(nb[2]))
       - (int'(nb[6]) + 2*int'(nb[7]) + int'(nb[8]));
    ax = (gx < 0) ? -gx : gx;
    ay = (gy < 0) ? -gy : gy;
    g.amp = AMP_BITS'(ax + ay);
    if (ax == 0 && ay == 0)       g.dir = DIR_NONE;
    else if (5*ay <= 2*ax)        g.dir = (gx > 0) ? DIR_E : DIR_W;
    else if (5*ax <= 2*ay)        g.dir = (gy > 0) ? DIR_N : DIR_S;
    else if (gx > 0)              g.dir = (gy > 0) ? DIR_NE : DIR_SE;
    else                          g.dir = (gy > 0) ? DIR_NW : DIR_SW;
    return g;
  endfunction

  // Index along its square ring (radius r = max(|dr|,|dc|)) of the pixel at
  // offset (dr, dc) from the centre; the ring is walked clockwise from its
  // top-left corner.
  function automatic int ring_idx(input int dr, input int dc);
    int r;
    r = (dr < 0 ? -dr : dr) > (dc < 0 ? -dc : dc) ? (dr < 0 ? -dr : dr)
                                                  : (dc < 0 ? -dc : dc);
    if (dr == -r && dc < r)       return dc + r;
    else if (dc == r && dr < r)   return 2*r + dr + r;
    else if (dr == r && dc > -r)  return 4*r + r - dc;
    else                          return 6*r + r - dr;
  endfunction

  // Flat source index, in a square of side 'side', of the pixel that lands
  // on flat index p when the square is turned counter-clockwise by k steps
  // of 45 degrees (ring of radius r shifted by k*r positions).
  function automatic int rot_src(input int side, input int p, input int k);
    int h, dr, dc, r, i, sdr, sdc;
    h  = side / 2;
    dr = p / side - h;
    dc = p % side - h;
    r  = (dr < 0 ? -dr : dr) > (dc < 0 ? -dc : dc) ? (dr < 0 ? -dr : dr)
                                                   : (dc < 0 ? -dc : dc);
    if (r == 0) return p;
    i = (ring_idx(dr, dc) + k*r) % (8*r);
    if (i < 2*r)      begin sdr = -r;            sdc = -r + i;       end
    else if (i < 4*r) begin sdr = -r + (i-2*r);  sdc = r;            end
    else if (i < 6*r) begin sdr = r;             sdc = r - (i-4*r);  end
    else              begin sdr = r - (i-6*r);   sdc = -r;           end
    return (sdr + h) * side + (sdc + h);
  endfunction

  // Direction code after turning counter-clockwise by k steps of 45 degrees.
  function automatic logic [DIR_BITS-1:0] rot_dir(input logic [DIR_BITS-1:0] d,
                                               input int k);
    if (d == DIR_NONE) return DIR_NONE;
    return DIR_BITS'(((int'(d) - 1 - k + 16) % 8) + 1);
  endfunction

endpackage
