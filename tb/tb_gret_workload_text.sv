// tb_gret_workload_text: the kind of content GRET is meant for: a binary
// character (a "6" built from a ring and a hooked stem, with curved,
// stair-stepped edges) next to a multi-level halftone patch that has a
// binary line buried in it. One GRET core processes the 48x40 page. Checks:
// every output pixel equals the reference; every pixel whose 3x3
// neighbourhood holds gray values comes out unchanged, so the halftone keeps
// its structure and tone; the character's edges are enhanced (some pixels
// replaced by LUT gray levels) while pixels far from any edge are unchanged.
module tb_gret_workload_text;
  import gret_pkg::*;
  import gret_ref_pkg::*;
  localparam int LW = 48, H = 40;
  logic clk = 0, rst_n = 0;
  logic [7:0] bin_th = 128, gray_lo = 32, gray_hi = 224;
  logic rule_we = 0, lut_we = 0;
  logic [3:0] rule_idx = 0, lut_idx = 0;
  rule_t rule = '0;
  logic [7:0] lut_val = 0;
  logic in_valid = 0, in_ready, in_sof = 0, in_eof = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_sof, out_sol, out_eof, ev_gray, ev_enh, ev_conflict;
  logic [7:0] out_data;

  gret_core #(.PIX_W(8), .LINE_W(LW), .NRULES(16)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, n_out = 0;
  int n_glyph_enh = 0, n_ht = 0, n_ht_changed = 0, n_flat = 0, n_flat_changed = 0;

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  function automatic bit flat(int y, int x);   // no edge within the window
    for (int i = -4; i <= 4; i++)
      for (int j = -4; j <= 4; j++)
        if ((px(y+i, x+j) >= 128) != (px(y, x) >= 128)) return 0;
    return 1;
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      automatic int y = n_out / LW, x = n_out % LW;
      automatic bit g, e, cf;
      automatic byte unsigned exp = ref_pixel(y, x, g, e, cf);
      checks++;
      if (out_data !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d", y, x, out_data, exp);
      end
      if (g) begin
        n_ht++;
        checks++;
        if (out_data != px(y, x)) begin n_ht_changed++; failures++; end
      end
      if (flat(y, x)) begin
        n_flat++;
        checks++;
        if (out_data != px(y, x)) begin n_flat_changed++; failures++; end
      end
      if (x < 32 && e) n_glyph_enh++;
      n_out++;
    end
  end

  initial begin
    img_h = H; img_w = LW;
    img = new[H*LW];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < LW; x++) begin
        automatic int d2 = (y - 26)*(y - 26) + (x - 17)*(x - 17);
        automatic byte unsigned v = 0;
        if (d2 >= 36 && d2 <= 110) v = 255;                       // bowl
        if (x >= 7 && x <= 11 && y >= 8 && y <= 26) v = 255;      // stem
        if (y >= 5 + (x - 7) / 4 && y <= 8 + (x - 7) / 4 && x >= 7 && x <= 26) v = 255; // hook
        if (x >= 34) v = byte'(40 + (($urandom(x*97 + y) % 5) * 40)); // halftone levels
        if (x >= 34 && (y - (x - 34) / 2) >= 18 && (y - (x - 34) / 2) <= 20) v = 255; // buried line
        img[y*LW + x] = v;
      end
    std_rules();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (rules[i]) begin
      @(negedge clk); rule_we = 1; rule_idx = 4'(i); rule = rules[i];
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); rule_we = 0; lut_we = 1; lut_idx = 4'(i); lut_val = lut[i];
    end
    @(negedge clk); lut_we = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < LW; x++) begin
        in_valid = 1; in_sof = (y == 0 && x == 0); in_eof = (y == H-1 && x == LW-1);
        in_data = img[y*LW + x];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
    in_valid = 0; in_sof = 0; in_eof = 0;
    repeat (4*LW + 40) @(negedge clk);
    checks++;
    if (n_out != H*LW) begin failures++; $display("FAIL %0d pixels out", n_out); end
    $display("glyph pixels enhanced %0d; halftone pixels %0d, changed %0d; edge-free pixels %0d, changed %0d",
             n_glyph_enh, n_ht, n_ht_changed, n_flat, n_flat_changed);
    checks++;
    if (n_glyph_enh == 0 || n_ht == 0 || n_flat == 0) begin
      failures++;
      $display("FAIL content did not exercise the design");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
