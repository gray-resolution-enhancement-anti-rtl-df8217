// tb_gret_multichip_top: end-to-end test of the multiple-chip GRET system on
// a 64-pixel line split over 4 cores (segments of 16 + 8 pixels). Two pages
// of test content are written in with random idle clocks; the reassembled
// raster output is compared pixel by pixel with the reference model run on
// the whole, unsplit line, so any error in the overlap handling shows. The
// test also counts that every mechanism happens: gray bypass, enhancement,
// rule conflicts, enhanced pixels that need the neighbouring segment's
// overlap, input back-pressure (splitter full or cores draining a page), the
// flush at page end, and every centre direction, i.e. all eight turns.
module tb_gret_multichip_top;
  import gret_pkg::*;
  import gret_ref_pkg::*;
  localparam int LW = 64, SEG = 4, H = 12, PAGES = 2, S = LW / SEG;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_bin_th = 128, cfg_gray_lo = 32, cfg_gray_hi = 224;
  logic cfg_rule_we = 0, cfg_lut_we = 0;
  logic [3:0] cfg_rule_idx = 0, cfg_lut_idx = 0;
  rule_t cfg_rule = '0;
  logic [7:0] cfg_lut_val = 0;
  logic in_valid = 0, in_ready, in_sof = 0, in_eof = 0;
  logic [SEG-1:0][7:0] in_data = '0;
  logic out_valid, out_sof, out_eof;
  logic [SEG-1:0][7:0] out_data;
  logic [SEG-1:0] ev_gray, ev_enh, ev_conflict;

  gret_multichip_top #(.PIX_W(8), .LINE_W(LW), .SEG(SEG), .NRULES(16)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, n_out = 0;
  int n_gray = 0, n_enh = 0, n_conf = 0, n_bp = 0, n_edge = 0, n_flush = 0;
  int rot_seen[9];

  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_bp++;
  always @(posedge clk) if (rst_n && !dut.g_core[0].u_core.in_ready) n_flush++;
  always @(posedge clk) if (rst_n) begin
    n_gray += $countones(ev_gray); n_enh += $countones(ev_enh); n_conf += $countones(ev_conflict);
  end

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      automatic int y = (n_out / (LW/SEG)) % H, w = n_out % (LW/SEG);
      for (int l = 0; l < SEG; l++) begin
        automatic int x = w*SEG + l;
        automatic bit g, e, cf;
        automatic byte unsigned exp = ref_pixel(y, x, g, e, cf);
        checks++;
        if (out_data[l] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d", y, x, out_data[l], exp);
        end
        if (e && (x % S < 4 || x % S >= S - 4) && x >= 4 && x < LW - 4) n_edge++;
      end
      checks++;
      if (out_sof !== (y == 0 && w == 0) || out_eof !== (y == H-1 && w == LW/SEG-1)) begin
        failures++;
        $display("FAIL markers at (%0d,%0d)", y, w);
      end
      n_out++;
    end
  end

  initial begin
    gen_image(H, LW, 5);
    std_rules();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < LW; x++) begin
        logic [80:0] win;
        rfeat_t f;
        for (int i = 0; i < 9; i++)
          for (int j = 0; j < 9; j++) win[i*9+j] = px(y-4+i, x-4+j) >= th_bin;
        f = ref_features(win);
        rot_seen[f.dir[24]]++;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (rules[i]) begin
      @(negedge clk); cfg_rule_we = 1; cfg_rule_idx = 4'(i); cfg_rule = rules[i];
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); cfg_rule_we = 0; cfg_lut_we = 1; cfg_lut_idx = 4'(i); cfg_lut_val = lut[i];
    end
    @(negedge clk); cfg_lut_we = 0;
    for (int p = 0; p < PAGES; p++)
      for (int y = 0; y < H; y++)
        for (int w = 0; w < LW/SEG; w++) begin
          in_valid = 0;
          while (($urandom % 5) == 0) @(negedge clk);
          in_valid = 1; in_sof = (y == 0 && w == 0); in_eof = (y == H-1 && w == LW/SEG-1);
          for (int l = 0; l < SEG; l++) in_data[l] = img[y*LW + w*SEG + l];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
    in_valid = 0; in_sof = 0; in_eof = 0;
    repeat (6*(S+8) + 100) @(negedge clk);
    checks++;
    if (n_out != PAGES*H*LW/SEG) begin
      failures++;
      $display("FAIL %0d beats out, expected %0d", n_out, PAGES*H*LW/SEG);
    end
    $display("gray %0d enhanced %0d conflict %0d overlap-dependent %0d back-pressure %0d flush %0d",
             n_gray, n_enh, n_conf, n_edge, n_bp, n_flush);
    for (int d = 0; d < 9; d++) begin
      checks++;
      if (rot_seen[d] == 0) begin failures++; $display("FAIL direction %0d never at the centre", d); end
    end
    checks++;
    if (n_gray == 0 || n_enh == 0 || n_conf == 0 || n_edge == 0 || n_bp == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
