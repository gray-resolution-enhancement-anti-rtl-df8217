// tb_gret_core: end-to-end test of one GRET core on a short line width.
// Two pages of test content are streamed in with random idle clocks; every
// output pixel is compared in raster order with the reference model, as are
// the page and line markers and the event flags. Also checked: the core
// drains each page by itself (in_ready low for exactly 4*LINE_W+4 clocks),
// and each output leaves 5 clocks after the input beat that completes its
// 9x9 window. Each mechanism (gray bypass, enhancement, rule conflict, all
// eight rotations, flush, input idle) must occur at least once.
module tb_gret_core;
  import gret_pkg::*;
  import gret_ref_pkg::*;
  localparam int LW = 20, H = 12, PAGES = 2;
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

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint beat_cyc[$];       // clock of every beat (input and flush)
  int n_out = 0, page_out = 0;
  int n_gray = 0, n_enh = 0, n_conf = 0, n_flush = 0, n_idle = 0;
  int rot_seen[9];

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && (!in_ready || (in_valid && in_ready))) beat_cyc.push_back(cyc);
  always @(posedge clk) if (rst_n && !in_ready) n_flush++;
  always @(posedge clk) if (rst_n && in_ready && !in_valid) n_idle++;

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // Output checker.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      automatic int y = (n_out % (H*LW)) / LW, x = n_out % LW;
      automatic bit g, e, cf;
      automatic byte unsigned exp = ref_pixel(y, x, g, e, cf);
      automatic longint lat;
      checks++;
      if (out_data !== exp || ev_gray !== g || ev_enh !== e || ev_conflict !== cf) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) got %0d g%0d e%0d c%0d exp %0d g%0d e%0d c%0d", y, x,
                                    out_data, ev_gray, ev_enh, ev_conflict, exp, g, e, cf);
      end
      checks++;
      if (out_sof !== (y == 0 && x == 0) || out_sol !== (x == 0) || out_eof !== (y == H-1 && x == LW-1)) begin
        failures++;
        $display("FAIL markers at (%0d,%0d): sof %0d sol %0d eof %0d", y, x, out_sof, out_sol, out_eof);
      end
      // latency: the beat that completes this pixel's window
      lat = cyc - 1 - beat_cyc[(n_out / (H*LW)) * (H*LW + 4*LW + 4) + (n_out % (H*LW)) + 4*LW + 4];
      checks++;
      if (lat != 5) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d at (%0d,%0d)", lat, y, x);
      end
      n_gray += g; n_enh += e; n_conf += cf;
      n_out++;
    end
  end

  // Which turns the pipeline needs, from the reference.
  task automatic count_turns();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < LW; x++) begin
        logic [80:0] w;
        rfeat_t f;
        for (int i = 0; i < 9; i++)
          for (int j = 0; j < 9; j++) w[i*9+j] = px(y-4+i, x-4+j) >= th_bin;
        f = ref_features(w);
        rot_seen[f.dir[24]]++;
      end
  endtask

  initial begin
    gen_image(H, LW, 11);
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
    count_turns();
    for (int p = 0; p < PAGES; p++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < LW; x++) begin
          in_valid = 0;
          while (($urandom % 4) == 0) @(negedge clk);
          in_valid = 1; in_sof = (y == 0 && x == 0); in_eof = (y == H-1 && x == LW-1);
          in_data = img[y*LW + x];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
      in_valid = 0; in_sof = 0; in_eof = 0;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      checks++;
      if (n_flush != (p+1) * (4*LW + 4)) begin
        failures++;
        $display("FAIL flush length %0d", n_flush);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != PAGES*H*LW) begin
      failures++;
      $display("FAIL %0d pixels out, expected %0d", n_out, PAGES*H*LW);
    end
    $display("gray %0d enhanced %0d conflict %0d flush clocks %0d idle %0d", n_gray, n_enh, n_conf, n_flush, n_idle);
    for (int d = 0; d < 9; d++) begin
      checks++;
      if (rot_seen[d] == 0) begin failures++; $display("FAIL direction %0d never at the centre", d); end
    end
    checks++;
    if (n_gray == 0 || n_enh == 0 || n_conf == 0 || n_flush == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
