// tb_gret_segment_merger: feeds 5 lines of 4 segments of 16 pixels as the
// cores would (line marker on the first pixel, random idle clocks) and checks
// that the raster output holds exactly pixels 5..12 of every segment in line
// order, in 8 beats per line of 4 pixels, each line one clock after its
// last segment pixel, with the page markers.
module tb_gret_segment_merger;
  localparam int LW = 32, SEG = 4, S = LW/SEG, L = S + 8, NL = 5;
  logic clk = 0, rst_n = 0;
  logic seg_valid = 0, seg_sof = 0, seg_sol = 0, seg_eof = 0;
  logic [SEG-1:0][7:0] seg_data = '0;
  logic out_valid, out_sof, out_eof;
  logic [SEG-1:0][7:0] out_data;
  int checks = 0, failures = 0, nout = 0;
  longint cyc = 0, last_in[NL];
  gret_segment_merger #(.PIX_W(8), .LINE_W(LW), .SEG(SEG)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;
  function automatic byte unsigned f(int ln, int k, int j);
    return byte'(ln*53 + k*17 + j*3 + 1);
  endfunction
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk)
    if (rst_n && out_valid) begin
      automatic int ln = nout / S, w = nout % S;
      for (int l = 0; l < SEG; l++) begin
        automatic int p = w*SEG + l;
        checks++;
        if (out_data[l] !== f(ln, p / S, p % S + 4)) begin
          failures++;
          $display("FAIL line %0d pixel %0d got %0d exp %0d", ln, p, out_data[l], f(ln, p/S, p%S+4));
        end
      end
      checks++;
      if (out_sof !== (nout == 0) || out_eof !== (nout == NL*S-1)) begin
        failures++;
        $display("FAIL markers at %0d", nout);
      end
      if (w == 0) begin
        checks++;
        if (cyc - last_in[ln] != 2) begin
          failures++;
          $display("FAIL line %0d starts %0d clocks after its last input", ln, cyc - last_in[ln]);
        end
      end
      nout++;
    end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int ln = 0; ln < NL; ln++)
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        seg_valid = 0;
        while ($urandom % 4 == 0) @(negedge clk);
        seg_valid = 1; seg_sol = (j == 0); seg_sof = (ln == 0 && j == 0);
        seg_eof = (ln == NL-1 && j == L-1);
        for (int k = 0; k < SEG; k++) seg_data[k] = f(ln, k, j);
        if (j == L-1) last_in[ln] = cyc;
      end
    @(negedge clk); seg_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (nout != NL*S) begin failures++; $display("FAIL %0d beats out", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
