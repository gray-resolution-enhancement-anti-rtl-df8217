// tb_gret_segment_splitter: 6 lines of a 32-pixel line cut into 4 segments
// of 16 pixels (8 own + 4 overlap each side). Input and output stall at
// random. Every segment beat is compared with the pixel it must carry
// (white beyond the line ends), with the page markers on the first and last
// beat. Counts input back-pressure and output stalls.
module tb_gret_segment_splitter;
  localparam int LW = 32, SEG = 4, S = LW/SEG, L = S + 8, NL = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_sof = 0, in_eof = 0;
  logic [SEG-1:0][7:0] in_data = '0;
  logic seg_valid, seg_ready = 0, seg_sof, seg_eof;
  logic [SEG-1:0][7:0] seg_data;
  byte unsigned img[NL][LW];
  int checks = 0, failures = 0, nbeat = 0, n_bp = 0, n_stall = 0;
  gret_segment_splitter #(.PIX_W(8), .LINE_W(LW), .SEG(SEG)) dut (.*);
  always #5 clk = !clk;
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) seg_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_bp++;
  always @(posedge clk) if (rst_n && seg_valid && !seg_ready) n_stall++;
  always @(posedge clk)
    if (rst_n && seg_valid && seg_ready) begin
      automatic int ln = nbeat / L, j = nbeat % L;
      for (int k = 0; k < SEG; k++) begin
        automatic int p = k*S - 4 + j;
        automatic byte unsigned exp = (p < 0 || p >= LW) ? 0 : img[ln][p];
        checks++;
        if (seg_data[k] !== exp) begin
          failures++;
          $display("FAIL line %0d seg %0d beat %0d got %0d exp %0d", ln, k, j, seg_data[k], exp);
        end
      end
      checks++;
      if (seg_sof !== (nbeat == 0) || seg_eof !== (nbeat == NL*L - 1)) begin
        failures++;
        $display("FAIL markers at beat %0d", nbeat);
      end
      nbeat++;
    end
  initial begin
    foreach (img[y, x]) img[y][x] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int y = 0; y < NL; y++)
      for (int w = 0; w < LW/SEG; w++) begin
        @(negedge clk);
        in_valid = 0;
        while ($urandom % 5 == 0) @(negedge clk);
        in_valid = 1; in_sof = (y == 0 && w == 0); in_eof = (y == NL-1 && w == LW/SEG-1);
        for (int l = 0; l < SEG; l++) in_data[l] = img[y][w*SEG + l];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk); in_valid = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (nbeat != NL*L || n_bp == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL beats %0d back-pressure %0d stalls %0d", nbeat, n_bp, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
