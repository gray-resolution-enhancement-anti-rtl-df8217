// tb_gret_line_buffer: writes 14 lines of a short line width with random
// gaps between pixels; one clock after each write the 9-pixel column must
// hold that column of the current line and of the 8 lines before it.
module tb_gret_line_buffer;
  localparam int LW = 12;
  logic clk = 0, rst_n = 0;
  logic wr = 0, eol = 0, col_valid;
  logic [3:0] col = 0;
  logic [7:0] din = 0;
  logic [8:0][7:0] col_pix;
  byte unsigned img[20][LW];
  int checks = 0, failures = 0;
  int qr[$], qc[$];
  gret_line_buffer #(.PIX_W(8), .LINE_W(LW), .ROWS(9)) dut (.*);
  always #5 clk = !clk;
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    #1;
    if (rst_n && col_valid) begin
      automatic int r_q = qr.pop_front(), c_q = qc.pop_front();
      if (r_q >= 8)
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (col_pix[i] !== img[r_q - 8 + i][c_q]) begin
          failures++;
          $display("FAIL row %0d col %0d tap %0d got %0d exp %0d", r_q, c_q, i, col_pix[i], img[r_q-8+i][c_q]);
        end
      end
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 14; r++)
      for (int c = 0; c < LW; c++) begin
        @(negedge clk);
        wr = 0;
        while ($urandom % 3 == 0) @(negedge clk);
        img[r][c] = 8'($urandom);
        wr = 1; col = 4'(c); eol = (c == LW-1); din = img[r][c];
        qr.push_back(r); qc.push_back(c);
      end
    @(negedge clk); wr = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
