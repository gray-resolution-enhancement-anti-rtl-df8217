// tb_gret_delay: random data in, the output must equal the input of exactly
// DEPTH clocks earlier.
module tb_gret_delay;
  localparam int W = 9, DEPTH = 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist[$];
  int checks = 0, failures = 0;
  gret_delay #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .din, .dout);
  always #5 clk = !clk;
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (hist.size() >= DEPTH) begin
        checks++;
        if (dout !== hist[hist.size()-DEPTH]) begin
          failures++;
          $display("FAIL t=%0d got %h exp %h", t, dout, hist[hist.size()-DEPTH]);
        end
      end
      din = W'($urandom);
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
