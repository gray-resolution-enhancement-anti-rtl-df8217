// tb_gret_threshold: random columns and thresholds, including the edge
// values 0 and 255; each output bit is compared with the threshold rule.
module tb_gret_threshold;
  logic [7:0]      th;
  logic [8:0][7:0] pix;
  logic [8:0]      bin;
  int checks = 0, failures = 0;
  gret_threshold #(.PIX_W(8), .N(9)) dut (.th, .pix, .bin);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      th = (t < 20) ? 8'(t * 13) : 8'($urandom);
      for (int i = 0; i < 9; i++) pix[i] = (i == 0) ? th : (i == 1) ? th - 1 : 8'($urandom);
      #1;
      for (int i = 0; i < 9; i++) begin
        automatic bit exp = !(int'(pix[i]) < int'(th));
        checks++;
        if (bin[i] !== exp) begin
          failures++;
          $display("FAIL th=%0d pix=%0d got %0d", th, pix[i], bin[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
