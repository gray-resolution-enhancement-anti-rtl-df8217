// tb_gret_output_stage: loads the LUT, then drives random decisions, gray
// flags and original values; the registered output (one clock later) must be
// the LUT entry for an enhanced pixel and the original value otherwise.
module tb_gret_output_stage;
  logic clk = 0, rst_n = 0;
  logic lut_we = 0, in_valid = 0, hit = 0, gray = 0, out_valid, out_enh;
  logic [3:0] lut_idx = 0, addr = 0;
  logic [7:0] lut_val = 0, orig = 0, out;
  byte unsigned model[16];
  int checks = 0, failures = 0;
  gret_output_stage #(.PIX_W(8), .NRULES(16)) dut (.*);
  always #5 clk = !clk;
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      lut_we = 1; lut_idx = 4'(i); lut_val = 8'(17*i + 3); model[i] = 8'(17*i + 3);
    end
    @(negedge clk); lut_we = 0;
    for (int t = 0; t < 400; t++) begin
      byte unsigned exp;
      bit e;
      @(negedge clk);
      in_valid = 1'($urandom); hit = 1'($urandom); gray = ($urandom % 3) == 0;
      addr = 4'($urandom); orig = 8'($urandom);
      e = hit && !gray;
      exp = e ? model[addr] : orig;
      @(negedge clk);
      checks++;
      if (out !== exp || out_valid !== in_valid || out_enh !== (e && in_valid)) begin
        failures++;
        $display("FAIL t=%0d out %0d exp %0d", t, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
