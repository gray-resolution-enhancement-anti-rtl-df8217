// tb_gret_gradient_lut: all 512 neighbourhoods against the reference, which
// finds the direction sector with an arctangent. Also counts that every one
// of the nine direction codes occurs.
module tb_gret_gradient_lut;
  import gret_pkg::*;
  import gret_ref_pkg::*;
  logic [8:0] nb;
  grad_t      g;
  int checks = 0, failures = 0;
  int seen[9];
  gret_gradient_lut dut (.nb, .g);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 512; v++) begin
      int d, a;
      nb = 9'(v);
      #1;
      ref_grad(nb, d, a);
      checks++;
      if (int'(g.dir) != d || int'(g.amp) != a) begin
        failures++;
        $display("FAIL nb=%b got dir %0d amp %0d exp dir %0d amp %0d", nb, g.dir, g.amp, d, a);
      end
      if (d >= 0 && d < 9) seen[d]++;
    end
    for (int d = 0; d < 9; d++) begin
      checks++;
      if (seen[d] == 0) begin
        failures++;
        $display("FAIL direction %0d never produced", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
