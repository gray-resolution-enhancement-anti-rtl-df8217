// tb_gret_rotator: random feature sets with every centre direction. The
// output is compared with the step-by-step ring walk of the reference, and
// the 90-degree turns are also checked against the exact formula
// out(y, x) = in(x, -y) (offsets from the centre).
module tb_gret_rotator;
  import gret_pkg::*;
  import gret_ref_pkg::*;
  feat_t fin, fout;
  int checks = 0, failures = 0;
  gret_rotator dut (.fin, .fout);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 360; t++) begin
      rfeat_t f, o;
      automatic int cd = t % 9;
      f.pix = new[81]; f.dir = new[49]; f.amp = new[49];
      for (int i = 0; i < 81; i++) begin fin.pix[i] = 1'($urandom); f.pix[i] = int'(fin.pix[i]); end
      for (int i = 0; i < 49; i++) begin
        fin.dir[i] = 4'($urandom % 9);
        fin.amp[i] = 4'($urandom % 9);
      end
      fin.dir[24] = 4'(cd);
      for (int i = 0; i < 49; i++) begin f.dir[i] = int'(fin.dir[i]); f.amp[i] = int'(fin.amp[i]); end
      #1;
      o = ref_rotate(f);
      for (int i = 0; i < 81; i++) begin
        checks++;
        if (int'(fout.pix[i]) != o.pix[i]) begin
          failures++;
          $display("FAIL t=%0d pix %0d", t, i);
        end
      end
      for (int i = 0; i < 49; i++) begin
        checks++;
        if (int'(fout.dir[i]) != o.dir[i] || int'(fout.amp[i]) != o.amp[i]) begin
          failures++;
          $display("FAIL t=%0d grad %0d got %0d/%0d exp %0d/%0d", t, i, fout.dir[i], fout.amp[i], o.dir[i], o.amp[i]);
        end
      end
      checks++;
      if (cd != 0 && fout.dir[24] != 4'(DIR_N)) begin
        failures++;
        $display("FAIL centre direction not north after turn");
      end
      if (cd == 3) // east: 90 degrees
        for (int y = -4; y <= 4; y++)
          for (int x = -4; x <= 4; x++) begin
            checks++;
            if (fout.pix[(y+4)*9 + x+4] !== fin.pix[(x+4)*9 + (-y)+4]) failures++;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
