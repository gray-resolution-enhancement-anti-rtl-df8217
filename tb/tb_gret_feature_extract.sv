// tb_gret_feature_extract: random and structured 9x9 windows; all 49
// directions and amplitudes are compared with the reference.
module tb_gret_feature_extract;
  import gret_pkg::*;
  import gret_ref_pkg::*;
  logic [80:0] pix;
  feat_t       feat;
  int checks = 0, failures = 0;
  gret_feature_extract dut (.pix, .feat);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 400; t++) begin
      rfeat_t f;
      automatic int a = $urandom % 9, b = $urandom % 9, c = $urandom % 9;
      for (int i = 0; i < 81; i++)
        case (t % 3)
          0: pix[i] = 1'($urandom);
          1: pix[i] = (a * (i / 9) + b * (i % 9)) > 8 * c;   // straight edge
          default: pix[i] = ((i / 9) - 4) * ((i / 9) - 4) + ((i % 9) - 4) * ((i % 9) - 4) < a + 3;
        endcase
      #1;
      f = ref_features(pix);
      checks++;
      if (feat.pix !== pix) failures++;
      for (int i = 0; i < 49; i++) begin
        checks++;
        if (int'(feat.dir[i]) != f.dir[i] || int'(feat.amp[i]) != f.amp[i]) begin
          failures++;
          $display("FAIL t=%0d pos %0d got %0d/%0d exp %0d/%0d", t, i,
                   feat.dir[i], feat.amp[i], f.dir[i], f.amp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
