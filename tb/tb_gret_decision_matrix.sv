// tb_gret_decision_matrix: random feature sets against sparse random rules
// (a few cared-for pixels and directions), so that single hits, multiple
// hits resolved by priority, and misses all occur. The raw match vector and
// the sorted address are compared with the reference.
module tb_gret_decision_matrix;
  import gret_pkg::*;
  import gret_ref_pkg::*;
  localparam int NR = 16;
  feat_t              feat;
  rule_t [NR-1:0]     rl;
  logic  [NR-1:0]     match;
  logic               hit;
  logic  [3:0]        addr;
  int checks = 0, failures = 0, n_multi = 0, n_miss = 0;
  gret_decision_matrix #(.NRULES(NR)) dut (.feat, .rules(rl), .match, .hit, .addr);
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 600; t++) begin
      rfeat_t f;
      automatic int first = -1, n = 0;
      if (t % 50 == 0)
        for (int r = 0; r < NR; r++) begin
          rl[r] = '0;
          rl[r].en = ($urandom % 8) != 0;
          for (int c = 0; c < 1 + r % 3; c++) begin
            automatic int p = $urandom % 81;
            rl[r].pix_care[p] = 1; rl[r].pix_val[p] = 1'($urandom);
          end
          if (r % 4 == 0) begin
            automatic int p = $urandom % 49;
            rl[r].dir_care[p] = 1; rl[r].dir_val[p] = 4'($urandom % 3);
          end
          rl[r].amp_min = 4'($urandom % 4);
        end
      f.pix = new[81]; f.dir = new[49]; f.amp = new[49];
      for (int i = 0; i < 81; i++) begin feat.pix[i] = 1'($urandom); f.pix[i] = int'(feat.pix[i]); end
      for (int i = 0; i < 49; i++) begin
        feat.dir[i] = 4'($urandom % 3); f.dir[i] = int'(feat.dir[i]);
        feat.amp[i] = 4'($urandom % 6); f.amp[i] = int'(feat.amp[i]);
      end
      #1;
      for (int r = 0; r < NR; r++) begin
        automatic bit m = ref_match(rl[r], f);
        checks++;
        if (match[r] !== m) begin
          failures++;
          $display("FAIL t=%0d rule %0d match %0d exp %0d", t, r, match[r], m);
        end
        if (m) begin n++; if (first < 0) first = r; end
      end
      checks++;
      if (hit !== (n > 0) || (n > 0 && int'(addr) != first)) begin
        failures++;
        $display("FAIL t=%0d hit %0d addr %0d exp %0d", t, hit, addr, first);
      end
      if (n > 1) n_multi++;
      if (n == 0) n_miss++;
    end
    checks++;
    if (n_multi == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL coverage: multi %0d miss %0d", n_multi, n_miss);
    end
    $display("multiple hits %0d, misses %0d", n_multi, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
