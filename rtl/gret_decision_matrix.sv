// gret_decision_matrix: the rule-based decision matrix of GRET with priority
// sorting. All NRULES rules are evaluated at once on the rotated window; a
// rule matches when it is enabled, every pixel it cares about has the
// template value, every direction it cares about has the template direction,
// and the centre amplitude reaches its minimum. Several rules may match the
// same pixel: the priority sorter passes on the matching rule with the
// lowest index as the enhanced-data address. Combinational.
// Parallel rules and the priority resolution follow the method; the rule
// format (masked templates in a writable table) and "lowest index wins" are
// this design's choice, as the method does not publish its rules.
module gret_decision_matrix
  import gret_pkg::*;
#(
  parameter int NRULES = 16,
  localparam int AW = (NRULES > 1) ? $clog2(NRULES) : 1
) (
  input  feat_t                   feat,
  input  rule_t [NRULES-1:0]      rules,
  output logic  [NRULES-1:0]      match,   // raw hits, before sorting
  output logic                    hit,
  output logic  [AW-1:0]          addr
);
  for (genvar i = 0; i < NRULES; i++) begin : g_rule
    logic dir_ok;
    always_comb begin
      dir_ok = 1'b1;
      for (int j = 0; j < NGRAD; j++)
        if (rules[i].dir_care[j] && feat.dir[j] != rules[i].dir_val[j])
          dir_ok = 1'b0;
      match[i] = rules[i].en
               && (((feat.pix ^ rules[i].pix_val) & rules[i].pix_care) == '0)
               && dir_ok
               && (feat.amp[CGRAD] >= rules[i].amp_min);
    end
  end

  always_comb begin
    hit  = 1'b0;
    addr = '0;
    for (int i = NRULES-1; i >= 0; i--)
      if (match[i]) begin
        hit  = 1'b1;
        addr = AW'(i);
      end
  end
endmodule
