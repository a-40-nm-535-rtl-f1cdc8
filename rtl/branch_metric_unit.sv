// branch_metric_unit: the gamma unit.  For every one of the 16 branches of a
// reciprocal-dual-trellis stage it multiplies (sign-magnitude sum*) the bit
// metrics g_j whose label bit b_j is 1; a label bit of 0 contributes the
// value 1 (sign +, magnitude 0), which is what the per-input multiplexers of
// the specification's SMM chain select.  Inputs: the KB systematic bit
// metrics and the parity bit metric of one stage (g[KB] is the parity), and
// the code-rate mode kap = log2(kappa).  Output: gamma for branch {s, x}.
// The branch labels come from turbo_pkg::TR_LABEL.  Combinational.
module branch_metric_unit
  import turbo_pkg::*;
(
  input  kap_t kap,
  input  gm_t  g     [NG],
  output pm_t  gamma [NBR]
);
  always_comb begin
    for (int b = 0; b < NBR; b++) begin
      logic [KB:0] lbl;
      pm_t         acc;
      lbl = TR_LABEL[(kap > 3'd4) ? 4 : int'(kap)][b];
      acc = '{s: 1'b0, m: '0};
      for (int j = 0; j < NG; j++)
        if (lbl[j]) acc = smm(acc, gm2pm(g[j]));
      gamma[b] = acc;
    end
  end
endmodule
