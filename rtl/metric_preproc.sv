// metric_preproc: turns the soft inputs of one trellis stage into bit
// metrics in sign-magnitude form.  For each systematic lane it adds the
// channel LLR and the a priori (extrinsic) LLR of the other half-iteration
// (the a priori is ignored while use_apr = 0, i.e. in the first
// half-iteration) and maps L to g = [sign(L); -ln tanh(|L|/2)] with LUT_0;
// the parity LLR goes through LUT_0 alone.  The sum L is also passed on for
// the hard decision.  Sign bit 1 means negative; LUT_0 saturates at 63.
// One register stage: outputs follow the inputs by one cycle.
module metric_preproc
  import turbo_pkg::*;
(
  input  logic  clk,
  input  logic  in_valid,
  input  logic  use_apr,
  input  llr_t  sys [KB],
  input  ext_t  apr [KB],
  input  llr_t  par,
  output logic  out_valid,
  output gm_t   g  [NG],
  output lsum_t ls [KB]
);
  lsum_t l   [KB];
  gm_t   g_c [NG];

  function automatic gm_t to_gm(lsum_t v);
    logic [LSUMW-1:0] a;
    a = v[LSUMW-1] ? LSUMW'(-v) : LSUMW'(v);
    return '{s: v[LSUMW-1], m: lut0g(a)};
  endfunction

  always_comb begin
    for (int j = 0; j < KB; j++) begin
      l[j]   = LSUMW'(sys[j]) + (use_apr ? LSUMW'(apr[j]) : '0);
      g_c[j] = to_gm(l[j]);
    end
    g_c[KB] = to_gm(LSUMW'(par));
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    g         <= g_c;
    ls        <= l;
  end
endmodule
