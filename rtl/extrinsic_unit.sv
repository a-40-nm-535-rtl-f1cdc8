// extrinsic_unit: computes the extrinsic LLR of systematic bit LANE of one
// trellis stage from the reciprocal dual trellis.
//   pathm[b] = alpha_{t-1}(s) * gamma_t(s,x) * beta_t(next)  for branch b={s,x}
//   Q0 = sum of pathm over branches whose label bit LANE is 0   (path metric
//   Q1 = sum of pathm over branches whose label bit LANE is 1    network +
//                                                               two hier. min)
//   U  = Q0 / (Q1 / g)          (two SMD units; g = bit metric of the lane)
//   L  = sign(U) * rho * -ln tanh(|U_M|/2)  (LUT, then rho scaling)
// L(u) = ln((1+U')/(1-U')) with U' = (Q1/g)/Q0 is the dual-code extrinsic
// formula; U has the same sign as U' and |U_M| = |U'_M|, and the LUT is
// symmetric in U_M, so either ratio gives the same result.
// rho is 0.75 for kappa <= 2 and 0.875 for kappa >= 4, applied to the LUT
// output as x - x/4 and x - x/8, which shrinks the extrinsic value.  (Scaling
// |U_M| inside the tanh instead would enlarge it, and made long blocks
// diverge in simulation.)
// Timing: pathm and g_in sampled together; ext_out is valid 2 cycles later
// (one pipeline register after the min* trees, one at the output).
module extrinsic_unit
  import turbo_pkg::*;
#(
  parameter int LANE = 0
) (
  input  logic clk,
  input  kap_t kap,
  input  pm_t  pathm [NBR],
  input  gm_t  g_in,
  output ext_t ext_out
);
  pm_t tin0 [8];
  pm_t tin1 [8];
  pm_t q0, q1;
  pm_t q0_r, q1_r;
  gm_t g_r;
  int  km;

  // Path metric network: route the branches by label bit LANE.
  always_comb begin
    km = (kap > 3'd4) ? 4 : int'(kap);
    for (int i = 0; i < 8; i++) begin
      tin0[i] = pathm[TR_SEL[km][LANE][0][i]];
      tin1[i] = pathm[TR_SEL[km][LANE][1][i]];
    end
  end

  hier_min_unit u_q0 (.in(tin0), .out(q0));
  hier_min_unit u_q1 (.in(tin1), .out(q1));

  always_ff @(posedge clk) begin
    q0_r <= q0;
    q1_r <= q1;
    g_r  <= g_in;
  end

  pm_t                   u;
  logic signed [PMW-1:0] um;
  logic [PMW-1:0]        d;
  logic [5:0]            lx, mag;

  always_comb begin
    u   = smd(q0_r, smd(q1_r, gm2pm(g_r)));
    um  = signed'(u.m);
    d   = um[PMW-1] ? PMW'(-um) : PMW'(um);
    lx  = lutx(d);
    mag = (kap <= 3'd1) ? lx - (lx >> 2) : lx - (lx >> 3);
  end

  always_ff @(posedge clk)
    ext_out <= u.s ? -EXTW'(signed'({1'b0, mag})) : EXTW'(signed'({1'b0, mag}));
endmodule
