// recursion_unit: one step of the forward (alpha) or backward (beta, dummy
// beta_d) recursion over the 8-state reciprocal dual trellis.
//   forward  (BACKWARD=0): a_t(z)   = min*_{(s,x)->z} sum*(a_{t-1}(s), gamma(s,x))
//   backward (BACKWARD=1): b_{t-1}(s) = min*_x sum*(gamma(s,x), b_t(next(s,x)))
// Each state uses two SMM (sign-magnitude multiply) and one SMA (min*) unit,
// the recursion metric unit of the specification; the caller holds the
// metrics in a register, so the SMM->SMA path is the feedback loop.  No
// explicit normalisation is needed because the magnitudes are modulo numbers.
// Combinational; trellis connections come from turbo_pkg.
module recursion_unit
  import turbo_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  kap_t kap,
  input  pm_t  m_in  [NS],
  input  pm_t  gamma [NBR],
  output pm_t  m_out [NS]
);
  pm_t xin [NS];
  pm_t yin [NS];
  int  km;

  always_comb begin
    km = (kap > 3'd4) ? 4 : int'(kap);
    for (int s = 0; s < NS; s++) begin
      if (BACKWARD) begin
        xin[s] = smm(gamma[2*s],   m_in[TR_NEXT[km][2*s]]);
        yin[s] = smm(gamma[2*s+1], m_in[TR_NEXT[km][2*s+1]]);
      end else begin
        xin[s] = smm(m_in[TR_PRED[km][s][0] >> 1], gamma[TR_PRED[km][s][0]]);
        yin[s] = smm(m_in[TR_PRED[km][s][1] >> 1], gamma[TR_PRED[km][s][1]]);
      end
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_sma
    sma_unit u_sma (.x(xin[s]), .y(yin[s]), .z(m_out[s]));
  end
endmodule
