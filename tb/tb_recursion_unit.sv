// tb_recursion_unit: checks one forward and one backward recursion step in
// every code-rate mode against real arithmetic on a trellis the testbench
// derives itself.  Metrics are sign-magnitude numbers (-1)^s * e^(-m/64):
//   forward  a'(z) = sum over branches (s,x) entering z of a(s) * gamma(s,x)
//   backward b'(s) = sum over x of gamma(s,x) * b(next(s,x))
// Each output must match to within 2 % of the sum of its two terms' sizes,
// and carry the right sign where the sum is not nearly cancelled.
module tb_recursion_unit;
  import turbo_pkg::*;
  kap_t kap;
  pm_t  m_in [NS];
  pm_t  gamma [NBR];
  pm_t  fwd [NS];
  pm_t  bwd [NS];
  recursion_unit #(.BACKWARD(1'b0)) dut_f (.kap, .m_in, .gamma, .m_out(fwd));
  recursion_unit #(.BACKWARD(1'b1)) dut_b (.kap, .m_in, .gamma, .m_out(bwd));

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next state of branch b = {x2, x1, x0, input} for kappa = 2^kl
  function automatic int next_state(int kl, int b);
    bit x [0:19];
    int kn;
    kn = 1 << kl;
    x[0] = b[1]; x[1] = b[2]; x[2] = b[3];
    for (int m = 0; m < kn; m++)
      x[m + 3] = (m == kn - 1) ? b[0] : (x[m] ^ x[m + 2]);
    return 4 * x[kn + 2] + 2 * x[kn + 1] + x[kn];
  endfunction

  function automatic real val(pm_t a, int base);
    return (a.s ? -1.0 : 1.0) * $exp(-real'(signed'(PMW'(a.m - PMW'(base)))) / 64.0);
  endfunction

  task automatic cmp(pm_t got, real r, real tot, int base, string what);
    real e;
    e = val(got, base) - r;
    checks++;
    if (e > 0.02 * tot || e < -0.02 * tot) begin
      failures++;
      if (failures < 10) $display("FAIL: %s: got %f expected %f", what, val(got, base), r);
    end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int kl, base;
      real rf [NS], tf [NS], rb [NS], tb [NS];
      kl = n % 5;
      kap = kap_t'(kl);
      base = $urandom_range(0, 200000);
      for (int s = 0; s < NS; s++) begin
        m_in[s].s = (n % 2) ? 1'(($urandom)) : 1'b0;
        m_in[s].m = PMW'(base + $urandom_range(0, 300));
      end
      for (int b = 0; b < NBR; b++) begin
        gamma[b].s = (n % 2) ? 1'(($urandom)) : 1'b0;
        gamma[b].m = PMW'($urandom_range(0, 300));
      end
      for (int s = 0; s < NS; s++) begin rf[s] = 0; tf[s] = 0; rb[s] = 0; tb[s] = 0; end
      for (int b = 0; b < NBR; b++) begin
        int z;
        real t;
        z = next_state(kl, b);
        t = val(m_in[b >> 1], base) * val(gamma[b], 0);
        rf[z] += t;
        tf[z] += (t < 0) ? -t : t;
        t = val(gamma[b], 0) * val(m_in[z], base);
        rb[b >> 1] += t;
        tb[b >> 1] += (t < 0) ? -t : t;
      end
      #1;
      for (int s = 0; s < NS; s++) begin
        cmp(fwd[s], rf[s], tf[s], base, $sformatf("kappa=%0d forward state %0d", 1 << kl, s));
        cmp(bwd[s], rb[s], tb[s], base, $sformatf("kappa=%0d backward state %0d", 1 << kl, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
