// tb_extrinsic_unit: checks the extrinsic LLR unit against the dual-code
// formula in real arithmetic.  From random branch metrics
// pathm(b) = (-1)^s e^(-m/64) it forms Q0 and Q1, the sums over branches
// whose label bit (lane 0, and lane 15 at kappa = 16) is 0 and 1, then
// U = (Q1/g)/Q0 and L = sign(U) * rho * 8 * -ln tanh(|ln|U|| / 2), rho = 0.75
// for kappa <= 2 and 0.875 above, the LUT value saturated at 63 (units of
// 1/8).  Because
// that function is steep near |U| = 1, the output may lie anywhere between
// the values for |ln|U|| +- 3/64, plus one unit.  Operands whose Q0 or Q1 is
// nearly cancelled are skipped.  The result must appear two cycles after the
// inputs.
module tb_extrinsic_unit;
  import turbo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  kap_t kap;
  pm_t  pathm [NBR];
  gm_t  g_in;
  ext_t ext0, ext15;
  extrinsic_unit #(.LANE(0))  dut0  (.clk, .kap, .pathm, .g_in, .ext_out(ext0));
  extrinsic_unit #(.LANE(15)) dut15 (.clk, .kap, .pathm, .g_in, .ext_out(ext15));

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [KB:0] label(int kl, int b);
    bit x [0:19];
    logic [KB:0] l;
    int kn;
    kn = 1 << kl;
    x[0] = b[1]; x[1] = b[2]; x[2] = b[3];
    l = '0;
    for (int m = 0; m < kn; m++) begin
      x[m + 3] = (m == kn - 1) ? b[0] : (x[m] ^ x[m + 2]);
      l[m] = x[m] ^ x[m + 1] ^ x[m + 3];
    end
    return l;
  endfunction

  function automatic real val(logic s, int m);
    return (s ? -1.0 : 1.0) * $exp(-real'(m) / 64.0);
  endfunction

  function automatic int lx(real d, real rho);   // extrinsic magnitude
    real v;
    if (d <= 0.0) return int'(rho * 63.0);
    v = d / 64.0;
    v = 8.0 * $ln((1.0 + $exp(-v)) / (1.0 - $exp(-v)));
    if (v > 63.0) v = 63.0;
    return int'(rho * v);
  endfunction

  task automatic check_lane(int kl, int lane, ext_t got);
    real q0, q1, t0, t1, u, d, rho;
    int  lo, hi, mag;
    q0 = 0; q1 = 0; t0 = 0; t1 = 0;
    for (int b = 0; b < NBR; b++) begin
      real v;
      v = val(pathm[b].s, int'(pathm[b].m));
      if (label(kl, b)[lane]) begin q1 += v; t1 += (v < 0) ? -v : v; end
      else                    begin q0 += v; t0 += (v < 0) ? -v : v; end
    end
    if ((q0 < 0 ? -q0 : q0) < 0.2 * t0 || (q1 < 0 ? -q1 : q1) < 0.2 * t1) return;
    u = (q1 / val(g_in.s, int'(g_in.m))) / q0;
    d = $ln(u < 0 ? -u : u) * 64.0;
    if (d < 0) d = -d;
    rho = (kl <= 1) ? 0.75 : 0.875;
    lo = lx(d + 3.0, rho) - 2;
    hi = lx(d - 3.0, rho) + 2;
    mag = (got < 0) ? -int'(got) : int'(got);
    checks++;
    if (mag < lo || mag > hi || (mag != 0 && ((got < 0) != (u < 0)))) begin
      failures++;
      if (failures < 10) $display("FAIL: kappa=%0d lane %0d: got %0d, expected %s%0d..%0d",
                                  1 << kl, lane, got, (u < 0) ? "-" : "+", lo, hi);
    end
  endtask

  initial begin
    int latency;
    kap = '0;
    g_in = '0;
    for (int b = 0; b < NBR; b++) pathm[b] = '0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int kl;
      kl = n % 5;
      @(negedge clk);
      kap = kap_t'(kl);
      for (int b = 0; b < NBR; b++) begin
        pathm[b].s = (n % 3 == 0) ? 1'b0 : 1'(($urandom));
        pathm[b].m = PMW'($urandom_range(0, 400));
      end
      g_in.s = 1'(($urandom));
      g_in.m = GMW'($urandom_range(0, 300));
      @(posedge clk);
      @(posedge clk);
      #1;
      check_lane(kl, 0, ext0);
      if (kl == 4) check_lane(kl, 15, ext15);
    end
    // latency: the output changes exactly two edges after the inputs
    @(negedge clk);
    kap = 3'd4;
    for (int b = 0; b < NBR; b++) pathm[b] = '{s: 1'b0, m: (label(4, b)[0]) ? PMW'(40) : PMW'(0)};
    g_in = '{s: 1'b0, m: '0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    g_in = '{s: 1'b1, m: '0};    // flips the sign of U
    latency = 0;
    @(posedge clk);
    #1;
    while (ext0 >= 0 && latency < 10) begin
      latency++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (latency != 1) begin   // first edge samples, second edge drives
      failures++;
      $display("FAIL: latency %0d, expected 2 clock edges", latency + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
