// tb_turbo_decoder: end-to-end test of the turbo decoder at a reduced block
// size (K = 512, LTE QPP coefficients f1 = 31, f2 = 64).  For every code
// rate (kappa = 1, 2, 4, 8, 16) it draws random information bits, encodes
// them with two LTE recursive systematic encoders (natural and QPP order),
// punctures the parity to rate kappa/(kappa+1) per constituent code,
// sends BPSK over an AWGN channel, quantises the LLRs to 3.3 fixed point,
// loads them, decodes with 6 iterations and compares the decisions with the
// information bits.  The decoded block must be error-free while the raw
// channel decisions are not, so the iterations must actually correct bits.
// Also checked: the cycle count of every half-iteration
// (K/(2*kappa) + 2W plus a small fixed overhead), that no memory bank is
// ever double-booked, and that each mechanism occurred: every mode, the
// interleaved half-iteration, the alpha-bar hand-over between the SISOs, and
// simultaneous a priori reads and extrinsic write-backs.
module tb_turbo_decoder;
  import turbo_pkg::*;
  localparam int K  = 512;
  localparam int AW = $clog2(K);
  localparam int F1 = 31;
  localparam int F2 = 64;
  localparam int NIT = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  kap_t          kap;
  logic [AW-1:0] f1 = AW'(F1), f2 = AW'(F2);
  logic [3:0]    n_iter = 4'(NIT);
  logic          sys_we = 0, par_we = 0, par_wsel = 0, start = 0;
  logic [AW-1:0] sys_waddr = '0, par_wstage = '0;
  llr_t          sys_wdata = '0, par_wdata = '0;
  logic          busy, done, conflict;
  logic [4:0]    half_iter;
  logic [$clog2(K/KB)-1:0] out_word = '0;
  logic [KB-1:0] out_bits;

  turbo_decoder #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  int n_modes = 0, n_abar = 0, n_rw_overlap = 0, n_interleaved = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) begin
    if (dut.addr_valid && dut.s1_valid) n_rw_overlap++;
    if (dut.gen_start && dut.abar_ok[dut.il]) n_abar++;
    if (dut.gen_start && dut.il) n_interleaved++;
  end

  function automatic int qpp(int x);
    return int'((longint'(F1) * x + longint'(F2) * x * x) % K);
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic llr_t quant(real l);
    int q;
    q = int'(l * 8.0);
    if (q > 31) q = 31;
    if (q < -32) q = -32;
    return llr_t'(q);
  endfunction

  bit u [K];
  bit v [K];
  bit p1 [K];
  bit p2 [K];

  task automatic rsc(input bit in [K], output bit par [K]);
    bit [2:0] s;   // s[0] = a(k-1), s[1] = a(k-2), s[2] = a(k-3)
    s = '0;
    for (int k = 0; k < K; k++) begin
      bit a;
      a = in[k] ^ s[1] ^ s[2];          // 1 + D^2 + D^3 feedback
      par[k] = a ^ s[0] ^ s[2];         // 1 + D + D^3 feed-forward
      s = {s[1], s[0], a};
    end
  endtask

  task automatic run_mode(int kl, real sigma, int max_err);
    int kappa, w, t, raw_err, dec_err, cyc, t2;
    int half_cycles [$];
    kappa = 1 << kl;
    w = int'(win_len(kap_t'(kl)));
    t = K / kappa;
    t2 = t / 2;
    kap = kap_t'(kl);
    for (int i = 0; i < K; i++) u[i] = bit'($urandom_range(0, 1));
    for (int i = 0; i < K; i++) v[i] = u[qpp(i)];
    rsc(u, p1);
    rsc(v, p2);
    raw_err = 0;
    // load systematic
    for (int i = 0; i < K; i++) begin
      real l;
      l = (u[i] ? -1.0 : 1.0) * 2.0 / (sigma * sigma) +
          gauss() * 2.0 / sigma;
      @(negedge clk);
      sys_we = 1; sys_waddr = AW'(i); sys_wdata = quant(l);
      if ((sys_wdata < 0) != u[i]) raw_err++;
    end
    @(negedge clk) sys_we = 0;
    // load the surviving parity bits, one per stage
    for (int q = 0; q < 2; q++)
      for (int st = 0; st < t; st++) begin
        real l;
        bit  b;
        b = q ? p2[st * kappa + kappa - 1] : p1[st * kappa + kappa - 1];
        l = (b ? -1.0 : 1.0) * 2.0 / (sigma * sigma) + gauss() * 2.0 / sigma;
        @(negedge clk);
        par_we = 1; par_wsel = q[0]; par_wstage = AW'(st); par_wdata = quant(l);
      end
    @(negedge clk) par_we = 0;
    start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin
      logic [4:0] h;
      h = half_iter;
      @(negedge clk);
      cyc++;
      if (half_iter != h) begin
        half_cycles.push_back(cyc);
        cyc = 0;
      end
    end
    check(half_cycles.size() == 2 * NIT, $sformatf("kappa=%0d: %0d half-iterations", kappa, half_cycles.size()));
    foreach (half_cycles[i]) begin
      int lo, hi;
      lo = t2 + 2 * w;
      hi = t2 + 2 * w + 12;
      check(half_cycles[i] >= lo && half_cycles[i] <= hi,
            $sformatf("kappa=%0d half %0d took %0d cycles, expected %0d..%0d",
                      kappa, i, half_cycles[i], lo, hi));
    end
    check(!conflict, "memory bank conflict");
    dec_err = 0;
    for (int wd = 0; wd < K / KB; wd++) begin
      out_word = ($clog2(K/KB))'(wd);
      #1;
      for (int j = 0; j < KB; j++) if (out_bits[j] != u[wd * KB + j]) dec_err++;
    end
    $display("kappa=%0d sigma=%0.2f raw errors=%0d decoded errors=%0d half-iteration cycles=%0d",
             kappa, sigma, raw_err, dec_err, half_cycles[0]);
    check(dec_err <= max_err, $sformatf("kappa=%0d: %0d decoded errors", kappa, dec_err));
    check(raw_err > dec_err, $sformatf("kappa=%0d: no correction (raw %0d)", kappa, raw_err));
    n_modes++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_mode(0, 0.80, 0);
    run_mode(1, 0.70, 0);
    run_mode(2, 0.60, 0);
    run_mode(3, 0.50, 0);
    run_mode(4, 0.45, 0);
    check(n_modes == 5, "all five code rates decoded");
    check(n_interleaved > 0, "interleaved half-iterations ran");
    check(n_abar > 0, "alpha-bar handed to the second SISO");
    check(n_rw_overlap > 0, "a priori reads overlapped extrinsic write-backs");
    $display("mechanisms: modes=%0d interleaved=%0d abar=%0d rw_overlap=%0d",
             n_modes, n_interleaved, n_abar, n_rw_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
