// tb_siso_decoder: decodes one sub-block of the constituent code on its own.
// Random information bits are encoded by the LTE recursive systematic
// encoder from state 0, punctured to rate kappa/(kappa+1) (the last parity
// bit of every kappa bits is kept), and turned into bit metrics
// [sign; 64 * -ln tanh(|L|/2)] in the stream order the decoder expects:
// windows ascending, the stages of each window descending.
//   * Clean inputs (|L| = 4): every extrinsic LLR of the first
//     nwin*W - 2 stages must have the sign of its bit (the code alone
//     recovers each bit from its neighbours; the block end is left open).
//   * Noisy inputs: the decisions channel + extrinsic must have fewer
//     errors than the channel alone.
//   * The pass-through sums must come out in input order.
//   * Timing: the first output 2W + 2 clock edges after the edge that takes
//     the first input (2W + 3 cycles counting both), one
//     output per cycle, nwin*W outputs, out_last on the last one.
// Modes kappa = 1, 4 and 16.
module tb_siso_decoder;
  import turbo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  kap_t       kap = '0;
  logic [7:0] nwin = '0;
  logic [5:0] wlen = '0;
  pm_t        alpha_init [NS];
  pm_t        beta_end   [NS];
  logic       in_valid = 0;
  gm_t        in_g  [NG];
  lsum_t      in_ls [KB];
  logic       out_valid, out_last, busy;
  ext_t       out_ext [KB];
  lsum_t      out_ls  [KB];
  pm_t        alpha_last [NS];
  siso_decoder dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic gm_t to_gm(int l8);   // LLR in units of 1/8
    real a, v;
    a = real'((l8 < 0) ? -l8 : l8) / 8.0;
    v = (a == 0.0) ? 1023.0 : 64.0 * $ln((1.0 + $exp(-a)) / (1.0 - $exp(-a)));
    if (v > 1023.0) v = 1023.0;
    if (v < 1.0) v = 1.0;
    return '{s: (l8 < 0), m: GMW'(int'(v))};
  endfunction

  int  lsys [2048];
  int  lpar [512];
  bit  u [2048];

  task automatic run(int kl, int nw, real sigma);
    int kn, w, nst, nbits, first_in, first_out, nout, raw_err, dec_err, sign_err, cyc;
    bit [2:0] s;
    kn = 1 << kl;
    w = (kl <= 1) ? 32 : (kl == 2) ? 16 : 8;
    nst = nw * w;
    nbits = nst * kn;
    kap = kap_t'(kl); nwin = 8'(nw); wlen = 6'(w);
    s = '0;
    raw_err = 0;
    for (int i = 0; i < nbits; i++) begin
      bit a, p;
      u[i] = bit'($urandom_range(0, 1));
      a = u[i] ^ s[1] ^ s[2];
      p = a ^ s[0] ^ s[2];
      s = {s[1], s[0], a};
      if (sigma == 0.0) lsys[i] = u[i] ? -32 : 32;
      else begin
        lsys[i] = int'(((u[i] ? -1.0 : 1.0) * 2.0 / (sigma * sigma) + gauss() * 2.0 / sigma) * 8.0);
        if (lsys[i] > 31) lsys[i] = 31;
        if (lsys[i] < -32) lsys[i] = -32;
      end
      if ((lsys[i] < 0) != u[i]) raw_err++;
      if (i % kn == kn - 1) begin
        if (sigma == 0.0) lpar[i / kn] = p ? -32 : 32;
        else begin
          lpar[i / kn] = int'(((p ? -1.0 : 1.0) * 2.0 / (sigma * sigma) + gauss() * 2.0 / sigma) * 8.0);
          if (lpar[i / kn] > 31) lpar[i / kn] = 31;
          if (lpar[i / kn] < -32) lpar[i / kn] = -32;
        end
      end
    end
    first_in = -1; first_out = -1; nout = 0; dec_err = 0; sign_err = 0; cyc = 0;
    fork
      begin   // stimulus
        for (int n = 0; n < nst; n++) begin
          int st;
          st = (n / w) * w + w - 1 - (n % w);
          @(negedge clk);
          in_valid = 1;
          for (int j = 0; j < KB; j++) begin
            int l;
            l = (j < kn) ? lsys[st * kn + j] : 32;
            in_g[j] = to_gm(l);
            in_ls[j] = lsum_t'(l);
          end
          in_g[KB] = to_gm(lpar[st]);
        end
        @(negedge clk) in_valid = 0;
      end
      begin   // monitor
        while (nout < nst && cyc < 10 * nst + 200) begin
          @(posedge clk);
          #1;
          cyc++;
          if (in_valid && first_in < 0) first_in = cyc;
          if (out_valid) begin
            int st;
            st = (nout / w) * w + w - 1 - (nout % w);
            if (first_out < 0) first_out = cyc;
            check(cyc - first_out == nout, $sformatf("kappa=%0d output %0d late", kn, nout));
            check(out_last == (nout == nst - 1), $sformatf("kappa=%0d out_last at output %0d", kn, nout));
            for (int j = 0; j < kn; j++) begin
              int b;
              b = st * kn + j;
              check(int'(out_ls[j]) == lsys[b], $sformatf("kappa=%0d stage %0d lane %0d: pass-through", kn, st, j));
              if (sigma == 0.0 && st < nst - 2 && ((out_ext[j] < 0) != u[b] || out_ext[j] == 0)) sign_err++;
              if ((int'(out_ls[j]) + int'(out_ext[j]) < 0) != u[b]) dec_err++;
            end
            nout++;
          end
        end
      end
    join
    check(nout == nst, $sformatf("kappa=%0d: %0d outputs, expected %0d", kn, nout, nst));
    check(first_out - first_in == 2 * w + 2,
          $sformatf("kappa=%0d: latency %0d, expected %0d", kn, first_out - first_in, 2 * w + 2));
    if (sigma == 0.0)
      check(sign_err == 0, $sformatf("kappa=%0d clean input: %0d extrinsic signs wrong", kn, sign_err));
    else
      check(dec_err < raw_err, $sformatf("kappa=%0d sigma=%0.2f: %0d errors after, %0d before", kn, sigma, dec_err, raw_err));
    $display("kappa=%0d sigma=%0.2f raw=%0d decoded=%0d sign errors=%0d", kn, sigma, raw_err, dec_err, sign_err);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      alpha_init[s] = '{s: 1'b0, m: '0};                          // known start state
      beta_end[s]   = '{s: 1'b0, m: (s == 0) ? '0 : PM_BIG};      // open end
    end
    for (int j = 0; j < NG; j++) in_g[j] = '0;
    for (int j = 0; j < KB; j++) in_ls[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 4, 0.0);
    run(0, 4, 0.7);
    run(2, 4, 0.0);
    run(2, 4, 0.6);
    run(4, 6, 0.0);
    run(4, 6, 0.45);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
