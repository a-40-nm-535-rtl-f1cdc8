// tb_qpp_addr_gen: checks the recursive QPP address generator.
// Part 1 uses a small interleaver (K = 192, f1 = 23, f2 = 48, kappa = 8,
// W = 4): the addresses must match pi(x) = (f1*x + f2*x^2) mod K computed
// directly, and several entries of the published example table
// (e.g. stage 1 lane 0 = 184, stage 0 lane 1 = 71, stage 2 lane 7 = 1).
// Part 2 uses the default size (K = 4096, f1 = 31, f2 = 64) in every mode
// with its window length, interleaved and natural order, over the first
// sub-block (K/(2*kappa) stages).  In both, the stages must come window by
// window (ascending) and in descending order inside each window, one per
// step.
module tb_qpp_addr_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // small instance
  localparam int KS = 192, AS = 8;
  logic [2:0]    kap_s = 3'd3;
  logic [5:0]    wlen_s = 6'd4;
  logic          il_s = 1'b1, start_s = 0, step_s = 0;
  logic [AS-1:0] addr_s [16];
  logic [AS-1:0] stage_s;
  qpp_addr_gen #(.K(KS), .NL(16)) dut_s (
    .clk, .rst_n, .kap(kap_s), .wlen(wlen_s), .interleave(il_s), .f1(AS'(23)), .f2(AS'(48)),
    .start(start_s), .step(step_s), .addr(addr_s), .stage(stage_s));

  // default-size instance
  localparam int KL = 4096, AL = 12;
  logic [2:0]    kap = '0;
  logic [5:0]    wlen = '0;
  logic          il = 0, start = 0, step = 0;
  logic [AL-1:0] addr [16];
  logic [AL-1:0] stage;
  qpp_addr_gen dut (
    .clk, .rst_n, .kap, .wlen, .interleave(il), .f1(AL'(31)), .f2(AL'(64)),
    .start, .step, .addr, .stage);

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

  function automatic int pi(int x, int k, int f1, int f2);
    return int'((longint'(f1) * x + longint'(f2) * x * x) % k);
  endfunction

  // a few cells of the published example table: {stage, lane, address}
  int tab [8][3] = '{'{1, 0, 184}, '{11, 0, 104}, '{0, 1, 71}, '{9, 1, 191},
                     '{0, 2, 46}, '{6, 2, 190}, '{2, 7, 1}, '{11, 3, 29}};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // part 1
    @(negedge clk) start_s = 1;
    @(negedge clk) start_s = 0;
    for (int n = 0; n < 12; n++) begin
      int exp_stage;
      exp_stage = (n / 4) * 4 + 3 - (n % 4);
      step_s = 1;
      @(negedge clk);
      step_s = 0;
      check(int'(stage_s) == exp_stage, $sformatf("K=192 step %0d: stage %0d, expected %0d", n, stage_s, exp_stage));
      for (int j = 0; j < 8; j++)
        check(int'(addr_s[j]) == pi(8 * exp_stage + j, KS, 23, 48),
              $sformatf("K=192 stage %0d lane %0d: %0d", exp_stage, j, addr_s[j]));
      foreach (tab[t])
        if (tab[t][0] == exp_stage)
          check(int'(addr_s[tab[t][1]]) == tab[t][2],
                $sformatf("table cell stage %0d lane %0d: %0d, expected %0d",
                          tab[t][0], tab[t][1], addr_s[tab[t][1]], tab[t][2]));
    end
    // part 2
    for (int kl = 0; kl < 5; kl++)
      for (int inter = 0; inter < 2; inter++) begin
        int w, t2, kn;
        kn = 1 << kl;
        w = (kl <= 1) ? 32 : (kl == 2) ? 16 : 8;
        t2 = KL / 2 / kn;
        @(negedge clk);
        kap = 3'(kl); wlen = 6'(w); il = inter[0]; start = 1;
        @(negedge clk) start = 0;
        for (int n = 0; n < t2; n++) begin
          int es;
          es = (n / w) * w + w - 1 - (n % w);
          step = 1;
          @(negedge clk);
          step = 0;
          check(int'(stage) == es, $sformatf("kappa=%0d step %0d: stage %0d, expected %0d", kn, n, stage, es));
          for (int j = 0; j < kn; j++)
            check(int'(addr[j]) == (inter ? pi(kn * es + j, KL, 31, 64) : kn * es + j),
                  $sformatf("kappa=%0d il=%0d stage %0d lane %0d: %0d", kn, inter, es, j, addr[j]));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
