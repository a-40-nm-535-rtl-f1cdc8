// tb_input_memory: loads a random codeword (K systematic LLRs, K/kappa
// parity-1 and parity-2 LLRs) through the load port, then reads it back
// the way the decoder does: per cycle kappa successive addresses for SISO 1
// (natural or QPP order) and the same plus K/2 for SISO 2, together with the
// parity of the current stage for both halves.  Data must appear one cycle
// after the request and match what was loaded; no conflict may be flagged.
// Modes kappa = 1, 4 and 16.
module tb_input_memory;
  import turbo_pkg::*;
  localparam int K = 4096, NL = 16, AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  kap_t          kap = '0;
  logic          sys_we = 0, par_we = 0, par_wsel = 0, rd_en = 0, rd_psel = 0;
  logic [AW-1:0] sys_waddr = '0, par_wstage = '0, rd_stage = '0;
  llr_t          sys_wdata = '0, par_wdata = '0;
  logic [AW-1:0] rd_addr [2][NL];
  logic          rd_lane_en [NL];
  llr_t          sys_rdata [2][NL];
  llr_t          par_rdata [2];
  logic          conflict;
  input_memory dut (.*);

  llr_t sys_m [K];
  llr_t par_m [2][K];
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

  function automatic int pi(int x);
    return int'((longint'(31) * x + longint'(64) * x * x) % K);
  endfunction

  task automatic run(int kl, int il, int psel);
    int kn, t;
    kn = 1 << kl;
    t = K / kn;
    kap = kap_t'(kl);
    for (int a = 0; a < K; a++) begin
      @(negedge clk);
      sys_we = 1; sys_waddr = AW'(a); sys_wdata = llr_t'($urandom); sys_m[a] = sys_wdata;
    end
    @(negedge clk) sys_we = 0;
    for (int q = 0; q < 2; q++)
      for (int s = 0; s < t; s++) begin
        @(negedge clk);
        par_we = 1; par_wsel = q[0]; par_wstage = AW'(s); par_wdata = llr_t'($urandom);
        par_m[q][s] = par_wdata;
      end
    @(negedge clk) par_we = 0;
    for (int j = 0; j < NL; j++) rd_lane_en[j] = (j < kn);
    for (int n = 0; n < 300; n++) begin
      int st;
      st = $urandom_range(0, t / 2 - 1);
      @(negedge clk);
      rd_en = 1; rd_psel = psel[0]; rd_stage = AW'(st);
      for (int j = 0; j < NL; j++) begin
        int a;
        a = il ? pi((kn * st + j) % K) : (kn * st + j) % K;
        rd_addr[0][j] = AW'(a);
        rd_addr[1][j] = AW'((a + K / 2) % K);
      end
      @(negedge clk);
      rd_en = 0;
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < kn; j++)
          check(sys_rdata[s][j] == sys_m[rd_addr[s][j]],
                $sformatf("kappa=%0d SISO %0d lane %0d address %0d: %0d, expected %0d",
                          kn, s, j, rd_addr[s][j], sys_rdata[s][j], sys_m[rd_addr[s][j]]));
      check(par_rdata[0] == par_m[psel][st] && par_rdata[1] == par_m[psel][st + t / 2],
            $sformatf("kappa=%0d parity %0d stage %0d", kn, psel + 1, st));
      check(!conflict, "conflict flagged");
    end
  endtask

  initial begin
    for (int j = 0; j < NL; j++) begin
      rd_addr[0][j] = '0; rd_addr[1][j] = '0; rd_lane_en[j] = 1'b0;
    end
    repeat (2) @(negedge clk);
    run(0, 1, 1);
    run(2, 0, 0);
    run(4, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
