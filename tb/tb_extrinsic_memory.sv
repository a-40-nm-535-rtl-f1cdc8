// tb_extrinsic_memory: writes K extrinsic LLRs through the write bus
// (kappa successive addresses per SISO per cycle, natural or QPP order) while
// the read bus fetches other stages in the same cycles, then reads every
// address back.  Read data must appear one cycle after the request and
// match the last value written; no conflict may be flagged.
module tb_extrinsic_memory;
  import turbo_pkg::*;
  localparam int K = 4096, NL = 16, AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          rd_en = 0, wr_en = 0;
  logic [AW-1:0] rd_addr [2][NL];
  logic [AW-1:0] wr_addr [2][NL];
  logic          lane_en [NL];
  ext_t          rd_data [2][NL];
  ext_t          wr_data [2][NL];
  logic          conflict;
  extrinsic_memory dut (.*);

  ext_t model [K];
  bit   known [K];
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

  function automatic int adr(int il, int x);
    return il ? pi(x % K) : x % K;
  endfunction

  task automatic run(int kl, int il);
    int kn, t2;
    kn = 1 << kl;
    t2 = K / 2 / kn;
    for (int j = 0; j < NL; j++) lane_en[j] = (j < kn);
    for (int st = 0; st < t2; st++) begin
      int rs;
      rs = (st + t2 / 2) % t2;          // some other stage is read meanwhile
      @(negedge clk);
      wr_en = 1; rd_en = 1;
      for (int j = 0; j < NL; j++) begin
        wr_addr[0][j] = AW'(adr(il, kn * st + j));
        wr_addr[1][j] = AW'((adr(il, kn * st + j) + K / 2) % K);
        rd_addr[0][j] = AW'(adr(il, kn * rs + j));
        rd_addr[1][j] = AW'((adr(il, kn * rs + j) + K / 2) % K);
        wr_data[0][j] = ext_t'($urandom);
        wr_data[1][j] = ext_t'($urandom);
      end
      @(posedge clk);
      #1;
      wr_en = 0; rd_en = 0;
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < kn; j++) begin
          if (known[rd_addr[s][j]])
            check(rd_data[s][j] == model[rd_addr[s][j]],
                  $sformatf("kappa=%0d read during write, address %0d", kn, rd_addr[s][j]));
        end
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < kn; j++) begin
          model[wr_addr[s][j]] = wr_data[s][j];
          known[wr_addr[s][j]] = 1;
        end
      check(!conflict, "conflict flagged");
    end
    // read everything back
    for (int st = 0; st < t2; st++) begin
      @(negedge clk);
      rd_en = 1;
      for (int j = 0; j < NL; j++) begin
        rd_addr[0][j] = AW'(kn * st + j);
        rd_addr[1][j] = AW'(kn * st + j + K / 2);
      end
      @(posedge clk);
      #1;
      rd_en = 0;
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < kn; j++)
          check(rd_data[s][j] == model[rd_addr[s][j]],
                $sformatf("kappa=%0d address %0d: %0d, expected %0d", kn, rd_addr[s][j],
                          rd_data[s][j], model[rd_addr[s][j]]));
    end
  endtask

  initial begin
    for (int j = 0; j < NL; j++) begin
      rd_addr[0][j] = '0; rd_addr[1][j] = '0; wr_addr[0][j] = '0; wr_addr[1][j] = '0;
      wr_data[0][j] = '0; wr_data[1][j] = '0; lane_en[j] = 1'b0;
    end
    for (int a = 0; a < K; a++) known[a] = 0;
    repeat (2) @(negedge clk);
    run(0, 1);
    run(4, 0);
    run(3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
