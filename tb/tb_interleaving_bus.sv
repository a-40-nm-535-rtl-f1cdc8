// tb_interleaving_bus: checks the bank mapping and the conflict detector.
// For contention-free request sets (kappa successive QPP addresses for the
// first SISO, the same plus K/2 for the second, every mode) each enabled
// lane must get half = (a >= K/2), bank = a mod 16, and the addressed bank
// must be enabled with row (a mod K/2)/16; no conflict may be flagged.
// Then two lanes are forced onto one bank, which must be flagged.
module tb_interleaving_bus;
  localparam int K = 4096, NL = 16, AW = 12, RW = 7, BW = 4;
  logic [AW-1:0] req_addr [2][NL];
  logic          req_en   [2][NL];
  logic          bank_en  [2][NL];
  logic [RW-1:0] bank_row [2][NL];
  logic          lane_half[2][NL];
  logic [BW-1:0] lane_bank[2][NL];
  logic          conflict;
  interleaving_bus dut (.*);

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

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int kn, st, nen;
      kn = 1 << (n % 5);
      st = $urandom_range(0, K / 2 / kn - 1);
      for (int j = 0; j < NL; j++) begin
        int a;
        a = (n % 2) ? pi(kn * st + j) : kn * st + j;
        req_addr[0][j] = AW'(a);
        req_addr[1][j] = AW'((a + K / 2) % K);
        req_en[0][j] = (j < kn);
        req_en[1][j] = (j < kn);
      end
      #1;
      check(!conflict, $sformatf("kappa=%0d: false conflict", kn));
      nen = 0;
      for (int h = 0; h < 2; h++) for (int b = 0; b < NL; b++) nen += bank_en[h][b];
      check(nen == 2 * kn, $sformatf("kappa=%0d: %0d banks enabled", kn, nen));
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < kn; j++) begin
          int a, h, b;
          a = int'(req_addr[s][j]);
          h = (a >= K / 2);
          b = a % NL;
          check(lane_half[s][j] == h[0] && int'(lane_bank[s][j]) == b,
                $sformatf("lane %0d/%0d address %0d: half %0d bank %0d", s, j, a, lane_half[s][j], lane_bank[s][j]));
          check(bank_en[h][b] && int'(bank_row[h][b]) == (a % (K / 2)) / NL,
                $sformatf("bank %0d/%0d: en %0d row %0d for address %0d", h, b, bank_en[h][b], bank_row[h][b], a));
        end
    end
    // a forced collision
    for (int n = 0; n < 50; n++) begin
      int a;
      for (int j = 0; j < NL; j++) begin
        req_addr[0][j] = AW'(j); req_addr[1][j] = AW'(K / 2 + j);
        req_en[0][j] = 1'b1;     req_en[1][j] = 1'b1;
      end
      a = $urandom_range(0, NL - 1);
      req_addr[n % 2][(a + 1) % NL] = AW'((n % 2) * K / 2 + a + NL * $urandom_range(1, 100));
      #1;
      check(conflict, "collision not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
