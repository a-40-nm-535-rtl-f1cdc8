// tb_branch_metric_unit: checks the gamma unit in every code-rate mode.
// The testbench derives the branch labels of the punctured reciprocal dual
// trellis on its own (kappa mother-code steps per stage, the dual input
// forced to x[m]^x[m+2] where the parity is punctured) and compares each of
// the 16 branch metrics with the sign-magnitude product of the bit metrics
// whose label bit is 1: XOR of the signs, sum of the magnitudes.
module tb_branch_metric_unit;
  import turbo_pkg::*;
  kap_t kap;
  gm_t  g [NG];
  pm_t  gamma [NBR];
  branch_metric_unit dut (.*);

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

  // label of branch b = {x2, x1, x0, input} for kappa = 2^kl;
  // bit j < kappa: systematic bit j, bit KB: parity
  function automatic logic [KB:0] label(int kl, int b);
    bit x [0:19];
    logic [KB:0] l;
    int kap_n;
    kap_n = 1 << kl;
    x[0] = b[1]; x[1] = b[2]; x[2] = b[3];
    l = '0;
    for (int m = 0; m < kap_n; m++) begin
      x[m + 3] = (m == kap_n - 1) ? b[0] : (x[m] ^ x[m + 2]);
      l[m] = x[m] ^ x[m + 1] ^ x[m + 3];
    end
    l[KB] = x[kap_n - 1] ^ x[kap_n + 1] ^ x[kap_n + 2];
    return l;
  endfunction

  initial begin
    for (int n = 0; n < 500; n++) begin
      int kl;
      kl = n % 5;
      kap = kap_t'(kl);
      for (int j = 0; j < NG; j++) begin
        g[j].s = 1'(($urandom));
        g[j].m = GMW'($urandom_range(0, 1023));
      end
      #1;
      for (int b = 0; b < NBR; b++) begin
        logic [KB:0] l;
        logic s;
        int unsigned m;
        l = label(kl, b);
        s = 0; m = 0;
        for (int j = 0; j < NG; j++)
          if (l[j]) begin s ^= g[j].s; m += g[j].m; end
        checks++;
        if (gamma[b].s != s || gamma[b].m != PMW'(m)) begin
          failures++;
          if (failures < 10) $display("FAIL: kappa=%0d branch %0d: %0d:%0d, expected %0d:%0d",
                                      1 << kl, b, gamma[b].s, gamma[b].m, s, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
