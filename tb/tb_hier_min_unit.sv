// tb_hier_min_unit: checks the eight-input min* tree against the real sum of
// its inputs.  Inputs are sign-magnitude numbers (-1)^s * e^(-m/64); the
// output value must match the sum to within 3 % of the sum of the input
// magnitudes (seven rounded LUT corrections) and, where the sum is not
// nearly cancelled, carry its sign.
module tb_hier_min_unit;
  import turbo_pkg::*;
  pm_t in [8];
  pm_t out;
  hier_min_unit dut (.*);

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

  function automatic real val(pm_t a);
    return (a.s ? -1.0 : 1.0) * $exp(-real'(a.m) / 64.0);
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      real r, tot, e;
      int base;
      base = $urandom_range(0, 3000);
      r = 0.0; tot = 0.0;
      for (int i = 0; i < 8; i++) begin
        in[i].s = (n % 3 == 0) ? 1'b0 : 1'(($urandom));
        in[i].m = PMW'(base + $urandom_range(0, 300));
        r += val(in[i]);
        tot += $exp(-real'(in[i].m) / 64.0);
      end
      #1;
      // magnitudes are modulo 2^PMW: take the output relative to base
      e = (out.s ? -1.0 : 1.0) * $exp(-real'(signed'(PMW'(out.m - PMW'(base)))) / 64.0)
          - r * $exp(real'(base) / 64.0);
      tot = tot * $exp(real'(base) / 64.0);
      checks++;
      if (e > 0.03 * tot || e < -0.03 * tot) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d sum=%f out=%0d:%0d", n, r, out.s, out.m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
