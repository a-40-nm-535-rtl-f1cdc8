// tb_sma_unit: checks the min* (sign-magnitude addition) unit against real
// arithmetic.  A sign-magnitude number [s; m] stands for (-1)^s * e^(-m/64);
// z must represent x + y to within 2/64 in magnitude, with the right sign.
// Random operands, equal and opposite signs, small and large differences.
module tb_sma_unit;
  import turbo_pkg::*;
  pm_t x, y, z;
  sma_unit dut (.*);

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
    for (int n = 0; n < 4000; n++) begin
      real r, mref, err;
      x.s = 1'(($urandom));
      y.s = 1'(($urandom));
      x.m = PMW'($urandom_range(0, 1500));
      y.m = (n % 4 == 0) ? PMW'($urandom_range(0, 20)) + x.m : PMW'($urandom_range(0, 1500));
      #1;
      r = val(x) + val(y);
      if (r == 0.0) continue;
      mref = -$ln(r < 0 ? -r : r) * 64.0;
      if (mref > 1000.0) continue;     // beyond the saturated correction range
      // magnitudes are modulo 2^PMW: compare the wrapped difference
      err = real'(signed'(PMW'(z.m - PMW'(int'(mref))))) + real'(int'(mref)) - mref;
      checks++;
      if (err > 2.0 || err < -2.0 || z.s != (r < 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: x=%0d:%0d y=%0d:%0d z=%0d:%0d ref=%0d:%f", x.s, x.m, y.s, y.m, z.s, z.m, r < 0, mref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
