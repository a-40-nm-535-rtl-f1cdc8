// tb_metric_preproc: checks the bit-metric pre-processor against real
// arithmetic.  For each lane L = channel + a priori (a priori only when
// use_apr = 1); the bit metric must be sign = (L < 0) and magnitude
// 64 * -ln tanh(|L/8| / 2), rounded, limited to [GFLOOR, 1023] (GFLOOR = 1); the parity
// metric likewise from the parity LLR alone.  L itself is passed on.
// Outputs follow the inputs by exactly one clock.
module tb_metric_preproc;
  import turbo_pkg::*;
  localparam real GFLOOR = 1.0;
  logic  clk = 0;
  always #5 clk = ~clk;
  logic  in_valid = 0, use_apr = 0, out_valid;
  llr_t  sys [KB];
  ext_t  apr [KB];
  llr_t  par = '0;
  gm_t   g  [NG];
  lsum_t ls [KB];
  metric_preproc dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gref(int l);
    real a, v;
    a = real'((l < 0) ? -l : l) / 8.0;
    if (a == 0.0) return 1023;
    v = 64.0 * $ln((1.0 + $exp(-a)) / (1.0 - $exp(-a)));
    if (v > 1023.0) v = 1023.0;
    if (v < GFLOOR) v = GFLOOR;
    return int'(v);
  endfunction

  task automatic cmp(gm_t got, int l, string what);
    int r, e;
    r = gref(l);
    e = int'(got.m) - r;
    checks++;
    if (e > 1 || e < -1 || (l != 0 && got.s != (l < 0))) begin
      failures++;
      if (failures < 10) $display("FAIL: %s L=%0d: %0d:%0d, expected %0d", what, l, got.s, got.m, r);
    end
  endtask

  initial begin
    for (int j = 0; j < KB; j++) begin sys[j] = '0; apr[j] = '0; end
    repeat (2) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      int l [KB];
      use_apr = 1'(($urandom));
      in_valid = 1'(($urandom));
      for (int j = 0; j < KB; j++) begin
        sys[j] = llr_t'($urandom);
        apr[j] = ext_t'($urandom);
        l[j] = int'(sys[j]) + (use_apr ? int'(apr[j]) : 0);
      end
      par = llr_t'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) begin
        failures++;
        $display("FAIL: out_valid %0d, expected %0d", out_valid, in_valid);
      end
      for (int j = 0; j < KB; j++) begin
        cmp(g[j], l[j], $sformatf("lane %0d", j));
        checks++;
        if (int'(ls[j]) != l[j]) begin
          failures++;
          if (failures < 10) $display("FAIL: lane %0d sum %0d, expected %0d", j, ls[j], l[j]);
        end
      end
      cmp(g[KB], int'(par), "parity");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
