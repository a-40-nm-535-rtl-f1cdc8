// tb_window_buffer: random writes and reads against a model array.  The
// read is asynchronous; a read of the address being written in the same
// cycle must still return the old word.
module tb_window_buffer;
  localparam int DW = 24, DEPTH = 32, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  window_buffer #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we    = 1'(($urandom));
      waddr = AW'($urandom);
      wdata = DW'($urandom);
      raddr = (n % 3 == 0) ? waddr : AW'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d got %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
