// tb_alpha_buffer: the forward-metric LIFO as the SISO uses it.  In period
// p, window p is pushed into bank p%2 (push_first on its first word) while
// window p-1 is popped from the other bank (pop_first on its first pop);
// the pops must return window p-1 in reverse order.  Run for window lengths
// 32, 16 and 8.
module tb_alpha_buffer;
  localparam int DW = 16, DEPTH = 32, AW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [AW:0]   len = '0;
  logic          push = 0, push_first = 0, push_bank = 0;
  logic          pop = 0, pop_first = 0, pop_bank = 0;
  logic [DW-1:0] push_data = '0, pop_data;
  alpha_buffer #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  logic [DW-1:0] win [2][DEPTH];
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int nwin);
    len = (AW+1)'(w);
    for (int p = 0; p <= nwin; p++)
      for (int o = 0; o < w; o++) begin
        @(negedge clk);
        push = (p < nwin);
        push_first = push && (o == 0);
        push_bank = p[0];
        push_data = DW'($urandom);
        if (push) win[p % 2][o] = push_data;
        pop = (p >= 1);
        pop_first = pop && (o == 0);
        pop_bank = ~p[0];
        #1;
        if (pop) begin
          checks++;
          if (pop_data != win[(p - 1) % 2][w - 1 - o]) begin
            failures++;
            if (failures < 10) $display("FAIL: W=%0d window %0d pop %0d: %h, expected %h",
                                        w, p - 1, o, pop_data, win[(p - 1) % 2][w - 1 - o]);
          end
        end
      end
    @(negedge clk);
    push = 0; pop = 0; push_first = 0; pop_first = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(32, 5);
    run(16, 6);
    run(8, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
