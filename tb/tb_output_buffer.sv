// tb_output_buffer: writes random a posteriori inputs (channel + a priori
// sum and extrinsic value) for kappa lanes of both SISOs at random distinct
// bit addresses, and reads the stored decisions back 16 bits at a time.
// Each stored bit must be 1 exactly when sum + extrinsic < 0; bits never
// written in a phase keep their earlier value; disabled lanes write nothing.
module tb_output_buffer;
  import turbo_pkg::*;
  localparam int K = 4096, NL = 16, AW = 12, WW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          wr_en = 0;
  logic          lane_en [NL];
  logic [AW-1:0] wr_addr [2][NL];
  lsum_t         ls      [2][NL];
  ext_t          ext     [2][NL];
  logic [WW-1:0] rd_word = '0;
  logic [NL-1:0] rd_bits;
  output_buffer dut (.*);

  bit model [K];
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NL; j++) begin
      lane_en[j] = 1'b1;
      for (int s = 0; s < 2; s++) begin wr_addr[s][j] = '0; ls[s][j] = '0; ext[s][j] = '0; end
    end
    // initialise every bit
    for (int st = 0; st < K / 2 / NL; st++) begin
      @(negedge clk);
      wr_en = 1;
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < NL; j++) begin
          wr_addr[s][j] = AW'(s * K / 2 + st * NL + j);
          ls[s][j] = lsum_t'(1);
          model[s * K / 2 + st * NL + j] = 0;
        end
    end
    for (int n = 0; n < 2000; n++) begin
      int kn, base;
      kn = 1 << (n % 5);
      base = $urandom_range(0, K / 2 / kn - 1) * kn;
      @(negedge clk);
      wr_en = 1'(($urandom));
      for (int j = 0; j < NL; j++) lane_en[j] = (j < kn);
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < NL; j++) begin
          wr_addr[s][j] = AW'(s * K / 2 + base + j);
          ls[s][j]  = lsum_t'($urandom_range(0, 200) - 100);
          ext[s][j] = ext_t'($urandom);
          if (wr_en && j < kn)
            model[s * K / 2 + base + j] = (int'(ls[s][j]) + int'(ext[s][j]) < 0);
        end
    end
    @(negedge clk) wr_en = 0;
    for (int w = 0; w < K / NL; w++) begin
      rd_word = WW'(w);
      #1;
      for (int j = 0; j < NL; j++) begin
        checks++;
        if (rd_bits[j] != model[w * NL + j]) begin
          failures++;
          if (failures < 10) $display("FAIL: bit %0d = %0d, expected %0d", w * NL + j, rd_bits[j], model[w * NL + j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
