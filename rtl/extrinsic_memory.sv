// extrinsic_memory: the K extrinsic LLRs exchanged between half-iterations.
// Same organisation as the systematic part of input_memory (2 halves x NL
// banks, mapping in interleaving_bus), but every bank is a dual-port RAM:
// one read and one write per cycle, each routed by its own interleaving bus,
// so a priori values for the stage being fetched are read while the
// extrinsic values of an earlier stage are written back to the same
// (natural) addresses they were read from.
// Reads are registered: data appear the cycle after the request.
// The memory is not cleared; the first half-iteration ignores its contents.
module extrinsic_memory
  import turbo_pkg::*;
#(
  parameter int K  = 4096,
  parameter int NL = KB,
  localparam int AW = $clog2(K),
  localparam int RW = $clog2(K / (2 * NL)),
  localparam int BW = $clog2(NL)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr [2][NL],
  input  logic          lane_en [NL],
  output ext_t          rd_data [2][NL],
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr [2][NL],
  input  ext_t          wr_data [2][NL],
  output logic          conflict
);
  localparam int ROWS = K / (2 * NL);

  ext_t mem [2][NL][ROWS];

  logic          r_en [2][NL], w_en [2][NL];
  logic          rb_en [2][NL], wb_en [2][NL];
  logic [RW-1:0] rb_row [2][NL], wb_row [2][NL];
  logic          r_half [2][NL], w_half [2][NL];
  logic [BW-1:0] r_bank [2][NL], w_bank [2][NL];
  logic          r_half_r [2][NL];
  logic [BW-1:0] r_bank_r [2][NL];
  ext_t          bank_q [2][NL];
  ext_t          bank_d [2][NL];
  logic          r_conf, w_conf;

  always_comb
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NL; j++) begin
        r_en[s][j] = rd_en && lane_en[j];
        w_en[s][j] = wr_en && lane_en[j];
      end

  interleaving_bus #(.K(K), .NL(NL)) u_rbus (
    .req_addr(rd_addr), .req_en(r_en), .bank_en(rb_en), .bank_row(rb_row),
    .lane_half(r_half), .lane_bank(r_bank), .conflict(r_conf));
  interleaving_bus #(.K(K), .NL(NL)) u_wbus (
    .req_addr(wr_addr), .req_en(w_en), .bank_en(wb_en), .bank_row(wb_row),
    .lane_half(w_half), .lane_bank(w_bank), .conflict(w_conf));

  assign conflict = r_conf | w_conf;

  // write data routed to its bank
  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int b = 0; b < NL; b++) bank_d[h][b] = '0;
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NL; j++)
        if (w_en[s][j]) bank_d[w_half[s][j]][w_bank[s][j]] = wr_data[s][j];
  end

  for (genvar h = 0; h < 2; h++) begin : g_h
    for (genvar b = 0; b < NL; b++) begin : g_b
      always_ff @(posedge clk) begin
        if (wb_en[h][b]) mem[h][b][wb_row[h][b]] <= bank_d[h][b];
        if (rb_en[h][b]) bank_q[h][b] <= mem[h][b][rb_row[h][b]];
      end
    end
  end

  always_ff @(posedge clk) begin
    r_half_r <= r_half;
    r_bank_r <= r_bank;
  end

  always_comb
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NL; j++)
        rd_data[s][j] = bank_q[r_half_r[s][j]][r_bank_r[s][j]];
endmodule
