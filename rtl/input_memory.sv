// input_memory: the received codeword.  Systematic LLRs sit in 2 halves x NL
// banks of K/(2*NL) rows (see interleaving_bus for the mapping); each bank is
// a single-port RAM that is either loaded (one LLR per cycle, natural
// address) or read through the interleaving bus (one LLR per lane and SISO
// per cycle).  Parity-1 and parity-2 LLRs, one per trellis stage, sit in two
// halves of K/2 entries each: stage t of a block of T = K/kappa stages is in
// half (t >= T/2), row t mod T/2, so each SISO reads its own half.
// Reads are registered: data appear the cycle after the request.
// Load and decoding are not overlapped (the load port has priority).
module input_memory
  import turbo_pkg::*;
#(
  parameter int K  = 4096,
  parameter int NL = KB,
  localparam int AW = $clog2(K),
  localparam int RW = $clog2(K / (2 * NL)),
  localparam int BW = $clog2(NL)
) (
  input  logic          clk,
  input  kap_t          kap,
  // load port
  input  logic          sys_we,
  input  logic [AW-1:0] sys_waddr,
  input  llr_t          sys_wdata,
  input  logic          par_we,
  input  logic          par_wsel,      // 0: parity-1, 1: parity-2
  input  logic [AW-1:0] par_wstage,
  input  llr_t          par_wdata,
  // decoding read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr [2][NL],
  input  logic          rd_lane_en [NL],
  input  logic          rd_psel,       // parity memory to read
  input  logic [AW-1:0] rd_stage,      // stage within the sub-block
  output llr_t          sys_rdata [2][NL],
  output llr_t          par_rdata [2],
  output logic          conflict
);
  localparam int ROWS = K / (2 * NL);
  localparam int PH   = K / 2;

  llr_t sys_mem [2][NL][ROWS];
  llr_t par_mem [2][2][PH];

  logic          req_en   [2][NL];
  logic          bank_en  [2][NL];
  logic [RW-1:0] bank_row [2][NL];
  logic          lane_half[2][NL];
  logic [BW-1:0] lane_bank[2][NL];
  logic          lane_half_r[2][NL];
  logic [BW-1:0] lane_bank_r[2][NL];
  llr_t          bank_q   [2][NL];

  always_comb
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NL; j++) req_en[s][j] = rd_en && rd_lane_en[j];

  interleaving_bus #(.K(K), .NL(NL)) u_bus (
    .req_addr(rd_addr), .req_en, .bank_en, .bank_row, .lane_half, .lane_bank, .conflict);

  // load-side address split
  logic          l_half;
  logic [AW-1:0] l_off;
  logic [BW-1:0] l_bank;
  logic [RW-1:0] l_row;
  logic [AW-1:0] t_half;    // T/2 for the current mode
  logic          p_half;
  logic [AW-1:0] p_row;

  always_comb begin
    l_half = (int'(sys_waddr) >= PH);
    l_off  = l_half ? AW'(int'(sys_waddr) - PH) : sys_waddr;
    l_bank = BW'(l_off % AW'(NL));
    l_row  = RW'(l_off / AW'(NL));
    t_half = AW'(PH >> kap);
    p_half = (par_wstage >= t_half);
    p_row  = p_half ? par_wstage - t_half : par_wstage;
  end

  for (genvar h = 0; h < 2; h++) begin : g_h
    for (genvar b = 0; b < NL; b++) begin : g_b
      always_ff @(posedge clk) begin
        if (sys_we && l_half == h[0] && l_bank == b[BW-1:0])
          sys_mem[h][b][l_row] <= sys_wdata;
        else if (bank_en[h][b])
          bank_q[h][b] <= sys_mem[h][b][bank_row[h][b]];
      end
    end
    for (genvar q = 0; q < 2; q++) begin : g_p
      always_ff @(posedge clk)
        if (par_we && par_wsel == q[0] && p_half == h[0])
          par_mem[q][h][p_row[$clog2(PH)-1:0]] <= par_wdata;
    end
    always_ff @(posedge clk)
      if (rd_en) par_rdata[h] <= par_mem[rd_psel][h][rd_stage[$clog2(PH)-1:0]];
  end

  always_ff @(posedge clk) begin
    lane_half_r <= lane_half;
    lane_bank_r <= lane_bank;
  end

  always_comb
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NL; j++)
        sys_rdata[s][j] = bank_q[lane_half_r[s][j]][lane_bank_r[s][j]];
endmodule
