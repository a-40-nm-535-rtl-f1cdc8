// output_buffer: hard decision and decoded-bit store.  For every valid lane
// of both SISO decoders it forms the a posteriori LLR L(u) = L(c;y) + L_ext
// and stores the decision (1 when L(u) < 0, since L = ln P(0)/P(1)) at the
// lane's natural bit address.  Every half-iteration overwrites the bits, so
// after the last one the buffer holds the final decisions.  The K bits are
// read out NL at a time: rd_word selects bits [NL*rd_word +: NL]
// (combinational read).
module output_buffer
  import turbo_pkg::*;
#(
  parameter int K  = 4096,
  parameter int NL = KB,
  localparam int AW = $clog2(K),
  localparam int WW = $clog2(K / NL)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          lane_en [NL],
  input  logic [AW-1:0] wr_addr [2][NL],
  input  lsum_t         ls      [2][NL],
  input  ext_t          ext     [2][NL],
  input  logic [WW-1:0] rd_word,
  output logic [NL-1:0] rd_bits
);
  logic [NL-1:0] mem [K / NL];

  always_ff @(posedge clk)
    if (wr_en)
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < NL; j++)
          if (lane_en[j]) begin
            logic signed [LSUMW:0] lu;
            lu = (LSUMW+1)'(ls[s][j]) + (LSUMW+1)'(ext[s][j]);
            mem[wr_addr[s][j] / AW'(NL)][wr_addr[s][j] % AW'(NL)] <= lu[LSUMW];
          end

  assign rd_bits = mem[rd_word];
endmodule
