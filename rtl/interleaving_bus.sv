// interleaving_bus: routes the 2*NL lane requests of the two SISO decoders
// (NL successive interleaver addresses each) onto the 2*NL single-access
// memory banks, and tells each lane where its data will come from.
// Memory organisation: address a in [0,K) lives in half h = (a >= K/2), bank
// b = a mod NL and row r = (a mod K/2) / NL.  The QPP interleaver's
// contention-free property guarantees that the kappa successive addresses of
// one SISO fall into distinct banks and that the second SISO's addresses
// (the first's plus K/2) fall into the other half, so every bank sees at most
// one request per cycle; an assertion checks this.
// Combinational.  The crossbar form is this design's choice.
module interleaving_bus #(
  parameter int K  = 4096,
  parameter int NL = 16,
  localparam int AW = $clog2(K),
  localparam int RW = $clog2(K / (2 * NL)),
  localparam int BW = $clog2(NL)
) (
  input  logic [AW-1:0] req_addr [2][NL],
  input  logic          req_en   [2][NL],
  output logic          bank_en  [2][NL],
  output logic [RW-1:0] bank_row [2][NL],
  output logic          lane_half[2][NL],
  output logic [BW-1:0] lane_bank[2][NL],
  output logic          conflict
);
  localparam int HALF = K / 2;

  logic [AW-1:0] off  [2][NL];
  int            hits [2][NL];

  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int b = 0; b < NL; b++) begin
        bank_en[h][b]  = 1'b0;
        bank_row[h][b] = '0;
        hits[h][b]     = 0;
      end
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < NL; j++) begin
        lane_half[s][j] = (int'(req_addr[s][j]) >= HALF);
        off[s][j]       = lane_half[s][j] ? AW'(int'(req_addr[s][j]) - HALF) : req_addr[s][j];
        lane_bank[s][j] = BW'(off[s][j] % AW'(NL));
        if (req_en[s][j]) begin
          bank_en [lane_half[s][j]][lane_bank[s][j]]  = 1'b1;
          bank_row[lane_half[s][j]][lane_bank[s][j]] |= RW'(off[s][j] / AW'(NL));
          hits    [lane_half[s][j]][lane_bank[s][j]] += 1;
        end
      end
    conflict = 1'b0;
    for (int h = 0; h < 2; h++)
      for (int b = 0; b < NL; b++)
        if (hits[h][b] > 1) conflict = 1'b1;
  end
endmodule
