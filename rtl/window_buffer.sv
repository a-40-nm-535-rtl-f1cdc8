// window_buffer: holds the soft inputs (bit metrics and channel+a priori
// LLRs) of one sliding window so that the alpha and beta recursions can read
// them after the dummy backward recursion has consumed them from memory.
// One write and one read port on DEPTH words of DW bits.  The read is
// asynchronous and returns the old word when the same address is written
// in the same cycle; the SISO relies on this to write window p+2 into the
// slots that the beta recursion is reading window p from, in the same
// (reversed) order.  Written as a flip-flop array.
module window_buffer #(
  parameter int DW    = 8,
  parameter int DEPTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
