// alpha_buffer: last-in/first-out store of the forward metrics of a window.
// The alpha recursion pushes alpha_{t-1} of every stage in forward order;
// the beta recursion of the next period pops them in reverse order.  Two
// banks of DEPTH words alternate (bank = window number mod 2) so that the
// pushes of window p+1 and the pops of window p can overlap; push and pop
// positions are counted inside.  push_first/pop_first start a new window
// (the word they come with is position 0 / position len-1).
// Pop data is combinational from the current pop position.
module alpha_buffer #(
  parameter int DW    = 8,
  parameter int DEPTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW:0]   len,        // window length, 1..DEPTH
  input  logic          push,
  input  logic          push_first,
  input  logic          push_bank,
  input  logic [DW-1:0] push_data,
  input  logic          pop,
  input  logic          pop_first,
  input  logic          pop_bank,
  output logic [DW-1:0] pop_data
);
  logic [DW-1:0] mem [2][DEPTH];
  logic [AW-1:0] wptr, rptr, wsel, rsel;

  assign wsel = push_first ? '0 : wptr;
  assign rsel = pop_first ? AW'(len - 1'b1) : rptr;

  always_ff @(posedge clk)
    if (push) mem[push_bank][wsel] <= push_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wsel + 1'b1;
      if (pop)  rptr <= rsel - 1'b1;
    end

  assign pop_data = mem[pop_bank][rsel];
endmodule
