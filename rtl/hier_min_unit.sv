// hier_min_unit: hierarchical min* tree.  Reduces eight sign-magnitude
// metrics to their sign-magnitude sum with seven SMA (min*) units in three
// levels (4 + 2 + 1).  Combinational; the extrinsic unit registers its
// output.
module hier_min_unit
  import turbo_pkg::*;
(
  input  pm_t in [8],
  output pm_t out
);
  pm_t l1 [4];
  pm_t l2 [2];

  for (genvar i = 0; i < 4; i++) begin : g_l1
    sma_unit u (.x(in[2*i]), .y(in[2*i+1]), .z(l1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_l2
    sma_unit u (.x(l1[2*i]), .y(l1[2*i+1]), .z(l2[i]));
  end
  sma_unit u_l3 (.x(l2[0]), .y(l2[1]), .z(out));
endmodule
