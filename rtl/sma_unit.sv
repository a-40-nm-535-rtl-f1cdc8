// sma_unit: sign-magnitude addition, the min* operator of the log-domain
// sign-magnitude arithmetic.  For x = Xs*e^-Xm and y = Ys*e^-Ym it returns
// z = x + y in the same form:
//   Zs = sign of the operand with the smaller magnitude part (larger |value|)
//   Zm = min(Xm, Ym) + corr,  corr = -ln(1 + e^-|Xm-Ym|)  if the signs agree
//                             corr = -ln(1 - e^-|Xm-Ym|)  if they differ.
// Structure as in the specification's SMA unit: one subtractor whose sign bit
// picks the minimum and the output sign, an ABS stage, two correction LUTs
// (LUT_1, LUT_2) selected by the XOR of the signs, and a final adder.
// Magnitudes are modulo numbers: the difference is taken in PMW-bit two's
// complement, so the unit works across the wrap of the metric registers as
// long as the operands are less than half the range apart.
// Purely combinational.
module sma_unit
  import turbo_pkg::*;
(
  input  pm_t x,
  input  pm_t y,
  output pm_t z
);
  logic signed [PMW-1:0] diff;
  logic                  x_smaller;
  logic [PMW-1:0]        absd;
  logic [PMW-1:0]        mn;
  logic signed [11:0]    corr;

  always_comb begin
    diff      = signed'(x.m - y.m);
    x_smaller = diff[PMW-1];
    absd      = x_smaller ? PMW'(-diff) : PMW'(diff);
    mn        = x_smaller ? x.m : y.m;
    corr      = (x.s == y.s) ? lut1(absd) : lut2(absd);
    z.s       = x_smaller ? x.s : y.s;
    z.m       = mn + PMW'(corr);
  end
endmodule
