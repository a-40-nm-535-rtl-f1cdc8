// qpp_addr_gen: recursive address generator for kappa successive
// interleaver addresses per trellis stage, in the sliding-window order the
// SISO decoder consumes: window 0 stages W-1..0, window 1 stages
// 2W-1..W, and so on.
//
// For lane j (0 <= j < kappa) and stage i it holds pi(kappa*i + j), where
// pi(x) = (f1*x + f2*x^2) mod K is the QPP interleaver.  Two recursions are
// used, with G(i,j) = 2*kappa*f2*(kappa*i + j) + kappa*f1:
//   descending  pi(kappa*(i-1)+j) = pi(kappa*i+j) - G(i,j) + kappa^2*f2
//   ascending   pi(kappa*(i+w)+j) = pi(kappa*i+j) + w*G(i,j) + (w*kappa)^2*f2,
//               w = 2W-1, jumping from the bottom of one window to the top of
//               the next
// all mod K.  start loads the seeds pi(kappa*W + j) (stage i = W); each step
// then makes one descending move (the first W from the seed) or, after the
// last stage of a window, one ascending move.  With interleave = 0 the same
// recursions run with f1 = 1, f2 = 0, which gives the natural order
// kappa*i + j.  The generator serves the first sub-block; the second SISO's
// addresses are these plus K/2 (mod K), a property of QPP interleavers with
// odd f1 and even f2.
// Timing: addr and stage change on the clock edge that samples step (or
// start); lanes j >= kappa hold don't-care values.
// The seed computation and the use of general modulo arithmetic are this
// design's choices.
module qpp_addr_gen #(
  parameter int K  = 4096,
  parameter int NL = 16,
  localparam int AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    kap,        // log2 kappa
  input  logic [5:0]    wlen,       // W
  input  logic          interleave,
  input  logic [AW-1:0] f1,
  input  logic [AW-1:0] f2,
  input  logic          start,
  input  logic          step,
  output logic [AW-1:0] addr [NL],
  output logic [AW-1:0] stage
);
  typedef logic [63:0] u64_t;

  logic [AW-1:0] pi_r [NL];
  logic [AW:0]   i_r;
  logic [6:0]    o_r;
  logic          asc;
  u64_t          kk, ff1, ff2, w;

  function automatic u64_t modk(u64_t v);
    return v % u64_t'(K);
  endfunction

  always_comb begin
    kk  = u64_t'(1) << kap;
    ff1 = interleave ? u64_t'(f1) : 64'd1;
    ff2 = interleave ? u64_t'(f2) : 64'd0;
    w   = 2 * u64_t'(wlen) - 1;
    asc = (o_r == 7'(wlen) - 7'd1);
  end

  logic [AW-1:0] seed_pi [NL];
  logic [AW-1:0] next_pi [NL];

  always_comb
    for (int j = 0; j < NL; j++) begin
      u64_t x, g;
      x = kk * u64_t'(wlen) + u64_t'(j);
      seed_pi[j] = AW'(modk(ff1 * x + modk(ff2 * modk(x * x))));
      g = modk(2 * kk * ff2 * (kk * u64_t'(i_r) + u64_t'(j)) + kk * ff1);
      if (asc)
        next_pi[j] = AW'(modk(u64_t'(pi_r[j]) + w * g + modk(w * w * kk * kk * ff2)));
      else
        next_pi[j] = AW'(modk(u64_t'(pi_r[j]) + u64_t'(K) - g + modk(kk * kk * ff2)));
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      i_r  <= '0;
      o_r  <= '0;
      pi_r <= '{default: '0};
    end else if (start) begin
      i_r  <= (AW+1)'(wlen);
      o_r  <= 7'(wlen);
      pi_r <= seed_pi;
    end else if (step) begin
      pi_r <= next_pi;
      if (asc) begin
        i_r <= i_r + (AW+1)'(w);
        o_r <= '0;
      end else begin
        i_r <= i_r - 1'b1;
        o_r <= (o_r == 7'(wlen)) ? 7'd0 : o_r + 7'd1;
      end
    end

  assign addr  = pi_r;
  assign stage = AW'(i_r);
endmodule
