// siso_decoder: soft-in/soft-out decoder on the reciprocal dual trellis
// with sliding windows, producing kappa extrinsic LLRs per trellis stage.
//
// Input stream: one trellis stage per cycle (in_valid), in the order
// "windows in ascending order, stages of each window in descending order",
// nwin*wlen stages in all.  Each stage carries the KB systematic bit metrics
// and the parity bit metric (in_g[KB]) and the KB channel+a priori LLRs
// (in_ls, only passed through for the hard decision).
//
// Schedule, with periods of wlen cycles (period p, offset o):
//   p <  nwin        window p enters in reverse order: it is written into
//                    window buffer p%2 and the dummy backward unit beta_d
//                    runs over it from a "no information" start; its final
//                    value becomes the start of the beta recursion of window
//                    p-1.
//   1 <= p <= nwin   the alpha unit runs forward over window p-1 read from
//                    window buffer (p-1)%2 and pushes alpha_{t-1} into the
//                    alpha buffer; alpha carries over from window to window.
//   2 <= p <= nwin+1 the beta unit runs backward over window p-2 (buffer
//                    p%2, read before window p overwrites it), pops alpha,
//                    and the KB extrinsic units produce the stage's
//                    extrinsic LLRs.
// The stream that leaves (out_valid) is therefore in the same order as the
// stream that came in, delayed by two periods and 3 pipeline cycles; a
// half-iteration takes (nwin+2)*wlen + 3 cycles.
// alpha_init is the forward metric at the first stage (uniform for the
// first sub-block, the stored alpha-bar of the neighbouring SISO otherwise);
// beta_end the backward metric after the last stage of the sub-block.
// alpha_last is the forward metric after the last stage, valid from the
// cycle after the last alpha step until the next run.
// The beta_d start value, the alpha-buffer ping-pong and the 3-cycle
// pipeline are this design's choices.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int NWW = 8    // width of the window count
) (
  input  logic           clk,
  input  logic           rst_n,
  input  kap_t           kap,
  input  logic [NWW-1:0] nwin,
  input  logic [5:0]     wlen,
  input  pm_t            alpha_init [NS],
  input  pm_t            beta_end   [NS],
  input  logic           in_valid,
  input  gm_t            in_g  [NG],
  input  lsum_t          in_ls [KB],
  output logic           out_valid,
  output logic           out_last,
  output ext_t           out_ext [KB],
  output lsum_t          out_ls  [KB],
  output pm_t            alpha_last [NS],
  output logic           busy
);
  localparam int WAW = $clog2(WMAX);
  localparam int WBW = NG*(GMW+1) + KB*LSUMW;

  typedef struct packed {
    gm_t   [NG-1:0] g;
    lsum_t [KB-1:0] ls;
  } wb_word_t;

  // ------------------------------------------------------------------
  // Timeline
  // ------------------------------------------------------------------
  logic           running;
  logic [NWW:0]   p_r;
  logic [WAW-1:0] o_r;
  logic           act;
  logic [NWW:0]   p;
  logic [WAW-1:0] o, o_rev;
  logic           ph_bd, ph_a, ph_b, last_o;

  always_comb begin
    act    = running | in_valid;
    p      = running ? p_r : '0;
    o      = running ? o_r : '0;
    o_rev  = WAW'(wlen - 6'd1) - o;
    last_o = (o == WAW'(wlen - 6'd1));
    ph_bd  = act && (p < (NWW+1)'(nwin));
    ph_a   = act && (p >= 1) && (p <= (NWW+1)'(nwin));
    ph_b   = act && (p >= 2) && (p <= (NWW+1)'(nwin) + 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running <= 1'b0;
      p_r     <= '0;
      o_r     <= '0;
    end else if (act) begin
      if (last_o) begin
        o_r <= '0;
        p_r <= p + 1'b1;
        if (p == (NWW+1)'(nwin) + 1'b1) running <= 1'b0;
        else                             running <= 1'b1;
      end else begin
        o_r     <= o + 1'b1;
        p_r     <= p;
        running <= 1'b1;
      end
    end

  assign busy = running;

  pm_t delta [NS];
  always_comb
    for (int s = 0; s < NS; s++) delta[s] = '{s: 1'b0, m: (s == 0) ? '0 : PM_BIG};

  // ------------------------------------------------------------------
  // Window buffers (two, ping-pong)
  // ------------------------------------------------------------------
  wb_word_t       wb_wdata;
  wb_word_t       wb_rdata [2];
  logic [WAW-1:0] wb_raddr [2];
  logic           wb_we    [2];

  always_comb begin
    for (int j = 0; j < NG; j++) wb_wdata.g[j]  = in_g[j];
    for (int j = 0; j < KB; j++) wb_wdata.ls[j] = in_ls[j];
    for (int b = 0; b < 2; b++) begin
      wb_we[b]    = ph_bd && (p[0] == b[0]);
      // the bank being filled is the one beta reads; the other feeds alpha
      wb_raddr[b] = (p[0] == b[0]) ? o_rev : o;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_wb
    window_buffer #(.DW(WBW), .DEPTH(WMAX)) u_wb (
      .clk, .we(wb_we[b]), .waddr(o_rev), .wdata(wb_wdata),
      .raddr(wb_raddr[b]), .rdata(wb_rdata[b]));
  end

  wb_word_t wa_word, wbt_word;
  gm_t      ga [NG];
  gm_t      gb [NG];
  always_comb begin
    wa_word  = wb_rdata[~p[0]];
    wbt_word = wb_rdata[p[0]];
    for (int j = 0; j < NG; j++) begin
      ga[j] = wa_word.g[j];
      gb[j] = wbt_word.g[j];
    end
  end

  // ------------------------------------------------------------------
  // gamma units
  // ------------------------------------------------------------------
  pm_t gam_d [NBR];
  pm_t gam_a [NBR];
  pm_t gam_b [NBR];
  branch_metric_unit u_gam_d (.kap, .g(in_g), .gamma(gam_d));
  branch_metric_unit u_gam_a (.kap, .g(ga),   .gamma(gam_a));
  branch_metric_unit u_gam_b (.kap, .g(gb),   .gamma(gam_b));

  // ------------------------------------------------------------------
  // beta_d, alpha, beta units
  // ------------------------------------------------------------------
  pm_t bd_r [NS];
  pm_t bd_hold [NS];
  pm_t a_r [NS];
  pm_t b_r [NS];
  pm_t bd_in [NS];
  pm_t a_in [NS];
  pm_t b_in [NS];
  pm_t bd_nx [NS];
  pm_t a_nx [NS];
  pm_t b_nx [NS];

  always_comb begin
    bd_in = (o == 0) ? delta : bd_r;
    a_in  = (p == 1 && o == 0) ? alpha_init : a_r;
    if (o == 0) b_in = (p == (NWW+1)'(nwin) + 1'b1) ? beta_end : bd_hold;
    else        b_in = b_r;
  end

  recursion_unit #(.BACKWARD(1'b1)) u_bd (.kap, .m_in(bd_in), .gamma(gam_d), .m_out(bd_nx));
  recursion_unit #(.BACKWARD(1'b0)) u_a  (.kap, .m_in(a_in),  .gamma(gam_a), .m_out(a_nx));
  recursion_unit #(.BACKWARD(1'b1)) u_b  (.kap, .m_in(b_in),  .gamma(gam_b), .m_out(b_nx));

  always_ff @(posedge clk) begin
    if (ph_bd) begin
      bd_r <= bd_nx;
      if (last_o) bd_hold <= bd_nx;
    end
    if (ph_a) begin
      a_r <= a_nx;
      if (last_o && p == (NWW+1)'(nwin)) alpha_last <= a_nx;
    end
    if (ph_b) b_r <= b_nx;
  end

  // ------------------------------------------------------------------
  // alpha buffer (LIFO)
  // ------------------------------------------------------------------
  logic [NS*(PMW+1)-1:0] ab_push, ab_pop;
  pm_t a_prev [NS];
  always_comb
    for (int s = 0; s < NS; s++) begin
      ab_push[s*(PMW+1) +: PMW+1] = a_in[s];
      a_prev[s] = ab_pop[s*(PMW+1) +: PMW+1];
    end

  alpha_buffer #(.DW(NS*(PMW+1)), .DEPTH(WMAX)) u_abuf (
    .clk, .rst_n, .len((WAW+1)'(wlen)),
    .push(ph_a), .push_first(ph_a && o == 0), .push_bank(~p[0]), .push_data(ab_push),
    .pop(ph_b),  .pop_first(ph_b && o == 0),  .pop_bank(p[0]),   .pop_data(ab_pop));

  // ------------------------------------------------------------------
  // Path metrics alpha*gamma*beta, registered, then the extrinsic units
  // ------------------------------------------------------------------
  pm_t   pathm   [NBR];
  pm_t   pathm_r [NBR];
  gm_t   gb_r    [KB];
  lsum_t ls_r [3][KB];
  logic  v_r  [3];
  logic  l_r  [3];
  logic  last_b;
  int    km;

  always_comb begin
    km = (kap > 3'd4) ? 4 : int'(kap);
    for (int b = 0; b < NBR; b++)
      pathm[b] = smm(smm(a_prev[b >> 1], gam_b[b]), b_in[TR_NEXT[km][b]]);
    last_b = ph_b && last_o && (p == (NWW+1)'(nwin) + 1'b1);
  end

  always_ff @(posedge clk) begin
    pathm_r <= pathm;
    for (int j = 0; j < KB; j++) begin
      gb_r[j]    <= gb[j];
      ls_r[0][j] <= wbt_word.ls[j];
    end
    ls_r[1] <= ls_r[0];
    ls_r[2] <= ls_r[1];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin v_r[i] <= 1'b0; l_r[i] <= 1'b0; end
    end else begin
      v_r[0] <= ph_b;   l_r[0] <= last_b;
      v_r[1] <= v_r[0]; l_r[1] <= l_r[0];
      v_r[2] <= v_r[1]; l_r[2] <= l_r[1];
    end

  for (genvar j = 0; j < KB; j++) begin : g_ext
    extrinsic_unit #(.LANE(j)) u_ext (
      .clk, .kap, .pathm(pathm_r), .g_in(gb_r[j]), .ext_out(out_ext[j]));
  end

  assign out_valid = v_r[2];
  assign out_last  = l_r[2];
  assign out_ls    = ls_r[2];

  // The input stream must be gap-free while windows are entering.
  a_stream: assert property (@(posedge clk) disable iff (!rst_n)
                             (running && ph_bd) |-> in_valid);
endmodule
