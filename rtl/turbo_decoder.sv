// turbo_decoder: multiple code-rate turbo decoder with two parallel SISO
// decoders working on the reciprocal dual trellis.
//
// A codeword of K information bits is loaded through the load port
// (systematic LLRs by natural bit address, parity-1 and parity-2 LLRs by
// trellis stage), then start runs 2*n_iter half-iterations: even ones decode
// constituent code 1 in natural order, odd ones constituent code 2 in QPP
// interleaved order.  In every half-iteration each SISO decodes one half of
// the block (K/(2*kappa) trellis stages, kappa information bits per stage),
// reading kappa systematic and a priori LLRs per cycle through the
// interleaving buses and writing kappa extrinsic LLRs per cycle back in
// place; kappa = 2^kap selects the code rate kappa/(kappa+2) of the turbo
// code (constituent rate kappa/(kappa+1)).
//
// Control: one address generator produces the read addresses (natural or
// interleaved), a second one replays the same sequence for the write-back as
// the extrinsic values come out.  The forward metric at the end of the first
// sub-block (alpha-bar) is kept for each constituent code and used as the
// start metric of the second SISO in the next iteration; in the first
// iteration, and at both sub-block ends, the "no information" value is
// used.  Hard decisions of the last half-iteration are read through
// out_word/out_bits (bit i of the block is out_bits[i mod 16] of word i/16).
//
// Timing: one trellis stage per SISO per cycle; a half-iteration takes
// K/(2*kappa) + 2W cycles plus 8 cycles of pipeline and control, W being the
// sliding-window length of the mode.  done pulses for one cycle at the end.
// Window lengths and the code-rate set follow the specification; the load
// interface, the pipeline depth and the boundary handling described above
// are this design's choices.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int K = 4096,
  localparam int AW = $clog2(K),
  localparam int WW = $clog2(K / KB)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration (hold stable while busy)
  input  kap_t          kap,          // log2 kappa, 0..4
  input  logic [AW-1:0] f1,
  input  logic [AW-1:0] f2,
  input  logic [3:0]    n_iter,       // iterations, 1..15
  // load port
  input  logic          sys_we,
  input  logic [AW-1:0] sys_waddr,
  input  llr_t          sys_wdata,
  input  logic          par_we,
  input  logic          par_wsel,
  input  logic [AW-1:0] par_wstage,
  input  llr_t          par_wdata,
  // control and status
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          conflict,     // sticky: a memory bank was double-booked
  output logic [4:0]    half_iter,    // half-iterations completed in this run
  // decoded bits
  input  logic [WW-1:0] out_word,
  output logic [KB-1:0] out_bits
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_DONE} state_t;
  state_t state;

  // ---------------------------------------------------------------
  // Mode-derived sizes
  // ---------------------------------------------------------------
  logic [5:0]    wlen;
  logic [AW-1:0] t2;          // stages per SISO
  logic [7:0]    nwin;
  logic          lane_en [KB];
  logic          il;          // interleaved half-iteration

  always_comb begin
    wlen = 6'(win_len(kap));
    t2   = AW'((K / 2) >> kap);
    nwin = 8'(t2 / AW'(wlen));
    for (int j = 0; j < KB; j++) lane_en[j] = (j < (1 << kap));
    il = half_iter[0];
  end

  // ---------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------
  logic          gen_start, rd_step, wr_step, wr_primed;
  logic [AW:0]   rd_cnt;
  logic          s1_valid, s1_last, s2_valid, s2_last;
  logic          mem_conf_in, mem_conf_ext;
  pm_t           abar [2][NS];
  logic          abar_ok [2];
  pm_t           s1_alast [NS];
  pm_t           s2_alast [NS];

  assign gen_start = (state == S_START);
  assign rd_step   = (state == S_RUN) && (rd_cnt < (AW+1)'(t2));
  assign wr_step   = (state == S_RUN) && (!wr_primed || s1_valid);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_IDLE;
      half_iter <= '0;
      rd_cnt    <= '0;
      wr_primed <= 1'b0;
      done      <= 1'b0;
      conflict  <= 1'b0;
      abar_ok   <= '{default: 1'b0};
    end else begin
      done <= 1'b0;
      if (mem_conf_in || mem_conf_ext) conflict <= 1'b1;
      case (state)
        S_IDLE:
          if (start) begin
            state     <= S_START;
            half_iter <= '0;
            conflict  <= 1'b0;
            abar_ok   <= '{default: 1'b0};
          end
        S_START: begin
          state     <= S_RUN;
          rd_cnt    <= '0;
          wr_primed <= 1'b0;
        end
        S_RUN: begin
          if (rd_step) rd_cnt <= rd_cnt + 1'b1;
          wr_primed <= 1'b1;
          if (s1_last) begin
            abar[il]    <= s1_alast;
            abar_ok[il] <= 1'b1;
            half_iter   <= half_iter + 1'b1;
            state       <= (half_iter + 1'b1 == {n_iter, 1'b0}) ? S_DONE : S_START;
          end
        end
        default: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
      endcase
    end

  // ---------------------------------------------------------------
  // Address generators: read (input + a priori) and write-back
  // ---------------------------------------------------------------
  logic [AW-1:0] rd_a1 [KB];
  logic [AW-1:0] wr_a1 [KB];
  logic [AW-1:0] rd_stage, wr_stage_unused;
  logic [AW-1:0] rd_addr [2][KB];
  logic [AW-1:0] wr_addr [2][KB];

  qpp_addr_gen #(.K(K), .NL(KB)) u_rd_gen (
    .clk, .rst_n, .kap, .wlen, .interleave(il), .f1, .f2,
    .start(gen_start), .step(rd_step), .addr(rd_a1), .stage(rd_stage));

  qpp_addr_gen #(.K(K), .NL(KB)) u_wr_gen (
    .clk, .rst_n, .kap, .wlen, .interleave(il), .f1, .f2,
    .start(gen_start), .step(wr_step), .addr(wr_a1), .stage(wr_stage_unused));

  always_comb
    for (int j = 0; j < KB; j++) begin
      rd_addr[0][j] = rd_a1[j];
      rd_addr[1][j] = rd_a1[j] + AW'(K / 2);   // QPP: pi(x + K/2) = pi(x) + K/2
      wr_addr[0][j] = wr_a1[j];
      wr_addr[1][j] = wr_a1[j] + AW'(K / 2);
      if (int'(rd_a1[j]) >= K / 2) rd_addr[1][j] = AW'(int'(rd_a1[j]) - K / 2);
      if (int'(wr_a1[j]) >= K / 2) wr_addr[1][j] = AW'(int'(wr_a1[j]) - K / 2);
    end

  // ---------------------------------------------------------------
  // Memories
  // ---------------------------------------------------------------
  logic addr_valid, mem_valid;
  llr_t sys_q [2][KB];
  llr_t par_q [2];
  ext_t apr_q [2][KB];
  ext_t s_ext [2][KB];
  lsum_t s_ls [2][KB];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      addr_valid <= 1'b0;
      mem_valid  <= 1'b0;
    end else begin
      addr_valid <= rd_step;
      mem_valid  <= addr_valid;
    end

  input_memory #(.K(K), .NL(KB)) u_in_mem (
    .clk, .kap,
    .sys_we, .sys_waddr, .sys_wdata, .par_we, .par_wsel, .par_wstage, .par_wdata,
    .rd_en(addr_valid), .rd_addr, .rd_lane_en(lane_en), .rd_psel(il), .rd_stage,
    .sys_rdata(sys_q), .par_rdata(par_q), .conflict(mem_conf_in));

  extrinsic_memory #(.K(K), .NL(KB)) u_ext_mem (
    .clk, .rd_en(addr_valid), .rd_addr, .lane_en, .rd_data(apr_q),
    .wr_en(s1_valid), .wr_addr, .wr_data(s_ext), .conflict(mem_conf_ext));

  // ---------------------------------------------------------------
  // Metric pre-processors and SISO decoders
  // ---------------------------------------------------------------
  logic use_apr;
  assign use_apr = (half_iter != 0);

  pm_t uniform [NS];
  pm_t delta   [NS];
  pm_t a2_init [NS];
  always_comb
    for (int s = 0; s < NS; s++) begin
      uniform[s] = '{s: 1'b0, m: '0};
      delta[s]   = '{s: 1'b0, m: (s == 0) ? '0 : PM_BIG};
      a2_init[s] = abar_ok[il] ? abar[il][s] : delta[s];
    end

  logic  pp_valid [2];
  gm_t   pp_g  [2][NG];
  lsum_t pp_ls [2][KB];
  logic  s_busy [2];

  for (genvar s = 0; s < 2; s++) begin : g_siso
    metric_preproc u_pre (
      .clk, .in_valid(mem_valid), .use_apr, .sys(sys_q[s]), .apr(apr_q[s]),
      .par(par_q[s]), .out_valid(pp_valid[s]), .g(pp_g[s]), .ls(pp_ls[s]));
  end

  siso_decoder #(.NWW(8)) u_siso1 (
    .clk, .rst_n, .kap, .nwin, .wlen, .alpha_init(uniform), .beta_end(delta),
    .in_valid(pp_valid[0]), .in_g(pp_g[0]), .in_ls(pp_ls[0]),
    .out_valid(s1_valid), .out_last(s1_last), .out_ext(s_ext[0]), .out_ls(s_ls[0]),
    .alpha_last(s1_alast), .busy(s_busy[0]));

  siso_decoder #(.NWW(8)) u_siso2 (
    .clk, .rst_n, .kap, .nwin, .wlen, .alpha_init(a2_init), .beta_end(delta),
    .in_valid(pp_valid[1]), .in_g(pp_g[1]), .in_ls(pp_ls[1]),
    .out_valid(s2_valid), .out_last(s2_last), .out_ext(s_ext[1]), .out_ls(s_ls[1]),
    .alpha_last(s2_alast), .busy(s_busy[1]));

  // ---------------------------------------------------------------
  // Decision and output buffer
  // ---------------------------------------------------------------
  output_buffer #(.K(K), .NL(KB)) u_out (
    .clk, .wr_en(s1_valid), .lane_en, .wr_addr, .ls(s_ls), .ext(s_ext),
    .rd_word(out_word), .rd_bits(out_bits));

  // The two SISO decoders run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (s1_valid == s2_valid) && (s1_last == s2_last));
endmodule
