// turbo_pkg: types, number formats, look-up tables and the reciprocal dual
// trellis shared by every block of the multiple code-rate turbo decoder.
//
// Number formats (LLRs in units of 1/8; sign-magnitude magnitudes in units
// of 1/64, i.e. MF = 6 fraction bits):
//   llr_t   channel LLR, 6-bit two's complement, 3 integer + 3 fraction bits
//           (the input quantisation the decoder is specified for).
//   ext_t   extrinsic LLR, 7-bit two's complement (this design's choice).
//   lsum_t  channel + a priori LLR, 8-bit two's complement, saturated.
//   gm_t    bit metric in sign-magnitude form: s=1 means negative, m = -ln|q|
//           with q = tanh(L/2), unsigned 10 bits, saturated at 1023 (~16).
//   pm_t    path metric in sign-magnitude form; m is an 18-bit modulo number
//           (modulo normalisation: only differences are ever compared).
//
// The reciprocal dual trellis.  The constituent code is the LTE recursive
// systematic code, parity p = u * (1+D+D^3)/(1+D^2+D^3).  Its parity checks
// are  sum_i g1_i u[t-i] + g0_i p[t-i] = 0, so every dual codeword is
// c_u[m] = x[m]^x[m+1]^x[m+3],  c_p[m] = x[m]^x[m+2]^x[m+3]
// for a free binary sequence x.  The dual trellis state before mother-code
// step m is (x[m+2],x[m+1],x[m]) = s[2:0]; the branch input is x[m+3].
// For rate kappa/(kappa+1) only the last parity bit of every kappa bits is
// sent, so the dual codeword must be 0 on the punctured parity positions:
// x[m+3] is then forced to x[m]^x[m+2] and only the input at the last step
// is free.  Merging kappa mother steps therefore gives a radix-2, 8-state
// trellis whose branches carry kappa systematic label bits and one parity
// label bit.  These tables are computed below by constant functions for
// kappa = 1, 2, 4, 8, 16 (kap = log2 kappa = 0..4).
//
// Boundary values in the dual domain: a known primal state corresponds to a
// uniform dual metric (all magnitudes 0) and an unknown primal state to a
// dual metric concentrated on state 0 (DELTA: state 0 magnitude 0, the
// others PM_BIG, i.e. a value of about e^-16).
package turbo_pkg;

  localparam int KB     = 16;   // highest kappa: banks and extrinsic units per SISO
  localparam int NS     = 8;    // trellis states (memory-3 constituent code)
  localparam int NBR    = 16;   // branches per trellis stage (radix 2)
  localparam int NG     = KB+1; // bit metrics per stage: KB systematic + 1 parity
  localparam int NMODE  = 5;    // kappa = 1, 2, 4, 8, 16
  localparam int LLRW   = 6;
  localparam int EXTW   = 7;
  localparam int LSUMW  = 8;
  localparam int MF     = 6;    // fraction bits of sign-magnitude magnitudes
  localparam real MS    = 64.0; // 2^MF
  localparam int GMW    = 10;
  localparam int PMW    = 18;
  localparam int WMAX   = 32;   // longest sliding window (Table I)

  typedef logic [2:0]                kap_t;
  typedef logic signed [LLRW-1:0]    llr_t;
  typedef logic signed [EXTW-1:0]    ext_t;
  typedef logic signed [LSUMW-1:0]   lsum_t;

  typedef struct packed {
    logic           s;
    logic [GMW-1:0] m;
  } gm_t;

  typedef struct packed {
    logic           s;
    logic [PMW-1:0] m;
  } pm_t;

  typedef pm_t pmv_t [NS];

  localparam logic [PMW-1:0] PM_BIG = PMW'(1024);   // 16 nats: value ~ 0
  localparam logic [GMW-1:0] GM_MAX = GMW'(1023);

  // Sliding-window length per mode (Table I of the specification).
  function automatic int unsigned win_len(kap_t kap);
    case (kap)
      3'd0, 3'd1: return 32;
      3'd2:       return 16;
      default:    return 8;
    endcase
  endfunction

  // Look-up tables.  Their contents are computed at elaboration from the
  // formulas below; LUT inputs and outputs are rounded to the nearest step.
  //   lut0g(a)  bit metric magnitude of an LLR |L| = a/8:
  //             MS * -ln tanh(|L|/2) = MS * ln((1+e^-|L|)/(1-e^-|L|)),
  //             saturated at GM_MAX (|L| = 0 gives GM_MAX) and at least 1:
  //             a magnitude of 0 (|q| = 1) would make the dual metrics of
  //             very reliable stages cancel exactly, and long blocks then
  //             decode worse at higher SNR; the floor caps |L| at about 5.5
  //             inside the trellis (this design's choice)
  //   lut1(d)   MS * -ln(1 + e^(-d/MS)), SMA correction, signs equal
  //   lut2(d)   MS * -ln(1 - e^(-d/MS)), SMA correction, signs differ,
  //             saturated at PM_BIG (d = 0 gives PM_BIG)
  //   lutx(d)   8 * -ln tanh(d/(2*MS)), extrinsic magnitude in 1/8 units,
  //             saturated at 63
  // with MS = 2^MF the scale of the sign-magnitude domain.
  localparam int  NL0 = 128;
  localparam int  NL12 = 512;
  localparam int  NLX = 256;
  typedef logic [NL0-1:0][GMW-1:0]  lut0_t;
  typedef logic [NL12-1:0][11:0]    lut12_t;
  typedef logic [NLX-1:0][5:0]      lutx_t;

  function automatic real nlth(real x);   // -ln tanh(x/2), x > 0
    return $ln((1.0 + $exp(-x)) / (1.0 - $exp(-x)));
  endfunction

  function automatic lut0_t mk_lut0();
    lut0_t t;
    for (int i = 0; i < NL0; i++) begin
      real v;
      v = (i == 0) ? real'(GM_MAX) : nlth(real'(i) / 8.0) * MS;
      if (v > real'(GM_MAX)) v = real'(GM_MAX);
      if (v < 1.0) v = 1.0;
      t[i] = GMW'(int'(v));
    end
    return t;
  endfunction

  function automatic lut12_t mk_lut12(bit differ);
    lut12_t t;
    for (int i = 0; i < NL12; i++) begin
      real v;
      if (differ) begin
        v = (i == 0) ? real'(PM_BIG) : -$ln(1.0 - $exp(-real'(i) / MS)) * MS;
        if (v > real'(PM_BIG)) v = real'(PM_BIG);
      end else
        v = -$ln(1.0 + $exp(-real'(i) / MS)) * MS;
      t[i] = 12'(int'(v));
    end
    return t;
  endfunction

  function automatic lutx_t mk_lutx();
    lutx_t t;
    for (int i = 0; i < NLX; i++) begin
      real v;
      v = (i == 0) ? 63.0 : nlth(real'(i) / MS) * 8.0;
      if (v > 63.0) v = 63.0;
      t[i] = 6'(int'(v));
    end
    return t;
  endfunction

  localparam lut0_t  LUT0G = mk_lut0();
  localparam lut12_t LUT1  = mk_lut12(1'b0);
  localparam lut12_t LUT2  = mk_lut12(1'b1);
  localparam lutx_t  LUTX  = mk_lutx();

  function automatic logic [GMW-1:0] lut0g(logic [LSUMW-1:0] a);
    return (a >= LSUMW'(NL0)) ? '0 : LUT0G[a[6:0]];
  endfunction

  function automatic logic signed [11:0] lut1(logic [PMW-1:0] d);
    return (d >= PMW'(NL12)) ? '0 : signed'(LUT1[d[8:0]]);
  endfunction

  function automatic logic signed [11:0] lut2(logic [PMW-1:0] d);
    return (d >= PMW'(NL12)) ? '0 : signed'(LUT2[d[8:0]]);
  endfunction

  function automatic logic [5:0] lutx(logic [PMW-1:0] d);
    return (d >= PMW'(NLX)) ? '0 : LUTX[d[7:0]];
  endfunction

  // Sign-magnitude multiplication (sum*): signs XOR, magnitudes add.
  function automatic pm_t smm(pm_t a, pm_t b);
    return '{s: a.s ^ b.s, m: a.m + b.m};
  endfunction

  // Sign-magnitude division (sub*): signs XOR, magnitudes subtract.
  function automatic pm_t smd(pm_t a, pm_t b);
    return '{s: a.s ^ b.s, m: a.m - b.m};
  endfunction

  function automatic pm_t gm2pm(gm_t g);
    return '{s: g.s, m: PMW'(g.m)};
  endfunction

  // ---------------------------------------------------------------------
  // Reciprocal dual trellis tables, indexed [kap][branch], branch = {s, x}.
  // Label bit j < kappa is the j-th systematic bit of the stage; bit KB is
  // the parity bit; bits kappa..KB-1 are 0.
  // ---------------------------------------------------------------------
  typedef logic [NMODE-1:0][NBR-1:0][2:0]          nxt_tab_t;
  typedef logic [NMODE-1:0][NBR-1:0][KB:0]         lbl_tab_t;
  typedef logic [NMODE-1:0][NS-1:0][1:0][3:0]      prd_tab_t;
  typedef logic [NMODE-1:0][KB-1:0][1:0][7:0][3:0] sel_tab_t;

  typedef struct packed {
    logic [2:0]  nxt;
    logic [KB:0] lbl;
  } dual_br_t;

  function automatic dual_br_t dual_branch(int kap, int br);
    logic     a0, a1, a2, x3;
    dual_br_t r;
    a0 = br[1]; a1 = br[2]; a2 = br[3];
    r.lbl = '0;
    for (int m = 0; m < (1 << kap); m++) begin
      x3 = (m == (1 << kap) - 1) ? br[0] : (a0 ^ a2);
      r.lbl[m] = a0 ^ a1 ^ x3;
      if (m == (1 << kap) - 1) r.lbl[KB] = a0 ^ a2 ^ x3;
      a0 = a1; a1 = a2; a2 = x3;
    end
    r.nxt = {a2, a1, a0};
    return r;
  endfunction

  function automatic nxt_tab_t mk_next();
    nxt_tab_t t;
    dual_br_t r;
    for (int k = 0; k < NMODE; k++)
      for (int b = 0; b < NBR; b++) begin
        r = dual_branch(k, b);
        t[k][b] = r.nxt;
      end
    return t;
  endfunction

  function automatic lbl_tab_t mk_label();
    lbl_tab_t t;
    dual_br_t r;
    for (int k = 0; k < NMODE; k++)
      for (int b = 0; b < NBR; b++) begin
        r = dual_branch(k, b);
        t[k][b] = r.lbl;
      end
    return t;
  endfunction

  // The two branches entering each state (every state has exactly two).
  function automatic prd_tab_t mk_pred();
    prd_tab_t t;
    int       cnt [NS];
    nxt_tab_t nx;
    nx = mk_next();
    for (int k = 0; k < NMODE; k++) begin
      for (int s = 0; s < NS; s++) begin cnt[s] = 0; t[k][s][0] = '0; t[k][s][1] = '0; end
      for (int b = 0; b < NBR; b++) begin
        int z;
        z = int'(nx[k][b]);
        if (cnt[z] < 2) t[k][z][cnt[z]] = 4'(b);
        cnt[z]++;
      end
    end
    return t;
  endfunction

  // Path metric network: for lane j, the 8 branches whose label bit j is 0
  // (sel[..][0]) and the 8 whose bit j is 1 (sel[..][1]).
  function automatic sel_tab_t mk_sel();
    sel_tab_t t;
    lbl_tab_t lb;
    lb = mk_label();
    for (int k = 0; k < NMODE; k++)
      for (int j = 0; j < KB; j++) begin
        int c0, c1;
        c0 = 0; c1 = 0;
        for (int q = 0; q < 8; q++) begin t[k][j][0][q] = '0; t[k][j][1][q] = '0; end
        for (int b = 0; b < NBR; b++)
          if (lb[k][b][j]) begin
            if (c1 < 8) t[k][j][1][c1] = 4'(b);
            c1++;
          end else begin
            if (c0 < 8) t[k][j][0][c0] = 4'(b);
            c0++;
          end
      end
    return t;
  endfunction

  localparam nxt_tab_t TR_NEXT  = mk_next();
  localparam lbl_tab_t TR_LABEL = mk_label();
  localparam prd_tab_t TR_PRED  = mk_pred();
  localparam sel_tab_t TR_SEL   = mk_sel();

endpackage
