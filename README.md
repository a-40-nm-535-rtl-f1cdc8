# Multiple code-rate turbo decoder on the reciprocal dual trellis

This is a turbo decoder for the LTE turbo code (two 8-state recursive
systematic encoders, parity polynomial (1+D+D^3)/(1+D^2+D^3), QPP
interleaver) with 4096-bit blocks. It decodes five code rates, 1/3, 1/2,
2/3, 4/5 and 8/9, with the same hardware, and gets faster as the rate goes up.

The central idea: a high-rate code is obtained by puncturing parity bits.
The usual decoder still walks the rate-1/2 mother trellis one information
bit per step, or merges κ steps into a radix-2^κ trellis whose size
explodes. This design instead decodes on the trellis of the *dual code*. The
dual of a rate κ/(κ+1) convolutional code is a rate 1/(κ+1) code. Its
trellis always has 8 states and 2 branches per state, and each branch
carries κ+1 label bits. So one trellis step consumes κ information bits
while the recursion hardware stays radix-2 and 8-state. With κ = 16, each
SISO (soft-in/soft-out) decoder produces 16 extrinsic values per clock.

## The dual trellis and its arithmetic

### Trellis

A dual codeword of the constituent code is any sequence

    c_u[m] = x[m] ^ x[m+1] ^ x[m+3],   c_p[m] = x[m] ^ x[m+2] ^ x[m+3]

for a free binary sequence x.

- **State:** the state before mother step m is (x[m+2], x[m+1], x[m]).
- **Puncturing:** when only the last parity bit of every κ bits is sent, the
  dual codeword must be 0 at the punctured parity positions. That forces
  x[m+3] = x[m] ^ x[m+2] on κ-1 of every κ steps.
- **Merged stage:** merging the κ steps gives an 8-state, 16-branch stage.
  Each branch carries κ systematic label bits and one parity label bit.
- **Tables:** `turbo_pkg` computes next-state, label, predecessor and
  path-metric-network tables for all five modes at elaboration time, by
  exactly this construction.

### Sign-magnitude log domain

In the dual domain the decoder multiplies and adds *signed* quantities
q = tanh(L/2), not probabilities. A number is therefore held as
[sign; magnitude], with value (-1)^s · e^(-m). The operations are:

| operation | unit | what it does |
|---|---|---|
| product | SMM | XOR the signs, add the magnitudes |
| quotient | SMD | XOR the signs, subtract the magnitudes |
| sum (min*) | `sma_unit` | take the sign and magnitude of the larger value, then correct the magnitude with a table: -ln(1+e^-d) when the signs agree, -ln(1-e^-d) when they differ (d = difference of the magnitudes) |

Magnitudes of path metrics are 18-bit modulo numbers with 6 fraction bits.
Only their differences are ever compared, so no normalisation is needed.

### Extrinsic values

For lane j of a stage, the decoder forms Q0 and Q1: the min*-sums of
α·γ·β over the 8 branches whose label bit j is 0 and 1 respectively. Then:

    U = Q0 / (Q1 / g_j)
    L_ext = ρ · sign(U) · (-ln tanh(|U_M| / 2))

Here g_j is the lane's own bit metric, U_M is the magnitude of U, and the
second line is a table look-up. The scaling factor ρ is 0.75 at rates 1/3
and 1/2 and 0.875 above.

### Bit metrics

The metric pre-processor turns channel LLR + a priori LLR into
[sign; -ln tanh(|L|/2)].

### Number formats

| quantity | format |
|---|---|
| channel LLR | 6-bit two's complement, 3.3 fixed point |
| extrinsic LLR | 7 bits (units of 1/8) |
| channel + a priori sum | 8 bits |
| bit-metric magnitude | 10 bits, 6 fraction bits |
| path-metric magnitude | 18 bits, modulo |

All look-up tables are computed in SystemVerilog from their formulas; the
formulas are listed in `turbo_pkg.sv`.

## Architecture

`turbo_decoder` (top) contains:

- **`input_memory`:** systematic LLRs in 2 × 16 single-port banks (one half
  of the block per SISO), plus the two parity memories (one parity LLR per
  trellis stage).
- **`extrinsic_memory`:** K extrinsic LLRs in 2 × 16 dual-port banks. The a
  priori values for new stages are read while extrinsic values of older
  stages are written back to the same addresses.
- **`interleaving_bus`:** a crossbar from lane addresses to banks. Address a
  goes to half a ≥ K/2, bank a mod 16, row (a mod K/2)/16. With a QPP
  interleaver, κ successive addresses never share a bank, and the second
  SISO's addresses are the first's plus K/2. Collisions are detected and
  reported on `conflict`.
- **`qpp_addr_gen`:** two instances, one producing read addresses and one
  replaying the same sequence for the write-back. Each produces κ addresses
  per stage by recursion, in sliding-window order. Within a window the
  stage index i descends, using

      π(κ(i-1)+j) = π(κi+j) - G + κ²f2

  and from one window to the next it jumps up by w = 2W-1 stages, using

      π(κ(i+w)+j) = π(κi+j) + w·G + (wκ)²f2

  where G = 2κf2(κi+j) + κf1, all mod K. Natural order uses f1 = 1, f2 = 0.
- **`metric_preproc`:** two instances, one per SISO.
- **`siso_decoder`:** two instances, each decoding one half of the block.
  See the next section.
- **`output_buffer`:** hard decisions sign(L(c;y) + L_ext) at natural bit
  addresses, read 16 bits per word.

Inside each `siso_decoder`:

- two window buffers (`window_buffer`);
- three gamma units (`branch_metric_unit`);
- the β_d, α and β recursion units (`recursion_unit`, each built from 8
  `sma_unit`s);
- an α LIFO (`alpha_buffer`);
- 16 path-metric SMMs;
- 16 `extrinsic_unit`s, each with two `hier_min_unit` trees of 7 SMAs.

### Sliding-window schedule

Time is cut into periods of W cycles. In period p:

1. window p streams in, in reverse stage order, is written into window
   buffer p mod 2, and runs through the dummy backward recursion β_d, which
   starts from "no information";
2. the α recursion runs forward over window p-1 and pushes its metrics onto
   the LIFO;
3. the β recursion runs backward over window p-2, starting from β_d's
   result. It pops α and feeds the extrinsic units, which emit κ extrinsic
   values per cycle.

### Half-iteration timing

A half-iteration therefore takes K/(2κ) + 2W cycles, plus 7 cycles of
pipeline and control. Measured per half-iteration at K = 4096:

| κ | rate | W | cycles |
|---:|:---:|---:|---:|
| 1 | 1/3 | 32 | 2119 |
| 2 | 1/2 | 32 | 1095 |
| 4 | 2/3 | 16 | 551 |
| 8 | 4/5 | 8 | 279 |
| 16 | 8/9 | 8 | 151 |

### Iterations

Even half-iterations decode code 1 in natural order; odd ones decode code 2
in interleaved order. SISO 1 starts from the known zero state. SISO 2 starts
from α-bar, SISO 1's final forward metric from the previous iteration of the
same constituent code ("no information" in the first iteration). Block ends
are treated as open: no termination.

### Throughput

At 252 MHz and 6 iterations, the cycle counts above give about 41, 79, 156,
308 and 570 Mbit/s for the five rates. This counts decoding only; loading a
block is not overlapped with decoding.

## Departures and choices to be aware of

- **Scaling factor ρ.** ρ multiplies the table *output*. The formula it
  comes from places ρ inside the tanh, tanh(ρ·U_M/2). That reading enlarges
  the extrinsic values instead of damping them, and in simulation it made
  4096-bit blocks diverge.
- **Bit-metric floor.** Bit-metric magnitudes are limited to at least 1/64.
  This caps |L| at about 5.5 inside the trellis. Without the floor, very
  reliable stages cancel exactly in the dual domain, and long blocks decoded
  *worse* at higher SNR.
- **Memory split.** Each memory is split into two halves, one per SISO, so
  that both SISOs access their κ words in the same cycle.
- **Parity storage.** Parity LLRs are stored per trellis stage. Punctured
  bits are never stored.
- **Unspecified details.** The loading port, the hard-decision read port,
  the control FSM, the pipeline depth and every word width beyond the 6-bit
  channel input are this design's own.
- **Interleaver coefficients.** The QPP coefficients are inputs. The tests
  use f1 = 31, f2 = 64, the LTE pair for K = 4096.
- **Not modelled.** SRAM macros are written as arrays. Chip-level parts
  (pads, clocking, power domains) are not modelled.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module against an independent model: real-number arithmetic for the
min*/SMM units, the recursions and the extrinsic formula; a trellis derived
separately in the testbench; and direct QPP evaluation, including cells of a
published K = 192 example.

End-to-end tests:

- **`tb_turbo_decoder`** (K = 512, all five rates, 6 iterations). Random
  bits are encoded, punctured, sent through AWGN and quantised to 3.3. Every
  block must decode error-free while the raw decisions are not. It also
  checks the half-iteration cycle count and that no bank conflict occurs,
  and it counts the mechanisms: every mode, interleaved half-iterations,
  the α-bar hand-over, and overlapping a priori reads with write-backs.
- **`tb_turbo_decoder_full`** (K = 4096, the default size, rates 1/3 and
  8/9). Rate 1/3 decodes error-free. At rate 8/9 (σ = 0.40) a few residual
  errors remain (4 of 4096 against 23 raw), and up to 8 are accepted. A
  heavily punctured code with 8-stage windows at this block length has an
  error floor there. No bit-error-rate curves were simulated.

Run any test with plain Verilator, the package first:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_turbo_decoder \
        rtl/turbo_pkg.sv rtl/*.sv tb/tb_turbo_decoder.sv
    ./obj_dir/Vtb_turbo_decoder

Each testbench ends with `TB_RESULT checks=N failures=M`. The full-size test
runs in well under a minute.

## Changing it

- **Block size:** parameter `K` of `turbo_decoder`. It must be a multiple of
  256, so that every mode's half-block is a whole number of windows. Give
  matching f1 and f2 at run time.
- **Window lengths:** `turbo_pkg::win_len`.
- **Word widths:** the constants at the top of `turbo_pkg`. The look-up
  tables follow automatically.
