# Parallel LTE turbo decoder with compressed next-iteration metrics

A turbo decoder runs its constituent decoders many times over the same frame.
Between two runs it keeps, at every sliding-window boundary, the backward state
metrics it reached, so that the next iteration can start the backward
recursion from a good estimate instead of from scratch (*next-iteration
initialisation*, NII). Stored plainly, that is 7 metrics × 12 bits per
boundary (state 0 is always 0 after normalisation), or 32,256 bits for a
6144-bit LTE frame with 32-step windows and two decoding phases.

This design stores each boundary as **one 14-bit word**: the spread
`delta = max − min` of the eight metrics, saturated to 8 bits, plus the 3-bit
indexes of the largest (`IMAX`) and smallest (`IMIN`) state. A max-log-MAP
decoder only follows the most reliable path, so what matters at a window start
is which state is best and by how much. Before the next iteration, a small
multiplexer network rebuilds eight metrics from the word. For the 6144-bit
frame the NII storage drops to 5376 bits, one sixth of the plain scheme.

The surrounding decoder follows the architecture this compression comes with:
- max-log-MAP decoding on the 8-state LTE trellis;
- sliding windows of 32 steps;
- eight SISO (soft-in soft-out) decoders working in parallel on segments of
  the frame;
- a recursive QPP interleaver;
- at most eight iterations, with early stopping.

Everything is synthesizable SystemVerilog. The top module is `turbo_decoder`.

## Decoding flow

One iteration is two half-iterations, run by the same hardware:

| phase | code decoded | order of steps | a-priori input | parity used |
|---|---|---|---|---|
| 0 (in-order) | first constituent code | natural | extrinsic of phase 1 | parity 1 |
| 1 (interleaved) | second constituent code | QPP order `pi(i)` | extrinsic of phase 0 | parity 2 |

All extrinsic values live in one memory, in natural order. A half-iteration
reads the a-priori value of each step and writes the new extrinsic value back
**to the same address**. In phase 1 the address is `pi(i)`, so reading
interleaves and writing back deinterleaves, and no second address sequence is
needed. In the first half-iteration of a frame the a-priori input is forced to
zero.

Phase 1 also writes a hard decision `Ls + La + Le > 0` for every bit, at its
natural address, into a decision memory. While it writes, it compares each
decision with the one already stored. Decoding stops:
- **early**, after an iteration (from the second on) in which no decision
  changed;
- at the latest, after `MAX_ITER = 8` iterations.

## Eight decoders, eight banks, no collisions

The frame of `N = 6144` steps is cut into `P = 8` segments of `M = 768` steps.
Decoder `j` always handles segment `j`, and all eight run in lockstep: in every
cycle they all work on the same local step `t`. Every frame memory is split the
same way, into eight banks of 768 words (`address = bank·768 + row`):
- channel LLRs: systematic, parity 1, parity 2;
- extrinsic LLRs;
- hard decisions.

- **Phase 0:** decoder `j` reads and writes bank `j`, row `t`. There is no
  conflict.
- **Phase 1:** decoder `j` needs address `pi(j·768 + t)`. For a QPP
  permutation and a segment length that divides `N`, these eight addresses
  always share one row and lie in eight different banks. The memories
  therefore serve all eight decoders in the same cycle through a read crossbar
  and a write crossbar, with no stalls and no arbitration. An assertion in
  `banked_llr_memory` checks that no two ports ever hit the same bank.

Each decoder has its own `qpp_interleaver`. It generates the addresses
recursively, without multipliers:

    pi(i+1) = pi(i) + g(i),   g(i+1) = g(i) + 2·f2   (mod N)

It works directly in (bank, row) form: an addition that carries past row 767
moves on to the next bank. The start values for `i = j·768` are computed at
elaboration. The defaults `f1 = 263`, `f2 = 480` are the LTE coefficients for
K = 6144. Parity 2 is loaded in the order of the interleaved sequence, so it
is always read at (bank `j`, row `t`).

## Inside one SISO decoder

`siso_decoder` handles its segment window by window (`WIN = 32`). Each window
has two passes:

1. **Forward pass (W + 1 cycles).** The decoder issues W reads (`rd_en`,
   `rd_t`). The data arrive one cycle later. Each step:
   - forms four branch metrics `gamma(u,p) = u·(Ls+La) + p·Lp`;
   - advances the forward metrics `alpha`;
   - stores `alpha_t` and the step's inputs in the window buffer.

   The forward recursion runs on across window borders.
2. **Backward pass (W cycles).** The decoder starts from the metrics rebuilt
   for the window's end boundary and walks the buffer backwards. Each cycle it
   emits one extrinsic LLR `Le = max_{u=1}(α+pLp+β) − max_{u=0}(…)` (8 bits,
   saturated) and the a-posteriori LLR `Ls+La+Le`. With them it returns the
   address tag that came with the read, which tells the top where to write.

   The backward metrics reached at the window's start boundary are compressed
   into one NII word and stored.

The two passes do not overlap. A half-iteration therefore takes
`(M/W)·(2W+1) + 1` cycles from `start` to `done`; that is 1561 cycles at the
defaults. All state metrics are 12-bit signed values, normalised after every
step so that state 0 is 0, and saturated.

### Where each NII word goes

- **Own memory.** A decoder's `nii_memory` holds 2 phases × 24 windows × 14
  bits. Entry `x` is the compressed metric set at the end boundary of window
  `x`. Window `x` produces the set at its own start boundary, which is the end
  boundary of window `x−1`, so it writes entry `x−1`. The next half-iteration
  of the same phase reads entry `x` to start window `x`.
- **Previous decoder.** The start boundary of window 0 is the end boundary of
  the previous segment. The word goes to the previous decoder (`nii_prev_*`),
  which stores it as entry 23. Because the decoders run in lockstep, it
  arrives during the previous decoder's first window. That decoder's last
  window therefore starts from its neighbour's result of the **same**
  half-iteration.
- **Forward metrics at segment ends.** These are kept uncompressed, one set
  per phase. They become the forward start of the next segment in the next
  iteration.
- **Frame edges.** Decoder 0 starts in state 0. The last window of the frame
  starts from equal metrics, because tail bits are not processed.
- **First half-iteration of each phase in a frame.** Every stored start point
  is replaced by equal metrics.

### Compression and recovery

`nii_compressor` finds maximum, minimum and both indexes with ten comparators,
because the maximum and minimum searches share their first level:

    level 1   4 × MAX-MIN  on pairs (0,1) (2,3) (4,5) (6,7)
    level 2   2 × MAX on the pair maxima,   2 × MIN on the pair minima
    level 3   1 × MAX,                       1 × MIN
    SUB/CLIP  delta = min(max − min, 255)

A MAX-MIN module is one comparator and two multiplexers. MAX and MIN are one
comparator and one multiplexer each. The state index travels through the same
multiplexers, so `IMAX` and `IMIN` fall out of the comparisons already made.
Ties: `IMAX` is the lowest index holding the maximum. For `IMIN`, a tie inside
a pair selects the odd state, and between pairs the lower pair wins.

`nii_recovery` gives the `IMAX` state the value `delta`, the `IMIN` state 0
and every other state `delta/2`. It needs only comparators on 3-bit indexes and
multiplexers. The backward step that follows re-normalises to state 0.

## Number formats

| quantity | width | note |
|---|---|---|
| state metric (α, β) | 12 bit signed | normalised to state 0, saturating |
| stored range `delta` | 8 bit unsigned | saturating |
| `IMAX`, `IMIN` | 3 bit each | |
| channel LLR | 6 bit signed | positive favours bit 1 |
| extrinsic LLR | 8 bit signed | saturating, not scaled |
| branch metric | 10 bit signed | |
| a-posteriori LLR | 10 bit signed | |

Widths and shared types are in `rtl/turbo_pkg.sv`.

## Top-level interface and timing

`turbo_decoder #(N=6144, P=8, W=32, MAX_ITER=8, F1=263, F2=480)`:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `in_valid`, `in_ready` | in / out | load handshake: one triple per accepted cycle |
| `in_sys`, `in_par1`, `in_par2` | in | 6-bit LLRs; `in_par2` is the second encoder's parity for the same step index |
| `out_valid`, `out_bit`, `out_last` | out | N decisions in natural order, one per cycle, no back-pressure |
| `iters`, `early_stop` | out | iterations used for the last frame; stopped before the limit |
| `busy` | out | high from the end of loading to the end of read-out |

A frame is N loads, then decoding, then N output cycles. From the cycle that
accepts the last input to the first `out_valid` takes
`2·iters·((M/W)·(2W+1) + 3) + 2` cycles: 6254 cycles for a frame that stops
after two iterations, 9380 for three and 25,010 for eight. `N` must be a
multiple of `P`, `N/P` a multiple of `W`, and `(F1, F2)` a valid QPP pair for
`N`.

## Files

| file | content |
|---|---|
| `turbo_pkg.sv` | widths, types, trellis functions |
| `turbo_decoder.sv` | top: decoders, QPP generators, memories, wiring |
| `turbo_controller.sv` | load, half-iteration sequencing, stopping rule, read-out |
| `siso_decoder.sv` | sliding-window max-log-MAP decoder with NII |
| `branch_metric_unit.sv`, `alpha_unit.sv`, `beta_unit.sv`, `llr_unit.sv` | datapath of one trellis step |
| `window_buffer.sv` | one window of forward metrics and inputs |
| `nii_compressor.sv`, `max_min_unit.sv`, `max_unit.sv`, `min_unit.sv`, `sub_clip.sv` | NII compression |
| `nii_recovery.sv`, `nii_memory.sv` | NII rebuild and storage |
| `qpp_interleaver.sv` | recursive QPP addresses in bank/row form |
| `banked_llr_memory.sv` | P-bank memory with crossbars |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=… failures=…`. `tb/tb_ref_pkg.sv` holds reference models
written independently of the RTL: the trellis as an encoder shift register,
the max-log-MAP steps in plain integers, and the compression and recovery
rules. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/turbo_pkg.sv \
        tb/tb_ref_pkg.sv tb/tb_siso_decoder.sv --top-module tb_siso_decoder
    ./obj_dir/Vtb_siso_decoder

The testbenches check the following:
- **`tb_siso_decoder`** compares every output bit-exactly with a reference
  model of the full windowed schedule, for a middle segment over four
  half-iterations. Stored metrics are unused in the first two and recovered in
  the last two. It also checks the words handed to the neighbours and the
  half-iteration time.
- **`tb_qpp_interleaver`** walks all eight generators through their segments
  at N = 6144. At every step it checks the addresses against the polynomial,
  and that the eight addresses share one row and use eight distinct banks.
- **`tb_turbo_decoder`** (N = 512, 4 decoders, W = 16) and
  **`tb_turbo_decoder_full`** (all defaults) encode random frames with a
  reference LTE turbo encoder. They add Gaussian noise, decode, and compare
  the result with the information bits. The frames cover:
  - a noise-free frame at full LLR scale (drives the range into saturation);
  - moderately noisy frames, which must decode without error and stop early;
  - a very noisy frame, which must run to the iteration limit.

  They check the decoding latency against the formula above. They also count
  that each mechanism occurred: early stop, iteration limit, NII store,
  recovery and clipping, hand-over between segments, and cross-bank reads.

At the defaults the full-size testbench runs four frames in well under a
second of simulation time:

| frame | noise sigma (amplitude 6) | raw sign errors | errors after decoding | iterations | latency |
|---|---|---|---|---|---|
| 0 | none, amplitude 30 | 0 | 0 | 2 (early stop) | 6254 |
| 1 | 0.55 | 203 | 0 | 2 (early stop) | 6254 |
| 2 | 0.90 | 791 | 0 | 3 (early stop) | 9380 |
| 3 | 3.00 | 2319 | 2538 | 8 (limit) | 25010 |

The last frame is far below the decoding threshold; it only exercises the
iteration limit.

## Where this design makes its own choices

The compression, its comparator tree, the widths of the state metrics and the
range, the window length, the number of parallel decoders, the iteration limit
and the recursive QPP generator come from the architecture this design follows.
The following are this implementation's own choices:

- **Recovery rule** (`delta` / 0 / `delta/2`). The architecture calls for a
  multiplexer-only recovery but does not fix the values.
- **Stopping criterion**: no hard decision changed over a whole iteration. The
  architecture uses an early stop but does not specify the test.
- **Word lengths** of channel, extrinsic and branch metrics.
- **No extrinsic scaling.**
- **No trellis termination.** Tail bits are not processed, so a frame encoded
  with LTE tail bits is decoded as if it had none.
- **Non-overlapped forward and backward passes.** A pipelined schedule with a
  double window buffer would nearly halve the half-iteration time; no
  throughput target is given.
- **Segment-end forward metrics stored uncompressed** (8 × 2 × 96 bits for the
  whole decoder).
- **Deinterleaving by in-place write-back**, and parity 2 supplied in
  interleaved order.
- **Frame interface**: streaming load and read-out, one sample per cycle.

The reported FPGA figures (about 103.6 MHz on a Xilinx device) were not
reproduced; the RTL has no target-specific parts.
