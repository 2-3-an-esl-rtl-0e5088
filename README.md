# R2²EMDC: a pipelined FFT whose throughput is set by one parameter

An N-point FFT on a streaming link often has to meet a throughput constraint,
not just compute a transform. A single radix-2² multi-path delay commutator
(R2²MDC) pipeline takes two samples per clock and so completes 2/N transforms
per cycle. The *vertically expanded* R2²MDC (R2²EMDC) puts `t` such pipelines
side by side and interleaves them. The design then takes `2t` samples per
clock. As `t` grows, delay registers are traded for butterflies and
multipliers:

| quantity                          | formula                 | N=16, t=1 | t=2 | t=4 | t=8 |
|-----------------------------------|-------------------------|-----------|-----|-----|-----|
| complex multipliers               | t·(2·⌈log₄N⌉ − 2)       | 2         | 4   | 8   | 16  |
| complex adders (2 per butterfly)  | 2t·log₂N                | 8         | 16  | 32  | 64  |
| delay registers (complex words)   | N − 2t                  | 14        | 12  | 8   | 0   |
| transforms per clock              | 2t/N                    | 1/8       | 1/4 | 1/2 | 1   |

This RTL implements the whole family as one parameterised module,
`r22_emdc_fft`, with `N` (a power of two, ≥ 2) and `T` (= t, a power of two,
1 … N/2). The defaults are N = 16 and T = 2. At every size the counts above
are what gets instantiated. The design adds one output register per lane to
them.

Compared with a radix-2 pipeline of the same throughput (the Pease
organisation, t·log₂N multipliers), the radix-2² ordering removes every
second column of multipliers. This is the main saving.

## How a frame moves through the pipeline

A frame of N samples enters in `NB = N/(2T)` *beats*, 2T samples per beat:

    input lane l, beat c   carries   x[l·NB + c]

The decimation-in-frequency FFT has log₂N butterfly columns. Column `s` works
on index bit `k = log₂N − 1 − s` and combines samples whose indices differ
only in that bit. Each column has T butterflies. The main problem of the
architecture is bringing the two partners of every butterfly to its two
inputs in the same cycle. How that is done depends on where bit k lives:

* **Lane bits.** The top log₂(2T) index bits select the lane. While k is one
  of them, both partners arrive in the same beat on different lanes. A fixed
  wire permutation (`r22_perm`) routes them to the same butterfly. The column
  that pairs on lane-address bit j takes the sample with lane address a on
  lane `{a without bit j, a[j]}`: the even lane of butterfly g is the partner
  with bit j = 0, the odd lane the one with bit j = 1. These columns use no
  registers.
* **Beat bits.** The remaining log₂(NB) bits count beats. Once k is one of
  them, the partners arrive D = 2^k beats apart. A delay commutator
  (`r22_delay_commutator`) on each lane pair realigns them with a delay of D,
  a 2×2 switch and a second delay of D. The commutator swaps two roles.
  Afterwards the port carries bit k, and beat bit k carries the bit the port
  held before. Each lane pair's commutators hold 2·(NB/2 + … + 1) = 2·(NB − 1)
  words, so the T pairs hold N − 2T in total.

T = 1 is the classic R2²MDC: every column after the first is fed by a
commutator. T = N/2 is fully parallel: only permutations remain, and there
are no delay registers.

`r22_pkg::stage_pos(q, beat, k, tb)` gives the flow-graph position of the
sample on lane q in a given beat. Both the RTL and the testbenches use it as
the definition of the data layout.

### Output order

The results leave in the order the last column produces them. That order is
bit-reversed, with the lane pairs outermost:

    output lane q, beat c   carries   X[ bitrev_log2N( (q/2)·(N/T) + 2c + q%2 ) ]

The `out_bin[q]` port gives this bin index for each lane, so no table is
needed downstream.

Setting the parameter `NATURAL_OUT = 1` adds `r22_reorder` behind the
pipeline. It is a ping-pong buffer of 2 × N complex words. One bank is
written at the bin addresses while the other is read in the input's order:
lane q, beat c carries X[q·NB + c]. This costs one more frame of latency, and
one more frame has to be fed to flush the last result. The option is off by
default, so the default core has exactly the register count in the table.

## Where the twiddle factors go

Radix-2 DIF multiplies every difference output by W_{2^{k+1}}^{i mod 2^k}.
Radix-2² splits these factors over pairs of columns (k, k−1).

* The part that is a power of −j is applied as a swap plus a negation
  (`r22_neg_j`). It happens on the lower input of the second column of the
  pair, the **BF II** (`r22_bfii`), and only when index bit k of that sample
  is 1. The first column of the pair is a plain butterfly, the **BF I**
  (`r22_bf`).
* The remaining factor is applied after the BF II, on **both** outputs:

      W_N^e,  e = ((b[k] + 2·b[k−1]) · b[k−2:0]) · N / 2^{k+1}

  Here b is the sample's flow-graph position. After the last pair the factor
  is 1, so no multipliers are placed there. If log₂N is odd, one radix-2
  column is left over. It is placed last and needs no twiddle. This is what
  makes the multiplier count 2T per pair of columns, minus the last pair.

Each multiplier (`r22_cmult`) has its own coefficient table
(`r22_twiddle_rom`), N entries of `cos` and `−sin` in Q1.15. The tables are
computed at elaboration, so no data file is needed. The address comes from
the column's local beat and the constant lane number.

## Control and timing

`r22_ctrl` counts input beats modulo NB. A column that sits behind commutator
delays sees the data of an earlier beat. Its local beat is therefore the
counter minus the delays in front of it: 2^tb − 2^k for a beat-bit column,
where tb = log₂NB, and 0 for a lane-bit column. The commutator switches, the
−j selects and the twiddle addresses all come from these local beats.

* **Handshake.** A beat is a cycle with `in_valid` high. Every register in
  the pipeline, the counter included, advances only in such cycles. A low
  `in_valid` is a stall. Nothing is lost, and the stall can come anywhere,
  even in the middle of a frame.
* **Latency.** The commutators add NB − 1 beats and the output register adds
  one clock. When the input streams without gaps, frame f is output in the
  same cycles in which frame f+1 is input. `out_valid` is high for one cycle
  per output beat, and `out_last` marks the last beat of a frame.
* **Flushing.** The core only moves when it is fed. To get the last frame
  out, feed NB − 1 more beats, for example zeros.
* **Reset.** `rst_n` is synchronous and active low. It clears only the
  control. The delay lines are not reset. Their old contents are never marked
  valid.

The first frame after reset starts at beat 0. Frames follow each other in
the beat count. There is no per-frame start signal.

## Number format

Inputs are signed W-bit (default 16) real and imaginary parts. At the input
they are sign-extended to `W + log₂N + 1` bits and carried at that width
throughout. This means no butterfly can overflow, and a rotation by a twiddle
(which can grow one component by √2) also fits. The outputs are the unscaled
DFT: X[k] = Σ x[n]·e^{−j2πkn/N}. Rounding happens only in the multipliers
(round to nearest after the Q1.15 product). Against a double-precision DFT,
the worst error seen is 16 LSB at N = 16 and 4096 LSB at N = 1024. Both come
from full-scale input, where the outputs reach about 2^25 at N = 1024. Most
of that error is systematic: W^0 = 1 cannot be represented in Q1.15 and is
stored as 1 − 2^−15.

## Files

| file | contents |
|------|----------|
| `rtl/r22_pkg.sv` | default sizes; bit-reverse and layout functions (`stage_pos`, `lane_of`, `addr_of`) |
| `rtl/r22_emdc_fft.sv` | top: columns, permutations, commutators, twiddles, output register |
| `rtl/r22_ctrl.sv` | beat counter, per-column local beats, `out_valid`/`out_last` |
| `rtl/r22_bf.sv` | BF I: radix-2 butterfly |
| `rtl/r22_bfii.sv` | BF II: −j on the lower input, then a butterfly |
| `rtl/r22_neg_j.sv` | multiplication by −j (swap and negate) |
| `rtl/r22_cmult.sv` | complex multiplier with rounding |
| `rtl/r22_twiddle_rom.sv` | W_N^e table computed at elaboration |
| `rtl/r22_delay_commutator.sv` | delay–switch–delay commutator |
| `rtl/r22_perm.sv` | lane permutation between lane-bit columns |
| `rtl/r22_reorder.sv` | optional natural-order output buffer |

Each testbench `tb/tb_<module>.sv` checks one module against values computed
independently. `tb/tb_r22_emdc_fft.sv` runs the top at its default size.
`tb/tb_r22_configs.sv` (with `tb/fft_harness.sv`) runs 19 configurations:
N = 16 with T = 1, 2, 4, 8; N = 2, 4, 8, 32 and 64 with several T; N = 256
with T = 2; N = 1024 with T = 1 and 8; and four of them with the natural-order
buffer.

## Simulating

With Verilator 5 (two-state, so no unknowns; the testbenches initialise what
they read):

    verilator --binary --timing --assert -Irtl -Itb rtl/r22_pkg.sv \
        tb/tb_r22_emdc_fft.sv --top-module tb_r22_emdc_fft
    ./obj_dir/Vtb_r22_emdc_fft

Use the same command with another testbench name for the other tests. Each
prints `TB_RESULT checks=<n> failures=<n>` and stops itself through a
watchdog if the design hangs.

The end-to-end test streams 12 frames and one flush frame: random data, an
impulse, a tone, two full-scale frames and a zero frame. Three of the frames
pause the input at random. Every bin is compared with a floating-point DFT,
within a tolerance proportional to the input's total magnitude. The test also
checks the bin order, the `out_valid` timing (one-frame latency) and the rate
of one frame every NB cycles. It counts that each mechanism actually
occurred: stalls, −j swaps, commutator crossings, non-trivial twiddles and
permuted frames. Each unit testbench was also run against a copy of its
module with one deliberate bug, and every one of them failed.

To change the size, override `N`, `T`, `W` or `TW` on `r22_emdc_fft`. T = N/2
gives the fully parallel, register-free version. Large N with small T makes
long shift-register delay lines (N/2 − 1 words per lane pair in the first
commutator). An ASIC flow would map them to SRAM.

## Choices this implementation makes

The architecture defines the column structure, the −j and twiddle placement,
the delay-commutator principle and the resource counts above. It leaves these
open, and the RTL settles them as follows:

* **Default configuration.** N = 16, T = 2. This is the smallest expanded
  case, and 16 points is the size the architecture is illustrated with.
* **Lane layout and permutation wiring.** Lane = top index bits. The
  permutation rule is derived from the flow graph so that the delay-register
  count is exactly N − 2t.
* **Widths.** The input is 16 bits. The datapath grows by log₂N + 1 guard
  bits, and there is no scaling. Twiddles are 16 bits.
* **Registers.** There are no pipeline registers other than the commutator
  delays and one output register. The critical path therefore runs through
  all lane-bit columns and up to one multiplier per column pair. A high clock
  rate would need retiming registers, which change the latency but not the
  structure.
* **Control.** The `in_valid` stall handshake, the reset scope, the default
  bit-reversed output order with an index port, and the structure of the
  optional reorder buffer are this implementation's own. `r22_ctrl` carries
  assertions for the handshake. They require that `out_valid` follows only an
  accepted beat, and only once a whole frame has entered.
* **Where the −j sits.** The −j belongs on the wire from a BF I output to
  the following BF II input. Here it is built into the BF II, after the
  commutator, where its select is a single beat or lane bit.
* **Throughput at t = N/2.** The formula 2t/N gives one transform per cycle.
  An example quoted with the architecture gives 1/2 for N = 16, t = 8. The
  RTL follows the formula: 16 samples in per cycle, one transform per cycle.

Not included: the "horizontal compression" variant, which folds an R2MDC
datapath to save hardware at lower throughput and for which no structure is
specified. Also not included is the generator program that chooses `t` from
a throughput constraint. Here that choice is the `T` parameter.
