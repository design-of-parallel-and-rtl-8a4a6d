# 2-bit-at-a-time distributed-arithmetic FIR filter with offset binary coding

A 4-tap FIR filter with fixed coefficients that needs no multiplier. It
computes

    y(n) = A0*x(n) + A1*x(n-1) + A2*x(n-2) + A3*x(n-3)

by *distributed arithmetic* (DA). The samples are processed one bit position at
a time. For each bit position, a small look-up table supplies the pre-added sum
of coefficients that this pattern of four sample bits selects. A
shift-and-add loop weights these sums by their bit position.

Three ideas keep the design small and fast:

* **Offset binary coding (OBC)** halves the look-up table. Plain DA needs
  2 x 2^4 = 32 words for four taps. OBC needs 8, because a table word only
  changes sign when all four address bits are complemented.
* **Two bits at a time (2-BAAT).** Every N-bit sample is split into a low half
  and a high half. Two identical lanes work on the two halves in parallel. A
  sample then takes N/2 clocks instead of N.
* **Pipelining.** Pipeline registers hold the two lane results while a final
  adder joins them. Meanwhile the lanes already work on the next sample.

The default configuration uses 16-bit samples and 8-bit coefficients, so a new
output arrives every 8 clocks. With `N = 8` the same RTL gives the 8-bit
variant, at 4 clocks per output.

## The arithmetic

Read each sample as a two's-complement fraction, x = -b0 + sum_{n>=1} b_n 2^-n.
Here b0 is the sign bit and n = N-1 is the least significant bit. OBC rewrites
every bit as c = 2b - 1, so c is either +1 or -1. This gives

    y = -E_0 + sum_{n=1..N-1} E_n 2^-n + E_extra 2^-(N-1)
    E_n     = 1/2 * sum_k c_kn * A_k
    E_extra = -1/2 * sum_k A_k

Complementing all four bits of a slice negates E_n. The table therefore only
has to store the 8 combinations with a fixed x0 bit. For the other 8, the
address is folded and the word is negated:

* The address bits for taps 1..3 are `x_kn XOR x0n`. Tap 1 gives address bit
  2, tap 3 gives bit 0.
* The stored word is `word[a] = A0 + sum_{k=1..3} (a_k ? -A_k : +A_k)`. This is
  the half of the table for x0n = 1, stored at twice its value so that it stays
  an integer.
* The word is negated when `x0n XOR nsign` is 1. The sign switch `nsign` is 0
  on the slice that carries the sign bit (n = 0) and 1 on every other slice. So
  the sign slice gets the extra minus that the term -E_0 asks for.

The RTL works with integers throughout. Samples are N-bit integers X and
coefficients are W-bit integers A. The output is the exact integer
sum A_k * X_k, which is N + W + 2 bits wide. To read it as a fraction, scale it
by 2^-(N-1).

## Datapath

```
 x_in ─► fir_tap_line ─ bits j ─────► da_obc_lane (low)  ─ acc,low ─► ┐
  (x(n)..x(n-3))       bits N/2+j ──► da_obc_lane (high) ─ acc,low ─► da_pipe_add ─► y
                            ▲                ▲                         ▲
                            └──── da_ctrl: slice j, S1..S4, pipe_load ─┘
```

* **`fir_tap_line`** is the delay line for x(n) .. x(n-3). It stays still
  while a sample is processed. In slice j it hands bit j of every tap to the
  low lane and bit N/2 + j to the high lane.
* **`da_obc_lane`** (two instances) each hold one 8-word `obc_rom`, an
  `obc_sign_mux` and a `shift_accumulator`.
  * The sign multiplexer picks either the ROM word or its bitwise inverse. It
    also raises a carry of one, which the accumulator's adder adds in, so the
    inverse becomes an exact two's-complement negation.
  * On its first slice, the accumulator adds the word to the *Extra* input.
    On every later slice it adds the word to its own value shifted right by
    one bit.
  * The low lane's Extra input is the OBC constant −(A0+A1+A2+A3), at the same
    doubled scale as the ROM words. The high lane's Extra input is 0.
  * The bits that the right shift pushes out are not lost: the `low` register
    collects them. After N/2 slices, `{acc, low}` is the lane's exact partial
    sum.
* **`da_pipe_add`** works in two steps.
  * Its pipeline registers capture both lanes' `{acc, low}`.
  * In the next clock it forms `hi * 2^(N/2) + lo`, halves that sum (which is
    exact, because the sum is always even), and loads the result into the
    output register `y`.
* **`da_ctrl`** counts the slices and drives the switches.

### Switches

| switch | lane | value |
|---|---|---|
| S3 | low | 1 on the first slice (the least significant bit, n = N−1): start from Extra |
| S4 | high | 1 on the first slice: start from Extra (0) |
| S1 | low | 0 when n = 0, otherwise 1. The low lane never sees n = 0, so S1 stays 1 |
| S2 | high | 0 on the last slice, which holds the sign bit (n = 0) |

S1 is a constant 1 in this arrangement. Synthesis will show it as a constant
output of `da_ctrl`, which is expected.

## Timing and interface of `da_obc_fir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears the delay line, so the first outputs see zero history) |
| `in_valid` / `in_ready` | in / out | 1 | sample handshake; a sample is taken in a clock where both are high |
| `x_in` | in | N | two's-complement sample |
| `y_valid` | out | 1 | one-clock pulse: `y` holds a new output |
| `y` | out | N+W+2 | exact sum of products, signed |

If a sample is accepted in clock t:

* the slices run in clocks t+1 .. t+N/2;
* `pipe_load` is high in clock t+N/2+1;
* the result appears with `y_valid` in clock t+N/2+3.

`in_ready` is high while the filter is idle and during the last slice. Samples
offered back to back are therefore taken every N/2 clocks. The pipeline
register takes one result in the same clock in which the lanes start on the
next sample.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | sample width. Must be even and ≥ 4. 8 and 16 are the two configurations this architecture is usually quoted for |
| `W` | 8 | coefficient width |
| `COEFFS` | {A3,A2,A1,A0} = {7, −61, 94, 23} | packed signed coefficients, A0 in the low bits. Placeholder values: replace them with your filter |
| `TAPS` (package `da_obc_pkg`) | 4 | fixed. The folding and the 8-word table are built for four taps |

Internal widths:

* ROM words: W+3 bits. This is enough for the sum of four coefficients and for
  its negation.
* Accumulator: W+4 bits.
* Output: N+W+2 bits.

The ROM contents are computed at elaboration from `COEFFS`. Changing a
coefficient means re-elaborating; there is no run-time table update.

## What follows the architecture and what is filled in

These parts follow the published architecture:

* the split of each sample into a least-significant and a most-significant
  half, one lane each;
* the two 8-word OBC ROMs, with the newest sample's bit folding the address
  and choosing the sign;
* the inverter-and-multiplexer sign stage;
* the accumulator multiplexer that chooses between the Extra term and the
  right-shifted feedback (S3/S4);
* the meaning of S1 and S3;
* the pipeline registers, the joining adder and the output register.

These parts are this design's own choices:

* **Which half of the OBC table the ROM stores.** The sign stage negates when
  `x0n XOR S1` is 1, and S1 is 0 on the sign slice. Those two facts fix the
  stored half: it is the half for x0n = 1, the negative of the x0n = 0 rows of
  the usual OBC table. Storing the other half would need the opposite S1
  polarity.
* **S2 and S4** are drawn but not defined in the source. Here they mirror S1
  and S3 for the high lane. The Extra term is added only once, in the low lane.
* **Exact negation and exact shifting.** The sign stage adds a carry of one.
  The accumulator keeps the bits its right shift pushes out. As a result, the
  output equals the mathematical result bit for bit, with no truncation.
* **Joining the lanes.** The high lane's result is shifted by N/2 positions
  before the add, which costs nothing but wiring.
* **Delay line and bit selection.** The delay line, the multiplexer that picks
  each slice's bits, the valid/ready handshake, the asynchronous reset, all
  widths, and the default coefficients are not specified by the architecture.

The flip-flop count of this RTL is not directly comparable with published
slice and flip-flop figures for the architecture. Synthesis at the defaults
gives about 170 flip-flop bits, for these reasons:

* the 4 × N-bit delay line is included;
* the low-bit registers keep full precision;
* the output is N+W+2 bits wide.

## Files

All files are in `rtl/` and `tb/`.

| file | content |
|---|---|
| `rtl/da_obc_pkg.sv` | tap count, ROM size, lane control struct (`lane_ctl_t` = {first, nsign}) |
| `rtl/da_obc_fir.sv` | top level |
| `rtl/da_ctrl.sv` | slice counter, switches, handshake |
| `rtl/fir_tap_line.sv` | delay line and bit selection |
| `rtl/da_obc_lane.sv` | one lane: address folding, ROM, sign stage, accumulator |
| `rtl/obc_rom.sv` | 8-word OBC table |
| `rtl/obc_sign_mux.sv` | inverter / multiplexer sign stage |
| `rtl/shift_accumulator.sv` | shift-and-add loop with Extra start |
| `rtl/da_pipe_add.sv` | pipeline registers, joining adder, output register |

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module with values computed independently, by multiplication or from the OBC
definition, and ends by printing `TB_RESULT checks=<n> failures=<n>`.

* **`tb_da_obc_fir`** runs the top level at its default size (16-bit samples).
  * It sends 3000 random and extreme samples (most negative, most positive,
    zero) with random gaps.
  * It checks every output against a reference FIR, and checks the latency
    (N/2+3 clocks) and the minimum sample period (N/2 clocks).
  * It counts these events and fails if any of them never happens:
    back-to-back samples, idle clocks, Extra starts, sign-slice negations, ROM
    word inversions in each lane, and the pipeline taking a result while the
    next sample is already being processed.
* **`tb_da_obc_fir_n8`** runs the same test with 8-bit samples.
* **The module testbenches** are `tb_obc_rom`, `tb_obc_sign_mux`,
  `tb_shift_accumulator`, `tb_da_obc_lane`, `tb_da_pipe_add`, `tb_da_ctrl` and
  `tb_fir_tap_line`.

To run one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_da_obc_fir \
    -y rtl -y tb +libext+.sv rtl/da_obc_pkg.sv tb/tb_da_obc_fir.sv
./obj_dir/Vtb_da_obc_fir
```

Every testbench finishes in well under a second. The top-level testbenches
read a few internal signals of the filter through hierarchical names, to count
the mechanisms listed above. If you rename instances, update those names too.
