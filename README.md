# SMSS reconfigurable FFT/IFFT processor (2 to 256 points)

This is a pipelined FFT/IFFT processor for OFDM-style workloads. One datapath
computes 2-, 4-, 8-, 16-, 32-, 64-, 128- or 256-point transforms of 8-bit complex
data, and the IFFT runs on the same hardware. The core is a 256-point
mixed-radix pipeline (4 x 8 x 8) that moves eight samples per clock on eight
parallel data paths, in a mixed-radix multipath delay commutator (MRMDC)
arrangement. It uses a **shared multiplier scheduling scheme (SMSS)**: the
rotations that would normally sit in front of the second stage are done in the
first stage, before the data is reordered. As a result, the second-stage radix-8
butterfly needs no multiplier. All remaining multipliers use the Urdhva
Tiryakbhyam ("vertically and crosswise") Vedic method. The transform size is
chosen at run time by a multiplexer in front of the core, driven by four select
lines.

The RTL follows the published SMSS reconfigurable processor where that
description is specific. That covers the eight paths, the radix-4 first stage
with its stream delays, the first-stage shared multipliers, the multiplier-free
radix-8 stages, the Vedic multipliers, the 8-bit ports, and the size-select
multiplexer with lines s5..s8. Where the description is silent, the design makes
its own choices, listed in [Departures and own choices](#departures-and-own-choices).

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `s5 s6 s7 s8` | in | 1 each | size select, `s5` most significant: `0000` = 256, `0001` = 128, ... `0111` = 2; `1xxx` = 256 |
| `ifft` | in | 1 | 0 = forward transform, 1 = inverse transform |
| `in_re[256]`, `in_im[256]` | in | 8 signed | input samples; only `in_*[0 .. N-1]` are used |
| `out_re[256]`, `out_im[256]` | out | 8 signed | result bins; `out_*[k]` for `k >= N` read 0 |
| `out_valid` | out | 1 | one-clock pulse when the outputs change |

The processor runs freely after reset. It samples all 256 inputs, the size lines
and `ifft` once every **32 clocks**: first at the first rising edge after reset
is released, then at every 32nd edge. The result of that frame appears on the
outputs, with an `out_valid` pulse, **105 clocks** after the sampling edge. A
new result follows every 32 clocks. Outputs hold between updates. Each frame
carries its own size and direction through the pipeline, so the settings can
change from one frame to the next without corrupting either frame.

Output scaling:
- **Forward:** `X(k) = sum x(n) e^{-j2πnk/N}`, unscaled, rounded to integers and
  saturated to [-128, 127].
- **Inverse:** `x(n) = (1/N) sum X(k) e^{+j2πnk/N}`, rounded and saturated.

For a 256-point forward transform of full-scale data, most bins saturate. Keep
the input amplitude matched to N if the bins must stay in range.

## How a 256-point transform is split

Everything hard about this design is in the index bookkeeping. The sample index
and the bin index are split as

```
n = 64*n1 + 8*m + p     n1 = 0..3, m = 0..7, p = 0..7   (n2 = 8m + p)
k = k1 + 4*r + 32*q     k1 = 0..3, r = 0..7, q = 0..7
```

so that

```
X(k) = sum_p W8^(p q) * W64^(p r) * sum_m W8^(m r) * [ W256^(n2 k1) * sum_n1 x(n) W4^(n1 k1) ]
                                    \_ stage 2 _/    \_ shared mult _/ \____ stage 1 ____/
       \_ stage 3 _/ \_ tw64_mult _/
```

Each term is evaluated by one stage of the pipeline:

| stage | unit | sums over | data arrangement at its input |
|---|---|---|---|
| feed | `frame_feeder` | - | beat t = 0..31: path p carries sample 8t + p |
| 1 | `s1_path` x 8 | n1 (radix-4) | path p, beats 0..31 = streams A, B, C, D (n1 = 0..3) of 8 beats each |
| 1 | `shared_mult` | - | rotates output k1 of butterfly m by W256^((8m+p) k1) |
| reorder | `commutator` (4 rows/clock) | - | writes rows {k1, m}; reads rows {k1, p}, line m |
| 2 | `bu_r8` | m (radix-8) | row {k1, p}: line m holds n2 = 8m + p |
| - | `tw64_mult` | - | line r of row {k1, p} rotated by W64^(p r) |
| reorder | `commutator` (1 row/clock) | - | writes rows {k1, p}; reads rows {k1, r}, line p |
| 3 | `bu_r8` | p (radix-8) | row {k1, r}: line p |
| out | `out_unit` | - | line q of row {k1, r} is bin k1 + 4r + 32q |

**Stage 1 and its idle period.** Each path receives its 32 samples of a frame as
four consecutive 8-beat streams A, B, C, D. Samples n2, n2+64, n2+128 and n2+192
sit at the same position in streams A..D. `stream_delay` delays the path by 24,
16 and 8 clocks; a 128-point core would use 12, 8 and 4 clocks. This lines the
four streams up, so the radix-4 butterfly has all four operands in the last 8
beats of the frame (the computation period). In the first 24 beats (the idle
period) it has nothing to do. The butterfly then emits all four of its outputs
(k1 = 0..3) in the same clock. Three of them are rotated right away by the
path's shared multipliers. This is the SMSS step: in a plain MRMDC pipeline
these rotations sit in front of the second stage.

**Commutators.** Stage 2 needs, for one (k1, p), the eight values m = 0..7 side
by side. Stage 1 produced them one per clock on path p. The first commutator is
an 8 x 8 transposition within each k1 block. It is built as a ping-pong buffer of
two 32-row x 8-word banks. One bank is written while the other is read. Reading
starts in the clock after the last write of a frame and takes one row per clock.
The second commutator transposes again, so stage 3 can sum over p. A concurrent
assertion checks that no frame completes while its bank is still being read.

**Multiplier-free radix-8.** `bu_r8` is a radix-2 step followed by two radix-4
butterflies. Three constant rotations are needed:
- W8^2 = -j is a swap of the real and imaginary parts.
- W8^1 = (1-j)/√2 and W8^3 = -(1+j)/√2 need the constant 1/√2. It is computed
  with shifts and adds as `(46341 v + 2^15) >> 16`, where
  46341 = 2^15 + 2^13 + 2^12 + 2^10 + 2^8 + 2^2 + 1.

## Reconfiguration

The core always computes 256 points. `size_mux` turns an N-point problem into a
256-point one by spreading the N inputs with stride S = 256/N and filling zeros
in between: `x'(n) = x(n/S)` if S divides n, else 0. The 256-point DFT of x' is
the N-point DFT of x, repeated 256/N times. `out_unit` keeps bins 0..N-1 and
clears the rest. So one multiplexer in front of the fixed pipeline is all the
reconfiguration hardware. The price is that small sizes take as long, and as
much energy, as a 256-point frame.

For the inverse transform, `size_mux` conjugates the inputs. `out_unit`
conjugates the results and divides them by N with a rounded arithmetic shift.

## Number format and accuracy

- **Ports:** 8-bit two's complement.
- **Internal words:** 22 bits (`IW`). The input enters as `sample * 16`
  (`FRAC` = 4 fraction bits). A 256-point unscaled result of 8-bit data is below
  2^17 in each component, so no stage scales or saturates. The only saturation
  is at the output ports.
- **Twiddle factors:** 12-bit signed, scaled by 1024 (`TW`, `TW_FRAC`), so +1.0
  is exact. They are generated by `twiddle_rom` from a quarter-wave table
  `COS_Q[i] = round(1024 cos(2πi/256))`, i = 0..64, using quadrant symmetry.
- **Rounding:** every complex product is rounded to nearest (`cmul_vedic`).
- **Accuracy:** against a floating-point DFT, results are within 1 LSB of the
  8-bit output. For bins far beyond the output range, the error grows by about
  1/256 of the magnitude, which comes from the 12-bit twiddles.

## Vedic multipliers

`vedic_mult` is an unsigned A x B multiplier. For each result column k it forms
all crosswise bit products `a[i] & b[k-i]` at once and counts them. It then adds
the column counts, each weighted by 2^k, which resolves the carries from column
to column. `cmul_vedic` handles signs by multiplying magnitudes and restoring the
sign. Each complex product uses four of these multipliers, 22 x 12 bits each,
and the result is registered.

Multiplier count:
- First stage: 3 complex multipliers per path x 8 paths.
- Before stage 3: 8 complex multipliers (`tw64_mult`).

## Files

| file | contents |
|---|---|
| `rtl/smss_pkg.sv` | sizes, word types, frame configuration and tag |
| `rtl/twiddle_rom.sv` | twiddle generator W256^e (quarter-wave table) |
| `rtl/smss_fft_top.sv` | top level: wires the pipeline below |
| `rtl/size_mux.sv` | size-select multiplexer, IFFT input conjugation |
| `rtl/frame_feeder.sv` | frame counter, input capture, distribution onto 8 paths |
| `rtl/s1_path.sv` | one first-stage path = `stream_delay` + `bu_r4` + `shared_mult` |
| `rtl/stream_delay.sv`, `rtl/bu_r4.sv`, `rtl/shared_mult.sv` | its parts |
| `rtl/commutator.sv` | ping-pong transposition buffer (used twice) |
| `rtl/bu_r8.sv` | radix-8 butterfly without multiplier (used twice) |
| `rtl/tw64_mult.sv` | W64 rotations before the third stage |
| `rtl/cmul_vedic.sv`, `rtl/vedic_mult.sv` | complex and real Vedic multipliers |
| `rtl/out_unit.sv` | bin ordering, size masking, IFFT scaling, saturation, output registers |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_workload_unit4.sv` | 256-point transform of four unit samples |

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops. The end-to-end test runs the top
at its full default size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_smss_fft_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/smss_pkg.sv tb/tb_smss_fft_top.sv
./obj_dir/Vtb_smss_fft_top
```

Replace the top module and file name to run any other testbench.
`tb_smss_fft_top` applies 20 back-to-back frames: every size as FFT and as IFFT,
changes of size between consecutive frames, and an overdriven frame to force
saturation. It compares every bin with a floating-point DFT and checks that
frame j's `out_valid` comes exactly 32j + 105 clocks after the first sampling
edge. It also fails if a size, the inverse mode, saturation or a size change
never happened. Building takes about 20 s; the run takes well under a second.

The block testbenches check their module against independent references:
- integer products (`vedic_mult`, `cmul_vedic`);
- exact or floating-point DFTs (`bu_r4`, `bu_r8`, `shared_mult`, `tw64_mult`,
  `s1_path`);
- explicit index maps (`commutator`, `frame_feeder`, `size_mux`, `out_unit`).

They also check each block's clock-level timing.

Sizes are parameters of `smss_pkg`: `NPT`, `PATHS`, `DW`, `IW`, `TW`, `FRAC`.
The index arithmetic in `frame_feeder`, `commutator`, `out_unit` and the twiddle
exponents is written for the 256-point, 8-path, 4 x 8 x 8 arrangement. Changing
`NPT` or `PATHS` therefore means reworking those modules, not just changing the
parameter.

## Departures and own choices

- **Throughput.** The published figure is 64 samples per clock (8.036 GS/s at
  126 MHz). This design follows the eight data paths that the architecture
  describes, which gives 8 samples per clock: one 256-point transform per
  32 clocks, about 1.0 GS/s at 126 MHz. No clock rate is claimed for this RTL.
- **Commutators** reorder whole frames in ping-pong buffers. They do not use
  switched delay lines (the original drawing shows four switch modes). The data
  order they produce is the one the next stage needs. The cost is more storage
  (2 x 256 words per commutator) and one extra frame of latency in each.
- **Shared multipliers** are one complex multiplier per rotated butterfly output
  (three per path). They are active only in the 8-beat computation period. The
  original shares them further in time, but its muxing is not described in
  enough detail to reproduce.
- **Radix-2 mode of the first-stage butterfly** (two radix-2 butterflies for a
  128-point core) is not built, because every size runs on the 256-point core.
- **Reconfiguration by stride spreading**, the size codes for sizes other than
  256, the extra `ifft` and `out_valid` pins, the once-per-frame input capture,
  the internal widths and twiddle format, rounding and output saturation are all
  choices of this design. The original names the select lines s5..s8 (one block
  diagram labels them S4..S7), gives `0000` as the 256-point code, and fixes the
  8-bit port width.
- **Twiddle multipliers in front of the third stage** (`tw64_mult`) follow from
  the decomposition. The published drawing only shows the first two stages.
- **Reference waveform.** The published simulation of inputs 1, 1, 1, 1, 0, ...
  (size code `0000`) prints output values that are not the DFT of that input,
  apart from the DC bin (4). This design produces the mathematically correct
  transform (X(0) = 4, X(1) ≈ 4 - 0.1j, falling to 0 at k = 64), and
  `tb_workload_unit4` checks it. The printed values are not reproduced.
- **Top-level port arrays.** The ports are 0-based arrays: `in_re[i-1]`
  corresponds to the pin named `in<i>_re`.

## Size

The pipeline holds:
- 256 input capture words and 256 result words;
- two commutators of 2 x 256 words each;
- 24 words of stream delay per path.

All of these are 44-bit complex values. Arithmetic: 32 complex Vedic
multipliers (128 real 22 x 12 magnitude multipliers), eight radix-4 butterflies
and two radix-8 butterflies. Every storage element is a register, and no
memory macro is assumed.
