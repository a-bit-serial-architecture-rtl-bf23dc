# Bit-serial multiplierless DCT (binDCT) in SystemVerilog

This is an 8x8 discrete cosine transform with no multipliers, plus its inverse,
built from bit-serial arithmetic. Every rotation of Chen's fast DCT is replaced
by lifting steps of the form `Q' = Q ± (k/2^m)·P`. The constants `k/2^m` are
1/2, 1/4, 3/4, 3/8 and 5/8. Each one costs one or two shifts and adds (the
"binDCT" idea of Liang and Tran). The words travel one bit per clock cycle,
least significant bit first, eight words side by side. So an adder is one
full adder and a carry flip-flop, and a shift is just a tap on a delay line.
The result is a very small datapath for low-rate image and video coding. It
reaches 8 words per 19 cycles.

The design follows the architecture published by S. Timakul and
S. Choomchuay ("A Bit-Serial Architecture for 1-D Multiplierless DCT").
Details that the publication leaves open were filled in here. Those choices,
and the places where this RTL departs from the publication, are listed in
[Departures and open points](#departures-and-open-points).

## The transform

### Forward 8-point core (`fwd_bindct`)

The input is `x0..x7`. All arithmetic is on 16-bit two's-complement words
with 8 fractional bits. The word length is a parameter (see
[Word length](#word-length)); all figures below are for 16 bits.

```
stage 1   a0 = x0+x7  a1 = x1+x6  a2 = x2+x5  a3 = x3+x4        (butterflies)
          a4 = x3-x4  a5 = x2-x5  a6 = x1-x6  a7 = x0-x7
stage 2   c5' = a5 - u4·a6 ;  c6 = a6 + d4·c5' ;  c5 = u5·c6 - c5'  (pi/4 rotation)
stage 3   b0 = a0+a3  b1 = a1+a2  b2 = a1-a2  b3 = a0-a3          (butterflies)
          d4 = a4+c5  d5 = a4-c5  d7 = a7+c6  d6 = a7-c6
stage 4   X0 = b0 + b1            X4 = X0/2 - b1
          X6 = u1·b3 - b2         X2 = b3 - d1·X6
          X7 = u3·d7 - d4         X1 = d7 - d3·X7
          X5 = d5 + u2·d6         X3 = d6 - d2·X5
```

These are the lifting values (coefficient set "CB"):

| lift | exact value | used |
|------|-------------|------|
| u1 | tan(π/8) = 0.4142 | 1/2 |
| d1 | sin(3π/8)cos(3π/8) = 0.3536 | 3/8 |
| u2 | tan(3π/16) = 0.6682 | 5/8 |
| d2 | sin(3π/16)cos(3π/16) = 0.4619 | 1/2 |
| u3 | tan(π/16) = 0.1989 | 1/4 |
| d3 | sin(π/16)cos(π/16) = 0.1913 | 1/4 |
| u4, u5 | tan(π/8) = 0.4142 | 1/2 |
| d4 | sin(π/4) = 0.7071 | 3/4 |

With the exact values, each output is the true DCT coefficient times a fixed
factor. The per-coefficient factors S0..S7 are **not** applied: fold them into
the quantisation table. The forward core holds 30 bit-serial adders: 16 in the
butterflies, 1 for X0, 10 in the lifting steps and 3 inside the 3/4, 3/8 and
5/8 scalers. Each lift is a `bs_lift` module. The lifting values are module
parameters (`U1_K`/`U1_M` … `U5_K`/`U5_M`, meaning `k` and `m` of `k/2^m`).

### Reverse core (`inv_bindct`)

The reverse core undoes the forward steps in the opposite order. Each lift is
undone by the opposite operation on the same term, for example
`b3 = X2 + d1·X6`, then `b2 = u1·b3 - X6`. The butterflies are undone by
butterflies that are not halved. The reverse core therefore returns **4×** the
forward core's input. The scalers around the cores cancel this factor (see
below).

## Bit-serial arithmetic: frames, shifts and guard slots

This is the part that takes most care.

**Frames.** A word occupies a frame of 19 cycles. Frame positions 0..2 are
*guard slots*, which carry zero. Positions 3..18 carry data bits 0..15, LSB
first. All eight lines of a core are aligned: at every point of the datapath
they share one frame position. Every unit is told the frame position of its
inputs (`pos`). Most units are given `pos` from the engine's frame counter,
minus a constant delay, through `bindct_pkg::pos_back`.

**Add and subtract (`bs_addsub`).** This is a full adder with a carry
flip-flop. At frame position 0 the carry takes its initial value: 0 for an
adder, or 1 for a subtractor, which also inverts its second operand. The guard
slots are zero, so they pass through an adder as zeros. In a subtractor they
become `0 + 1 + 1` = 0 with carry 1, which is exactly the "+1" the subtraction
needs.

**Shifting right (`bs_scale`).** Data is LSB first, so `P/2^j` is simply `P`
seen `j` cycles earlier. A lift with `m` shifts delays both of its lines by
`m` cycles. The tap for `P/2^j` sits `m-j` stages along P's delay line. To
form `3P/8 = P/4 + P/8`, one bit-serial adder sums two taps. The same holds
for `3P/4 = P/2 + P/4` and `5P/8 = P/2 + P/8`.

**Why three guard slots.** The largest shift is 3 (1/8). A tapped, shifted
word therefore starts up to three cycles before the aligned frame, and its
bits below the LSB fall into the guard slots. The scaler adds those fraction
bits too, so `kP/2^m` is formed exactly, with `m` fractional bits.

**Ctrl and rounding (`bs_lift`).** The second adder of a lift combines the
delayed Q with `kP/2^m`. Its outputs in the guard slots are the fraction.
A multiplexer ("Ctrl") replaces them with zeros, but their carry has already
entered bit 0. Every lift therefore returns exactly:

- `floor(Q + kP/2^m)`
- `floor(Q - kP/2^m)`
- `floor(kP/2^m - Q)`

All results wrap at 16 bits.

**Sign extension.** At the top of the word, a tap shifted by `j` would read
the first `j` bits of the *next* frame, which are guard zeros. For a negative
`P` that gives a wrong result. Each scaler captures the sign bit of `P` at
frame position 18. For the last `j` bits, that tap gives the sign instead of
the stream.

**Butterflies (`bs_butterfly`).** A butterfly is an adder and a subtractor
with registered outputs (1 cycle).

**Latency and rate.** The latency of a core is 1 (butterflies) + 6
(stage 2) + 1 (butterflies) + 4 (stage 4) = **12 cycles**, measured from an
input bit to the same output bit. A new 8-word vector can enter every frame,
which is 8 words per 19 cycles. The stage lengths of 6 and 4 come from the
architecture drawing. Lines with fewer lifts get plain delays (`bs_delay`).

## The 2-D engine (`dct2d_engine`)

One 1-D core is used twice, along rows and then along columns. An 8x8
transpose RAM sits between the two passes. A free-running counter divides
time into 19-cycle frames. Each engine repeats a 17-frame schedule:

| frames | what goes into the core | where the result goes |
|--------|-------------------------|-----------------------|
| 8 row frames | an input row, if `in_valid` is high at `in_ready`; otherwise an empty frame (a *stall*), and the row slot is repeated | transpose RAM, row `i` |
| 1 bubble frame | nothing | - |
| 8 column frames | column `c` read from the RAM | output, `out_valid` for one cycle |

A result leaves the core 12 cycles after the end of its frame. It is
deserialised and then written by a tag that travelled with the frame. The
bubble frame is needed because the last row's result is complete only 12
cycles into the following frame. Without the bubble, the first column would
be read before that row is in the RAM.

**Scaling.** All scaling is done by arithmetic shifts of the parallel words.
In the forward engine, each core input is divided by 4 and each core output
by 2. In the reverse engine, each core input is doubled. At the top, pixels
are halved before the forward engine, and the reverse output is doubled at
the end (saturating). These shifts keep the three butterfly stages from
overflowing 16 bits. The chain closes exactly:

- Reverse pass on `2·Y`, where `Y = T(v/4)/2`, gives `4·T⁻¹(T(v/4)) = v`.
- Two passes therefore return the halved pixel, and the final doubling
  returns `pixel·256`.

Rounding in each lift makes the round trip near-exact, not lossless.

**Timing.** With rows always available, one block takes 17 frames (323 cycles)
per engine. The first coefficient column leaves 10 frames + 13 cycles after
the block's first row is taken. For example:

- A 256x256 image (1024 blocks) takes 330,752 cycles: 82.7 ms at 4 MHz.
- n×64 kbit/s video with n = 30 (240,000 pixels/s at 8 bits) needs at least
  a 1.21 MHz clock.

## Word length

The word length is the parameter `WL` of `bindct_top`, and it is passed
down to every unit. The default is 16 bits. The integer part is always
8 bits, so a word has `WL - 8` fractional bits. A frame is `WL + 3` cycles
and a block is `17 × (WL + 3)` cycles. The core latency stays at 12 cycles.
`WL` can range from 10 to 61:

- The lower limit comes from the engine. It collects each result in the
  frame after its own, so the frame must be longer than the latency.
- The upper limit comes from the 6-bit frame counter.

Longer words cost one flip-flop per bit in each serialiser, deserialiser
and RAM word. The bit-serial core itself does not grow. Measured
round-trip MSE on random blocks (`tb_word_length`):

| WL | fractional bits | MSE (pixel units) |
|----|-----------------|-------------------|
| 10 | 2 | 49 |
| 12 | 4 | 3.3 |
| 16 | 8 | 0.0095 |
| 24 | 16 | 3e-8 |
| 32 | 24 | 0 |

From 16 fractional bits up, the rounding error is negligible.

## Top level (`bindct_top`)

```
pix (8 x int8) --x128--> forward 2-D engine --coef--> [hold] --> reverse 2-D engine --x2 (sat)--> rec
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `pix_valid` / `pix_ready` | in / out | 1 | a row is taken in the cycle where both are high (at most once per frame) |
| `pix[8]` | in | 8 signed | one row of pixels, -128..127 |
| `coef_valid`, `coef_index` | out | 1, 3 | a column of coefficients and its number |
| `coef[8]` | out | `WL` signed | coefficients, Q8.8 by default, binDCT scale (factors not applied) |
| `rec_valid`, `rec_index` | out | 1, 3 | a reconstructed row and its number |
| `rec[8]` | out | `WL` signed | reconstructed pixels, Q8.8 by default (≈ pixel·256) |
| `fwd_stall`, `fwd_bubble`, `inv_stall`, `inv_bubble` | out | 1 | pulses when an engine sends an empty frame |

The coefficient frames of one block come in the order of columns 0..7. Column
`c` holds the coefficients of horizontal frequency `c`, for vertical
frequencies 0..7. The reverse engine takes these frames as its "rows", so it
undoes the column pass first and emits pixel rows 0..7. A one-entry holding
register joins the two engines. The schedules line up so that it never
overruns, and an assertion checks this.

## Files

| file | contents |
|------|----------|
| `rtl/bindct_pkg.sv` | word and frame constants, `pos_t`, `word_t`, lift modes, `pos_back` |
| `rtl/bs_addsub.sv` | bit-serial adder / subtractor |
| `rtl/bs_delay.sv` | N-cycle delay line |
| `rtl/bs_scale.sv` | `kP/2^m` scaler with sign extension |
| `rtl/bs_lift.sv` | one lifting step with the Ctrl zero insertion |
| `rtl/bs_butterfly.sv` | registered bit-serial butterfly |
| `rtl/fwd_bindct.sv`, `rtl/inv_bindct.sv` | 8-point forward and reverse cores |
| `rtl/transpose_ram.sv` | 8x8 word memory, row write and column read |
| `rtl/dct2d_engine.sv` | serialiser, core, deserialiser, RAM, frame schedule, scalers |
| `rtl/bindct_top.sv` | forward and reverse engines chained, parameter `WL` |
| `tb/bindct_model_pkg.sv` | word-level reference model used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_image_workload` and `tb_word_length` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each one checks
against the word-level model in `tb/bindct_model_pkg.sv`, which computes
every lift as `floor(...)` on whole integers. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/bindct_pkg.sv tb/bindct_model_pkg.sv rtl/*.sv tb/tb_bindct_top.sv \
  --top-module tb_bindct_top -Mdir obj_top && obj_top/Vtb_bindct_top
```

Replace `tb_bindct_top` with another testbench name to run it. The
testbenches and what each one covers:

- `tb_bs_addsub`, `tb_bs_butterfly`, `tb_bs_scale` and `tb_bs_lift` cover the
  bit-level units, with random full-range words.
- `tb_fwd_bindct` and `tb_inv_bindct` cover 200 back-to-back vectors per
  core. They check the 12-cycle latency and the zero guard slots. A second
  copy of each core, with 24-bit words, is checked bit-exactly against the
  model at that width.
- `tb_transpose_ram` and `tb_dct2d_engine` cover the RAM and both engine
  forms. They include stalls, and they check the `in_ready` and output
  spacing.
- `tb_bindct_top` sends eight blocks, including constant -128 / +127 blocks
  and a ±128 checkerboard. Stalls occur in the first three blocks. It checks
  exact coefficients and reconstruction, the 323-cycle block period, the
  203-cycle first-column latency, and that stalls, bubbles and reverse waits
  all happened.
- `tb_image_workload` runs synthetic 128x128 and 512x512 images end to end.
  It reports the reconstruction MSE, which is about 0.0098 in pixel units
  (0.0024 at the halved scale) on these images.
- `tb_word_length` runs five copies of the top, with `WL` = 10, 12, 16,
  24 and 32, on the same blocks. Every coefficient and reconstructed pixel
  is compared with the model at that width. The testbench also checks the
  row order and the block period of `17 × (WL + 3)` cycles. Finally, it
  checks that the error falls as the word grows and is below 1e-8 at
  32 bits.

The whole design runs at its default sizes. Every testbench finishes in
seconds.

## Departures and open points

- **u5 = 1/2.** The coefficient table gives 1/2 for u5 in set CB. The
  architecture drawing shows 3/8, with a 3-cycle lift. The published counts
  of 17 shifts and 30 adds hold only with 1/2, so 1/2 is used. Two delays
  after the u5 lift keep stage 2 at six cycles and the latency at 12. For
  the drawn variant, set `U5_K=3, U5_M=3` on `fwd_bindct` and `inv_bindct`.
  The latency stays at 12, but the engine does not pass these parameters
  through.
- **Registered butterflies.** The delays drawn along each line add up to 10
  cycles, but the stated latency is 12. Registering the two butterfly stages
  accounts for the difference.
- **An alignment delay that the drawing shows on line X(6) is omitted.** It
  would put X(6) one cycle behind the other seven outputs.
- **Sign extension in the scalers** is an addition. Zero-filled shifted
  words would be wrong for negative values.
- **Rounding** is floor in every lift. The publication does not say which
  rounding it uses.
- **Error figures.** The published MSE is 0.0014–0.0016 on a photograph
  (set CB, 8 fractional bits). The published block diagram takes the error
  at the halved scale: it compares the halved pixels with the reverse
  output before the final doubling. At that point the error is half as
  large and the MSE is a quarter of the MSE in pixel units. Here the MSE at
  the halved scale is about 0.0024 on the synthetic test images and 0.0017
  on random blocks. In pixel units the figures are 0.0098 and 0.0069. The
  same photograph was not available for comparison.
- **Bubble frame.** A block takes 17 frames instead of the 16 implied by the
  published 78 ms for 256x256 at 4 MHz, which makes it about 6% slower. A
  bit-level transpose could remove the bubble.
- **The reverse core** has no published bit-serial drawing. It reuses the
  forward core's circuits and timing, following the reverse flow graph.
- **Control, handshake and reset** are this design's own. The publication
  assumes only a "fairly small" control circuit.
- **Saturation** of the final ×2 is this design's own. Without it, a
  reconstructed -128 or +127 can round just past the 16-bit range.
- **Word lengths of 8 and 9 bits** (0 and 1 fractional bits), the low end
  of the published precision study, are not supported. See
  [Word length](#word-length).
- **Coefficient set CA** (the second approximation, with more shifts) is not
  built as a configuration. Its longer lifts would need longer stages
  (latency 16) and a matching `LAT` in the engine.
- **The published resource count** is 37 bit-serial adders and about 80
  latches. Here a forward core has 30 adders and 136 flip-flops (delay lines,
  carries, butterfly registers and sign latches). The serialisers, RAM and
  control come on top of that.
