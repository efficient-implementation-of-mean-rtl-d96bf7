# Streaming mean, variance and skewness of a grey-level image

This core computes three first-order texture features of an image: the mean
grey level, the variance (contrast) and the third central moment (skewness,
the asymmetry of the histogram). It does this while the pixels stream in, one
per clock, without building a histogram. For an 8x8 image with 8-bit pixels
the results are ready 64 clocks after the first pixel, that is, as soon as the
last pixel has been read.

## The idea: moments instead of a histogram

The textbook form of the statistics goes through the histogram `H(i)`:

    mean     = sum_i i * H(i) / NM
    variance = sum_i (i - mean)^2 * H(i) / NM
    skewness = sum_i (i - mean)^3 * H(i) / NM

A direct hardware version needs one counter per grey level (256 of them),
a 256-input adder tree, and a second pass over the histogram once the mean is
known. Expanding the powers removes both the histogram and the second pass.
With `S1 = sum f`, `S2 = sum f^2`, `S3 = sum f^3` over the NM pixels:

    mean     = S1/NM
    variance = S2/NM - mean^2
    skewness = S3/NM - 3 * mean * S2/NM + 2 * mean^3

Three running sums can be formed in a single pass. Everything else is a few
multiplications done once per image.

## Integer arithmetic, and what the outputs mean

NM is a power of two (64), so each division is a right shift, and the shift
truncates. The core uses the truncated quotients in the later terms:

    m  = floor(S1/64)
    E2 = floor(S2/64)
    E3 = floor(S3/64)
    meanout  = m
    varians  = E2 - m^2
    skweness = E3 - 3*m*E2 + 2*m^3

These are integer approximations of the exact statistics, not roundings of
them. The reference 8x8 image used in the testbench has these statistics:

| statistic | exact value | core output |
|-----------|-------------|-------------|
| mean      | 14.5156     | 14          |
| variance  | 235.72      | 250         |
| skewness  | 6447.6      | 6526        |

The variance error comes mostly from squaring the truncated mean. If you need
better accuracy, keep fractional bits of `S1/64` (widen the shift registers)
and widen the products. The core itself does not do this.

Range of each output, for 8-bit pixels:

* `meanout` is at most 255 and always fits its 8 bits.
* `varians` is never negative, because `floor(m)^2 <= floor(E2)`. It is at
  most 16383, so it always fits 16 bits.
* `skweness` is signed, in two's complement. Its magnitude can reach about
  1.6 million for strongly skewed images, which needs 27 bits. The default
  width is 16 bits, and the core outputs the low 16 bits, so values outside
  -32768..32767 wrap around. Set `SKEW_W = 27` if the full range matters. The
  internal arithmetic is always exact; only the output is cut.
* The skewness is not normalised. A common normalisation divides by L^2, with
  L = 255. Do this outside the core if you want it.

## Datapath

    datain ─┬──────────────► acc(i)   ─► >>6 reg ─► m  ──┬──────────────► meanout
            ├─► i^2 ───────► acc(i^2) ─► >>6 reg ─► E2 ──┼─► E2 - m^2 ─► varians
            └─► i^3 ───────► acc(i^3) ─► >>6 reg ─► E3 ──┴─► E3 - 3*m*E2 + 2*m^3 ─► skweness
    frame_counter ── last ──► (restart accumulators, load the >>6 registers)

* **power_unit** forms `i^2` and `i^3` of the incoming pixel with two
  multipliers.
* **accumulator**, three instances, keeps the running sums. They are 14, 22
  and 30 bits wide, which is exact for 64 pixels. Each exposes
  `total = stored + present term`. In the clock of an image's last pixel,
  `total` is therefore already the full image sum. At that edge the stored sum
  clears, so the next image can start in the very next clock.
* **shift_right_register**, three instances, captures `total >> 6` on the last
  pixel. It holds that value for a whole image time. These registers are also
  the output buffer: the results stay stable while the next image streams in.
* **variance_unit** (one multiplier and one subtractor) and **skewness_unit**
  (multipliers, a subtractor and an adder) are combinational. They work from
  the held quotients.
* **frame_counter** counts 0..63 and raises `last` on pixel 63.

The only registers are the counter, the three accumulators, the three quotient
registers and two status flags. The slowest path runs from the quotient
registers through `3*m*E2` to the skewness adder. This path only changes once
per image, so it could be treated as a multicycle path, or a register could be
added after the stages at the cost of one extra clock of latency.

## Interface and timing (`mean_var_skew`)

| port           | dir | width  | meaning |
|----------------|-----|--------|---------|
| `clock`        | in  | 1      | clock |
| `reset`        | in  | 1      | synchronous, active high; clears the counter, the sums, the results and the flags |
| `datain`       | in  | PIX_W  | one pixel per clock, in raster order, with no gaps |
| `meanout`      | out | PIX_W  | `m` |
| `varians`      | out | VAR_W  | `E2 - m^2` |
| `skweness`     | out | SKEW_W | `E3 - 3*m*E2 + 2*m^3`, signed |
| `result_valid` | out | 1      | low after reset until the first image is done, then high |
| `frame_done`   | out | 1      | high for one clock after each image's last pixel |

The image framing is implicit. There is no valid or start-of-frame input:

* The first pixel of an image is the one sampled at the first rising edge with
  `reset` low.
* Every later group of 64 consecutive edges is one image.
* The edge that samples pixel 63 updates the three outputs.
* Until the first image is done, the outputs are zero.

A source with gaps must hold `reset` or gate the clock enable around the core.
Adding a `valid` input to the counter and to the accumulators would be a small
change.

Parameters, all with defaults:

* `PIX_W = 8`
* `IMG_ROWS = 8`
* `IMG_COLS = 8`
* `VAR_W = 16`
* `SKEW_W = 16`

`IMG_ROWS*IMG_COLS` must be a power of two; elaboration stops with an error
otherwise. The accumulator, shift and quotient widths follow from these
parameters.

## How this relates to the published design

These parts follow the published design:

* the moment formulas
* the truncated integer arithmetic
* three accumulators feeding 6-bit shift registers
* the structure of the variance and skewness stages
* the 8x8 / 8-bit configuration
* the 64-clock latency
* the port names and widths
* the reference results 14 / 250 / 6526

These are this implementation's own choices:

* **Three shift registers.** The published prose counts two shift registers,
  but its block diagram shows three, and the skewness needs `S3/64`. This core
  has three.
* **Zero before the first result.** The published simulation shows
  high-impedance outputs before the first result. This core drives zeros and
  adds `result_valid` and `frame_done`.
* **Details the publication leaves open:**
  * the reset style
  * back-to-back images
  * the restart scheme of the accumulators
  * the accumulator widths
  * the signed, wrapping 16-bit skewness output
* **Quotient registers as the buffer.** The publication mentions "a counter and
  a buffer". Here the quotient registers are the buffer, and there is no extra
  output register.
* **The powers multipliers.** How `i^2` and `i^3` are formed is not shown.
  Here they are two combinational multipliers.

## Files

* `rtl/mvs_pkg.sv`: default sizes and the width helper
* `rtl/mean_var_skew.sv`: the top level
* `rtl/frame_counter.sv`, `rtl/power_unit.sv`, `rtl/accumulator.sv`,
  `rtl/shift_right_register.sv`, `rtl/variance_unit.sv`,
  `rtl/skewness_unit.sv`: the blocks
* `tb/tb_<block>.sv`: a self-checking testbench per block; `tb/tb_mean_var_skew_wide.sv` runs the top at a larger size. Each prints
  `TB_RESULT checks=N failures=M`.

## Verification

`tb/tb_mean_var_skew.sv` runs the top at its default parameters with a 100 ns
clock. It streams these images:

1. the 8x8 reference image, checked against 14 / 250 / 6526
2. 40 images back to back: uniform random, skewed left, skewed right and
   single-mode
3. a reset in the middle of an image
4. the reference image again

After every image it compares the outputs with the same formulas evaluated in
64-bit integers inside the testbench. It also checks:

* the 64-clock latency
* that results are held during the next image
* the `frame_done` and `result_valid` behaviour

It counts each of these and fails if any never occurred:

* back-to-back images
* held results
* mid-image reset
* negative skewness
* skewness beyond 16 bits

`tb/tb_mean_var_skew_wide.sv` runs the top with 16x16 images and
`SKEW_W = 27`. It streams 30 images, including the most skewed ones possible.
It checks that the results are exact and that the latency is 256 clocks.

The block testbenches run each unit against independent models:

* all 256 pixel values for the powers
* random sums and restarts for the accumulator
* random images for the variance and skewness stages, the latter both at 16
  bits and at 27 bits

To run one with Verilator:

    verilator --binary --timing --assert -Irtl rtl/mvs_pkg.sv tb/tb_mean_var_skew.sv \
        --top-module tb_mean_var_skew -o sim && ./obj_dir/sim

All testbenches pass. Each was also run against a copy of its block with one
deliberate error, and each one failed.

Not covered: the tests are functional simulation only. No timing analysis or
FPGA implementation was done.
