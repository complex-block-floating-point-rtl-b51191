# Complex block floating point with exponent box encoding

Baseband signal processing handles long vectors of complex samples. Storing
each real and imaginary part as an IEEE-754 single repeats an 8-bit exponent
64 times in a 64-sample block. Block floating point shares one exponent
across the block instead. Its known weakness is that a small sample sitting
next to a large one is shifted so far right that its mantissa is lost.

The *exponent box* format recovers those samples. Each real or imaginary part
carries one extra bit, the box bit. When the alignment shift would wipe a part
out, the part is stored pre-shifted by one mantissa width and its box bit is
set. In effect every part chooses between two exponents, `E` and `E - 24`, for
one bit instead of eight.

This repository holds synthesizable SystemVerilog for:

- the format converter;
- block addition, subtraction and element-wise multiplication;
- a SIMD ALU built from those units;
- two 4-point FFT engines (radix-2 and radix-4);
- an I/Q front end that turns ADC codes into encoded blocks;
- a top level that wires all of these together.

Every unit has a self-checking testbench that compares its output with a
real-valued reference.

## The format

A block holds `NV` complex samples (default 64) at single precision:

| field | width | count |
|---|---|---|
| shared exponent `E` | 8 (`NE`) | 1 per block |
| sign `s` | 1 | 2 per sample (re, im) |
| box bit `x` | 1 | 2 per sample |
| scaled mantissa `m` | 24 (`NM`) | 2 per sample |

A 64-sample block therefore takes 8 + 128 × 26 = 3336 bits. The same samples
as pairs of IEEE singles take 4096 bits.

The value of one part is

    (-1)^s * m * 2^(E - 127 - 23 - 24*x)

so `m` is a fixed-point number with 23 fraction bits, scaled by the shared
exponent. The IEEE hidden bit is stored explicitly: the widest part of the
block has `m[23] = 1`. The box shift `BOX` equals the mantissa width, 24. A
part with `x = 1` is therefore read 24 binary places lower than its
neighbours.

In RTL, a block is four signals with a common prefix. For the encoder output
these are:

- `y_exp [NE-1:0]`;
- `y_sign [NV][2]`;
- `y_box [NV][2]`;
- `y_mant [NM-1:0] [NV][2]`.

Index `[k][0]` is the real part of sample `k` and `[k][1]` the imaginary part.
The constants live in `cbfp_pkg`.

## Encoding a block (`cbfp_ebox_encoder`)

The encoder takes `NV` complex IEEE singles and works in four steps:

1. The shared exponent is the largest biased exponent field in the block.
2. For each part, `dE = E - e_part` is the right shift that aligns its 24-bit
   significand (hidden bit included) to `E`.
3. If `dE >= 24` and the part is not zero, the shift would clear every bit.
   The box bit is then set and the shift is reduced by 24.
4. The significand is shifted right by the remaining amount. Dropped bits are
   truncated.

Zeros and subnormals have a hidden bit of 0 and an effective exponent of 1.
Infinity and NaN have no special handling: their exponent field is treated
like any other. A part whose `dE` is 48 or more still underflows to zero,
because one box step cannot reach it. Latency is 1 clock.

## Block addition and subtraction (`cbfp_adder`, `cbfp_postscale`)

The adder computes `Y[k] = A[k] ± B[k]` for all `NV` samples at once. `sub[k]`
picks the operation per sample. The hard part is that the two operands differ
twice over: their shared exponents differ, and so does each part's box bit.

**Pre-processing.** Each part becomes a fixed-point number
`BOX + MW_IN` bits wide:

- a part with its box bit set is placed as-is, so its value sits in the low
  bits;
- a part without it is shifted left by 24.

This undoes the box encoding without losing a bit. The operand with the
smaller shared exponent is then shifted right by the exponent difference.
Sign and subtract select a two's complement.

**Addition.** One signed adder per part, two bits wider than the operands.

**Post-scale (`cbfp_postscale`).** This stage is shared with the FFT engines
and runs in three steps:

1. Sign/magnitude conversion of every part.
2. Block renormalisation. If any magnitude is wider than `BOX + MW_OUT` bits,
   the shared exponent is raised by the excess and every part is shifted
   right by the same amount. This is the one-bit carry of an addition, or up
   to two bits in the radix-4 FFT.
3. Truncation logic for each part:
   - if the magnitude has bits at or above `2^24`, the part is stored with
     `x = 0` and its top `MW_OUT` bits;
   - otherwise a non-zero part is stored with `x = 1` and its low bits;
   - everything below the box LSB is dropped.

The output exponent is the larger of the two input exponents, plus the
renormalisation step. An exponent that would pass 255 saturates and raises
`exp_ovf`. Latency is 1 clock.

## Block multiplication (`cbfp_multiplier`, `cbfp_mul_lane`)

The multiplier computes the element-wise product `Y[k] = A[k] · B[k]`. Each
output part is a sum of two 24×24 products:

- real: `ar·br − ai·bi`;
- imaginary: `ar·bi + ai·br`.

The box bits decide how the two products line up. `cbfp_mul_lane` computes
one output part:

- `A` is the number of box bits set in the two factors of the first product,
  and `B` the same for the second. Each is 0, 1 or 2.
- `K = min(A, B)` is the common box count. The product with more box bits is
  shifted right by `(A − K)·24` or `(B − K)·24`, so both products share the
  scale `2^(E1 + E2 − 24K)`.
- The aligned 48-bit products are added or subtracted at full width. The sum
  is left-normalised, and the lane reports the exponent that its own leading
  one would need.

`cbfp_multiplier` then forms the block result:

1. The shared exponent is the largest lane exponent over all non-zero output
   parts.
2. Every part is re-encoded against it, exactly as the encoder does: a box bit
   when the shift reaches 24, truncation below.
3. A negative exponent clamps to 0 (the block underflows toward zero). One
   above 255 saturates and raises `exp_ovf`.

Latency is 1 clock. The multiplier costs `4·NV` 24×24 multipliers.

## The SIMD ALU (`cbfp_alu`)

`cbfp_alu` takes two blocks and `op`:

| `op` | operation |
|---|---|
| 0 | `A + B` |
| 1 | `A − B` |
| 2 | `A · B` (element-wise) |

Only the unit that is needed fires. The output register is chosen by the
operation issued one clock earlier. An operation may be issued every clock.
Latency is 1 clock.

## 4-point FFT engines

Both engines transform one 4-sample block `x(0..3)` into `X(0..3)`. The 4-point
twiddles are 1, −j, −1 and j. None of them needs a multiplier:

- multiplying by −j swaps the real and imaginary fields, then inverts the new
  imaginary sign;
- multiplying by −1 inverts both signs.

**Radix-2 (`cbfp_fft4_r2`).** Two stages of `cbfp_adder`:

- Stage 1 forms `x0 ± x2` and `x1 ± x3`. Both operand pairs come from the same
  block, so they share an exponent and need no alignment. Its output keeps a
  25-bit mantissa, so the one-bit growth is held rather than renormalised.
- `x1 − x3` is then rotated by −j.
- Stage 2 combines the four intermediate values into `X(0..3)` and brings the
  mantissas back to 24 bits.

Latency is 2 clocks. `exp_ovf` is raised if either stage saturated.

**Radix-4 (`cbfp_fft4_r4`).** One stage:

- each output is a signed sum of four rotated inputs;
- one post-scale absorbs up to two bits of growth.

Latency is 1 clock.

Each engine accepts a new block every clock.

## Front end: from ADC codes to blocks

This front end follows a two-ADC receiver. The I and Q branches each have an
ADC whose input level is set by an automatic gain control (AGC) loop.

- **`cbfp_fix2ieee`** takes one signed ADC code and the AGC gain as a
  power-of-two exponent `g_exp`:
  - the code is read as a fraction in [−1, 1);
  - the gain is removed exactly, by subtracting `g_exp` from the exponent;
  - the result is an IEEE-754 single;
  - results below the normal range become +0, and results above it saturate
    to the largest finite value.

  Latency is 1 clock.
- **`cbfp_block_buffer`** collects `NV` complex samples. It pulses `out_valid`
  for one clock, one clock after the last sample is written. The consumer must
  take the block in that clock. The next block may start writing at once.
- The encoder then turns the collected block into the box format.

## Top level (`cbfp_top`)

The front end turns the I/Q stream into encoded blocks (`enc_*`). Each encoded
block is then used in parallel:

- as operand A of the ALU. Operand B and `op` come from top ports and are
  sampled in the clock `enc_valid` is high. The result appears on `alu_*`.
- split into `NV/4` groups of four consecutive samples. Each group feeds one
  radix-2 engine (`fft2_*`) and one radix-4 engine (`fft4_*`).
  - On input, the groups share the block exponent.
  - Each group's result is a 4-sample block with its own exponent:
    `fft2_exp[g]` and `fft4_exp[g]`.
  - Per-group saturation flags are on `fft2_ovf[g]` and `fft4_ovf[g]`.

Latency, counted from the `adc_valid` clock of a block's last sample:

| output | clocks |
|---|---|
| `enc_valid` | 3 |
| `alu_valid` | 4 |
| `fft4_valid` | 4 |
| `fft2_valid` | 5 |

There is no back-pressure. A new sample may arrive every clock, so a block
completes every `NV` clocks.

The ADCs, AGC loops and analog mixers are outside the RTL. Their digital
signals are the top's ports: `adc_i`, `adc_q`, `agc_gexp_i` and `agc_gexp_q`.

All registers use a synchronous, active-low `rst_n` that clears the valid
flags and output registers.

## Design choices and departures

These are the points where this RTL chose something the format description
leaves open, or reads it in one particular way.

- **Box shift and width.** The mantissa is 24 bits with the leading bit
  stored, and the box shift equals that width. The box condition is
  `dE >= 24` ("the shift would remove every bit"). A strict `>` would leave
  parts with `dE = 24` as zeros.
- **Rounding.** Every shift truncates. No rounding mode is implemented.
- **Adder output exponent.** The output exponent is the larger input exponent,
  raised by one (two in the radix-4 FFT) when the sum grows. It is never
  lowered when a subtraction cancels: small results are held through the box
  bit, or lost if they fall below it.
- **Multiplier output exponent.** The shared exponent is the largest exponent
  among the non-zero output parts. Each part is then re-encoded against it.
- **Exponent range.** A saturated exponent raises `exp_ovf`. An underflowing
  multiplier exponent clamps to 0. IEEE special values are not handled.
- **FFT intermediate width.** The radix-2 engine keeps 25 bits between its
  stages rather than renormalising in between.
- **FFT engine outputs.** Each 4-sample group leaves with its own exponent.
  It is not re-merged into a 64-sample block.
- **Front-end sizes.**
  - The ADC width (16 bits) and the gain as a power of two are this design's
    choices.
  - So are the single-bank block buffer and the way the units share one
    datapath in the top.
- **Timing.** One register per arithmetic stage with valid in/valid out. The
  pipeline depth is this design's choice, not a requirement of the format.

## Verification

Each testbench in `tb/` is self-checking:

- It drives random blocks. These include wide exponent spreads, so that box
  bits appear and some parts flush to zero, and exact zeros.
- It decodes every output part to a `real`.
- It compares the result with a real-valued reference of the operation.
- The tolerance is the truncation error the format allows at the output
  exponent.
- It checks the latency in clocks.
- It ends with `TB_RESULT checks=N failures=M`.

`tb_cbfp_pkg` holds the shared reference functions:

- IEEE decode;
- decode of a box-encoded part;
- a reference encoder;
- random IEEE values at a chosen exponent.

| testbench | unit | size |
|---|---|---|
| `tb_cbfp_ebox_encoder` | encoder | NV = 16 |
| `tb_cbfp_adder` | adder/subtractor | NV = 8 |
| `tb_cbfp_multiplier` | multiplier, all 9 (A, B) box-count cases | NV = 8 |
| `tb_cbfp_alu` | ALU, all three operations | NV = 4 |
| `tb_cbfp_fft4_r2` | radix-2 FFT, back-to-back blocks | 4 |
| `tb_cbfp_fft4_r4` | radix-4 FFT, back-to-back blocks | 4 |
| `tb_cbfp_fix2ieee` | ADC code to IEEE | 16-bit codes |
| `tb_cbfp_block_buffer` | block buffer | NV = 8 |
| `tb_cbfp_top` | whole datapath at its defaults | NV = 64, 24 blocks |

`tb_cbfp_top` streams ADC codes with varied AGC gains. It checks the encoded
block, the ALU result for all three operations, and every radix-2 and radix-4
group output against references. It also counts how often each mechanism
occurred:

- box bits set;
- parts flushed to zero;
- adds, subtracts and multiplies;
- adder carries;
- FFT exponent growth.

It fails if any of these never happened.

To run a testbench with Verilator (5.x, `--timing`):

    verilator --binary --timing --assert -Wno-fatal -Wno-WIDTH \
        -y rtl -y tb rtl/cbfp_pkg.sv tb/tb_cbfp_pkg.sv tb/tb_cbfp_adder.sv \
        --top-module tb_cbfp_adder -o sim
    ./obj_dir/sim

Replace `tb_cbfp_adder` with any testbench name. The full-size top test takes
about a minute to build and well under a second to run.

## What is not built

- **Other precisions.** Half, double and quad precision are not built. Only
  the constants in `cbfp_pkg` would change, but only single precision has been
  simulated.
- **Larger FFTs.** There are no FFTs larger than 4 points: no non-trivial
  twiddle multipliers and no stage memories. So the 128- to 2048-point
  transforms of an OFDM system cannot run on this design.
- **QAM and OFDM blocks.** The system-level blocks that would use the
  arithmetic are not built. These are the QAM mapper and demapper, the
  pulse-shaping and matched filters, the up/down-samplers, the carrier mixer,
  the equaliser, and OFDM cyclic-prefix handling.
- **Common-exponent baseline.** The plain common-exponent format, which the
  box format improves on, is not built.
- **Analog parts.** The analog front end (ADC, AGC loop, mixers) is outside
  the RTL.
- **Large multiplies.** A 1000-sample block multiply is supported by
  `cbfp_multiplier` as a parameter (`NV = 1000`) but has not been simulated at
  that size. The top is built for 64-sample blocks.

## Files

| file | contents |
|---|---|
| `rtl/cbfp_pkg.sv` | widths, bias, box shift, ALU op codes |
| `rtl/cbfp_ebox_encoder.sv` | IEEE block to exponent box block |
| `rtl/cbfp_adder.sv` | block add/subtract |
| `rtl/cbfp_postscale.sv` | sign/magnitude, renormalise, box re-encode (used by the adder and FFTs) |
| `rtl/cbfp_mul_lane.sv` | one output part of the multiplier |
| `rtl/cbfp_multiplier.sv` | element-wise block multiply |
| `rtl/cbfp_alu.sv` | SIMD ALU |
| `rtl/cbfp_fft4_r2.sv`, `rtl/cbfp_fft4_r4.sv` | 4-point FFT engines |
| `rtl/cbfp_fix2ieee.sv` | ADC code and AGC gain to IEEE single |
| `rtl/cbfp_block_buffer.sv` | serial-to-block buffer |
| `rtl/cbfp_top.sv` | full datapath |
| `tb/` | testbenches and the shared reference package |
