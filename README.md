# DLFloat16 fused multiply-add

This is a floating-point multiply-add unit for deep-learning training and
inference. It computes `R = C + A*B` in a 16-bit format called DLFloat16,
with 1 sign bit, 6 exponent bits and 9 fraction bits. The format trades
some IEEE-754 features for a smaller unit:

- there are no subnormals;
- zero is unsigned;
- infinity and NaN are merged into one unsigned symbol;
- rounding is round-nearest-up, which decides on the guard bit alone and so needs no sticky logic in the normalizer or rounder.

With 6 exponent bits the range is wide enough that the multiply and the
accumulate can both stay in 16 bits. No 32-bit accumulator is needed.

The RTL contains:

- the pipelined FMA, which also has a mode where A and B are 8-bit floats while C and R stay 16-bit;
- an FP32-to-DLFloat16 quantizer, used to copy FP32 master weights to DLFloat16 during training;
- self-checking testbenches for every block, built on a bit-exact reference model.

## The number format

A DLFloat16 word `{s, e[5:0], f[8:0]}` has the value
`(-1)^s * 2^(e-31) * (1 + f/512)`.

| exponent | fraction      | meaning                                   |
|----------|---------------|-------------------------------------------|
| 0        | 0             | zero (sign ignored, produced as `0x0000`) |
| 0        | non-zero      | normal number `2^-31 * 1.f`               |
| 1 … 62   | any           | normal number                             |
| 63       | 0 … 510       | normal number `2^32 * 1.f`                |
| 63       | 511           | NaN-infinity (sign ignored, produced as `0x7FFF`) |

Exponent 0 is an ordinary binade, and the top binade is usable except for
one code. The smallest number is therefore `2^-31 * (1 + 2^-9)` and the
largest is `2^33 - 2 ulp`. Any NaN-infinity operand makes the result
NaN-infinity and raises the `naninf` flag. This includes `0 * NaN-infinity`,
because the format does not tell the two apart.

**FP8 operands.** With `fp8_mode = 1`, A and B are 8-bit values in bits
`[7:0]` of their ports. Their layout is 1 sign, 5 exponent and 2 fraction
bits, with bias 15. They follow the same conventions: all-zero is zero and
all-ones is NaN-infinity. Each one is widened exactly to DLFloat16 (exponent
+16, fraction padded with zeros), so after unpacking the datapath is
identical. C and R are always 16-bit. The bias and special encodings of the
8-bit format are this design's choice.

## Datapath

`rtl/dlf_fma.sv` is a three-stage pipeline that accepts one operation per
cycle. A result appears exactly 3 cycles after its `in_valid` cycle. There
is no stall or backpressure.

```
stage 1   dlf_unpack x3 ─┬─ dlf_exp_shift ── dlf_aligner (C >> shift, sticky)
                         └─ dlf_booth_mult (A*B as sum + carry)
          ── dlf_stage ──
stage 2   dlf_csa32 (product pair + aligned C, inverted if subtracting)
            ├─ dlf_adder (|sum|, sign)
            └─ dlf_lza   (predicted left shift)
          ── dlf_stage ──
stage 3   dlf_normalizer ── dlf_exp_adjust ── dlf_round_pack
          ── dlf_stage ── r, naninf
```

### The 34-bit window

All addition happens in one fixed window: 34 magnitude bits plus a sign bit.

```
bit   33 ........ 24 23 22 21 ..................... 2 1 0
      [ C, unshifted ]        [ product A*B, 20 bits ] . .
```

The product of the two 10-bit significands always sits at bits `[21:2]`,
with its units bit at bit 20. The addend C starts with its hidden bit at
bit 33 and is shifted right by

`shift = clamp(Ea + Eb - Ec - 18, 0, 34)`     (biased exponents)

`dlf_exp_shift` also produces the exponent of bit 33. That exponent is
`Ea + Eb - 18` when the product sets the scale, and `Ec` when the shift is
clamped at 0. Two things make this small window exact:

- **Addend far above the product** (shift clamped at 0). Here the product is
  left at bits `[21:2]` even though it really belongs lower. The product is
  then wholly below C's guard bit (bit 23), whether it is in its true place
  or at `[21:2]`. Under round-nearest-up, C plus or minus any such non-zero
  value rounds back to C in both cases. So no sticky bit is needed for the
  product.
- **Addend far below the product.** Bits of C shifted past bit 0 are ORed
  into a sticky bit. In an effective subtraction this sticky bit takes one
  more unit off the sum: the adder's carry-in is `esub & ~sticky` instead of
  `esub`. The window then holds exactly the floor of the true difference,
  and its guard bit is the true guard bit. Without this borrow, about one
  near-cancelling subtraction in several thousand rounds the wrong way.
  This is the only sticky bit in the design. Rounding itself never looks at
  one.

As a result, every result equals the exact value of `C + A*B` rounded once,
and the testbenches check this bit for bit.

The largest possible sum magnitude stays below `2^34`. The addend's hidden
bit is at most bit 33 and the product stays below bit 22, and the low bits
of C are far above the product whenever C is at the top. This is why 34
bits are enough.

### Multiplier

`dlf_booth_mult` is a radix-4 Booth multiplier for two unsigned 10-bit
significands. The multiplier is recoded into six digits in {-2…+2}. This
gives six signed partial products, which three levels of 3:2 carry-save
adders reduce (6→4→3→2). The two resulting vectors are not added. Stage 2
merges them with the aligned addend in one more 3:2 row, so the multiply
and the accumulate share a single carry-propagate adder.

The partial products are sign-extended to 33 bits, so that the pair can go
straight into the 35-bit signed window: `sum + carry == A*B (mod 2^33)`.

### Adder and leading-zero anticipation

`dlf_adder` adds the two carry-save vectors and the carry-in in 35 bits.
The product never occupies window bits `[1:0]`, so those two bits only
combine the addend's bottom bits with the carry-in. They are added on their
own, and their carry-out feeds a 32-bit core adder for bits `[33:2]` plus
the sign bit. If the sum is negative, meaning C was the larger operand of a
subtraction, the adder negates it. It returns the magnitude and which
operand won. That choice also decides the result's sign.

`dlf_lza` works in parallel with the adder and predicts the normalization
shift directly from the adder inputs. From each bit's propagate, generate
and kill signals it forms the indicator

```
f[i] = t[i+1] & (g[i] & ~z[i-1] | z[i] & ~g[i-1])
     | ~t[i+1] & (z[i] & ~z[i-1] | g[i] & ~g[i-1])
```

over all 35 bits. The leading one of `f` is within one position of the true
leading one, on either side. The shift count is `33 - lead`, floored at 0.

`dlf_normalizer` shifts the magnitude left by that count into a 35-bit
field. The leading one then sits at bit 34, 33 or 32. A final one-position
correction picks the 10 significand bits and the guard bit, and reports an
exponent correction of +1, 0 or -1.

Inside the FMA, negative sums always come with carry-in 1. Because of that,
the "+1" case never occurs there. It is kept so that the normalizer is
correct for any LZA error of one position. `dlf_exp_adjust` forms the
result exponent as
`window exponent - shift count + correction`.

### Rounding, overflow, underflow

`dlf_round_pack` adds the guard bit to the 10-bit significand. This is
round-nearest-up: halfway cases round away from zero. A carry out of the
significand bumps the exponent. After rounding, the result is packed as
follows:

- **Too large:** an exponent above 63, or exponent 63 with fraction 511, gives NaN-infinity and raises `naninf`.
- **Too small:** a negative exponent, or exponent 0 with fraction 0, gives zero, with no flag.
- **Exact zero:** when the sum cancels exactly, the result is `0x0000`.

The overflow and underflow behaviour is this design's choice.

## FP32 quantizer

`dlf_q_fp32` rounds an FP32 value to DLFloat16 with the same rule. It keeps
the top 9 fraction bits and uses fraction bit 13 as the guard bit, then
rebiases the exponent by -96. It reuses `dlf_round_pack`, so out-of-range
values behave exactly as in the FMA. FP32 infinities and NaNs become
NaN-infinity. FP32 zeros and subnormals become zero.

## Top level

`dlfloat_top` places the two units side by side:

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `fma_in_valid`, `fma_fp8_mode` | in | 1 | issue an FMA; A and B are FP8 |
| `fma_a`, `fma_b`, `fma_c` | in | 16 | operands of `R = C + A*B` |
| `fma_out_valid`, `fma_r`, `fma_naninf` | out | 1/16/1 | result 3 cycles after issue, NaN-infinity flag |
| `q_in_valid`, `q_x` | in | 1/32 | FP32 value to quantize |
| `q_out_valid`, `q_r`, `q_naninf` | out | 1/16/1 | quantized value, 1 cycle later |

Shared constants and the unpacked-operand struct are in `rtl/dlf_pkg.sv`.
Every block is a module of its own in `rtl/`.

## Verification

Every module has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The FMA and quantizer tests compare
against `tb/dlf_ref_pkg.sv`. That reference model forms `C + A*B` exactly,
as a 192-bit fixed-point integer, and then rounds it once. It shares no
code with the RTL.

- **Exhaustive tests:**
  - the unpacker: all 2^16 words and all 2^8 FP8 codes;
  - the multiplier: all 2^20 significand pairs;
  - the exponent logic: all 64^3 exponent triples;
  - the aligner: every significand at every shift;
  - the rounder: every significand and guard value over the whole exponent range.
- **`tb_dlf_fma`:** 200 000 operations mixing near-cancellation, close and random exponents, and FP8 mode. It checks the 3-cycle latency on every result. It starts with 22 directed cases whose results were worked out by hand: zeros, NaN-infinity, the largest and smallest numbers, overflow, underflow, rounding ties and FP8 mode. These also check the reference model itself.
- **`tb_dlfloat_top`:** runs the whole top level at its default configuration. It counts how often each mechanism fires and fails if any count is zero. The mechanisms are:
  - effective subtraction;
  - negative sum;
  - sticky borrow;
  - addend above or fully below the product;
  - LZA exact or one short;
  - round up, and round-up carry;
  - overflow;
  - NaN-infinity operand;
  - flush to zero;
  - exact cancellation;
  - FP8 mode;
  - quantizer rounding and overflow;
  - back-to-back bursts.
- **`tb_dot_product`:** accumulates dot products in 16 bits, feeding each result back as the next C. It runs three interleaved chains, so the pipeline takes one operation per cycle. The runs are:
  - chains of 42 720 products in FP16 mode;
  - chains of 10 000 products in FP16 mode;
  - chains of 10 000 products in FP8 mode.

  Every intermediate sum must match the reference, and a run of N operations must take N cycles plus the 3-cycle drain.

To run a test with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dlf_pkg.sv tb/dlf_ref_pkg.sv tb/tb_dlfloat_top.sv --top-module tb_dlfloat_top
./obj_dir/Vtb_dlfloat_top
```

Substitute any other `tb_*` module in the same way. Each test takes well
under a second of simulation.

## Choices made here, and what is not included

The following points are this design's own, not fixed by the format
description:

- the three-stage split and valid-only handshake;
- the window layout and the alignment sticky borrow;
- the LZA equations;
- overflow to NaN-infinity and silent flush to zero;
- the FP8 bias;
- emitting NaN-infinity as `0x7FFF`;
- the quantizer's handling of out-of-range values;
- flip-flops (rather than latches) for the staging registers.

The FMA is one processing element of a larger accelerator core. That core
holds 512 of these units in a 2D array, with a 2 MB scratchpad SRAM,
operand buffers, special-function units, control and clock generation, and
reaches about 1.5 TFLOP/s (around 1.46 GHz). None of that is here: its
organization is not specified, and neither is the small integer engine
that sits beside the floating-point datapath in the same FPU.

The FP32 weight-update addition used in training is also not included. It
is ordinary IEEE arithmetic done outside this unit.
