# MX block MAC: exact MXFP8 / MXFP6 / MXFP4 dot products into FP32

Microscaling (MX) formats store a block of 32 small floating-point numbers
together with one shared power-of-two scale. Each element is a tiny float
(8, 6 or 4 bits) with its own sign, exponent and mantissa. The scale is an
8-bit pure exponent (E8M0) worth `2^(X-127)`. This unit computes, once per
clock,

```
fp_out = round_FP32( fp_in + 2^(scale_a-127) * 2^(scale_b-127) * sum_{i=0..31} a[i]*b[i] )
```

Here `a` and `b` are two MX blocks, and `fp_in` is an FP32 accumulator value,
usually the previous result.

The main idea is that **nothing is rounded until the very end**. A product of
two MX elements always fits exactly in a 36-bit fixed-point number. So the 32
products are added exactly in integer arithmetic, and the block sum meets the
FP32 accumulator in a single wide adder. Only the final FP32 result is
rounded, once, to nearest-even. The result is therefore the correctly rounded
value of the exact expression above. There is no per-product or per-level
normalisation, as a chain of FP32 multipliers and adders would need. That is
what keeps the pipeline at 4 stages.

## The operation

| `mode` | block A | block B | MX name              |
|--------|---------|---------|----------------------|
| 0      | E4M3    | E4M3    | MXFP8                |
| 1      | E3M2    | E3M2    | MXFP6                |
| 2      | E2M3    | E2M3    | MXFP6                |
| 3      | E2M1    | E2M1    | MXFP4                |
| 4      | E4M3    | E3M2    | mixed MXFP8 x MXFP6  |
| 5      | E4M3    | E2M3    | mixed MXFP8 x MXFP6  |
| 6      | E4M3    | E2M1    | mixed MXFP8 x MXFP4  |
| 7      | reserved: result is NaN |  |                |

* Each element sits in an 8-bit slot of `elems_a` / `elems_b` (element `i` in
  bits `8i+7 .. 8i`).
  * E4M3 uses the whole slot: sign 7, exponent 6..3, mantissa 2..0.
  * FP6 elements use bits 5..0 and FP4 elements bits 3..0, with the sign in
    the top used bit. Unused upper bits are ignored.
* The element formats follow the OCP MX definitions: biases 7 (E4M3),
  3 (E3M2), 1 (E2M3, E2M1), with subnormals. None of them has an infinity.
  Only E4M3 has a NaN (`S.1111.111`).
* The E5M2 variant of MXFP8 is **not** supported. Its exponent range would
  need a 64-bit product grid instead of 36 bits (see below).
* Special values:
  * A NaN anywhere gives the quiet NaN `0x7FC00000`. "Anywhere" means a NaN
    `fp_in`, an E4M3 NaN element, a scale of `0xFF`, or mode 7.
  * An infinite `fp_in` passes through unchanged.
  * A finite result beyond the FP32 range becomes a signed infinity.
  * Subnormal `fp_in` values and subnormal results are handled exactly.
* If the block sum is exactly zero, the result is `fp_in` itself, including
  the sign of a zero. Any other exact zero is `+0`.

## One grid for every element format

All formats are mapped onto the E4M3 format, the widest one supported. Each
element becomes a sign, a 4-bit **offset exponent** `exp = e + 6` (0..14)
and a 4-bit significand `sig` with the hidden bit in bit 3. Then

```
value = (-1)^sign * sig * 2^(exp - 9)
```

Narrower mantissas are padded with zeros on the right. Subnormals get a zero
hidden bit and their format's minimum exponent:

| format | normal `exp` | subnormal `exp` | `sig`          |
|--------|--------------|-----------------|----------------|
| E4M3   | E - 1        | 0               | `{E!=0, m2..m0}` |
| E3M2   | E + 3        | 4               | `{E!=0, m1, m0, 0}` |
| E2M3   | E + 5        | 6               | `{E!=0, m2..m0}` |
| E2M1   | E + 5        | 6               | `{E!=0, m0, 0, 0}` |

Every smaller format's exponent range (-2..4 and 0..2) lies inside E4M3's
(-6..8), and its precision is at most E4M3's 4 bits. So one datapath sized
for E4M3 x E4M3 serves all formats, mixed pairs included, with no loss.

## The block datapath: 36, 37 and 42 bits

A product of two decoded elements is `sigA*sigB * 2^(expA+expB-18)`:

* **32 multipliers** form the 8-bit products `sigA*sigB`.
* **32 adders** form the 5-bit exponent sums `expA+expB` (0..28).
* **Align** shifts each product left by its exponent sum. The smallest
  product has its lowest bit at position 0 and the largest ends at bit 35.
  In general the span is `(emax_A + emax_B) - (emin_A + emin_B) + p_A + p_B`,
  which for E4M3 is `(8+8) - (-6-6) + 4 + 4 = 36` bits. Every product is an
  exact 36-bit integer, in units of `2^-18` times the block's scale.
* **Two's complement conversion** gives each product the sign
  `signA ^ signB` and turns it into a 37-bit signed number.
* A **5-level adder tree** adds the 32 products pairwise and grows one bit
  per level, so its 42-bit output `sum_of_products` is exact.
* In parallel, **scale addition** forms the block's unbiased scale exponent,
  `X = scale_a + scale_b - 254`. The block sum `S` is then worth
  `S * 2^(X - 18)`.

## Adding fp_in: the 67-bit window

This is the subtle part of the design. It lives in `mx_exp_compare` and
`mx_final_adder`.

### The two addends

* `F` is fp_in's significand with its hidden bit: 24 bits, made signed (25
  bits). Its lowest bit weighs `2^e_fp`, with `e_fp = max(E,1) - 150`.
* `S` is the 42-bit signed block sum. Its lowest bit weighs `2^(X-18)`.
* The exponent compare computes the distance between the two lowest bits,
  `d = e_fp - (X - 18)`. It runs in stage 1, alongside the multipliers,
  because it needs only the scales and fp_in's exponent.

### Where the window goes

The final adder places both addends in one 67-bit two's complement window
(67 = 42 + 24 + 1) and adds them. Where the window goes depends on `d`:

| case | placement | loss |
|------|-----------|------|
| `S == 0` or `d > 42` | F at bit 42; S shifted right by `d-42` | sticky |
| `0 <= d <= 42` | S at bit 0; F shifted left by `d` | exact |
| `-25 <= d < 0` | F at bit 0; S shifted left by `-d` | exact |
| `d < -25` | S at bit 25; F shifted right by `-d-25` | sticky |

* In the two middle cases both addends fit completely, and the sum is exact.
* In the two outer cases one addend lies far below the other. It is shifted
  right **arithmetically**, which rounds towards minus infinity, and the
  bits that fall out are ORed into a `sticky` flag.

### Why the sticky flag is enough

The true sum is then `W + f`, where `W` is the window sum and `0 < f < 1`
window LSB. The magnitude passed on is:

* `W`, when `W >= 0`;
* `-W`, when `W < 0` and nothing was lost;
* `~W` (that is, `-W-1`), when `W < 0` and something was lost. This keeps
  "magnitude plus a nonzero fraction" true for negative sums as well.

So the magnitude and the sticky flag always describe the exact sum.

### Why rounding still sees a guard bit

Whenever bits were lost, the result keeps enough bits above them:

* with F on top (`d > 42`), F is normalised or subnormal at bit 42, so the
  24 kept bits sit at or above bit 41;
* with S on top (`d < -25`), S is nonzero and at least `2^25`, while F is
  below `2^23`, so the leading one is at bit 24 or higher.

In both cases the guard bit is inside the window, and the sticky flag
carries everything below it. Rounding is therefore exact for every input
combination.

## Normalise, round, exponent

* **Normalize** counts leading zeros and shifts the magnitude left in one
  barrel-shifter pass, so that the leading one lands in bit 66. The shift is
  capped at `192 + e_w`, where `e_w` is the weight of window bit 0. The cap
  applies when the result is below the FP32 normal range: the subnormal LSB
  `2^-149` then lands in bit 43 and the result comes out subnormal.
* **Post round** keeps bits 66..43 and rounds to nearest, ties to even. Bit
  42 is the guard bit. The sticky bit is bits 41..0 ORed with the adder's
  sticky flag.
* **Exp update** forms the exponent field:
  * a normal result gets `193 + e_w - shift`, plus 1 if rounding carried;
  * a subnormal result gets 0, or 1 if it rounded up to `2^-126`;
  * a field of 255 or more is an overflow, and the result becomes a signed
    infinity.

## Pipeline and interface

| stage | work |
|-------|------|
| 1 | input processing (A and B), exponent adders, multipliers, scale addition, exponent compare |
| 2 | align, two's complement, 5-level adder tree |
| 3 | 67-bit final adder |
| 4 | normalize, round, exponent update, special cases; `fp_out` registered |

* **Issue and latency.** One operation can be issued every clock. An
  operation sampled with `in_valid = 1` at a rising edge appears on `fp_out`
  with `out_valid = 1` after the fourth rising edge, counting the sampling
  edge as the first.
* **Reset.** `rst_n` is synchronous and active low. It clears only the valid
  chain; the data registers need no reset.
* **Accumulating.** To accumulate, feed `fp_out` back into `fp_in`; this
  path is outside the unit. A single dependent chain can issue every fifth
  clock. Five independent chains, interleaved, keep the pipeline full; the
  end-to-end testbench does this.

Ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` | in | 1 | an operation is present |
| `fp_in` | in | 32 | FP32 accumulator input |
| `scale_a`, `scale_b` | in | 8 | E8M0 shared scales |
| `elems_a`, `elems_b` | in | 32 x 8 | element slots |
| `mode` | in | 3 | element formats, table above |
| `out_valid` | out | 1 | `fp_out` is valid |
| `fp_out` | out | 32 | FP32 result |

The block count (32), the widths (36, 37, 42, 67, 11-bit scale sum and
exponent difference) and the four pipeline stages follow the published
architecture. A coarse synthesis of `mx_mac` gives about 1.8k word-level
cells and 831 flip-flop bits.

## Where this RTL makes its own choices

The published description gives the block diagram, the widths and the stage
count. It does not give the following, which are decisions of this
implementation:

* **Mode encoding.** The 3-bit mode's encoding, including which mixed pairs
  codes 4–6 select. The input processing accepts a format per block, so other
  pairs need only a different decoder in `mx_mac`.
* **Formats.** MXFP8 means E4M3 only. E5M2 would break the 36-bit grid.
* **Element sizes.** Significands are 4 bits and raw products 8 bits. The
  published diagram labels these buses 8 and 16 bits, i.e. the element
  storage width. The 36-bit derivation needs only 4-bit precision.
* **Level-1 adders.** The 36-bit level-1 adders are read as 36-bit
  magnitudes. They become 37-bit signed words, as the diagram's 37-bit tree
  inputs show, so the first tree level is 38 bits wide.
* **Final adder.** The window placement in the 67-bit adder and the sticky
  handling.
* **Exponent path.** The exponent difference reaches the exponent update
  through the window weight `e_w`, not as a separate bus.
* **Rounding and special values.** Round-to-nearest-even, subnormal support,
  and the NaN/infinity/zero rules.
* **Pipeline.** The exact stage boundaries, the valid/reset handshake, and
  where the FP6/FP4 elements sit in an 8-bit slot.

## Files

| file | block |
|------|-------|
| `rtl/mx_pkg.sv` | shared widths, format codes, element and FP32 types |
| `rtl/mx_mac.sv` | top: pipeline registers, mode decoder, special cases |
| `rtl/mx_input_proc.sv` | element decoder onto the common grid (one per block) |
| `rtl/mx_exp_adders.sv` | 32 exponent adders |
| `rtl/mx_multipliers.sv` | 32 significand multipliers |
| `rtl/mx_align.sv` | 36-bit product alignment |
| `rtl/mx_twos_comp.sv` | sign combination and two's complement |
| `rtl/mx_adder_tree.sv` | parameterised balanced adder tree (5 levels, 37 -> 42 bits) |
| `rtl/mx_scale_add.sv` | shared-scale addition |
| `rtl/mx_exp_compare.sv` | exponent difference between fp_in and the block |
| `rtl/mx_final_adder.sv` | 67-bit window adder with sticky |
| `rtl/mx_normalize.sv` | leading-zero count and barrel shift |
| `rtl/mx_post_round.sv` | round to nearest even |
| `rtl/mx_exp_update.sv` | result exponent and overflow |

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.

* **Exhaustive tests.** These cover the element decoder (every slot value
  in every format, checked by value), the exponent adders, the multipliers,
  the aligner (every product and shift), the scale addition and the
  exponent compare.
* **Random and corner tests.** The two's complement converter and the adder
  tree get random and extreme values, including the all-maximum and
  all-minimum sums.
* **Final adder.** This is checked by value: a 640-bit integer holds the
  exact sum, and the output's magnitude, sign and sticky flag must describe
  it. All four window cases are required to occur.
* **Back end.** Normalise, round and exponent update are checked against
  their arithmetic definitions, including ties, carries and the
  normal/subnormal boundary.
* **`tb_mx_mac` (end to end, at full size).** About 20 000 random
  operations plus 1 000 chained accumulation steps are checked bit-exactly
  against `tb/mx_ref_pkg.sv`.
  * The reference works from the format definitions with no shared grid. It
    sums the exact value in a 640-bit integer and rounds once.
  * The testbench also checks the 4-clock latency and the result order.
  * It counts how often each mechanism occurs, and fails if one never does:
    every format and mixed pair, every window case, a zero block sum, NaN,
    infinity, overflow, subnormal results, near-total cancellation, bubbles,
    back-to-back issue and accumulation chains.

`mx_mac` also carries two concurrent assertions, which are active in
simulation with `--assert`. They check the two invariants the rounding
argument depends on:

* the summed magnitude never reaches bit 66;
* the window weight `e_w` never drops below -191.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mx_pkg.sv tb/mx_ref_pkg.sv tb/tb_mx_mac.sv --top-module tb_mx_mac
./obj_dir/Vtb_mx_mac
```

Replace `tb_mx_mac` with any other testbench name. The full end-to-end run
takes a couple of seconds.
