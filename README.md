# RoBA: a rounding-based approximate multiplier

Multiplying by a power of two costs only a shift. This multiplier uses that.
It rounds each operand to its nearest power of two and keeps only the cheap
terms of the product. What remains is three shifts, one addition and one
subtraction, and no partial-product array at all. The price is a small,
bounded error. That suits workloads such as image filtering, where the output
is judged by eye.

The RTL here is synthesizable SystemVerilog. It is combinational, has a
configurable width, and comes in two forms. One is an unsigned multiplier.
The other is a signed (two's complement) multiplier built around it, which is
the top level.

## The arithmetic

Let `Ar` and `Br` be `A` and `B` rounded to the nearest power of two. The exact
product can be rearranged as

    A*B = (Ar - A)*(Br - B) + Ar*B + Br*A - Ar*Br

Each of the last three terms has a power-of-two factor, so a shifter can form
it. The first term would need a real multiplier. It is the product of two
rounding errors, so it is small, and it is dropped:

    A*B  ~=  Ar*B + Br*A - Ar*Br

Some consequences, all checked by the testbenches:

* **Exact cases.** If either operand is zero or a power of two, its rounding
  error is zero, so the dropped term is zero and the result is exact.
* **Error bound.** No operand is ever more than a third of its own value from
  its rounded value. The dropped term is therefore at most `A*B/9`, so the
  relative error never exceeds 11.1%. The worst case is `3 x 3 -> 8`.
  Over all 8-bit magnitude pairs the mean relative error is about 2.8%. It is
  about the same at 16 bits.
* **Error sign.** The result can be above or below the exact product. It is
  below when both operands were rounded the same way. It is above when one
  operand was rounded up and the other down, because the dropped term is
  then negative. It is never negative for non-negative inputs, so the
  subtractor needs no sign bit.

## Rounding to the nearest power of two

This is the one block with real logic design in it (`roba_rounding`). Let
bit `k` hold the leading one of `x`. Then `x` lies between `2^k` and `2^(k+1)`,
and the midpoint is `3*2^(k-1)`. `x` is at or above the midpoint exactly when
bit `k-1` is also set. So the rule is:

| leading one at `k`, bit `k-1` | result     |
|-------------------------------|------------|
| bit `k-1` = 0                 | `2^k`      |
| bit `k-1` = 1 and `k >= 2`    | `2^(k+1)`  |
| `x = 3` (`k = 1`)             | `2`        |
| `x = 0`                       | `0`        |

Values exactly on the midpoint (6, 12, 24, ...) lie the same distance from
both powers. They are rounded **up**. Either choice gives the same accuracy,
but treating the midpoint as part of the upper range makes the per-bit logic
smaller. The only exception is 3, which goes to 2.

The output is the rounded value itself, one-hot (or zero). It is written per
bit, with no encoder and no comparator. Output bit `j` is set in two cases:

* the leading one is at `j` and `x` does not round up;
* the leading one is at `j-1` and `x` does round up.

An immediate assertion checks that the output has at most one bit set.

Because the rounded value is one-hot, each shifter (`roba_shifter`) is an
AND-OR network. It ORs together copies of the operand shifted by `i`, each
gated by bit `i` of the one-hot factor. No shift amount is ever encoded.

## The signed datapath

Rounding only helps non-negative numbers. A negative two's complement value
does not round to a pattern that is a power of two. The signed multiplier
therefore works on magnitudes and restores the sign at the end:

```
 a ─┐                       ┌─ shifter: |a| * Br ─┐
    ├─ sign detector ─|a|,|b|─ rounding ─ Ar,Br ─ shifter: Br * Ar ──┼─ adder ─ subtractor ─ sign set ─ p
 b ─┘        │              └─ shifter: |b| * Ar ─┘                          │
             └──────────────────── neg = sign(a) xor sign(b) ────────────────┘
```

(The adder sums the two cross products, `|a|*Br` and `|b|*Ar`. The subtractor
takes away `Br*Ar`.)

| module                      | role                                                          |
|-----------------------------|---------------------------------------------------------------|
| `roba_signed_multiplier`    | top: two's complement in, two's complement product out       |
| `roba_sign_detector`        | magnitudes of `a` and `b`, product sign as xor of sign bits   |
| `roba_unsigned_multiplier`  | the unsigned RoBA datapath: 2 roundings, 3 shifters, add, sub |
| `roba_rounding`             | nearest power of two, one-hot                                 |
| `roba_shifter`              | operand times one-hot power of two                            |
| `roba_adder`                | `Br*|A| + Ar*|B|`                                             |
| `roba_subtractor`           | minus `Ar*Br`                                                 |
| `roba_sign_set`             | two's complement negation when the product is negative       |
| `roba_pkg`                  | default operand width `ROBA_N = 8`                            |

### Widths and corner cases

* Operands are `N` bits and the product is `2N` bits. `N` defaults to 8.
  That default is a choice made for this RTL. It fits a part with 8 + 8
  operand pins and a 16-bit product. Every module takes the width as a
  parameter, and the testbenches also run widths 5 and 16.
* A magnitude is at most `2^(N-1)`, which fits `N` unsigned bits. This covers
  the most negative input `-2^(N-1)`: its magnitude is itself a power of two,
  so any product with it is exact.
* Each cross product is at most `2^(2N-2)`, so the adder needs no carry out.
  The final magnitude is at most `2^(2N-2)`, so the signed result always
  fits `2N` bits.
* `roba_unsigned_multiplier` expects magnitudes no larger than `2^(N-1)`.
  That is the range the sign detector delivers. A rounding input at or above
  `3*2^(N-2)` cannot be represented once rounded, so it is clamped to
  `2^(N-1)`. Only a direct unsigned user could ever supply one.

### Timing

Everything is combinational, with no clock and no reset. The critical path
runs through the leading-one detection and the AND-OR shifter, then one
`2N`-bit adder, one `2N`-bit subtractor and the output negation. For
throughput, register the top's ports, or add pipeline registers between the
adder and the subtractor.

After generic synthesis the 8-bit signed top is about 144 word-level cells,
with no flip-flops.

## What follows the method and what is chosen here

Taken from the method:
* the approximation formula;
* the rounding rule, including midpoints rounded up and the 3 -> 2 exception;
* signed operation through magnitudes and a final sign stage;
* the block structure (sign detector, rounding, three shifters, adder,
  subtractor, sign set);
* the `N`-bit width of the rounded values.

Chosen for this RTL:
* the 8-bit default width;
* a purely combinational implementation;
* the per-bit form of the rounding logic;
* the AND-OR shifters;
* two's complement negation for both the magnitude and the sign stage;
* acceptance of the most negative input;
* clamping of out-of-range unsigned inputs.

A second signed variant of the multiplier is known. It goes by the name
"AS-RoBA", but its internals are not available, so it is not provided.

## Application: image smoothing and sharpening

`tb/tb_roba_image_filter.sv` generates a 32x32 8-bit grayscale image. The
image has a ramp, a bright square and a checkerboard patch. The testbench
filters the image with two 3x3 masks, and every product goes through the
signed multiplier. The masks are standard choices:

* smoothing: `[1 2 1; 2 4 2; 1 2 1]/16`
* sharpening: `[0 -1 0; -1 5 -1; 0 -1 0]`

Pixels span 0..255, which needs 9 bits in two's complement. The 8-bit default
cannot hold such a pixel, so this test runs at `N = 16`. Results, measured
against exact filtering:

* **Smoothing: exact.** Every coefficient is a power of two, and such
  products carry no error.
* **Sharpening: PSNR about 22 dB.** The centre coefficient 5 is rounded to 4.
  The error concentrates on the high-contrast checkerboard.

For filters, this shows that choosing coefficients close to powers of two
matters more than the pixel data.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values come from
`tb/roba_ref_pkg.sv`, an integer reference model written independently of the
RTL. It finds the nearest power of two by comparing distances to every
candidate, and forms the products with ordinary multiplication.

| testbench                        | what it covers                                                  |
|----------------------------------|-----------------------------------------------------------------|
| `tb_roba_signed_multiplier`      | all 65,536 pairs of 8-bit operands at the default width; exactness and the 1/9 bound; counts every mechanism (round up, round down, midpoint up, 3 -> 2, negative product, most negative input, result above/below/equal to exact) and fails if one never occurs |
| `tb_roba_unsigned_multiplier`    | all magnitude pairs 0..128 at N = 8, 20,000 random pairs at N = 16 |
| `tb_roba_rounding`               | every input at N = 8 and N = 5                                  |
| `tb_roba_sign_detector`          | all 8-bit operand pairs                                         |
| `tb_roba_shifter`                | every operand against every one-hot factor and zero             |
| `tb_roba_adder`, `tb_roba_subtractor`, `tb_roba_sign_set` | corner values plus 20,000 random vectors |
| `tb_roba_image_filter`           | the application above                                           |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.
The multiplier is combinational, so every result is checked in the cycle its
operands are applied.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/roba_pkg.sv tb/roba_ref_pkg.sv tb/tb_roba_signed_multiplier.sv \
    --top-module tb_roba_signed_multiplier -y rtl -y tb +libext+.sv
./obj_dir/Vtb_roba_signed_multiplier
```

To run another testbench, substitute its name. To change the width, edit
`ROBA_N` in `rtl/roba_pkg.sv`, or override `N` on an instance. The adder,
subtractor and sign set take the product width `W = 2N`.
