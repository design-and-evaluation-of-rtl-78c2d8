# Precision-scalable FP32 / MXINTn fused multiply-add

This unit computes `R = A + B·C` with a single rounding to FP32. It has two
multipliers behind one adder:

* **FP32 mode** (`type_sel = 0`): B and C are ordinary FP32 numbers. Their
  significands are multiplied exactly, and the product is added to A.
* **MXINTn mode** (`type_sel = 1`): B and C each carry a *block* of small
  two's complement integers, with one shared power-of-two scale per block
  (an E8M0 exponent). A precision-scalable integer multiplier forms the
  block's dot product. The dot product is scaled by the two shared exponents
  and then added to the FP32 A in the same FP32 adder.

The narrow formats give more products per operation (4, 8 or 16 per word)
while the accumulation stays in FP32 with full internal precision. This is
what dot products in fully connected neural-network layers need: many cheap
low-precision products summed into an accurate running FP32 value. When
accuracy matters more than throughput, the same unit still does plain IEEE
FP32 FMAs.

The design follows the architecture of the master's thesis *"Design and
Evaluation of a Precision-Scalable Block Floating-Point Multiplier"*
(Politecnico di Torino): its block diagram, its four pipeline stages and
their register positions, its control signals `type_sel` and `CTRL_in`, its
flush-to-zero policy and its double-precision internal addition. Widths,
encodings and the inside of the block multiplier are not specified there.
They are this implementation's own choices, and the section *Design
choices* lists them.

## Number formats

**FP32 operands** follow IEEE 754 binary32, with one exception: denormals are
not supported. A denormal input counts as a zero of the same sign. A product
below 2^-126, or a final result below 2^-126 after rounding, also becomes a
signed zero. Rounding is always round to nearest, ties to even. Infinities
and NaNs behave as in IEEE 754:

* If an operand is a NaN, it comes out quieted (quiet bit set, sign and
  payload kept). A is checked first, then B, then C.
* `0·∞` and `∞ − ∞` give the quiet NaN `7FC00000`.

**MXINTn blocks.** A 32-bit B or C word is split into equal fields, with
element 0 in the least significant bits:

| CTRL_in | precision | elements per word | fraction bits F | element value |
|---|---|---|---|---|
| 0 (3) | MXINT8 | 4  | 6 | m / 2^6 |
| 1     | MXINT4 | 8  | 2 | m / 2^2 |
| 2     | MXINT2 | 16 | 0 | m       |

Each element mantissa `m` is a two's complement integer: one sign bit, one
integer bit and n−2 fraction bits. The shared exponents `e8m0_i` (for B) and
`e8m0_w` (for C) are unsigned, with bias 127. In MXINTn mode the unit
therefore computes

```
R = round_FP32( A + 2^(e8m0_i + e8m0_w - 254 - 2F) * Σ_k b_k·c_k )
```

and the sum has 4, 8 or 16 terms. Longer blocks, such as the 32-element
blocks of the OCP MX formats, take several operations, with R fed back as A.

## Pipeline

There are four stages and three pipeline registers. One operation can start
every clock.

| stage | work | ends in |
|---|---|---|
| 1 | field extraction; input class (zero, denormal, ∞, NaN); 24×24 FP32 significand product; the sub-unit array of the block multiplier | REG 1 |
| 2 | block accumulation (dot product); two's complement to sign/magnitude; product multiplexer (`type_sel`); product normalization; product exponent and exponent difference to A; product exceptions | REG 2 |
| 3 | swap by exponent; alignment shift with sticky bit; complement for subtraction; 58-bit addition | REG 3 |
| 4 | complement of a negative sum; leading-zero detection; normalization; rounding; exponent adjust; sign selection; special-case selection and packing | combinational to `r_out` |

Inside the block multiplier, REG 1 sits between the sub-unit array and the
block accumulation. This splits the widest logic in the design across two
stages. `fma_core` delivers its result 3 rising edges after its inputs.

`fma_top` wraps the core in an input register and an output register, so
every path runs from register to register. At the top, a result appears 5
rising edges after the edge that samples its inputs. The valid bits and the
asynchronous active-low reset (`rst_n`) are additions of this
implementation. The reset clears only the valid bits; the datapath
registers are not reset.

## The block multiplier (`mxint_block_mult`, `mxint_su`)

The block multiplier is built from 64 identical **sub-units**. Each sub-unit
is a 2-bit × 2-bit multiplier, and each input digit can be read as signed or
unsigned. The 32-bit word is split into four 8-bit lanes, and each lane has
a 4×4 grid of sub-units. `SU(i,j)` multiplies digit `i` of B by digit `j` of
C. What the grid computes depends on the precision:

* **MXINT8**: the whole grid makes one 8×8 product. `SU(i,j)` has weight
  2^(2(i+j)), and digit 3 (the top digit) is signed.
* **MXINT4**: the two diagonal 2×2 groups each make one 4×4 product, with
  weights 2^(2(i mod 2 + j mod 2)). The odd digits are signed.
* **MXINT2**: each diagonal sub-unit makes one whole product, and every
  digit is signed.

Sub-units that the selected precision does not use are gated to zero. Every
sub-unit result is registered (REG 1). Stage 2 then shifts each result by
its weight and sums them all into a 20-bit signed dot product. The sum is
exact: in the worst case, four products of (−128)·(−128), it needs 18 bits.

With 32-bit operand words, all 64 sub-units are busy only in MXINT8. MXINT4
uses 32 of them and MXINT2 uses 16. Keeping every sub-unit busy at low
precision would need wider B and C words.

## Why a single rounding is exact

The product and A are both carried as a sign, a 12-bit signed exponent and
a **53-bit significand** (double-precision resolution).

* The FP32 product has 48 bits and always fits exactly.
* An MXINTn dot product has at most 18 bits and also fits exactly.

The adder field is 58 bits wide: 2 headroom bits, the 53-bit significand and
3 guard bits. The smaller operand is shifted right. Every bit shifted out is
ORed into the field's LSB (the sticky bit).

Whenever bits are lost to sticky, the shift was at least 2. The sum then
still has its leading one at bit 54 or above, so the 24-bit rounding point
lies at least 30 bits above the sticky bit. The sticky-jammed sum and the
exact sum then fall between the same two FP32 rounding boundaries and round
to the same value. With a shift of 0 or 1, nothing is lost, and heavy
cancellation is computed exactly. The result is therefore the correctly
rounded value of the exact `A + B·C`, apart from the flush-to-zero rules.

The product exception logic replaces two kinds of product:

* A product of at least 2^129 becomes infinity. No finite FP32 A can bring
  such a sum back into range, so this matches the exact result.
* A product below 2^-126 becomes a signed zero, because of the flush policy.

The swap stage orders the operands by **exponent only**. When both exponents
are equal and the product is the larger of the two, the sum comes out
negative. Stage 4 then complements it and flips the sign.

## Special-case priority (`output_packer`)

1. An operand is a NaN → that NaN, quieted.
2. `0·∞`, or `∞ + (−∞)` → `7FC00000`.
3. A is infinite → A.
4. The product is infinite or overflows → infinity with the product's sign.
5. The sum is exactly zero → `+0`, or `−0` when A and the product are both
   negative.
6. The exponent overflows after rounding → infinity.
7. The exponent underflows after rounding → signed zero.
8. Otherwise → `{sign, exponent, rounded fraction}`.

## Interface (`fma_top`, same ports on `fma_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset of the valid bits |
| `valid_in` | in | 1 | an operation is presented |
| `type_sel` | in | 1 | `SEL_FP32` (0) or `SEL_MXINT` (1) |
| `ctrl_in` | in | 2 | MXINTn precision, `mx_mode_e` |
| `a_in`, `b_in`, `c_in` | in | 32 | A (FP32); B and C (FP32 or MXINTn blocks) |
| `e8m0_i`, `e8m0_w` | in | 8 | shared exponents of the B and C blocks |
| `r_out` | out | 32 | FP32 result |
| `valid_out` | out | 1 | `r_out` holds a result |

There is no back-pressure, and operations may change mode from one clock to
the next. Types and constants are in `rtl/fma_pkg.sv`.

## Source files

The blocks are listed in datapath order. All are combinational, except
`fma_core` and `fma_top` (registers) and `mxint_block_mult` (which holds
its part of REG 1).

| file | block |
|---|---|
| `fma_pkg.sv` | shared types, widths, encodings |
| `fp_extractor.sv` | sign/exponent/fraction split; forwards B and C as blocks in MXINTn mode |
| `input_special_detector.sv` | input classes, denormal flush, A significand, NaN selection |
| `fp32_sig_mult.sv` | 24×24 significand multiplier |
| `mxint_su.sv` | 2-bit sub-unit |
| `mxint_block_mult.sv` | sub-unit array, internal REG 1, block accumulation |
| `mxint_convert.sv` | dot product to sign/magnitude in the 53-bit field |
| `product_normalizer.sv` | leading-zero shift of the selected product |
| `exp_align_ctrl.sv` | product exponent and exponent difference |
| `product_exception_detector.sv` | product NaN/invalid/∞/overflow/underflow/zero |
| `swap_unit.sv` | operand order by exponent, alignment distance |
| `complement_align.sv` | right shift with sticky bit, negation for subtraction |
| `sig_adder.sv` | 58-bit adder |
| `lzc.sv` | leading-zero detector |
| `post_add_normalizer.sv` | complement of a negative sum, normalization |
| `rounding_unit.sv` | round to nearest, ties to even |
| `exponent_adjuster.sv` | final biased exponent, overflow/underflow |
| `sign_selector.sv` | result sign |
| `output_packer.sv` | special-case selection and FP32 packing |
| `fma_core.sv` | the four-stage FMA |
| `fma_top.sv` | input and output registers around the core |

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. The testbenches use
two helper packages:

* `tb/fma_ref_pkg.sv` is an exact reference model. It computes the sum as a
  720-bit integer and rounds it once, and it takes the dot product element
  by element. It shares no code with the RTL.
* `tb/fma_stim_pkg.sv` is a random operation generator.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fma_pkg.sv tb/fma_ref_pkg.sv tb/fma_stim_pkg.sv tb/tb_fma_top.sv \
    --top-module tb_fma_top
./obj_dir/Vtb_fma_top
```

What the testbenches check:

* **`tb_fma_top`** uses the default parameters. It streams 100,000 random
  FP32, MXINT8, MXINT4 and MXINT2 operations, with idle cycles and mode
  changes between neighbouring operations. Every result must match the
  reference bit for bit and arrive exactly 5 edges after its inputs. The
  test also counts 20 mechanisms: each multiplier and precision, type and
  precision switches, NaN propagation, invalid operations, infinities,
  product overflow and underflow, result overflow and flush, denormal
  inputs, swap, negative sums, cancellation, rounding carry, ties and exact
  zeros. A mechanism that never occurs counts as a failure.
* **`tb_fma_core`** runs the same test on the core, with a latency of 3.
* **`tb_fc_layer`** computes fully-connected-layer dot products. Each one
  is a 32-element MX block (or 32 FP32 terms) plus a bias, accumulated by
  feeding `r_out` back into A. Each result is checked against the reference
  applied step by step, together with the cycle count of the chain.
* **The unit testbenches** check each block against its own independent
  computation. Where the input space is small they cover it completely: the
  sub-unit and the sign selector.

## Design choices

These points are not fixed by the source description and were chosen here:

* **Block layout.** One 32-bit word holds 4, 8 or 16 elements, and the
  products are summed into one dot product per operation.
* **Sub-units.** They are 2-bit, laid out as 4 lanes of 4×4. Signed and
  unsigned digits handle two's complement elements.
* **CTRL_in encoding.** The 2-bit codes in the table above; code 3 acts as
  MXINT8.
* **Fraction bits.** MXINT4 and MXINT2 get n−2 fraction bits (2 and 0),
  following MXINT8's 6. E8M0 has bias 127 and no NaN code.
* **Widths.** The exponent is 12 bits and the adder 58 bits. The
  double-precision resolution of the addition comes from the source; the
  exact widths are chosen here.
* **Swap.** Operands are ordered by exponent, and a negative sum is
  complemented after the adder. This follows the source's block diagram.
  Its prose instead says the larger-magnitude operand is chosen.
* **Product overflow.** The threshold is 2^129.
* **Underflow.** A result is judged after rounding.
* **Zero operands.** They always go to the second adder input.
* **NaN order.** A NaN operand is chosen in the order A, B, C.
* **Control.** The valid bits, the reset and operand isolation (the unused
  multiplier's inputs are forced to zero) are additions.
* **Special-case inputs to the exception logic.** The shared exponents reach
  the product exception logic only through the product exponent. The
  source diagram wires them to it directly.

These are not included:

* other IEEE rounding modes (only ties-to-even is used);
* exception flag outputs;
* the combinational, 1-register and 2-register pipeline variants the source
  compares against;
* any area, power or clock-frequency claim: those depend on a cell library.
