# Single-precision complex floating-point multiplier

This RTL multiplies two complex numbers whose real and imaginary parts are IEEE-754 single-precision
values:

    (ar + j·ai) · (br + j·bi) = pr + j·pi
    pr = ar·br − ai·bi
    pi = ar·bi + ai·br

Four real floating-point multipliers compute the four cross products at the same time. One
floating-point adder forms `pi` and one floating-point subtractor forms `pr`. The whole unit is
combinational: no clock, no registers, no handshake. The outputs settle one combinational delay
after the inputs change.

The hardest part to build is the 24×24-bit mantissa multiplier inside each real multiplier. It
comes in four interchangeable styles, chosen with the `MULT` parameter:

| `MULT`            | mantissa multiplier                                                    |
|-------------------|------------------------------------------------------------------------|
| `MULT_CIFM_CLA`   | CIFM (combined integer/floating-point multiplier) with carry look ahead adders. This is the default and the fastest. |
| `MULT_CIFM`       | the same CIFM with ripple carry adders                                  |
| `MULT_VEDIC`      | Vedic (Urdhva Tiryagbhyam) multiplier from nine 8×8 blocks              |
| `MULT_ARRAY`      | classic AND/full-adder cell array                                       |

All four styles give the same, exact 48-bit product. They differ only in structure, and so in
delay and power. With a typical FPGA flow the published ordering, fastest first, is: CIFM with CLA,
CIFM, Vedic, array. Those timing and power figures come from implementation. They are not
reproduced here.

## Number handling

The fields are the standard ones: sign in bit 31, biased exponent in bits 30:23 (bias 127), and a
23-bit fraction with a hidden leading 1. The fraction together with the hidden bit gives a 24-bit
mantissa.

**Rounding is truncation.** The multiplier drops the product bits below the 23-bit fraction. The
adder/subtractor does the same at the end. The adder also drops the bits of the smaller operand that
fall off during alignment, and it keeps no guard or sticky bits. So a subtraction can come out one
unit in the last place above the exact round-toward-zero result. This choice is deliberate: it
reproduces a published reference simulation bit for bit. With

    ar = 0x42DD62B2  ai = 0x432675B6  br = 0xD6DA5746  bi = 0x49A5A3B1

the unit gives `pr = 0xDA3CD184` and `pi = 0xDA8DF8FC`. Round-to-nearest would give …185 and …8FD.
Exact round-toward-zero would give …8FB for `pi`.

**Special values** are this design's own choice:

- An input with exponent 0 counts as zero, so subnormals are flushed to zero.
- An exponent that overflows (≥ 255 after normalisation) gives ±infinity.
- One that underflows (≤ 0) gives ±0.
- A NaN input, 0·∞ or ∞−∞ gives the quiet NaN `0x7FC00000`.
- Other infinite inputs propagate as infinity.
- An exact cancellation in the adder gives +0.

## Real multiplier (`fp_mul`)

The three fields are handled separately:

- **sign:** XOR of the two signs.
- **exponent:** an 8-bit ripple carry adder adds the two biased exponents, and its carry-out
  becomes the ninth bit. The bias 127 is then subtracted once. The exponent is kept 10 bits wide
  and signed, so overflow and underflow can be detected.
- **mantissa:** `{1, frac_a} × {1, frac_b}` in the selected `mant_mul24`. The product lies in
  [1, 4). If bit 47 is set, the fraction is bits 46:24 and the exponent is incremented. Otherwise
  the fraction is bits 45:23.

## The CIFM mantissa multiplier

This style is built bottom-up in three layers.

**4×4 optimised multiplier (`cifm_mul4`).** The 16 partial products `XiYj` are reduced in three
levels of half adders (HA) and full adders (FA), grouped in eight small blocks.

- **Level 1** has four blocks that work in parallel on two-bit slices, with no carry passing
  between them. Block 1 (HA+FA) and block 2 (HA+HA) add partial-product rows Y0 and Y1. Block 3
  (HA+FA) and block 4 (HA+HA) add rows Y2 and Y3. Block 1 already gives P1.
- **Level 2** has block 5 (HA+FA+FA) and block 6 (FA). Block 5 takes X0Y2, block 1's sum and the
  weight-3 and weight-4 sums. It gives P2 and passes a carry up. Block 6 adds the three weight-5
  terms.
- **Level 3** has block 7 (HA+HA), which gives P3 and P4, and block 8 (FA+FA+HA), which gives P5 to
  P7.

P0 is `X0Y0`. The block make-up follows the published diagram. The carry routing between blocks is
this design's, and an exhaustive test checks it.

**12×12 module (`cifm_mul12`).**

- Nine `cifm_mul4` blocks form every product of 4-bit digits, `a_i·b_j`.
- For each digit `b_j`, the products `a_0·b_j` and `a_2·b_j` do not overlap, so they are simply
  concatenated. `a_1·b_j` is added at weight 4. This gives a 16-bit row.
- The three rows are added at weights 0, 4 and 8.
- An enable input holds the operands at zero when the module is not needed (operand isolation).

**24×24 multiplier (`cifm_mul24`).** The operands are split into 12-bit halves AH, AL, BH and BL.
Four 12×12 modules form AH·BH, AL·BH, AH·BL and AL·BL in parallel.

- P0–P11 are the low half of AL·BL.
- **ADDER 2** gives P12–P35. It adds `{AH·BH[11:0], AL·BL[23:12]}`, AL·BH and AH·BL as two 24-bit
  additions, and each addition produces a carry.
- **ADDER 1** gives P36–P47. It adds both carries to `AH·BH[23:12]`.

Two **checkers** watch AH and BH. When a half is all zero, the 12×12 modules that multiply by it are
switched off. Their product is zero anyway, so the result does not change, but the logic does not
toggle. In floating-point use the hidden bit keeps AH and BH non-zero, so the checkers only act when
the block is used as a plain integer multiplier.

With `USE_CLA = 1`, every adder in the three layers is a `cla_adder`. This is a carry look ahead
adder with 4-bit groups: carries inside a group are computed in parallel from generate/propagate
signals, and group generate/propagate terms link the groups. With `USE_CLA = 0` the adders are
ripple carry adders (`rca`). The exact kind of "modified" carry look ahead adder used originally is
not known; this is a standard one.

## The Vedic mantissa multiplier

- `vedic_mul2` is the 2×2 cell. It takes the vertical product `a0b0`, adds the crosswise products
  `a1b0 + a0b1` with a half adder, then adds the vertical product `a1b1` plus that carry with a
  second half adder.
- `vedic_mul4` and `vedic_mul8` each combine four half-size products B0A0, B0A1, B1A0 and B1A1.
  The combining is done by `vedic_combine`, which holds three N-bit ripple carry adders:

      RCA1 = B0A1 + B1A0                                  -> carry c1
      RCA2 = RCA1 + {0, upper half of B0A0}               -> carry c2, gives s[N-1:N/2]
      RCA3 = B1A1 + {0, c1|c2, upper half of RCA2}        -> s[2N-1:N]

  `c1` and `c2` carry the same weight and can never both be 1, so an OR merges them.
- `vedic_mul24` forms all nine byte products `Bj·Ai`. Three 16-bit ripple carry adders add the
  crosswise pairs of equal weight, and a fourth adds B1A1 into the weight-16 column. The two
  vertical products B0A0 and B2A2 do not overlap, so they form one word. The three column sums are
  folded into that word by ripple carry adders that start at bits 8, 16 and 24. The byte split, the
  nine 8×8 blocks and the first 16-bit adders follow the published structure. The arrangement of
  the later adders is this design's.

## The array mantissa multiplier

`array_mul` is an N×N grid of `array_cell`s (N = 24). Each cell is an AND of `m_j` and `q_i` feeding
a full adder, which also takes the incoming partial-product bit and the carry from the cell on its
right.

- Row i adds `M·q_i` to the previous row's partial product, shifted down one place.
- The row's final carry becomes the top bit of its partial product.
- The lowest bit of row i is product bit i. The last row gives the upper N bits.

## Floating-point adder/subtractor (`fp_addsub`)

When `sub = 1`, the sign of `b` is flipped first. Then:

1. **Compare.** The operand of larger magnitude is chosen by comparing exponent and mantissa
   together. Its exponent and sign become the result's. The smaller mantissa is shifted right by
   the exponent difference, and the bits shifted out are lost.
2. **Add or subtract.** The mantissas are added when the signs agree. Otherwise the smaller is
   subtracted from the larger, so the 25-bit result is never negative.
3. **Normalise.** A carry out shifts the result right by one and increments the exponent.
   Otherwise the leading zeros are counted and shifted out to the left, and the exponent is
   decremented by the same amount.

In `complex_fp_mul`, the adder is the instance with `sub` tied to 0 and the subtractor has it tied
to 1.

## Module hierarchy

    complex_fp_mul            top: 4 x fp_mul, fp_addsub (add), fp_addsub (subtract)
      fp_mul                  sign / exponent (rca #8) / mantissa path
        mant_mul24            selects the style by MULT
          cifm_mul24          4 x cifm_mul12, 2 x cifm_checker, ADDER 1, ADDER 2 (cifm_add)
            cifm_mul12        9 x cifm_mul4 + cifm_add
              cifm_mul4       half_adder / full_adder, 3 levels
            cifm_add          cla_adder or rca
          vedic_mul24         9 x vedic_mul8 + rca
            vedic_mul8        4 x vedic_mul4 + vedic_combine
              vedic_mul4      4 x vedic_mul2 + vedic_combine
          array_mul           N x N array_cell
      fp_addsub
    fp32_pkg                  field struct fp32_t, constants, mult_kind_e, is_zero/is_inf/is_nan

Every module sits in `rtl/<module>.sv`. Ports that carry floating-point values use the packed
struct `fp32_pkg::fp32_t` (`{sign, exp[7:0], frac[22:0]}`), which is bit-compatible with a
`logic [31:0]`.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` at the end. The floating-point testbenches share the behavioural
reference model `tb/tb_fp_ref_pkg.sv`, which is written with plain integer arithmetic. For example,
to run the end-to-end test of the default configuration:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl \
        rtl/fp32_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_complex_fp_mul.sv \
        --top-module tb_complex_fp_mul -o sim
    ./obj_dir/sim

What the testbenches cover:

- **`tb_complex_fp_mul`** runs the top at its default parameters. It checks the reference vector
  above, a few hand-worked products such as (1+2j)(3+4j) = −5+10j and j·j = −1, and 20,000 random
  complex products. It counts the datapath mechanisms and fails if any of them never occurred:
  mantissa normalisation, adder carry shift, cancellation shift, alignment shift, operand swap,
  overflow, underflow, zeros and NaN.
- **`tb_complex_styles`** builds the top in all four `MULT` styles side by side and checks that they
  give the same, correct result.
- **The integer multipliers and adders** are checked against `*` and `+`. The tests are exhaustive
  where the width allows (4×4, 8×8, 8-bit adder) and random with corner cases otherwise.

## Departures and inferred details

- There is no rounding beyond truncation, and the aligned operand in the adder loses its low bits
  (see above).
- Special-value handling, the checker's zero test, the carry routing between blocks in the 4×4
  CIFM, the adder order in the 12×12 module and the later adders of the 24×24 Vedic multiplier are
  this design's own. The published structure leaves them open. Each is checked against an
  independent model.
- The original implementations were separate designs, one per multiplier style. Here a parameter
  selects the style.
- The checker only acts on zero operand halves. With normalised mantissas that never happens, so in
  floating-point use it never switches a module off.
