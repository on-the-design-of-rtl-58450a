# An IEEE 754 adder/multiplier built around one provably sufficient rounding unit

Floating point units often start out handling the common cases, and then gain fixes for denormals,
overflow, traps and rounding corners one by one. This unit is organised the other way round. Every
operation is split into a **functional unit** that works at bounded precision and one shared
**rounding unit** that turns the functional unit's output into the IEEE result and detects the
overflow, underflow and inexact exceptions. The two sides are glued together by a single contract:

> The functional unit must deliver a value that agrees with the exact result in every bit position
> that can influence rounding. Beyond those positions, it only has to say whether anything nonzero
> is left (a sticky bit).

Once an adder or multiplier meets that contract, the rounding unit produces the correct result,
with the correct flags, in all four rounding directions. This includes trapped overflow and trapped
underflow, where IEEE asks for the result with its exponent "wrapped" by alpha = 3·2^(N-2).

The architecture follows the paper *On the design of IEEE compliant floating point units*. The
SystemVerilog, the encodings and the widths are this implementation's own. The sections below
point out where it had to choose.

## What the unit computes

`fpu_top` adds, subtracts or multiplies two finite IEEE operands. By default these are double
precision (N = 11 exponent bits, P = 53 significand bits including the hidden bit). Its outputs
are:

* the rounded result, as an IEEE bit string;
* the `overflow`, `underflow` and `inexact` exception flags;
* `tiny`: the exact result was nonzero and smaller than 2^e_min before rounding;
* `operand_special`: an operand is infinite or NaN. Those operands are outside this unit (see
  *Limits*), and the result is then meaningless.

The unit is purely combinational: result and flags follow the inputs in the same cycle. Nothing
is registered.

| port | dir | width | meaning |
|---|---|---|---|
| `op` | in | 2 | `OP_ADD`, `OP_SUB`, `OP_MUL` (`fpu_pkg::fpu_op_e`) |
| `rmode` | in | 2 | `RM_RNE` nearest-even, `RM_RZ` toward 0, `RM_RPI` toward +inf, `RM_RMI` toward -inf |
| `unf_en` | in | 1 | underflow trap enabled |
| `ovf_en` | in | 1 | overflow trap enabled |
| `inx_en` | in | 1 | inexact trap enabled |
| `a`, `b` | in | N+P | operands `{sign, exponent field, fraction}` |
| `result` | out | N+P | rounded result |
| `flag_overflow` / `flag_underflow` / `flag_inexact` | out | 1 | IEEE exception flags |
| `trap_overflow` / `trap_underflow` / `trap_inexact` | out | 1 | request the trap handler of that exception |
| `tiny` | out | 1 | tiny before rounding |
| `operand_special` | out | 1 | an operand has an all-ones exponent field |

The flags are formed in `exception_flags` as follows:

* `inexact = sig_inexact | (overflow & ~ovf_en)`. An untrapped overflow is always inexact.
* `underflow = unf_en ? tiny : (tiny & sig_inexact)`. With the trap enabled, tininess alone
  signals. Without it, tininess must come with a loss of accuracy; here that is taken as an
  inexact result, and tininess is measured before rounding.
* Each exception whose trap is enabled raises its `trap_*` request. The inexact trap is held back
  when an overflow or underflow trap is requested, because those take precedence. At most one
  request is therefore active. The trap handlers themselves are software.

When the overflow trap is enabled and overflow occurs, `result` is the correctly rounded x·2^-alpha.
When the underflow trap is enabled and the result is tiny, `result` is x·2^+alpha. In both cases
the wrapped value must lie in the normal range, which holds for every sum and product of double
operands except extreme products of denormals.

## Number representation inside the unit

Between the blocks, a number travels as a *factoring* (s, e, f) with value (-1)^s · 2^e · f:

* **Exponent `e`**: a signed, biased integer of N+3 bits. It may leave the field range (for
  example when a product overflows), and the rounding unit handles that. Biased 0 and biased 1
  both mean e_min. Biased 0 marks a *denormal* significand (f < 1), and biased 1 marks a normal one.
  This is exactly the IEEE field encoding, so the rounding unit's exponent output is already the
  field.
* **Significand `f`**: an unsigned fixed-point number. The number of integer bits grows and shrinks
  along the datapath:

| signal | integer bits | fraction bits | range |
|---|---|---|---|
| operand significand | 1 | P-1 | [0, 2) |
| adder output `g` | 2 | P+2 | [0, 4) |
| multiplier output `f_prod` | 2 | 2P-2 | [0, 4) |
| rounding-unit input `f_in` | 2 | FI = 2P-2 | [0, 4) |
| `f_n` after normalization | 1 | P+2 (last bit sticky) | [0, 2) |
| `f1` representative | 1 | P+1 (round, sticky) | [0, 2) |
| `f2` after rounding | 2 | P-1 | [0, 2] |
| `f3`, `f_out` | 1 | P-1 | [0, 2) |

### Representatives and sticky bits

The idea that makes bounded precision work is the *α-representative*. Take every real number that
lies strictly between two neighbouring multiples of 2^-α. All of them round the same way, so the
whole open interval can be replaced by one point: its midpoint. The multiples themselves stand for
themselves.

A representative therefore has one more bit than the grid, and that last bit says whether the
interval was a single point or open. This is exactly the classic sticky bit: keep α fraction bits
and OR everything below them into bit α+1.

Rounding to P bits needs only the P-representative. Its last three bits are the LSB, the round bit
and the sticky bit.

## The rounding unit (`rounding_unit`)

Six boxes in a chain:

```
 (e_in,f_in) ─► norm_shift ─► rep_p ─► sig_rnd ─► post_norm ─► adjust_exp ─► exp_rnd ─► (e_out,f_out)
                  │ tiny,ovf1             │ sig_ovf,      │ e2,f3        │ ovf2
                  │                       │ sig_inexact   │              │
                  └──────────────── overflow = ovf1 | ovf2 ──────────────┘
```

1. **`norm_shift`** finds the leading one of `f_in` and computes the exponent the value would have
   with unbounded range, ê. It then picks the target exponent:
   * normal result: ê;
   * tiny result, underflow trap disabled: e_min, in the denormal representation (biased 0). The
     significand is shifted further right.
   * trapped overflow: ê - alpha;
   * trapped underflow: ê + alpha. The significand is normalized as if the exponent range were
     unbounded.

   The shifter is one right shift of `f_in` placed P+2 positions to the left. Its distance is the
   leading-one position plus the denormalization distance. Every bit that falls off the end is
   ORed into the last output bit, so `f_n` is the (P+1)-representative. The box also raises
   `tiny` (0 < value < 2^e_min) and `ovf1` (value ≥ 2^(e_max+1)).
2. **`rep_p`** merges the last two bits of `f_n` into one sticky bit. This is a single OR gate,
   because the long sticky computation has already been done.
3. **`sig_rnd`** decides whether to add one unit in the last place. The decision uses the LSB, the
   round bit, the sticky bit, the sign and the direction:
   * nearest-even: `r & (s | lsb)`;
   * toward zero: never;
   * toward +inf or -inf: round or sticky, when the sign matches the direction.

   It flags `sig_ovf` when the rounded significand becomes 2, and `sig_inexact` when the round or
   sticky bit was set.
4. **`post_norm`** handles significand overflow. On `sig_ovf` the exponent is incremented (an
   incrementer and a 2:1 mux), and the significand's two top bits are ORed. That turns 10.0…0 into
   1.0…0 and leaves every other value unchanged.
5. **`adjust_exp`** covers what rounding did to the exponent:
   * `ovf2` is raised when the exponent reached e_max+1.
   * On a trapped rounding overflow, the exponent becomes e_max+1-alpha.
   * A tiny result in the denormal representation whose significand rounded up to 1.0 moves to
     biased exponent 1. Only the representation changes, not the value.
6. **`exp_rnd`** handles an overflow with the trap disabled. The result is replaced by infinity or
   by the largest finite number, depending on the direction and the sign:
   * nearest-even: always infinity;
   * toward zero: never infinity;
   * toward +inf: infinity for positive results;
   * toward -inf: infinity for negative results.

   Otherwise the box passes its inputs through.

`overflow = ovf1 | ovf2`: the value was too large before rounding, or rounding made it too large.
This is overflow measured after rounding with unbounded exponent range, as IEEE defines it.

## The adder (`fp_add_align`, `fp_adder`)

The adder needs only **three extra bits**. `fp_add_align` does the preprocessing (steps 1 and 2)
and `fp_adder` the addition (step 3):

1. **Swap**: compare the exponents and put the operand with the larger exponent in position A.
2. **Align**: shift f_B right by δ = min(e_A - e_B, P+2), in a shifter that keeps P+2 fraction
   bits. At the same time, and computed directly from δ, OR together the bits of f_B that would
   land at fraction position P+2 or beyond. The result, `{shifted[P+2:1], sticky}`, is the
   (P+1)-representative of the aligned operand.
3. **Add**: add sign and magnitude. The result `g` has 2 integer and P+2 fraction bits, and its
   exponent is e_A.

This meets the rounding unit's contract in every case. The worst case is a subtraction that
cancels one leading bit: the result then shifts one place left and still keeps P+1 bits, which is
enough. When more bits cancel, the exponents differed by at most one, so no sticky bit was
involved and the sum is exact.

A consequence worth knowing: a sum that is tiny is always exact. Addition therefore never raises
underflow with the trap disabled.

The adder returns the sign of operand A for a zero sum. `fpu_top` then applies the IEEE rule:
x + (-x) is +0, or -0 when rounding toward -inf.

## The multiplier (`fp_multiplier`)

The multiplier computes `s = s1 ^ s2` and `e = e1 + e2 - bias` (signed, may leave the field range).
For the significand:

* When both significands are normal, it passes on the P-representative of the 2P-bit product: P
  fraction bits and a sticky bit.
* When an operand is denormal, the product can start with many zeros. The exact product is passed
  on, and the rounding unit normalizes it. This exact product is also what makes a trapped
  underflow of a product come out right.

The significand multiplier itself is a plain `*`.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `fp_ref_pkg` is the reference model used by the larger testbenches. It works on wide integers:
  it rounds an exact value M·2^E straight from the IEEE definitions (leading one, unbounded
  rounding, wrap or denormal re-rounding or saturation). It also builds exact sums and products of
  IEEE strings. It shares no structure with the RTL.
* `fpu_top_tb` runs the unit in an 8-bit-precision, 5-bit-exponent format. It applies 200,000
  random vectors over all operations, directions and trap settings, and compares every result bit,
  flag and trap request. It also counts the internal events (swap, alignment sticky, cancellation, significand
  overflow, denormal rounded to normal, `ovf1`, `ovf2`, both traps, saturation to infinity and to
  x_max, the zero-sign rule, both multiplier paths, denormal results, an inexact trap held back by
  a higher-priority trap, each direction). An event
  that never occurs fails the test.
* `fpu_full_tb` runs the default double-precision unit end to end on 100,000 vectors, with
  exponents biased towards the edges of the range. It checks against `fp_ref`. In round-to-nearest
  without traps, it also checks against the simulator's own `real` arithmetic.
* `fpu_single_tb` does the same for a single-precision instance (`N = 8`, `P = 24`), against
  `fp_ref` only.
* `rounding_unit_tb`, `norm_shift_tb`, `rep_p_tb`, `sig_rnd_tb`, `post_norm_tb`,
  `adjust_exp_tb`, `exp_rnd_tb`, `exception_flags_tb`, `fp_add_align_tb`, `fp_adder_tb` and
  `fp_multiplier_tb` test the blocks in the small format. Some are
  exhaustive, and the rest are random against independently written models (a bit-serial
  normalizer, division-and-remainder arithmetic for the sticky bits).

To run one with Verilator (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/fpu_pkg.sv rtl/*.sv tb/fp_ref_pkg.sv tb/fpu_full_tb.sv --top-module fpu_full_tb
./obj_dir/Vfpu_full_tb
```

## Changing it

* **Format**: set `N` and `P` on `fpu_top`; every block derives its widths from them. For example,
  use `#(.N(8), .P(24))` for single precision. The small test format shows that the design works
  for formats other than double. The adder padding requires P ≥ 6.
* **Rounding-unit input width**: `FI` on `rounding_unit` is the number of fraction bits of `f_in`.
  Its default, 2P-2, accepts an exact product. A unit used only for addition could take P+2.
* **Pipelining**: none is specified. Natural register points are between the functional units and
  the rounding unit, and after `sig_rnd`.

## Where this implementation chose, and limits

* **Special values are out of scope.** The unit does not implement NaN and infinity operands, the
  invalid and division-by-zero exceptions, or the selection of a NaN result. The architecture
  leaves these to separate logic. `operand_special` marks where that logic would attach.
* **Rounding directions.** The architecture is developed in detail for nearest-even. The three
  directed modes use the standard IEEE decisions in `sig_rnd` and `exp_rnd`.
* **Trapped underflow.** The normalization box normalizes with unbounded exponent range before
  adding alpha. It does not pass the unnormalized significand through. This is what the correctness
  argument for products requires.
* **Denormal-to-normal exponent fix.** This rule fires only when the exponent is in the denormal
  representation (biased 0). It therefore leaves a trapped-underflow result, which is tiny but
  already wrapped, untouched.
* **Tininess and loss of accuracy.** IEEE allows two definitions of each. The unit uses tininess
  before rounding and inexactness as loss of accuracy.
* **Widths and encodings** are all this implementation's: the N+3-bit signed biased exponent, the
  2P-2-bit rounding input, the `f_n` width, the rounding-mode codes, the exact product for
  denormal multiplier operands, and the trap interface (an inexact trap enable and one request
  output per trap).
* **Trapped results outside the range.** A trapped result whose wrapped exponent still does not
  fit the field is not specified and is not checked. This only occurs for products of very small
  denormals with the underflow trap on.
