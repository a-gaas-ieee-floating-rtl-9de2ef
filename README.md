# Single precision floating point multiplier with trailing-1's rounding

This is a combinational IEEE 754 single precision multiplier. It is organised
to keep the significand datapath both fast and regular. It has three ideas:

* **A regular partial product array.** Radix-4 modified Booth recoding cuts
  the 24 partial products to 13. They are reduced by a *modified carry-save
  array*: two interleaved carry-save chains, one for the even rows and one for
  the odd rows, whose results are merged at the bottom. The array is 7 full
  adders deep. A plain carry-save array would be 11 deep, and a Wallace tree
  with the same depth would need irregular wiring.
* **A carry-select final adder sized for its job.** The 48-bit final adder is
  made of ripple-carry blocks of 7, 7, 8, 8, 9 and 9 bits. The blocks are
  arranged as a 22-bit low section and a 26-bit high section. The high section
  holds every bit that rounding needs.
* **Rounding without a second adder.** IEEE rounding normally needs the
  product P and also P + 1 ulp. Here a *trailing-1's predictor* (T1P) looks at
  the two addends of the final adder and flags the sum bits that an increment
  would invert. Rounding up is then one XOR per bit, applied to the sum the
  adder already produced.

The repository also contains a 16 x 16-bit unsigned fixed point multiplier
built from the same Booth recoder and modified carry-save array. It is a
separate design and shares nothing with the floating point multiplier.

## Data flow

```
 a[31:0] b[31:0]
   |        |
   |  sign, exponent fields ----------------> exponent_block --+-- sign, exp, ovf, unf, zero
   |        |                                       ^          |
   |  {1,frac_a}   {1,frac_b}                       | shift    v
   |     |            |                             |     format_adjust --> p[31:0]
   |     |      booth_recoder (13 digits)           |          ^
   |     v            v                             |          | frac[22:0]
   |   mcs_array: Booth muxes + even/odd CSA chains |          |
   |        | sum[47:0], carry[47:0]                |          |
   |        v                                       |          |
   |   final_adder: 22-bit CS (7,7,8) -> c22 -> 26-bit CS (8,9,9)
   |        | product[47:0]       addends[47:22]    |          |
   |        v                          v            |          |
   |   t1p_rounder: T1P flags, round decision, AND / XOR, shift +----
```

Everything is combinational: there are no clocks or registers. One
multiplication is one evaluation of the logic.

## Module map

| module | role |
|---|---|
| `fp_mul_pkg` | field widths, bias, Booth digit type `booth_digit_t` |
| `booth_recoder` | radix-4 Booth recoding of the unsigned multiplier (N/2+1 digits) |
| `mcs_array` | Booth selection muxes and the modified carry-save reduction |
| `ripple_adder` | ripple-carry block |
| `cs_adder` | generic carry-select adder (block widths are a parameter) |
| `final_adder` | the 48-bit final adder: 22-bit section plus 26-bit section |
| `t1p` | trailing-1's predictor (carry-select form, with carry-ripple as a special case) |
| `t1p_rounder` | round-to-nearest-even and normalisation shift |
| `exponent_block` | sign, exponent sum less bias, overflow/underflow/zero |
| `format_adjust` | packs the IEEE result, substituting infinity or zero |
| `fp_mul` | the single precision multiplier |
| `mult16` | the 16 x 16 fixed point multiplier |
| `gaas_mul_top` | top level: `fp_mul` and `mult16` side by side |

## The modified carry-save array

The Booth digit d_i of the multiplier is carried as three wires: `neg`, `two`
and `one`. Every array cell is a selection mux followed by a full adder. The
mux picks 0, x or 2x, and inverts the result for a negative digit.

The 13 rows are not fed through one long chain. Rows 0, 2, 4, ..., 12 (seven
rows) go into one carry-save chain, which is 5 full adders deep. Rows 1, 3,
..., 11 go into a second chain. At the bottom, two rows of full adders merge
the two sum/carry pairs into one pair. The total depth is therefore 7 full
adders.

A negative row is the one's complement of |d_i|·x, sign-extended to the full
48 bits. The missing +1 of every negative row is collected in one correction
vector: bit 2i is set when digit i is negative. That vector enters the odd
chain as its seventh row, so the odd chain is no deeper than the even one.
Sums are taken modulo 2^48. This is exact because the product is below 2^48.

## The final adder

`cs_adder` has the usual carry-select structure. The lowest block may be a
plain ripple adder. Every other block has two ripple adders, one computing with
carry-in 0 and one with carry-in 1, and the carry arriving from below selects
between them. The delay is roughly m·d_carry + (n/m − 1)·d_mux for blocks of
about m bits. For n = 48, a carry delay of 0.25 ns and a mux delay of 0.3 ns,
the best block size is m = sqrt(n·d_mux/d_carry) ≈ 7.6. That choice gives the
partition 7, 7, 8 | 8, 9, 9 used here.

`final_adder` splits the adder at bit 22. The low section produces only the
sticky bits and the carry `c22`. The high section produces product bits
47..22, which hold everything the rounder looks at.

## Trailing-1's rounding (the part worth reading twice)

### What the predictor computes

Adding 1 to a number inverts its bits from the l.s.b. up to and including the
first 0. Take a sum s = a + b + c. The flag r[i] must be 1 exactly when
s[i-1:0] are all ones.

The key fact is this: if the sum bits below j are all ones, the carry into bit
j equals the generate term a[j-1]·b[j-1]. (A propagating bit below could not
have received a carry, or its sum bit would be 0.) So in that situation

    s[j] = 1  <=>  z[j] = (a[j] ^ b[j]) ^ (a[j-1] & b[j-1]) = 1

and r[i] = z[0] & z[1] & ... & z[i-1]. Each z depends on only two neighbouring
bit pairs. The AND prefix is the only long path, and it is built in
carry-select fashion: groups of `GROUP` bits each start from a constant 1 and
are gated by the AND of all the groups below. The predictor's bit 0 takes the
finished sum bit, so a carry into the field is covered exactly. With
`GROUP >= W` the predictor becomes the carry-ripple form.

### Bits of the product

| name | product bit | meaning |
|---|---|---|
| v | 47 | product ≥ 2: the result must be shifted right one place |
| l | 23 | last kept bit when v = 0 |
| r | 22 | round bit when v = 0 |
| sticky | OR of 21..0 | anything below r |

Without overflow the result is P[46:23], with round bit r. With overflow it is
P[47:24]: l becomes the round bit and r joins the sticky bits.

### The rounder

1. One `t1p` over bits 47..24 gives the flags for an increment at bit 24.
   ANDing those flags with s[23] gives the flags for an increment at bit 23,
   so a single predictor serves both cases.
2. The control logic decides whether to round up:
   `v ? l & (P[24] | r | sticky) : r & (l | sticky)`. This is
   round-to-nearest, with ties to even.
3. The chosen flag set is gated by that decision (AND). It then inverts the
   sum bits (XOR).
4. The shift is `v | flag reaching bit 47`. The second term is a round-up
   that carries into bit 47, for example 1.111…1 rounding to 2.0. When v = 1
   the round-up cannot carry out of bit 47: P ≤ (2^24 − 1)^2, so P[24] is
   clear whenever P[47:25] are all ones.

The exponent block computes both exponents, e and e + 1, ahead of time. The
late `shift` only selects between them.

## Exponent path and special values

The sign is sign_a XOR sign_b. The exponent is e = exp_a + exp_b − 127 + shift,
computed in 10-bit signed arithmetic:

* e ≥ 255 sets `ovf`, and the result is infinity with the product's sign.
* e ≤ 0 sets `unf`, and the result is zero with the product's sign. There are
  no subnormal results.
* An operand whose exponent field is 0 is treated as zero. The result is then
  a signed zero and no flag is raised. Subnormal inputs are therefore flushed
  to zero.
* An exponent field of 255 has no special meaning. Infinity and NaN inputs are
  not recognised, and are multiplied as if they were ordinary numbers.

Only round-to-nearest-even is implemented. There is no inexact flag.

## Where this design makes its own choices

The structure above (Booth recoding, even/odd carry-save chains, the
7,7,8,8,9,9 carry-select partition, T1P rounding with AND / XOR / OR-shift,
and the exponent block with overflow and underflow flags) is the reference
architecture. The following points are this implementation's own choices:

* **Predictor term.** The z term of the predictor includes the generate term
  of the neighbouring bit. A predictor built from each bit pair alone is wrong
  when a carry is generated inside a run of ones, so the neighbouring term is
  needed for exact results.
* **Round decision.** Round-up is decided directly from l, r, P[24] and
  sticky. The alternative scheme adds half an ulp and then corrects ties. Both
  give the IEEE result. The carry from the low adder section is already
  contained in the sum bits, so the control logic does not read it separately.
* **Booth mux controls.** Each Booth mux is driven by three wires (neg, two,
  one). The reference cell layout labels four select lines on its mux, so the
  gate-level form of the mux differs.
* **Sign extension.** Negative rows are sign-extended to the full width and
  their +1 corrections are placed in one extra row of the odd chain. The
  reference architecture does not specify this.
* **T1P group size.** The predictor uses groups of 4 bits.
* **Special values.** The handling of zero, subnormal, infinity and NaN
  operands, and the results given on overflow and underflow, are described
  above.
* **16 x 16 multiplier.** It takes unsigned operands, and its 32-bit final
  adder uses blocks of 6, 6, 6, 7 and 7 bits. That partition follows the same
  block-size rule: m ≈ 6.2 for n = 32.
* **Timing.** The reference figures (about 4 ns per multiplication,
  delay-balanced adders) describe the physical circuit. This RTL is
  combinational and says nothing about timing.

## How far it has been checked

Each module has a self-checking testbench in `tb/`. Each testbench compares
against values computed independently: the integer product, the integer sum,
or a direct round-to-nearest-even of the exact 48-bit product.

* `tb_mcs_array` runs all 8-bit operand pairs plus random 24-bit ones. It
  also checks that the 24-bit reduction is 7 full adders deep.
* `tb_exponent_block` runs every exponent pair.
* `tb_cs_adder` also runs a form whose blocks grow by one bit each (4 to 8).
* `tb_t1p` tests the carry-select and carry-ripple forms on sums built to
  contain long runs of ones.
* `tb_t1p_rounder` and `tb_fp_mul` count round-ups, ties rounded both ways,
  the overflow shift, a round-up that carries into the next binade, exponent
  overflow and underflow, and zero operands. They fail if any of these never
  occurs.
* `tb_gaas_mul_top` runs both multipliers end to end through the top level at
  the default parameters: 100,000 single precision cases and as many 16 x 16
  cases.

Each testbench has also been confirmed to fail when one key line of its
module is broken.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fp_mul_pkg.sv tb/tb_gaas_mul_top.sv --top-module tb_gaas_mul_top
./obj_dir/Vtb_gaas_mul_top
```

Substitute any other `tb/tb_*.sv` and its module name to run that test. Each
full run takes well under a second.

## Changing it

* `booth_recoder`, `mcs_array` and `mult16` take an even width N (at least 8).
* `cs_adder` takes `W`, the block count `NB`, the widths `BW` (an 8-entry
  array, low block first; unused entries are ignored) and `FIRST_RIPPLE`.
  Block widths that do not sum to W stop elaboration.
* `t1p` takes `W` and `GROUP`. `t1p_rounder` passes its `T1P_GROUP` parameter
  through to it.
* `fp_mul`, `final_adder` and `t1p_rounder` are written for the single
  precision field layout: 24-bit significands and the bit positions given in
  the table above.
