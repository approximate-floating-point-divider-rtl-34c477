# Approximate single-precision floating-point dividers

An IEEE-754 binary32 division is costly in hardware because of its 24-bit
significand division. These dividers divide only the top of each
significand: the hidden one and the 7 mantissa bits below it, an **8-bit by
8-bit division**. The sign and exponent are computed exactly as in a full
divider. The 16 low mantissa bits of the result are not divided at all. They
are filled in one of three cheap ways, which gives three variants:

| variant | module | low 16 bits of the result | quotient normalised? | mean relative error* |
|---|---|---|---|---|
| divide & subtract | `fpdiv_alg1` | `Mx[15:0] - My[15:0]` (mod 2^16) | no | 5.8 % |
| divide & alternate '10' | `fpdiv_alg2` | constant `1010…10` | no | 5.8 % |
| divide & zero | `fpdiv_alg3` | zeros | yes, by a one-bit look-up table | 0.33 % |

\* Mean of |exact − result| / result over 20,000–50,000 random normal
operand pairs, measured by the testbenches at the default 8-bit division.
The reference figures for the three variants are 6.0 %, 5.9 % and 0.36 %.

**Divide & zero is the variant to use.** The other two are kept for
comparison. All three are purely combinational: there is no clock, no reset
and no handshake, and an output follows its inputs after the propagation
delay.

## Operand split

A binary32 word is `{sign, exp[7:0], man[22:0]}`, with value
`(-1)^s · 1.man · 2^(exp-127)`. The package `fpdiv_pkg` gives this word the
type `fp32_t`. With the default `DIV_W = 8`, each operand is cut like this:

```
   hidden   man[22:16]        man[15:0]
   [ 1 ]   [ 7 bits  ]   [    16 bits     ]
   \______ 8-bit divider _/ \ low field: subtract / pattern / zero
```

The result mantissa `z.man` has the same split. Its upper 7 bits (Z22..Z16)
come from the divider. Its lower 16 bits (Z15..Z0) come from the variant's
fill rule. In general the upper field is `DIV_W-1` bits and the low field is
`24-DIV_W` bits.

## Datapath, common to all three variants

```
 x.sign ─┐
 y.sign ─┴─ XOR ───────────────────────────────────────────────► z.sign
                       ┌─────────────┐
 x.man[22:16] ─┬──────►│ mant_cmp    │── mx_lt_my ─┬──────────────┐
 y.man[22:16] ─┼──────►│  Mx < My ?  │             │              │
               │       └─────────────┘             ▼              │
 x.exp, y.exp ─┼───────► Ex-Ey-1 / Ex-Ey ──► 2:1 mux ──► +127 ──► z.exp
               │
               └─ {1,·} ─► mant_div (8/8, 8 fraction bits) ─► q[8:0]
                                                                  │
                     variant: pick 7 bits of q (± 1-bit shift) ───┴─► z.man[22:16]
                     variant: fill rule ───────────────────────────► z.man[15:0]
```

* **Sign** (`fpdiv_sign`): `sz = sx ^ sy`.
* **Comparison** (`fpdiv_mant_cmp`): reports `Mx < My`. It compares the same
  truncated 7-bit fields the divider sees, not all 23 bits. This keeps the
  exponent consistent with the quotient that is actually produced. Equal
  fields count as "not less", because the quotient is then exactly 1.
* **Exponent** (`fpdiv_exp`): the stored exponent is
  `Ex - Ey + 127 - (Mx < My)`, computed modulo 256. A 2:1 multiplexer picks
  between `Ex-Ey-1` and `Ex-Ey`, and the bias is then added. The
  decrement accounts for a significand quotient below one.
* **Significand divider** (`fpdiv_mant_div`): computes
  `q = floor(a · 2^DIV_W / b)` for `a = {1, Mx field}` and `b = {1, My field}`.
  It is a combinational restoring array with one compare-and-subtract row per
  bit and no rounding. `q` has `DIV_W` fraction bits and lies in (½, 2):
  * if `Mx >= My`, then `q[8]` is the leading one;
  * if `Mx < My`, then `q[8] = 0` and `q[7]` is the leading one.

## The normalisation step, and why two variants are 6 % off

This step is the least obvious part of the design.

The upper mantissa field must be the 7 quotient bits directly below the
leading one of `q`. Where that leading one sits depends on the comparison:

* **Mx ≥ My:** the field is `q[7:1]`.
* **Mx < My:** the field is `q[6:0]`, which is `q` shifted left by one bit.

The exponent path already subtracts one in the second case, so the mantissa
must follow it.

* **Divide & zero** (`fpdiv_norm_lut`) applies this correction. A look-up
  table indexed by the one-bit comparison result selects between `q[7:1]` and
  `q[6:0]`, which is a 2:1 multiplexer. The result is the correctly truncated
  quotient of the truncated significands. Its error comes only from dropping
  16 input bits and the quotient remainder: 0.33 % on average, and at most
  about 1.6 %.
* **Divide & subtract** and **divide & alternate '10'** have no such table.
  They always take `q[7:1]`. When `Mx < My` (about half of random inputs),
  the leading one of the quotient is dropped and a wrong bit takes the
  hidden bit's place. That error is up to about 50 %, and it averages about
  6 % over all inputs. This is the main difference between the variants and
  the source of the error gap. The fill rule of the low 16 bits matters much
  less.

The description of the table says the shift is applied when `Mx > My`. A
left shift of the quotient in that case would push the leading one out.
This design therefore applies the shift when `Mx < My`, the case that
carries the exponent decrement. This reading is the one that reproduces
both the 6 % error of the unnormalised variants and the 0.36 % error of
divide & zero.

## Low-field fill rules

* **Divide & subtract** (`fpdiv_low_sub`): `z.man[15:0] = x.man[15:0] - y.man[15:0]`,
  modulo 2^16. The subtraction wraps when the divisor's bits are larger, and
  the borrow is dropped. Wrapping is this design's choice, because no rule is
  given for a negative difference. The difference is not a correction
  of the quotient's value; it is simply placed in the low bits.
* **Divide & alternate '10'**: `z.man[15:0] = 16'b1010_1010_1010_1010`. The
  top filled bit is a one.
* **Divide & zero**: `z.man[15:0] = 0`.

## What is not handled

None of the variants treats special operands or results. Zero, infinity,
NaN, subnormal inputs, division by zero, and exponent overflow or underflow
all produce meaningless words. The exponent simply wraps modulo 256.
Results are truncated, not rounded. If your operands can reach these
cases, you must add checks around the divider.

## Where this design makes its own choices

The behaviour above follows the published description of the three
algorithms. The following points were not specified there, or were
inconsistent, and were decided here:

* **Field widths.** The operands are 8 bits including the hidden bit, so 7
  stored bits are divided and 16 bits fill the rest. The description also
  mentions "the rest of the 15 bits", and slices one formula as M22..M17 and
  M16..M0. The 8-bit-with-hidden-bit reading is the one that reproduces the
  reference error rates.
* **Comparison width.** Only the truncated fields are compared, as described
  above.
* **Direction of the normalising shift.** It is applied when `Mx < My`, as
  described above.
* **Divider structure.** A restoring array, with no rounding and `DIV_W+1`
  quotient bits.
* **Wrap of the low subtraction.** Described above.
* **Timing.** Everything is combinational, with no registers.
* **Shared inputs in the top.** The top drives all three variants from one
  operand pair.

## Modules and interfaces

| file | ports | role |
|---|---|---|
| `rtl/fpdiv_pkg.sv` | – | `fp32_t`, `EXP_W=8`, `MAN_W=23`, `BIAS=127`, `DIV_W_DEFAULT=8` |
| `rtl/approx_fp_divider_top.sv` | `x, y` in; `z_alg1, z_alg2, z_alg3` out (all `fp32_t`) | the three variants side by side |
| `rtl/fpdiv_alg1.sv`, `rtl/fpdiv_alg2.sv`, `rtl/fpdiv_alg3.sv` | `x, y` in; `z` out | one variant each |
| `rtl/fpdiv_sign.sv` | `sx, sy` → `sz` | sign |
| `rtl/fpdiv_mant_cmp.sv` | `mx, my [DIV_W-2:0]` → `mx_lt_my` | comparison |
| `rtl/fpdiv_exp.sv` | `ex, ey [7:0], mx_lt_my` → `ez [7:0]` | exponent mux and bias |
| `rtl/fpdiv_mant_div.sv` | `a, b [DIV_W-1:0]` → `q [DIV_W:0]` | significand divider |
| `rtl/fpdiv_norm_lut.sv` | `q [DIV_W:0], mx_lt_my` → `mant_hi [DIV_W-2:0]` | normalising table (divide & zero only) |
| `rtl/fpdiv_low_sub.sv` | `lx, ly [LOW_W-1:0]` → `d` | low-field subtractor (divide & subtract only) |

`DIV_W` is the only parameter that matters. It sets the significand width
fed to the divider, hidden bit included. The default is 8. Raising it trades
area and delay for accuracy. The divide & zero variant was checked bit for
bit against the reference model at `DIV_W` = 4, 12 and 16, where its mean
errors were 5.3 %, 0.021 % and 0.001 %. `fpdiv_exp` has a `BIAS_P`
parameter, which is 127 for binary32.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* **Exhaustive tests:** sign (4 cases), comparator (all 2^14 field pairs),
  exponent path (all 2^17 exponent and select combinations), significand
  divider (all normalised 8-bit pairs, against integer `/`), and
  normalisation table (all quotient values).
* **Random tests:** the subtractor, plus corner cases.
* **Variant tests** (`tb_fpdiv_alg1..3`): each compares every result bit with
  a reference model. The model is in `tb/fpdiv_tb_pkg.sv` and is written
  from the arithmetic, not from the RTL. These tests also require the mean
  error to fall in a band around the expected figure.
* **Top test** (`tb_approx_fp_divider_top`): runs at the default
  parameters. It checks all three outputs on 50,000 random pairs and on
  directed cases, including 6 / 1.5 = 4 exactly, where no bit is dropped. It
  also checks the three error bands, and that divide & zero is the most
  accurate. It counts how often each mechanism occurs and fails if one never
  does. The mechanisms are: the `Mx < My` decrement with its shift, the
  `Mx >= My` path, equal fields, a wrapping low subtraction, and a negative
  sign.

To run a testbench with Verilator 5, start from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/fpdiv_pkg.sv tb/fpdiv_tb_pkg.sv tb/tb_approx_fp_divider_top.sv \
  --top-module tb_approx_fp_divider_top
./obj_dir/Vtb_approx_fp_divider_top
```

The other modules are found through `-y`. To run another testbench, replace
the last file and the `--top-module` name. `-Wno-fatal` keeps Verilator's
width and unused-bit lint warnings from stopping the build. Each testbench
finishes in about a second.
