# Constant-time redundant binary adders

A conventional binary adder cannot finish until its carries have rippled (or
been looked ahead) across the whole word. The delay grows with the word
length. The delay stops depending on the length only if the sum may be
written in a *redundant* number system: one where a digit can take more
values than the radix strictly needs. Then every position can choose its
outgoing carry from a few nearby input bits, without waiting for the carry
coming in.

This repository holds synthesizable SystemVerilog for four such adders. Every
digit is stored in two bits, and all four use radix 2:

| unit | digit set | digit value from `{h,l}` | carries | look-back | result |
|---|---|---|---|---|---|
| `cs2_adder` | CS2 `{0,1,2}` | `2h + l` (code `11` unused) | `{0,1}` | 0 (implicit left context) | N+1 digits |
| `cs3_adder` | CS3 `{0,1,2,3}` | `2h + l` | `{0,1}` | 0 | N+1 digits |
| `sd3_adder` | SD3(-) `{-2,-1,0,1}` | `-2h + l` | `{-1,0,1}` | 0 | N+2 digits |
| `sd_adder`  | SD `{-1,0,1}` | `-2h + l` (code `10` unused) | `{-1,0,1}` | 1 digit | N+1 digits |

A fifth unit, `cs3_pp_reducer`, shows why CS3 suits multipliers. Two
two's complement partial products, one position apart, already *are* a valid
CS3 number, so no gates are needed to convert them. One row of 4:2
compressors then adds two such pairs.

All units are combinational. `rbr_top` places them side by side. The depth of
each unit is one digit cell, whatever the operand length `N`.

## Equal-weight grouping

The encodings are chosen so that neighbouring digits overlap. Digit `i` has
weight `2^i`, so its `h` bit weighs `2^(i+1)`. That is the same weight as the
`l` bit of digit `i+1`. Instead of adding digit `i` of X to digit `i` of Y,
position `i` of every adder here adds the **four bits of weight `2^i`**:

```
theta[i] = x[i].l + y[i].l  (+/-)  x[i-1].h + y[i-1].h
```

The `h` bits count positively for CS2/CS3 and negatively for SD3(-). Position
`i` then splits the group sum as `theta[i] = 2*c[i] + sigma[i]`. It sends the
carry `c[i]` to position `i+1` and produces the sum digit
`z[i] = sigma[i] + c[i-1]`. Each carry depends only on the position's own
four bits. The split must be chosen so that `z[i]` always lands back in the
digit set, whatever carry arrives. This regrouping shrinks the range of
`theta`, and with it the carry set each unit needs. That is the main reason
the carry-save (CS) forms come out cheaper than signed-digit forms.

Position 0 has no digit below it: its `h` inputs and its carry in are 0. One
extra position, number `N`, adds the two top `h` bits, which weigh `2^N`.

## CS2: a carry that looks upward

The CS2 cell (`cs2_cell`) is the least obvious of the four. `theta` ranges
over 0..4, and the carry set is only `{0,1}`:

| theta | carry | sigma |
|---|---|---|
| 0 | 0 | 0 |
| 1 | 0 | 1 |
| 2, both `x[i-1].h` and `y[i-1].h` set | 0 | 2 |
| 2, otherwise | 1 | 0 |
| 3 | 1 | 1 |
| 4 | 1 | 2 |

`z = sigma + c_in` must stay ≤ 2. So every position that leaves `sigma = 2`
must receive a zero carry. Only a group sum of 4, or a 2 that keeps its value,
leaves `sigma = 2`.

Why does the `theta = 2` rule look only at bits inside position `i`? Suppose
both `h` bits below are set. Then the `l` bits of digit `i-1` are both 0,
because a CS2 digit never has `h = l = 1`. The group sum of position `i-1`
can then be at most 2, and it keeps that 2 under the same rule, so no carry
comes in. In the other direction, the cell uses the `h` bits to learn about
its own digit: when `x[i].l` and `y[i].l` are both 0, digit `i`'s `h` bits
may be 1. The position above may then hold a group sum of 4 and need a zero
carry from below. So the rule is really a dependence on the position *above*
(a left context). The digit encoding lets the cell infer it from its own
inputs. Example, with X = Y = (digits 3..0) `0 1 2 2`:

```
position 2: theta = 1+1+1+1 = 4  -> carry 1, sigma 2
position 1: theta = 0+0+1+1 = 2, both h set -> carry 0, sigma 2
z[2] = 2 + 0 = 2   (a carry of 1 here would give the illegal value 3)
```

Position `N` has no `l` inputs. If it sees a group sum of 2, that 2 comes
from two `h` bits and stays. Its carry out is therefore always 0, and the
N+1 digit result is exact (an assertion in `cs2_adder` watches this).
Operand digits must not use the code `11`. Results never do.

## CS3: a row of 4:2 compressors

With CS3, every `{h,l}` code is legal (values 0..3), so the four bits of
weight `2^i` and an incoming carry can go straight into a 4:2 compressor
(`compressor_42`). The compressor's `sum` becomes `z[i].l`, its `carry`
becomes `z[i].h`, and its `cout` goes to position `i+1`. `cout` is the
majority of three of the inputs and never depends on `cin`, so nothing
ripples. The compressor is written in multiplexer form:

```
cout  = (i1 ^ i2) ? i3 : i1
sum   = i1 ^ i2 ^ i3 ^ i4 ^ cin
carry = (i1 ^ i2 ^ i3 ^ i4) ? cin : i4
```

## SD3: no context at all

For SD3(-), `theta = x[i].l + y[i].l - x[i-1].h - y[i-1].h` lies in -2..2.
`sd3_cell` takes `carry = ceil(theta/2)`, which leaves `sigma` in `{-1,0}`.
Adding a carry in of -1, 0 or +1 then gives a digit in -2..1, which is exactly
SD3(-). Carries are `rbr_pkg::scarry_t` (`pos`, `neg`).

The top position can send out a carry of -1. That carry becomes digit `N+1`
(code `11`), so the result has N+2 digits.

SD3(+) digits `{-1,0,1,2}` are encoded with value `2h - l`. Any SD3(+) code
word, read as SD3(-), means the negated value. The same circuit therefore
adds SD3(+) numbers unchanged, with carries of the opposite sign. The
testbenches check both readings.

## SD: one digit of look-back

Plain signed digits `{-1,0,1}` have no spare code to exploit. `sd_cell` adds
`p = x[i] + y[i]` (-2..2). For `p = ±1` it looks at the sign bits of
`x[i-1]` and `y[i-1]`:

- If both lower digits are non-negative, any carry from below is 0 or +1. The
  cell then keeps its own remainder at -1 or 0 (`p = 1` → carry 1, digit -1;
  `p = -1` → carry 0, digit -1).
- Otherwise any carry from below is -1 or 0, and the cell keeps +1 or 0
  (`p = 1` → carry 0, digit 1; `p = -1` → carry -1, digit 1).

`p = ±2` always carries ±1 and `p = 0` never carries. The last carry is the
top digit `N`.

## Partial products to CS3 without gates

`cs3_pp_reducer` takes four `M`-bit two's complement partial products.
`pp[k]` weighs `2^k`, as the rows of a multiplier do. All arithmetic is
modulo `2^W` with `W = M + 4`: every row is sign-extended to `W` bits and
then treated as unsigned.

- Bit `i` of row 0 (weight `2^i`) and bit `i` of row 1 (weight `2^(i+1)`)
  form CS3 digit `i` as its `l` and `h` bits. This is pure wiring.
- Rows 2 and 3 form a second CS3 number in the same way, two digits higher.
- A `cs3_adder` adds the two CS3 numbers.

Read modulo `2^W`, the value of the result `z` (W CS3 digits) is
`pp0 + 2*pp1 + 4*pp2 + 8*pp3`. Interpret it as a W-bit two's complement
number. The adder's digit `W`, and the `h` bit of digit `W-1`, weigh `2^W` or
more and are dropped.

This is the first reduction step of a multiplier, not a complete one.

## Top level

`rbr_top #(N = 32)`. Every port is a packed array of `rbr_pkg::rdigit_t`
(`{h,l}`, digit `i` at index `i`), except `pp`.

| ports | width | meaning |
|---|---|---|
| `cs2_x`, `cs2_y` → `cs2_z` | N → N+1 digits | CS2 sum |
| `cs3_x`, `cs3_y` → `cs3_z` | N → N+1 digits | CS3 sum |
| `sd3_x`, `sd3_y` → `sd3_z` | N → N+2 digits | SD3(-) or SD3(+) sum |
| `sd_x`, `sd_y` → `sd_z` | N → N+1 digits | SD sum |
| `pp[3:0]` → `pp_z` | 4×N bits → N+4 digits | CS3 sum of the partial products |

The units share no signals. Five output bits are constant by construction:

- `z[0].h` of the CS2 sum;
- `z[0].h` of the CS3 sum;
- `z[0].h`, `z[1].h` and the top `h` bit of the reducer result.

## Files

- `rtl/rbr_pkg.sv`: digit and carry types, default length.
- `rtl/cs2_cell.sv`, `rtl/cs2_adder.sv`
- `rtl/compressor_42.sv`, `rtl/cs3_adder.sv`
- `rtl/sd3_cell.sv`, `rtl/sd3_adder.sv`
- `rtl/sd_cell.sv`, `rtl/sd_adder.sv`
- `rtl/cs3_pp_reducer.sv`
- `rtl/rbr_top.sv`
- `tb/tb_*.sv`: one self-checking testbench per unit, `tb_digit_cells` for
  the cells on their own, and `tb_rbr_top` for the whole design at its
  default size.

## Verification

Every testbench computes the integer values of operands and results on its
own and compares them. Each prints `TB_RESULT checks=<n> failures=<n>` and
stops itself with a watchdog if it hangs.

- **Unit testbenches.** Each adder gets every operand pair at 3 or 4 digits
  (all 3^8 or 4^6 pairs), then 20,000 random and extreme operand pairs at
  N = 32. The CS2 and SD benches also reject illegal result codes. The CS2
  bench includes the left-context example above as a directed digit-level
  check.
- **`tb_digit_cells`.** Checks each cell exhaustively: the identity
  `inputs + c_in = 2*c_out + z`, and that `c_out` does not change with
  `c_in`. That second property is what makes the adders constant-time.
- **`tb_rbr_top`.** Runs the top level at its defaults for 50,000 random
  vectors. It counts how often each mechanism fired, and fails if one never
  did:
  - CS2 group sum 2 with and without the carry;
  - a CS3 compressor carry;
  - SD3 carries of both signs;
  - both SD look-back outcomes;
  - negative partial products.

Each bench runs in well under a second. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rbr_pkg.sv tb/tb_rbr_top.sv \
          --top-module tb_rbr_top -o sim && ./obj_dir/sim
```

The same command works for any `tb/tb_<unit>.sv`.

## How far this follows the source, and where it departs

These parts follow the published analysis this design comes from:

- the digit sets and their encodings;
- equal-weight grouping;
- the CS2 rule table, including its group-sum-2 rule;
- the carry sets and look-back distances of the four adders;
- the gate-free pairing of shifted partial products into CS3.

The following are this design's own choices:

- **Cell internals other than CS2.** The source only names the SD cell and
  the 4:2 compressor and cites their circuits elsewhere, and it gives no
  rules for the SD3 cell. The SD cell here uses the classic signed-digit
  rules. The compressor uses a standard multiplexer form. The SD3 rules are
  derived from the stated carry set and zero look-back. The logic functions
  are checked exhaustively, but the transistor-level circuits and the delays
  they were compared on are not reproduced.
- **Widths and boundaries.**
  - Operand length `N = 32`: the source gives no length.
  - Extra result digits (N+1, or N+2 for SD3).
  - Zero carry into position 0.
  - Four-row reducer with sign extension, modulo `2^W`.
- **No registers.** There are no clocks, resets or pipeline stages. The
  source describes combinational cells only.

Not included:

- **Format-converting adders** (fully redundant inputs, partially redundant
  output, such as CS2 + CS2 → CS2 with only every k-th digit redundant).
  The source tabulates only their carry sets and look-back distances; their
  rules are not available.
- **A complete multiplier.**
- **Conversion out of redundant form** back to two's complement. That is an
  ordinary carry-propagate addition and is not part of the scheme.

## Changing it

- `N` sets the operand length of every adder and of `rbr_top`.
- `M` and `W` size the reducer. The default `W = M + 4` is enough to hold
  the four-row sum without wrap-around.

The testbenches compute values in 64-bit integers, so they check lengths up
to about 60 digits. For longer operands, raise `DEFAULT_DIGITS` in `rbr_pkg`
no further than that, or change the reference arithmetic.
