# 4x4 signed Wallace tree multiplier

This is a combinational multiplier for two 4-bit two's-complement numbers, the
multiplier **MR** and the multiplicand **MD**. It returns their 8-bit
two's-complement product **RESULT**. It works the way a Wallace tree multiplier
does:

1. Form one partial product per multiplier bit.
2. Add the partial products in a carry-save tree of full and half adders, so
   that no carry has to travel along a row, until only two numbers remain.
3. Add those two numbers with one fast carry-propagate adder. Here that is a
   carry look-ahead adder.

Signed operands are handled before the tree. If MR is negative, the design
multiplies -MR by -MD, which gives the same product. The multiplier it uses is
therefore never negative, so the tree only ever adds sign-extended copies of
the multiplicand. No correction step is needed after the final adder.

All products of the operand range (-8..7 times -8..7, that is -56..64) fit the
8-bit result exactly.

## Data path

```
 MR[3:0] ──┬──────────────────────────┐
           └─► twos_comp_gen (5 bit) ─► -MR ─┐
 MD[3:0] ──┬──────────────────────────┐      ▼
           └─► twos_comp_gen (5 bit) ─► -MD ─► pp_gen ─► P0..P3 [7:0]
                                                           │
                                                           ▼
                                                      wallace_tree ─► op_a, op_b [7:0]
                                                                          │
                                                                          ▼
                                                                   cla_adder ─► RESULT[7:0]
```

| File | Module | Role |
|---|---|---|
| `rtl/wallace_pkg.sv` | package | widths (`OP_W`=4, `PP_W`=8, `NEG_W`=5) and the partial-product types |
| `rtl/wallace_mult.sv` | `wallace_mult` | top level: `mr`, `md` in, `result` out |
| `rtl/twos_comp_gen.sv` | `twos_comp_gen` | -a = ~a + 1, computed by a ripple-carry chain of full adders |
| `rtl/pp_gen.sv` | `pp_gen` | chooses (MR, MD) or (-MR, -MD) and forms four 8-bit partial products |
| `rtl/wallace_tree.sv` | `wallace_tree` | two levels of 3:2 and 2:2 counters that leave two operands |
| `rtl/cla_adder.sv` | `cla_adder` | WIDTH-bit carry look-ahead adder (default 8) |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | | one-bit adder cells |

There is no clock and no reset, and nothing is registered. RESULT settles one
combinational delay after MR or MD changes. To pipeline the multiplier, put
registers on `pp`, on `op_a`/`op_b`, or on both.

## Partial products and signs

This is the part of the design that is least obvious.

`pp_gen` receives MR and MD. It also receives -MR and -MD from two
`twos_comp_gen` instances. It then selects:

| MR sign | multiplier used `m` (read as unsigned) | multiplicand used `c` (5-bit signed) |
|---|---|---|
| MR ≥ 0 | MR[3:0] | MD sign-extended to 5 bits |
| MR < 0 | (-MR)[3:0] | -MD |

Partial product `Pi` is `c` sign-extended to 8 bits when bit `i` of `m` is 1.
Otherwise it is zero. Each `Pi` is carried unshifted and has weight 2^i, so the
product is Σ Pi·2^i mod 2^8.

Two edge cases decide the widths:

- **MR = -8.** -MR = +8 is `1000`. As an unsigned 4-bit multiplier that is
  exactly 8, so four multiplier bits are enough.
- **MD = -8 with MR negative.** -MD = +8 does not fit in 4 signed bits. The
  negators are therefore 5 bits wide and work on the sign-extended operand.
  Negating in only 4 bits gives a wrong product for every negative MR
  combined with MD = -8.

`twos_comp_gen` itself defaults to `WIDTH = 4`, the operand width. The top
level instantiates it with `WIDTH = NEG_W = 5`.

## Wallace tree layout

Write `Pij` for bit j of partial product i. It lands in column i+j, which has
weight 2^(i+j). Bits that fall in column 8 or above are never used, and
neither are carries out of column 7. The reduction has two levels:

| column | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| inputs | P34 P25 P16 P07 | P33 P24 P15 P06 | P32 P23 P14 P05 | P31 P22 P13 P04 | P30 P21 P12 P03 | P20 P11 P02 | P10 P01 | P00 |
| level 0 | FA(P3,P2,P1) | FA | FA | FA | FA | HA(P20,P11) | – | – |
| level 1 | FA(s0, P07, c0 from col 6) | FA | FA | FA | HA(s0, P03) | – | – | – |
| `op_a` | s1 | s1 | s1 | s1 | s1 | s0 | P01 | P00 |
| `op_b` | c1 from col 6 | c1 | c1 | c1 from col 3 | c0 from col 2 | P02 | P10 | 0 |

After level 1, each column holds at most two bits. These two bits form
`op_a` and `op_b`, and `cla_adder` adds them with a carry in of 0.

Column 3 has three bits left after level 0: the level-0 sum, P03, and the
carry from the column-2 half adder. Any two of them can go into the level-1
half adder. This design uses the sum and P03 and passes the carry straight to
the final adder. Some outputs are wired directly to inputs or tied to 0
(`op_a[1:0]`, `op_b[2:0]`). That follows from this layout.

## Carry look-ahead adder

`cla_adder` computes g = a & b and p = a ^ b. It then writes each carry as the
fully expanded sum of products:

c[i+1] = g[i] | p[i]g[i-1] | … | p[i]…p[1]g[0] | p[i]…p[0]cin

No carry waits for the carry below it, and sum = p ^ c. It is a single
look-ahead level with no groups. At 8 bits the widest term has nine inputs.
If you make `WIDTH` much larger, consider a grouped (block) look-ahead
instead.

## What follows the reference description and what is this design's own

These parts follow the reference description:

- The four major parts: two's complement generator, partial product
  generator, Wallace tree and carry look-ahead adder.
- The widths: 4-bit operands, four 8-bit partial products and an 8-bit
  result.
- Negation built as invert-and-add-one on a ripple-carry adder of full adders.
- The partial products choose between MD/-MD and MR/-MR, and are
  sign-extended to 8 bits.
- The tree has two levels, with the half adders in the columns of weight 4
  (level 0) and 8 (level 1).
- The four reference products listed below.

These are this design's own choices:

- The exact selection rule in `pp_gen`: negate both operands when MR is
  negative. The reference names only which values are used.
- The 5-bit negators.
- Which leftover bit of column 3 bypasses the level-1 half adder.
- Single-level expanded look-ahead equations.
- Unused carry in and carry out at the final adder.
- A fully combinational design with no clock or reset.

The reference shows the last row of the tree as a chain of adder cells. Here
that row is the separate carry look-ahead adder.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against arithmetic computed in the testbench, and ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `half_adder_tb`, `full_adder_tb` | every input combination |
| `twos_comp_gen_tb` | every input at 4 and at 5 bits, plus -x for every 4-bit x |
| `pp_gen_tb` | every operand pair: each partial product against the selection rule, and the weighted sum against MR·MD |
| `wallace_tree_tb` | corner patterns and 20 000 random partial-product sets: op_a + op_b = Σ Pi·2^i mod 256 |
| `cla_adder_tb` | all 2^17 combinations of a, b and cin |
| `wallace_mult_tb` | the top level at its default configuration (see below) |

`wallace_mult_tb` first applies the four reference cases:

| MR | MD | expected RESULT |
|---|---|---|
| 2 | 3 | `00000110` |
| 4 | -5 | `11101100` |
| -7 | 3 | `11101011` |
| -6 | -1 | `00000110` |

It then applies all 256 operand pairs. It counts, and requires at least once,
each of these cases:

- both operands positive
- one operand negative
- both operands negative
- the negated-operand path
- MR = -8
- MD = -8 negated

For every testbench, a deliberately broken copy of its module was also run,
and the testbench caught it.

## Simulating

With Verilator 5, from the top of this tree:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wallace_pkg.sv \
    tb/wallace_mult_tb.sv --top-module wallace_mult_tb -Mdir obj && obj/Vwallace_mult_tb
```

To run another testbench, replace `wallace_mult_tb` with its name. Every
testbench runs in well under a second.
