# 64-bit multiply-accumulate unit with a reduced-complexity Wallace multiplier

This is an unsigned 64 × 64-bit multiply-accumulate (MAC) unit. On every clock
edge it adds the product of its two operands to a running sum:

    acc <= (acc + a * b) mod 2^129        (acc <= 0 when rst is high)

This is the inner-product kernel of filters, convolutions and transforms,
F = Σ Pᵢ·Qᵢ. Nearly all of the hardware is the 64 × 64 multiplier. It is a
*reduced-complexity* ("modified") Wallace tree. A plain Wallace tree uses full
adders and half adders freely. This one uses full adders (3:2 compressors)
wherever three bits of one column meet. It adds a half adder only where a column
would otherwise stay taller than the stage's target height. For 64-bit operands
the tree needs the same 10 stages as a conventional Wallace tree, and all of its
half adders fall into the last stage.

## Datapath and timing

```
 a[63:0] ─┐
          ├─> mod_wallace_mult ──prod[127:0]──> mac_adder ──[128:0]──> acc_reg ──┬──> p[127:0], p_carry
 b[63:0] ─┘     (pp_matrix →                      ^                            │
                 wallace_reduce →                 └──────── acc[128:0] ─────────┘
                 final_cpa)
```

| module | role |
|---|---|
| `MAC_64_bit` | top level: ports `clk`, `rst`, `a[63:0]`, `b[63:0]`, `p[127:0]`, `p_carry` |
| `mod_wallace_mult` | N × N multiplier: the three phases below |
| `pp_matrix` | phase 1: AND partial products, packed column by column |
| `wallace_reduce` | phase 2: the reduction tree (`fa_3to2`, `half_adder` cells) |
| `final_cpa` | phase 3: adds the last two rows |
| `mac_adder` | 128-bit product + 129-bit accumulator → 129-bit sum |
| `acc_reg` | 129-bit parallel-in parallel-out register, synchronous clear |
| `mac_pkg` | `OPERAND_W = 64`, and the row-count functions `next_rows` and `num_stages` |

There are no registers inside the multiplier or the adder. Multiplication and
accumulation form a single combinational path that ends in the accumulator.
Operands applied before a rising edge are already part of `p` just after that
edge: one operation per cycle, with one cycle of latency. `rst` is synchronous
and active high. `p` is bits 127:0 of the accumulator and `p_carry` is bit 128.
The sum wraps modulo 2^129. Because (2^64−1)² < 2^128, the accumulator holds any
two products before it can wrap. It holds many more when the operands are small.

## The reduction tree (`wallace_reduce`)

This is the part that needs explaining.

**Inverted pyramid.** The bit aᵢ·bⱼ has weight 2^(i+j). `pp_matrix` stores the
bits by column rather than as N shifted rows. Column c gets its
min(c+1, 2N−1−c) bits in slots 0, 1, 2, … with no gaps. Drawn with slot 0 on
top, the matrix is an inverted pyramid: N bits tall in column N−1 and one bit at
either end. Every slot above a column's height is 0.

**Grouping in threes.** A stage that starts with r rows splits every column into
groups of three bits, counted from the top. Each full group goes to a full adder.
Its sum stays in the column and its carry moves to the next column. A leftover
group of one or two bits passes through untouched. Counting rows, the stage ends
with

    r' = 2·⌊r/3⌋ + (r mod 3)          (for r divisible by 3: r' = 2r/3)

This is `mac_pkg::next_rows`. The carries arriving from the column below can push
a column above r'. When they do, two of that column's pass-through bits go to a
half adder, which lowers the column by one and raises the next column by one.
Columns are visited from least significant up, so that a half adder's carry is
seen before the next column is judged. This is the only place half adders appear.

**Resulting schedule.** The code applies this rule for N = 64:

| stage | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|---|---|---|
| rows in → out | 64→43 | 43→29 | 29→20 | 20→14 | 14→10 | 10→7 | 7→5 | 5→4 | 4→3 | 3→2 |
| full adders | 1323 | 882 | 587 | 392 | 262 | 172 | 116 | 70 | 43 | 6 |
| half adders | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 53 |

That gives 3853 full adders and 53 half adders in total. In the last stage,
columns 12 to 64 each hold two pass-through bits plus an incoming carry. Each of
them therefore needs a half adder, and the chain of half-adder carries
propagates upward. For N = 10 the same rule gives 10→7→5→4→3→2 rows, with 4 half
adders in the last stage.

**How the code does it.** A constant function, `schedule()`, runs the rule above
during elaboration. For every stage and column it returns the height, the number
of full adders and the number of half adders. Generate loops then place the
cells. Each stage block has an input matrix `cur` and an output matrix `nxt`. In
`nxt`, column c is filled in this order:

1. the full-adder sums;
2. the half-adder sums;
3. the pass-through bits;
4. the full-adder carries from column c−1;
5. the half-adder carries from column c−1.

The order itself does not matter, because the next stage regroups whatever it
finds from slot 0 upward. Column 2N−1 gets no cells. Any carry out of it would
be at or above 2^(2N), and a product never reaches that value. An elaboration
check (`$error`) catches any column left with more than two bits.

**The 3:2 cell (`fa_3to2`)** is written in multiplexer form. The half-sum a⊕b is
computed once and drives the select lines of two 2:1 multiplexers:

- `sum = (a^b) ? ~ci : ci`
- `carry = (a^b) ? ci : a`

The select is ready before `ci`, which suits a tree in which the third input is
often a late carry.

## Where this RTL departs from the original description

The original description is a short, partly inconsistent account of an FPGA
implementation. Where it was silent or contradicted itself, the choices are
these:

- **One 64-bit tree, not four 32-bit ones.** The original synthesized netlist
  builds the 64-bit product from four 32 × 32 Wallace multipliers and four adders.
  The prose describes a single 64-bit reduction with 10 stages. This RTL follows
  the prose. A 32 × 32 tree would need only 8 stages.
- **Half-adder count.** The description gives 8 half adders for the 64-bit tree.
  Its own height rule gives 53, as tabulated above. The description also says
  that half adders appear only in the 10th stage, and that part matches. The rule
  is implemented as stated, so the count is 53.
- **"Carry save" adders.** Both the accumulation adder and the multiplier's final
  adder are described as carry-save adders. Each produces one non-redundant sum
  of two operands, so here both are carry-propagate adders written as `+`. The
  carry structure is left to synthesis.
- **Output width.** The accumulator is 129 bits, but the published pin list has
  only `p[127:0]`. Bit 128 is brought out as the extra pin `p_carry`.
- **Not built.** The operand memory that feeds `a` and `b` is not part of this
  design. The description names it but does not specify it. The 4:2 and 5:2
  compressors it mentions are also not built. The reduction it actually describes
  uses only 3:2 cells and half adders.
- **Own choices.** The operands are unsigned. The partial products are plain AND
  terms, with no Booth recoding. The reset is synchronous and active high. The
  accumulator loads every cycle and has no enable.

No timing or power figures are claimed for this RTL. The original reports
217 MHz and about 178 mW for its FPGA implementation.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed independently, in the testbench itself, and ends by printing
`TB_RESULT checks=… failures=…`.

- `tb_fa_3to2`, `tb_half_adder`: exhaustive.
- `tb_pp_matrix`: checks every slot of every column against the expected
  aᵢ·bⱼ bit, and the weighted sum against a·b, for N = 64.
- `tb_wallace_reduce`: random matrices and all-ones matrices at N = 64 and
  N = 10. It checks that row0 + row1 equals the weighted bit count, and it checks
  the stage counts (10 and 5).
- `tb_mod_wallace_mult`: corner operands and 1000 random products at N = 64 and
  at N = 10.
- `tb_final_cpa`, `tb_mac_adder`: random operands and full-length carry chains,
  checked against a 32-bit-limb reference.
- `tb_acc_reg`: parallel load and synchronous clear.
- `tb_MAC_64_bit`: the full 64-bit design at its default parameters, run for
  328 cycles. The sum is checked just before and just after every edge, which
  confirms one cycle of latency. The run includes:
  - reset;
  - a run of small operands starting with 12 × 5 = 60;
  - random operands;
  - all-ones operands that carry into bit 128 and then wrap past 2^129;
  - a reset in the middle of a run.

  Each of these events is counted, and the test fails if any of them never
  happens.

## Simulating and changing it

Any testbench builds with plain Verilator 5. For example:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/mac_pkg.sv tb/tb_MAC_64_bit.sv --top-module tb_MAC_64_bit
./obj_dir/Vtb_MAC_64_bit
```

At N = 64 the tree has about 3900 cells. Expect Verilator to take tens of seconds
to elaborate it and under a minute to build. The simulation itself runs in well
under a second.

The operand width is the parameter `N` of `MAC_64_bit`, `mod_wallace_mult`,
`pp_matrix` and `wallace_reduce`. Its default is `mac_pkg::OPERAND_W = 64`. The
reduction schedule, the number of stages and every internal width follow from
it. There is nothing else to edit when N changes. To try another cell, or
another rule for placing half adders, change `fa_3to2`, `half_adder` or the
`schedule()` function. The elaboration check will report any schedule that fails
to reach two rows.
