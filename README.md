# Carry-free signed binary adder with a borrow word

Ordinary binary addition is slow because a carry may travel from the
lowest bit to the highest. This adder avoids that by working in
*signed binary*: every digit may be -1, 0 or 1, still with radix 2. The
representation is redundant. For example, `0 1` and `1 -1` both mean 1.
That freedom lets each position pick its outputs so that no carry ever
travels more than a short, fixed distance. The adder's delay is the same
for 4 digits as for 400.

The RTL implements one member of a family of such adders. Each position
splits the pair sum `x(i) + y(i)` into four small digits:

* a **borrow** `b(i+1)` in {0, 1}, sent to the position above;
* an **intermediate carry** `c(i+1)` in {-1, 0}, also sent up;
* an **intermediate sum** `s(i)` in {0, 1}, kept in place;
* the borrow `b(i)` received from the position below.

They are tied by one identity:

    x(i) + y(i) = 2*(c(i+1) + b(i+1)) + s(i) - b(i)

The sum digits can only be 0 or +1 and the carry digits only 0 or -1.
So the last step, `z(i) = s(i) + c(i)`, can never overflow: it gives -1,
0 or 1 and needs no further carry. This table was chosen because it gives
a small cell. Its two-level form has 15 product terms.

## Digit code

Each operand and result digit uses two wires, `{s, m}`:

| digit | s | m |
|------:|:-:|:-:|
|   -1  | 0 | 0 |
|    0  | 0 | 1 |
|    1  | 1 | 0 |

`s` is high only for +1 and `m` only for 0. The code `11` is never
applied. The logic treats it as a don't-care, so its result is undefined.
The borrow, intermediate sum and intermediate carry have only two values
each, so each uses one wire. A high borrow or sum wire means +1. A high
carry wire means -1.

The package `sba_pkg` defines the digit type `sbd_t` (a packed struct with
fields `s` and `m`), the constants `SBD_NEG`, `SBD_ZERO` and `SBD_POS`, and
two conversion functions.

## The addition table

This is what each position computes. Pairs are unordered: `-1 + 0`
covers both orders.

| x + y   | b out | b in | c out | s |
|---------|:-----:|:----:|:-----:|:-:|
| -1 + -1 |   0   |  0   |  -1   | 0 |
| -1 + -1 |   0   |  1   |  -1   | 1 |
| -1 +  0 |   0   |  0   |  -1   | 1 |
| -1 +  0 |   0   |  1   |   0   | 0 |
|  0 +  0 |   0   |  0   |   0   | 0 |
|  0 +  0 |   0   |  1   |   0   | 1 |
|  1 + -1 |   1   |  0   |  -1   | 0 |
|  1 + -1 |   1   |  1   |  -1   | 1 |
|  1 +  0 |   1   |  0   |  -1   | 1 |
|  1 +  0 |   1   |  1   |   0   | 0 |
|  1 +  1 |   1   |  0   |   0   | 0 |
|  1 +  1 |   1   |  1   |   0   | 1 |

Read it like this:

* **The borrow out** is 1 exactly when the pair contains a +1. It does not
  depend on anything from below, so it is ready after one gate level.
* **Even pair sums** (-2, 0, +2): `s = b in`. The carry is -1 for the pairs
  `-1 + -1` and `1 + -1`, and 0 otherwise.
* **Odd pair sums** (±1): `s = NOT b in`. The carry is -1 exactly when
  `b in` is 0.

You can check every row against the identity above.

## One position: three generators

`sba_cell` is one digit position. It wires three small blocks together:

```
           x(i) y(i)
             |   |
   +---------+---+---------+
   |         |   |         |
 borrow_gen  isc_gen <---- b(i)    (from borrow_gen of position i-1)
   |         |   |
 b(i+1)  c(i+1)  s(i)
                  |
   c(i) ----> final_sum_gen        (c(i) from isc_gen of position i-1)
                  |
                 z(i)
```

* `borrow_gen` is a single OR gate: `b(i+1) = x.s | y.s`.
* `isc_gen` is the NAND–NAND logic for carry and sum, built from five
  product terms:
  * `t1` marks `-1 + -1` and `1 + -1`, which always give carry -1.
  * `t2` and `t3` mark an odd pair with no borrow in.
  * `t4` marks two nonzero digits with a borrow in.
  * `t5` marks `0 + 0` with a borrow in.
  * `c = NAND(t1, t2, t3)` and `s = NAND(t2, t3, t4, t5)`.
* `final_sum_gen` computes `z.m = XNOR(c, s)` and `z.s = s AND NOT c`.

**How far information travels.** `z(i)` uses `s(i)` and `c(i)`:

* `s(i)` depends on position i and on the borrow from position i-1.
* `c(i)` is made in position i-1 from that position's digits and the
  borrow out of position i-2.

So each result digit depends on the operand digits in positions i, i-1 and
i-2, and on nothing lower. The critical path is the borrow gate, the
sum/carry logic, then the final-sum gate, whatever the word length. A
simpler table without the borrow would depend on two positions only. The
borrow buys the sign separation that keeps the final step carry-free.

## Word-level adder and its edges

`sba_adder #(DIGITS)` chains `DIGITS` cells and returns a result with
`DIGITS + 1` digits:

* Position 0 receives carry 0 and borrow 0.
* The top result digit is `z(DIGITS) = c(DIGITS) + b(DIGITS)`. It is formed
  by a `final_sum_gen` with the borrow in the place of the sum. This is
  legal because the borrow, like `s`, is in {0, 1}.

Summing the identity over all positions shows that `Σ z(i)·2^i` equals
`Σ (x(i) + y(i))·2^i` for every input. `DIGITS` defaults to 7, the operand
length of the example below. Any value of 1 or more works; a 64-digit
instance is tested.

**Example.** The numbers are written most significant digit first:

```
x        1  0 -1 -1  1  0  0          =  44
y        0 -1 -1  0  1  0 -1          = -45
b     1  0  0  0  1  0  0  0          (borrow into each position)
s        1  1  0  0  0  0  1
c    -1 -1 -1  0  0  0 -1  0          (carry into each position)
z     0  0  0  0  0  0 -1  1          = -1
```

## Departures and choices

* **Borrow polarity.** The published gate equations write the borrow output
  as `NOR(xs, ys)`. That is the complement of the table's borrow. The same
  equations read the borrow input as active high. Chaining those cells
  directly gives wrong sums. Here the borrow wire is active high in both
  places: the NOR plus an inverter. The other outputs (`ci1`, `zs`, `zm`)
  are exactly as published. `tb_sba_cell_pla` checks all four outputs
  against the published minimised cover, with `bi1` expected inverted.
* **Reach of a result digit.** The source describes each final digit as
  depending on two neighbouring operand positions. The borrow version
  depends on three, as shown above, and the tests check three.
* **Word ends and width.** The zero inputs at position 0, the extra top
  digit and the default width are choices made here.
* **Timing.** The design is purely combinational, with no registers and no
  clock. Register the inputs or outputs as your pipeline requires.
* **Lint warning.** Verilator reports that `borrow_gen` does not read the
  `m` bits of its operands. That is correct: they stay on the port so that
  every block takes whole digits.

Not included:

* the other addition tables of the same family (for example, ones whose
  borrow may also be -1);
* earlier adders that this one was compared against.

The area, power and delay advantages claimed for this cell come from
mapping it to standard-cell libraries. The RTL reproduces its logic but
not those measurements.

## Files

| file | contents |
|------|----------|
| `rtl/sba_pkg.sv` | digit type, code constants, conversions |
| `rtl/borrow_gen.sv` | borrow generator |
| `rtl/isc_gen.sv` | intermediate sum/carry generator |
| `rtl/final_sum_gen.sv` | final sum generator |
| `rtl/sba_cell.sv` | one digit position |
| `rtl/sba_adder.sv` | the N-digit adder (top) |
| `tb/sba_ref_pkg.sv` | integer reference: digit code and addition table |
| `tb/tb_borrow_gen.sv`, `tb/tb_isc_gen.sv`, `tb/tb_final_sum_gen.sv`, `tb/tb_sba_cell.sv` | exhaustive block tests |
| `tb/tb_sba_cell_pla.sv` | cell against the published sum-of-products cover |
| `tb/tb_sba_adder.sv` | 7-digit adder: example, all 3^14 operand pairs, locality, mechanism counts |
| `tb/tb_sba_adder_wide.sv` | 64-digit adder, 200,000 random pairs |

## Verification and simulation

Every testbench checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`.

* The block tests try every input combination.
* `tb_sba_adder` checks every operand pair of the default 7-digit adder.
  It compares each result digit with a chained table reference and each
  value with the integer sum.
* It also checks that changing digits below i-2 never changes `z(i)`.
* It counts that borrows, -1 carries, odd pairs with and without a borrow
  in, every result digit value and a nonzero top digit all occur.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sba_pkg.sv tb/sba_ref_pkg.sv tb/tb_sba_adder.sv --top-module tb_sba_adder
./obj_dir/Vtb_sba_adder
```

Substitute another testbench name to run the others. The exhaustive
7-digit run takes a few seconds.

To change the width, set `DIGITS` on `sba_adder`. To try another addition
table from the same family, replace `borrow_gen` and `isc_gen`, and
`final_sum_gen` if the digit sets change. Then update `table_row` in
`tb/sba_ref_pkg.sv`. The word-level tests check values independently of the
table.
