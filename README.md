# Low-precision array multiplier with a carry-free full adder

Neural-network inference tolerates small arithmetic errors, and in a multiplier
most of the logic and delay is in the full adders that sum the partial products.
This design gives up exact carries to make those adders cheaper. Its full adder
still computes the exact sum bit, but its carry output is simply one of its
inputs. There is no majority gate, and the carry input no longer lies on the
carry path. A 4x4 unsigned array multiplier is then built with this cell in
place of every full adder. The partial products and the half adders stay exact.

The result is an approximate product. Over all 256 pairs of 4-bit operands it
is exact in 95 cases. Elsewhere it is usually too large. The worst error is 160
and the mean absolute error is 27.4 (the exact products range from 0 to 225).
A zero operand always gives zero.

Everything is combinational. There is no clock, no reset and no latency.

## The low-precision full adder (`rtl/lp_full_adder.sv`)

    s_mod = a ^ b ^ cin        (two cascaded XOR gates, exact)
    cout  = a                  (a wire)

| a | b | cin | s_mod | cout | exact carry |
|---|---|-----|-------|------|-------------|
| 0 | 0 | 0   | 0     | 0    | 0           |
| 0 | 0 | 1   | 1     | 0    | 0           |
| 0 | 1 | 0   | 1     | 0    | 0           |
| 0 | 1 | 1   | 0     | 0    | **1**       |
| 1 | 0 | 0   | 1     | 1    | **0**       |
| 1 | 0 | 1   | 0     | 1    | 1           |
| 1 | 1 | 0   | 0     | 1    | 1           |
| 1 | 1 | 1   | 1     | 1    | 1           |

The carry is wrong in two of the eight cases:

- With a=1, b=0, cin=0 a carry is *invented*, worth +2 at the cell's weight.
- With a=0, b=1, cin=1 a carry is *lost*, worth −2.

The sum bit is never wrong. Because `cout` does not depend on `cin`, carries do
not ripple through a chain of these cells. The delay of a chain is that of two
XOR gates, whatever its length.

Which operand is wired to `a` therefore decides the error. That choice is the
most important decision in the multiplier (see below).

## The 4x4 array (`rtl/lp_multiplier.sv`)

`pp_gen` forms the 16 partial products `P[j][i] = x[i] & y[j]`, where bit i of
row j has weight 2^(i+j). Row 0 is the starting partial sum, and its bit 0 is
product bit 0. Each later row j is added to the running partial sum, which is
shifted right by one so that its bits line up with `P[j]`:

    row 1:   HA      LPFA    LPFA    HA        (nothing arrives from above at the top)
    row 2:   HA      LPFA    LPFA    LPFA
    row 3:   HA      LPFA    LPFA    LPFA
             bit 0 -> product bit j
                     carries ripple left ->    top carry feeds the next row

- `HA` is an exact half adder. `LPFA` is the low-precision full adder.
- The sum of a row's bit-0 cell is product bit j.
- After row 3, the three upper sums and the final carry form product bits 7..4.
- In total there are 4 half adders and 8 low-precision full adders.

**Operand order.** In every LPFA:

- `a` is the partial-product bit of the row being added.
- `b` is the running partial-sum bit.
- `cin` is the carry from the cell to the right.

A cell's carry-out is therefore its own partial-product bit. Swapping `a` and
`b`, so that the partial sum becomes the carry, makes the multiplier worse:

| order             | exact results of 256 | mean abs. error | max error |
|-------------------|----------------------|-----------------|-----------|
| `a` = partial product (used) | 95        | 27.4            | 160       |
| `a` = partial sum            | 86        | 40.0            | 192       |

With the order used, a cell whose partial-product bit is 1 always sends a carry
on. That is why most errors are over-estimates: 157 of the 256 pairs come out
too large and only 4 too small.

**Width.** The array is written for any `N >= 2` through the parameter `N`
(default 4). For N = 2 it holds only half adders and is exact. For larger N,
row 1 has two half adders and N−2 LPFAs. Every later row has one half adder and
N−1 LPFAs. The 4x4 size is the one this design is defined and measured at.
Wider versions are provided because the structure extends row by row. Their
accuracy has not been characterised here.

## What is specified and what was chosen

Fixed by the design being implemented:

- the full adder's logic: an exact three-input XOR sum and `cout = a`
- exact partial products
- replacing the full adders of a conventional 4x4 multiplier with the
  low-precision cell
- unsigned 4-bit operands and an 8-bit product

Chosen here:

- **Array shape.** A conventional multiplier could be a ripple array or a
  Wallace tree; this is a ripple-carry array.
- **Half adders stay exact.** Only full adders were to be replaced.
- **Operand order** of each LPFA, as described above.
- **Purely combinational** operation.

The source also compares transistor counts: 28 for an exact full adder against
20 for the low-precision one, and 318 against 270 for the two 4x4 multipliers.
Those figures are not reproduced here. The saving of 48 transistors matches six
replaced full adders, but a 4x4 array that produces all 8 product bits has
eight. Do not read the structure above as the one those counts describe.

The source also names a multi-bit adder made from the low-precision cell, but
never defines it. It is not included.

## Files

| file | contents |
|------|----------|
| `rtl/lp_full_adder.sv` | low-precision full adder |
| `rtl/half_adder.sv` | exact half adder |
| `rtl/pp_gen.sv` | N x N partial-product generator |
| `rtl/lp_multiplier.sv` | top: N x N low-precision array multiplier, `x`, `y` → `p` |
| `tb/lp_mul_ref_pkg.sv` | bit-level reference model; also counts invented and lost carries |
| `tb/tb_lp_full_adder.sv` | all 8 input cases against the truth table above |
| `tb/tb_half_adder.sv` | all 4 input cases |
| `tb/tb_pp_gen.sv` | all 256 operand pairs, bit by bit and by weighted sum |
| `tb/tb_lp_multiplier.sv` | all 256 operand pairs at the default size (see below) |
| `tb/tb_lp_multiplier_wide.sv` | N = 2 exhaustive (must be exact); N = 8 corner cases plus 4000 random pairs |

`tb_lp_multiplier` compares every product with the reference model. It also
checks that:

- a zero operand gives zero;
- the product is exact whenever no cell invented or lost a carry;
- the output is valid in the same cycle as the operands.

It fails if any of these never happens over the sweep: an invented carry, a lost
carry, an exact result, an over-estimate, an under-estimate. It prints the
error statistics quoted above.

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. Each also has a watchdog that counts a failure if the run hangs.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        tb/lp_mul_ref_pkg.sv tb/tb_lp_multiplier.sv --top-module tb_lp_multiplier
    ./obj_dir/Vtb_lp_multiplier

Use the same command for the other benches. Replace the bench file and
`--top-module`, and keep `tb/lp_mul_ref_pkg.sv` for the two multiplier benches.
Each bench runs in well under a second.

## Changing it

- **Trying another carry function** only needs a change to `cout` in
  `lp_full_adder.sv`. Mirror the change in the table `LP_FA_TABLE` of
  `tb/lp_mul_ref_pkg.sv`, then re-run `tb_lp_multiplier` to see the new error
  statistics.
- **Changing the operand order** means editing the `.a`/`.b` connections in
  `lp_multiplier.sv` and the matching lines of `approx_mul()`.
- **For an exact reference multiplier**, set `cout = (a & b) | (cin & (a ^ b))`.
  The array then computes `x * y` exactly, which is a useful sanity check of the
  wiring.
