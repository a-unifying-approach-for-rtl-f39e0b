# Weighted modulo 2^n+1 adder built on a diminished-1 adder

Residue arithmetic with the modulus 2^n+1 has a well-known problem. The
operands range over 0..2^n, so they need n+1 bits, while the sibling channels
(modulo 2^n and 2^n-1) need only n bits. The *diminished-1* code stores
every value minus one, which gets back to n bits. It brings its own costs:
converters into and out of the code, and special handling of zero. Adders for
ordinary binary ("weighted") operands and adders for diminished-1 operands
have therefore been designed as separate families.

This design joins the two families. A carry-save row of constant depth reduces
two weighted (n+1)-bit operands A and B to two n-bit vectors Y and U with

    |Y + U + 1| mod (2^n+1)  =  |A + B| mod (2^n+1)

The right-hand side is exactly what a diminished-1 adder computes. So any
diminished-1 adder, placed after the row, becomes a weighted modulo 2^n+1
adder. One more bit, the result MSB, comes almost for free from the adder's
half-sum signals.

The RTL is parameterized in n (`N`, default 32) and is purely combinational.

## Why the carry-save row works

Split each operand into its top bit and its low n bits: A = a_n·2^n + A_n,
and likewise for B. Legal operands lie in 0..2^n, so if a_n = 1 then A_n = 0.
Adding the two top bits gives a sum bit s_n (weight 2^n) and a carry
c_{n+1} (weight 2^{n+1}). Modulo 2^n+1 we have 2^n ≡ -1, so

    A + B ≡ A_n + B_n - 2·c_{n+1} - s_n

The identity -x ≡ ~x - 1 holds for a single bit x. Using it turns both
subtractions into additions of inverted bits plus a constant. The constant is
folded into one n-bit word:

    D = 2^n - 4 + 2·~c_{n+1} + ~s_n        (bit pattern 1 1 ... 1 d1 d0)
    d1 = NAND(a_n, b_n)                    (that is ~c_{n+1})
    d0 = XNOR(a_n, b_n)                    (that is ~s_n)

    A + B ≡ A_n + B_n + D + 2

A row of n full adders compresses A_n, B_n and D into a carry vector c and a
sum vector u. The carry of the top position has weight 2^n ≡ -1. Writing -1 as
~c_{n-1} - 1 lets that carry re-enter at bit 0 *inverted*, and the -1 uses up
one of the two added ones. What remains is

    Y = { c[n-2:0], ~c[n-1] },   U = u,   A + B ≡ Y + U + 1

This is the "inverted end-around carry" carry-save stage. Its delay is one
cell, whatever n is.

Cost of the row:

* **Positions 2..n-1 ("FA+" cells).** The D bit is a constant 1, so the cell
  is as small as a half adder: carry = a|b, sum = ~(a^b).
* **Positions 1 and 0.** These are full adders whose third input is d1 or d0.
  Legal operands never have a_n set together with a_1 or a_0, and the same
  holds for b. Under that rule the cells reduce to:

      c1 = a1 | b1                   u1 = ~((a1 ^ b1) | (a_n & b_n))
      c0 = (a0 | b0) & ~(a_n | b_n)  u0 = ~(a0 ^ b0 ^ a_n ^ b_n)

  These are the default (`SIMPLIFY_LSB = 1`). With `SIMPLIFY_LSB = 0` the two
  positions stay plain full adders.

Worked example, n = 4, A = 16, B = 5. The answer is 21 mod 17 = 4.

| step | value |
|---|---|
| a_n, b_n | 1, 0, so d1 = 1 and d0 = 0: D = 1110 |
| A_n, B_n | 0000, 0101 |
| carries c[3:0], sums u[3:0] | 0100, 1011 |
| Y = {c[2:0], ~c[3]} | 1001 (9) |
| U | 1011 (11) |
| Y + U + 1 = 21 | 21 mod 17 = 4 |

## The diminished-1 adder

The diminished-1 adder returns |Y + U + 1| mod 2^n+1 on n bits. Put another
way, it adds Y and U, and adds one more only when the addition has no
carry-out. Feeding the inverted carry-out straight back to the carry-in would
form a combinational loop that can oscillate. `dim1_adder` avoids the loop:

1. The preprocessing stage forms g = Y & U and the half-sum hs = Y ^ U. The
   half-sum also serves as the propagate signal, and it is brought out as a
   port.
2. A log2(n)-level prefix tree computes the group generate and propagate of
   bits i..0, for carry-in 0. `PREFIX` selects the tree:
   * `PREFIX_KS` (default): Kogge-Stone, a node at every position on every
     level.
   * `PREFIX_LF`: Ladner-Fischer in its minimum-depth form, about half the
     nodes with a larger fan-out.
3. One more level applies the end-around carry. The carry-in is
   cin = ~G[n-1:0], and the carry into bit i is G[i-1:0] | (P[i-1:0] & cin).
   This level is a carry-increment step.
4. The sum is s = hs ^ carry.

The whole adder can work this way because any diminished-1 adder fits in
this slot. Faster published forms exist: carry-lookahead, cyclic
parallel-prefix, select-prefix and Ling-carry adders. They would drop into the
same place with the same ports. This library provides only the two prefix
trees above, in this simple increment form.

## The result MSB

Y and U are both at most 2^n-1, so the sum reaches 2^n only when
Y + U = 2^n - 1. That happens exactly when Y and U are bitwise complementary,
that is, when every half-sum bit is 1. `hs_and_tree` ANDs the adder's half-sum
vector in a balanced tree. The tree runs beside the carry tree, so it adds
nothing to the critical path. In that case the adder's n low bits come out as
0 by themselves, so the full result is exactly 2^n.

## Modules

| file | role |
|---|---|
| `rtl/mod2n1_pkg.sv` | `prefix_e` enum (`PREFIX_KS`, `PREFIX_LF`) |
| `rtl/inv_eac_csa.sv` | D generation, FA+ row, reduced low cells, inverted end-around carry |
| `rtl/dim1_adder.sv` | parallel-prefix diminished-1 adder; exports its half-sums |
| `rtl/hs_and_tree.sv` | AND tree over the half-sums, which gives the result MSB |
| `rtl/weighted_mod_adder.sv` | top level: the three blocks above, wired in order |

Top-level interface (`weighted_mod_adder`):

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | N+1 | operand A, 0..2^N |
| `b` | in | N+1 | operand B, 0..2^N |
| `s` | out | N+1 | \|A+B\| mod 2^N+1 |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | width n of the low part of each operand |
| `PREFIX` | `PREFIX_KS` | carry tree of the diminished-1 adder |
| `SIMPLIFY_LSB` | 1 | use the reduced cells at CSA positions 0 and 1 |

Notes on the parameters:

* `N` must be at least 3.
* The design has no clock, no registers and no reset. The path from input to
  output is one carry-save cell, then log2(N) prefix levels, then the
  increment level and the sum XOR.
* At the default size, yosys coarse synthesis gives about 560 gate-level
  cells.

## Operand range

Operands above 2^N are illegal. `inv_eac_csa` holds immediate assertions that
report one. With `SIMPLIFY_LSB = 1` such an operand also gives a wrong result.
With full adders at the low positions, the row gives the right congruence for
any low part, but the operand is still outside the residue range.

## Verification

Every testbench in `tb/` checks itself and prints `TB_RESULT checks=.. failures=..`.

| testbench | what it covers |
|---|---|
| `tb_inv_eac_csa` | (Y+U+1) ≡ A+B for every legal pair at n = 4 and 8, both low-cell forms; random pairs at n = 32; FA+ cells bit by bit |
| `tb_dim1_adder` | every input pair at n = 4, 5, 8, both trees; n = 32 random, complementary (result 2^n) and wrap-around pairs; half-sum output |
| `tb_hs_and_tree` | every input at n = 5; all-ones, each single-zero and random vectors at n = 32 |
| `tb_weighted_mod_adder` | end to end at n = 4, 8, 16, 32 with both trees and both low-cell forms. Every pair at n = 4 and 8; 20,000 random pairs plus corners at 16 and 32. Fails if any mechanism never occurs in any configuration. |
| `tb_weighted_mod_adder_full` | the top with no parameter overrides (n = 32, Kogge-Stone); 100,000 pairs |

The mechanisms `tb_weighted_mod_adder` counts are:

* result 2^n;
* the diminished-1 stage wrapping (carry-out set);
* the diminished-1 stage incrementing;
* both operands equal to 2^n;
* exactly one operand equal to 2^n.

`tb_weighted_mod_adder` uses the helper `tb/wma_harness.sv`. The reference is
always (A+B) mod (2^n+1) in 64-bit integer arithmetic. To run one test, for
example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mod2n1_pkg.sv tb/tb_weighted_mod_adder.sv \
        --top-module tb_weighted_mod_adder
    ./obj_dir/Vtb_weighted_mod_adder

Each test runs in well under a second.

## What follows the published architecture and what does not

Taken from the published architecture:

* the decomposition into a constant-time inverted end-around-carry CSA stage,
  a diminished-1 adder and a half-sum AND for the MSB;
* the constant D with its NAND/XNOR bits;
* the half-adder-sized FA+ cells;
* reducing the two lowest cells under the operand-range rule.

Choices made here:

* **Reduced low cells.** The exact gate-level form of the two reduced cells.
  The equations above were derived for this design.
* **Diminished-1 adder.** The internal structure is a plain prefix tree with a
  final carry-increment level, not a specific published diminished-1 circuit.
  The Ladner-Fischer option uses the minimum-depth node placement.
* **Defaults.** N = 32 (the widest size of the published comparison, which
  also covers n = 4, 8 and 16) and the Kogge-Stone tree.
* **Combinational only.** No pipelining and no reset.

Not included:

* **Other diminished-1 adders.** The carry-lookahead, PPD, select-prefix and
  Ling-carry adders that the comparison places in the diminished-1 slot.
  Only their names are available here, not their circuits.
* **Deeper preprocessing simplification.** The inputs of the diminished-1
  adder's bit-1 preprocessing (y_0 and u_1) both depend on a_n and b_n, which
  allows a further simplification. No circuit for it is given, so Y and U
  enter the adder unchanged.
* **Reported timing and area.** Delay and area figures for a 0.18 µm library
  are outside what RTL simulation can check.
