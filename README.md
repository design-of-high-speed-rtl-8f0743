# Braun array multiplier with a Kogge-Stone final adder

An unsigned N x N array multiplier (N = 4 by default) in which the slowest
part of a classic Braun multiplier, the last row of ripple-carry full adders,
is replaced by a Kogge-Stone parallel-prefix adder. The rest of the array is
unchanged, so the design stays a regular grid of AND gates and full adders.
Only the final carry chain changes: it becomes a logarithmic-depth prefix
tree instead of a linear ripple.

For N = 4 the circuit is:

| part                          | count                              |
|-------------------------------|------------------------------------|
| AND gates (partial products)  | 16                                 |
| full adders (carry-save rows) | 9 (3 rows of 3)                    |
| Kogge-Stone adder             | one, 3 bits wide: 6 XOR, 10 AND, 5 OR |

The whole design is combinational: no clock, no registers, no reset. A
product is valid one propagation delay after the inputs settle.

## How the product is formed

Write the operands as x = x3..x0 (multiplicand) and y = y3..y0 (multiplier).
The product is

    p = sum over i, j of (x_i AND y_j) * 2^(i+j)

**Partial products** (`pp_and_array`). One AND gate per bit pair gives
`pp[j][i] = x[i] & y[j]`, which has weight 2^(i+j). Row j is the multiplicand
gated by multiplier bit j.

**Carry-save rows** (`braun_csa_array`). Rows 1 to N-1 each hold N-1 full
adders. Row 1 adds row 0 of the partial products, shifted by one place, to row
1. Each later row adds its own partial products to the previous row's
results:

- a full adder's **carry** goes straight down to the adder below it, which
  sits one weight higher;
- its **sum** goes diagonally down to the adder one column to the right;
- the leftmost adder of each row also takes the top partial product of the
  row above, `x[N-1] & y[j-1]`.

No carry moves sideways inside a row, so each row costs one full-adder delay.
The rightmost sum of each row is a finished product bit. That gives P1..P3,
and P0 is simply `x0 & y0`. After the last row two vectors of N-1 bits
remain, both of weight 2^N and up:

    sum_v   = { x3 y3, s3[2], s3[1] }     (s3 = sums of the last row)
    carry_v = { c3[2], c3[1], c3[0] }     (c3 = carries of the last row)

**Final adder** (`ksa`). In a conventional Braun multiplier, three more full
adders in ripple form add `sum_v + carry_v` and produce P4..P7. This carry
path crosses every column, so it sets the multiplier's delay. Here a
Kogge-Stone adder of width N-1 does that addition: its sum bits are P4..P6
and its carry-out is P7.

## The Kogge-Stone adder

This is the part that is least obvious from a schematic. `ksa` works in three
steps.

1. **Pre-processing.** For each bit, propagate `P_i = a_i xor b_i` and
   generate `G_i = a_i and b_i`.
2. **Prefix network.** The pair (G, P) of a group of bits i..j says whether
   the group creates a carry by itself (G), or passes an incoming carry
   through (P). Two adjacent groups merge with the prefix operator
   (`ksa_prefix_cell`):

       G(i:j) = G(i:k+1) or (P(i:k+1) and G(k:j))
       P(i:j) = P(i:k+1) and P(k:j)

   Level l merges every position with the position 2^l below it. After
   ceil(log2(W+1)) levels, each position holds the generate of everything
   below it, which is the carry into that bit. For W = 3 there are two levels.
3. **Post-processing.** `s_i = P_i xor C_(i-1)`. The carry-out is the group
   generate of the whole word.

**Carry-in.** The adder has a carry-in. It enters the prefix network as an
extra position 0 with G = cin and P = 0, and the operand bits sit at
positions 1..W. A node whose merged group reaches down to the carry-in only
needs G, because no later node uses its P. Such nodes are built with
`GROUP_P = 0`: one AND and one OR instead of two ANDs and one OR. For W = 3
this gives:

| level | node at position | merges with | kind   |
|-------|------------------|-------------|--------|
| 0     | 1 (bit 0)        | 0 (cin)     | G only |
| 0     | 2 (bit 1)        | 1           | G and P |
| 0     | 3 (bit 2)        | 2           | G and P |
| 1     | 2                | 0           | G only |
| 1     | 3                | 1           | G only |

Counting the three XORs and three ANDs of pre-processing and the three sum
XORs, that is 6 XOR, 10 AND and 5 OR gates. This matches the gate budget
the 3-bit adder was specified with. Handling the carry-in as a prefix
position is this implementation's reading; it gives exactly that count.

**XOR versions.** The adder's XOR gates exist in three transistor-level
versions (12, 14 and 22 transistors), which differ in delay, power and
area. They all have the same logic function, so all of them are the one
module `xor2`. The delay and transistor figures of those circuits cannot be
carried over to RTL.

## The z pins

The original schematic has four extra inputs, z0..z3. They sit on the carry
inputs that are otherwise tied to 0: z0..z2 on the first adder row and z3 on
the final adder's carry-in. They are kept as the port `z`:

    p = x*y + 2*z[0] + 4*z[1] + 8*z[2] + 16*z[3]      (N = 4)

This never overflows 2N bits: 15*15 + 30 = 255. **Tie `z` to 0 for a plain
product.** The order in which the pins map to columns (z[0] at the lowest
weight) is this design's choice.

## Modules

| module            | role                                                   |
|-------------------|--------------------------------------------------------|
| `braun_ksa_mult`  | top: partial products, carry-save array, final KSA     |
| `pp_and_array`    | N x N AND gates                                        |
| `braun_csa_array` | (N-1) x (N-1) full adders, produces P0..P(N-1), sum_v, carry_v |
| `full_adder`      | one-bit full adder                                     |
| `ksa`             | W-bit Kogge-Stone adder with carry-in                  |
| `ksa_prefix_cell` | prefix operator node; `GROUP_P` selects G-only form    |
| `xor2`            | two-input XOR                                          |
| `ksa_pkg`         | `pg_t`, the packed generate/propagate pair             |

Top-level ports of `braun_ksa_mult #(N = 4)`:

| port | dir | width | meaning                                  |
|------|-----|-------|------------------------------------------|
| `x`  | in  | N     | multiplicand                             |
| `y`  | in  | N     | multiplier                               |
| `z`  | in  | N     | carry-input pins, 0 for plain multiplication |
| `p`  | out | 2N    | product                                  |

**Parameters.** `N` (top, array) and `W` (adder) can be changed: an N-bit
multiplier uses an (N-1)-bit adder. The composition for N = 4 is the
original one. Larger N was checked at N = 8, but it is an extension, not part
of the original design.

After synthesis the N = 4 top has 53 AND, 23 OR and 24 XOR cells. That is 16
ANDs for partial products, 9 full adders of 3 AND + 2 OR + 2 XOR each, and
the adder's 10 AND + 5 OR + 6 XOR.

## Where this RTL departs from the original circuit

- The original is a transistor-level CMOS design. Its figures of merit are
  delays and transistor counts at 180 nm and 130 nm. The reported 4 x 4
  delays are about 536 ps for the conventional multiplier and 135 ps to
  237 ps with the Kogge-Stone stage, depending on the XOR version. None of
  that is modelled here. Only the logic and its structure are kept.
- The full adder is a 28-transistor cell. Only its function is given, so it
  is written as `s = a^b^ci`, `co = majority(a, b, ci)`.
- The worked 3-bit example that goes with the adder feeds the plain bit
  generate G_(i-1) into sum bit i, not the group generate. That shortcut
  gives wrong sums when a carry has to cross more than one bit. This RTL uses
  the full prefix carry, so every sum is exact. The example's own numbers
  (011 + 100 = 0111) are reproduced.
- The conventional Braun multiplier is the baseline, with the last row in
  ripple form. It is not included.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog that
records a failure if the run stalls. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ksa_pkg.sv tb/tb_braun_ksa_mult.sv --top-module tb_braun_ksa_mult
    ./obj_dir/Vtb_braun_ksa_mult

| testbench              | what it checks                                                           |
|------------------------|--------------------------------------------------------------------------|
| `tb_braun_ksa_mult`    | default N = 4 top. All 256 products, swept like a binary counter on the pins (x0 fastest, y3 slowest), then all 16 z values. It counts the final adder's carry-out, a carry crossing the whole final adder, carries leaving the array, and use of the z pins, and fails if any of them never happens. |
| `tb_braun_ksa_mult_n8` | top at N = 8: corner operands, 20 000 random products, 5 000 random operands with random z |
| `tb_ksa`               | 3-bit adder, all 128 cases and the 011 + 100 example; 8-bit adder, random cases and all-propagate cases |
| `tb_braun_csa_array`   | 4 x 4 array, all operands and first-row carry inputs: `p_low + 16*(sum_v + carry_v)` equals the weighted sum |
| `tb_pp_and_array`      | every partial product bit, all 256 operand pairs                         |
| `tb_full_adder`, `tb_xor2`, `tb_ksa_prefix_cell` | exhaustive truth tables                        |

All expected values come from integer arithmetic in the testbench, not from
the design. The top-level testbench reads `sum_v` and `carry_v` inside the
instance by hierarchical reference, for its mechanism counters only.
