# Fault tolerant reversible 5x5 signed multiplier

A two's-complement multiplier for 5-bit operands (one sign bit, four value
bits) built entirely from *reversible* and *parity preserving* gates. A
reversible gate has as many outputs as inputs, and its output pattern
determines its input pattern uniquely. A parity preserving gate also keeps
the XOR of its outputs equal to the XOR of its inputs. A network of such
gates inherits the property. So if any single gate output flips, the parity of
all the network's outputs no longer matches the parity of its inputs, and a
single fault can be detected at the boundary of the circuit.

The multiplier uses the modified Baugh-Wooley form of signed multiplication:
all 25 partial products are generated in parallel, then summed by a Wallace
tree of 3:2 counters. Two new gates carry most of the work:

* **F2PG**, a 5x5 gate that is a complete full adder on its own;
* **MNFT**, a 3x3 gate that gives a NAND for the complemented partial products.

The RTL describes the logic function of each reversible gate as ordinary
combinational SystemVerilog. It is a functional, bit-exact model of the
reversible netlist: every gate is a module instance, every constant input is
a literal, and every unused ("garbage") output is brought out on a port. It
does not model quantum cost or any physical reversible technology.

## The gates

All gates are combinational. `'` is NOT, juxtaposition is AND, `^` is XOR.

| Module | Size | Outputs | Use in the multiplier |
|---|---|---|---|
| `f2g`  | 3x3 | P=A, Q=A^B, R=A^C | B=C=0: three copies of A (fan-out) |
| `frg`  | 3x3 | P=A, Q=A'B^AC, R=A'C^AB (Fredkin, controlled swap) | C=0: R=AB, P passes A on |
| `mnft` | 3x3 | P=(A^B)C^A, Q=A^B, R=(A^B)C^A^C | A=1: R=NAND(B,C) |
| `mig`  | 4x4 | P=A, Q=A^B, R=AB^C, S=AB'^D | C=D=0: half adder, Q sum, R carry |
| `f2pg` | 5x5 | P=(A^B)C^B, Q=A^B, R=A^B^C, S=(A^B)C^AB^D, T=AB'^E | D=E=0: full adder, R sum, S carry |

`ft_full_adder` wraps one F2PG with D=E=0 and `ft_half_adder` wraps one MIG
with C=D=0. The full adder needs two constant inputs and leaves three garbage
outputs; a fault tolerant reversible full adder cannot do with fewer.

F2PG has one more use. With D=1 instead of 0, its S output is the *inverted*
carry. The tree uses this to add a constant one at the top product bit
without an extra gate (see below).

## Partial products (`pp_gen`)

For x = x4..x0 and y = y4..y0 in two's complement, the modified Baugh-Wooley
form writes the product as

    p = sum_{i,j<4} x_i y_j 2^(i+j)  +  x4 y4 2^8
      + sum_{j<4} NAND(x4, y_j) 2^(4+j)  +  sum_{i<4} NAND(x_i, y4) 2^(i+4)
      + 2^5 + 2^9                                   (mod 2^10)

So only one kind of adder is needed, with no subtractors. `pp_gen` outputs the
25 bits `pp[i*5+j]` of weight 2^(i+j). The 8 bits of the sign row and sign
column (exactly one of i, j is 4) are already complemented. The two constant
ones are added in the tree.

Fan-out is the awkward part of a reversible netlist: a signal may drive only
one gate input, so every reuse needs an explicit copy. The generator works
like this:

* Each x_i with i<4 is used five times. It is not copied. Instead it is cascaded
  along its row: the Fredkin gate's P output equals its A input, so the four
  AND gates of row i pass x_i from one to the next, and the last one feeds
  the row's MNFT (the NAND with y4).
* x4 and every y_j are copied five times by two chained F2Gs. The first F2G
  gives three copies, and its third copy feeds the second F2G, which gives three more.
* The x4·y4 Fredkin gate ends its chain, so its P output is garbage.

This gives 17 FRG, 8 MNFT and 12 F2G: 37 gates, 49 constant inputs (17 Fredkin
C=0, 24 F2G B=C=0, 8 MNFT A=1) and 34 garbage outputs (17 Fredkin Q, one
Fredkin P, two outputs of each MNFT).

## The Wallace tree (`wallace_tree`)

This is the part that takes the most care. Counting the two Baugh-Wooley
ones, the column heights for weights 2^0..2^9 start as

    column:  0  1  2  3  4  5  6  7  8  9
    height:  1  2  3  4  5  5  3  2  1  1

Three layers of F2PG full adders (3:2 counters) bring every column down to at
most two bits. FAn below is full adder n; "c" means column.

| Layer | Full adders | Notes |
|---|---|---|
| 1 | FA1 c2, FA2 c3, FA3 c4, FA4 c5, FA5 c6 | the 2^5 constant is FA4's carry-in |
| 2 | FA6 c3, FA7 c4, FA8 c5, FA9 c7 | |
| 3 | FA10 c4, FA11 c5, FA12 c6 | |

After layer 3 the heights are `1 2 1 1 1 2 2 2 2 0`. A short carry chain
finishes the sum:

* MIG half adders HA1 to HA4 on columns 1 to 4;
* F2PG full adders FA13 to FA16 on columns 5 to 8.

The 2^9 constant never appears as a separate bit. Column 9 holds only that
constant plus the carry out of column 8, so product bit 9 is the inverted
carry. FA16 is therefore a raw `f2pg` with D=1, whose S output
(carry ^ D) is p[9]. The carry out of column 9 is discarded, as the
mod 2^10 arithmetic requires.

In total the tree uses 16 F2PG and 4 MIG, with 41 constant inputs (30 zeros
on FA1 to FA15, D=1 and E=0 on FA16, the 2^5 one, 8 zeros on the MIGs) and
56 garbage outputs (3 per F2PG, 2 per MIG). The critical path is the
partial product gates, three adder layers, then eight gates of carry chain.

The source gives the tree's gate counts and constant/garbage totals, but not
its wiring. The reduction above is this design's own. It was chosen so that
it uses exactly those counts, including where the two Baugh-Wooley
constants go.

## The top (`ft_signed_mult`) and the parity check

`ft_signed_mult` connects `pp_gen` to `wallace_tree`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `x` | in | 5 signed | multiplicand |
| `y` | in | 5 signed | multiplier |
| `p` | out | 10 signed | x*y |
| `garbage` | out | 90 | {tree garbage[55:0], generator garbage[33:0]} |

The whole network has 57 gates (8 MNFT, 17 FRG, 12 F2G, 16 F2PG, 4 MIG), 90
constant inputs and 90 garbage outputs. Exactly ten of the constants are ones:
8 MNFT A inputs, the 2^5 one, and FA16's D. That is an even number, so for a
fault-free circuit

    ^{x, y} == ^{p, garbage}

A checker outside the multiplier can compare these two parities. A flipped
output bit of any single gate breaks the equality. This holds if the flip
reaches a garbage output directly, or if it propagates, because every gate
downstream preserves parity too. The multiplier itself contains no checker.
Like the source design, it only provides the outputs that make the check possible.

The design has no clock, no reset and no state. The product is valid once
the inputs have propagated through the combinational network.

## Sizes

The operand width is `ft_mult_pkg::N = 5`. The package also holds the
garbage and constant counts that size the ports. The generator's loops are
written in terms of N. The copy scheme (two F2Gs for five copies) and the
tree's wiring are specific to 5x5, so changing N is not supported. That is the
only size the source design presents.

## How far it can be trusted

* The F2PG and MNFT equations match the published truth tables. The
  testbenches compare the modules against those tables, entry by entry.
* F2G, Fredkin and MIG use their standard definitions from the reversible
  logic literature. For each one, the testbenches check the equations, parity
  preservation and reversibility (every output pattern occurs once).
* `pp_gen` is checked on all 1024 operand pairs against the Baugh-Wooley
  partial products, and for parity.
* `wallace_tree` is checked on about 20,000 25-bit input vectors (all
  single and double bits, plus random ones) against the weighted sum plus
  the two constants, and for parity.
* `ft_signed_mult` is checked on all 1024 operand pairs, including
  12*13 = 156, -12*13 = -156, 12*(-13) = -156 and -12*(-13) = 156. For every
  pair it also checks the parity relation, and it checks that flipping any
  one output bit breaks that relation.

Where the netlist departs from the original circuit drawings, or had to be
reconstructed:

* The row cascade and the F2G copy chains in `pp_gen` are a reconstruction.
  They match the published gate kinds and counts (37 gates, 49 constants,
  34 garbage). The original drawing may connect them differently.
* The Wallace tree's wiring and the placement of the Baugh-Wooley constants
  are this design's own, as described above. Only the counts are the
  published ones (57 gates, 90 constants, 90 garbage for the whole multiplier).
* The multiplier uses a MIG as its half adder. An F2PG with C=0 would also
  work (R sum, S carry), at a higher cost. The alternative is not built.

## Simulating

Each testbench in `tb/` prints one line, `TB_RESULT checks=N failures=M`,
and then calls `$finish`. For example, to run the full multiplier test with
Verilator 5:

    verilator --binary --timing --assert -Irtl \
      rtl/ft_mult_pkg.sv tb/tb_ft_signed_mult.sv -y rtl \
      --top-module tb_ft_signed_mult -Mdir obj -o sim
    ./obj/sim

Replace `tb_ft_signed_mult` with `tb_pp_gen`, `tb_wallace_tree`,
`tb_ft_full_adder`, `tb_ft_half_adder`, `tb_f2pg`, `tb_mnft`, `tb_frg`,
`tb_f2g` or `tb_mig` to test one part. Every test finishes in well under a
second.

## Files

`rtl/`
* `ft_mult_pkg.sv`: widths and counts
* `f2g.sv`, `frg.sv`, `mnft.sv`, `mig.sv`, `f2pg.sv`: the gates
* `ft_full_adder.sv`, `ft_half_adder.sv`: the adders
* `pp_gen.sv`, `wallace_tree.sv`: the two stages
* `ft_signed_mult.sv`: the top

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`.
