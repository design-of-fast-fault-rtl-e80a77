// ft_signed_mult: fast fault tolerant reversible 5x5 signed multiplier.
//
// Multiplies two 5-bit two's-complement numbers (1 sign bit, 4 value bits)
// into a 10-bit two's-complement product, using only parity preserving
// reversible gates, so that the network as a whole keeps the parity of its
// inputs: for a fault-free circuit, XOR of {x, y, all constant inputs} equals
// XOR of {p, all garbage outputs}. The 90 constant inputs hold ten ones in
// total (an even number), so the check reduces to
//     ^{x, y} == ^{p, garbage}
// and a single faulty gate output that flips one bit shows up as a mismatch.
//
// Structure, as published:
//   pp_gen       - 25 modified Baugh-Wooley partial products in parallel
//                  (17 FRG for AND, 8 MNFT for NAND, 12 F2G for fan-out)
//   wallace_tree - 3:2 reduction with F2PG full adders and MIG half adders
//                  (16 F2PG, 4 MIG)
// Totals: 57 gates, 90 constant inputs, 90 garbage outputs.
//
// Interface: x, y signed operands; p = x*y; garbage = {tree garbage (56),
// generator garbage (34)}. Purely combinational, no clock: the result
// settles after the partial product gates, three 3:2 layers and the final
// carry chain.
module ft_signed_mult
  import ft_mult_pkg::*;
(
  input  logic signed [N-1:0]  x,
  input  logic signed [N-1:0]  y,
  output logic signed [PW-1:0] p,
  output logic [GARBAGE-1:0]   garbage
);
  logic [NPP-1:0]          pp;
  logic [PPG_GARBAGE-1:0]  g_ppg;
  logic [TREE_GARBAGE-1:0] g_tree;

  pp_gen u_ppg (
    .x(x), .y(y), .pp(pp), .garbage(g_ppg)
  );

  wallace_tree u_tree (
    .pp(pp), .p(p), .garbage(g_tree)
  );

  assign garbage = {g_tree, g_ppg};

endmodule
