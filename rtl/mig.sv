// mig: modified Islam gate, a 4x4 parity preserving reversible gate.
//
//   P = A,  Q = A ^ B,  R = AB ^ C,  S = AB' ^ D
//
// With C = D = 0 it is a half adder: Q is the sum and R the carry. The
// equations are the gate's definition in the reversible logic literature;
// they cost three XORs, two ANDs and one NOT and keep A^B^C^D = P^Q^R^S.
// Combinational.
module mig (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
  assign s = (a & ~b) ^ d;
endmodule
