// f2pg: five variables parity preserving gate, a 5x5 reversible gate.
//
//   P = (A^B)C ^ B          (= AC ^ BC')
//   Q = A ^ B
//   R = A ^ B ^ C
//   S = (A^B)C ^ AB ^ D
//   T = AB' ^ E             (= AB ^ A ^ E)
//
// The equations and truth table are the published ones. With D = E = 0 and
// C as carry-in, R is the full adder sum and S the carry (majority of A, B,
// C), so one gate is a whole fault tolerant full adder. D = 1 instead gives
// the inverted carry on S, which the multiplier uses to add its Baugh-Wooley
// constant at the top bit. Input and output parity are always equal.
// Combinational.
module f2pg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  logic axb;
  logic shared;

  assign axb    = a ^ b;
  assign shared = axb & c;
  assign p = shared ^ b;
  assign q = axb;
  assign r = axb ^ c;
  assign s = shared ^ (a & b) ^ d;
  assign t = (a & ~b) ^ e;
endmodule
