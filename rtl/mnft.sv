// mnft: modified new fault tolerant gate, a 3x3 parity preserving reversible gate.
//
//   P = (A^B)C ^ A      (= AC' ^ BC)
//   Q = A ^ B
//   R = (A^B)C ^ A ^ C  (= AC' ^ B'C)
//
// The equations and truth table are the published ones. The gate shares the
// term (A^B)C between P and R, which keeps its cost at five XORs and one AND.
// With A = 1, R is NAND(B, C); the multiplier uses it that way for the
// complemented partial products of the sign row and column. Combinational.
module mnft (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic axb;
  logic shared;

  assign axb    = a ^ b;
  assign shared = axb & c;
  assign p = shared ^ a;
  assign q = axb;
  assign r = shared ^ a ^ c;
endmodule
