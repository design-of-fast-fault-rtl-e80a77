// frg: Fredkin gate, a 3x3 parity preserving reversible gate (controlled swap).
//
//   P = A,  Q = A'B ^ AC,  R = A'C ^ AB
//
// When A is 0, B and C pass straight through; when A is 1 they are swapped.
// With C = 0 the output R is the AND of A and B, and P hands A on unchanged,
// which is how the partial product generator cascades a multiplicand bit
// along a row. Purely combinational; the usual Fredkin definition.
module frg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
