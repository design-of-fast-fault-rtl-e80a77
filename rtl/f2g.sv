// f2g: Feynman double gate, a 3x3 parity preserving reversible gate.
//
//   P = A,  Q = A ^ B,  R = A ^ C
//
// With B = C = 0 it is the "copying circuit" that gives a signal a fan-out
// of three in a reversible network, where a wire may otherwise drive only one
// gate input. Input parity A^B^C equals output parity P^Q^R.
// Purely combinational. This is the gate's usual definition from the
// reversible logic literature (two XORs, quantum cost 2).
module f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
