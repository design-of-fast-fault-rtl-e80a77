// ft_half_adder: fault tolerant reversible half adder made of a single MIG.
//
// A and B are the addends and the gate's C and D inputs are tied to 0, so
// Q = A^B is the sum and R = AB the carry; P (a copy of A) and S (AB') are
// garbage outputs, brought out for parity checking. Combinational.
// Using a MIG as the half adder follows the published multiplier; which
// inputs carry the constants is this design's reading of the gate.
module ft_half_adder (
  input  logic       a,
  input  logic       b,
  output logic       sum,
  output logic       cout,
  output logic [1:0] garbage   // {P, S} of the MIG
);
  mig u_mig (
    .a(a), .b(b), .c(1'b0), .d(1'b0),
    .p(garbage[1]), .q(sum), .r(cout), .s(garbage[0])
  );
endmodule
