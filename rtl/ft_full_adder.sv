// ft_full_adder: fault tolerant reversible full adder made of a single F2PG.
//
// A and B are the addends, the gate's C input is the carry-in, D and E are
// tied to 0. Then R = A^B^Cin is the sum and S = (A^B)Cin ^ AB the carry;
// P, Q and T are garbage outputs, brought out so that the parity of a whole
// network can be checked (two constant inputs, three garbage outputs).
// Combinational. The construction is the published one.
module ft_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [2:0] garbage   // {P, Q, T} of the F2PG
);
  f2pg u_f2pg (
    .a(a), .b(b), .c(cin), .d(1'b0), .e(1'b0),
    .p(garbage[2]), .q(garbage[1]), .r(sum), .s(cout), .t(garbage[0])
  );
endmodule
