// wallace_tree: fault tolerant reversible Wallace tree for the 5x5 signed
// multiplier (modified Baugh-Wooley form).
//
// Input: the 25 partial product bits pp[i*5 + j] of weight 2^(i+j), with the
// sign row and column already complemented by the generator. The modified
// Baugh-Wooley scheme adds two constant ones, at weights 2^5 and 2^9. Column
// heights (weight 0..9) start at 1 2 3 4 5 5 3 2 1 1.
//
// Three Wallace layers of 3:2 full adders (F2PG, sum on R, carry on S)
// reduce every column to at most two bits:
//   layer 1: FA1..FA5  on columns 2,3,4,5,6 (the 2^5 one enters FA4 as carry-in)
//   layer 2: FA6..FA9  on columns 3,4,5,7
//   layer 3: FA10..FA12 on columns 4,5,6
// A short carry chain then resolves the two-bit columns: MIG half adders on
// columns 1..4 (HA1..HA4), F2PG full adders on columns 5..8 (FA13..FA16).
// The 2^9 one is folded into FA16: its D input is 1, so its S output is the
// inverted carry out of column 8, which is exactly product bit 9.
// That is 16 F2PG and 4 MIG, 41 constant inputs and 56 garbage outputs, the
// published counts for this part; the published figure of the wiring is not
// reproduced, and this particular reduction is this design's own.
//
// Output: p is the 10-bit two's-complement product; garbage holds the
// 3 unused outputs of every F2PG and the 2 of every MIG. Combinational;
// the longest path is 3 full adder layers plus an 8-gate carry chain.
module wallace_tree
  import ft_mult_pkg::*;
(
  input  logic [NPP-1:0]          pp,
  output logic [PW-1:0]           p,
  output logic [TREE_GARBAGE-1:0] garbage
);
  // Partial product bit (i,j).
  function automatic logic b(input logic [NPP-1:0] v, input int i, input int j);
    return v[i*N + j];
  endfunction

  // Full adder operands, results and garbage (FA1..FA16 at index 0..15).
  logic [15:0] fa_a, fa_b, fa_c, fa_s, fa_k;
  logic [2:0]  fa_g [16];
  // Half adders HA1..HA4 at index 0..3.
  logic [3:0]  ha_a, ha_b, ha_s, ha_k;
  logic [1:0]  ha_g [4];

  // Layer 1
  assign {fa_a[0],  fa_b[0],  fa_c[0]}  = {b(pp,0,2), b(pp,1,1), b(pp,2,0)};
  assign {fa_a[1],  fa_b[1],  fa_c[1]}  = {b(pp,0,3), b(pp,1,2), b(pp,2,1)};
  assign {fa_a[2],  fa_b[2],  fa_c[2]}  = {b(pp,0,4), b(pp,1,3), b(pp,2,2)};
  assign {fa_a[3],  fa_b[3],  fa_c[3]}  = {b(pp,1,4), b(pp,2,3), 1'b1};
  assign {fa_a[4],  fa_b[4],  fa_c[4]}  = {b(pp,2,4), b(pp,3,3), b(pp,4,2)};
  // Layer 2
  assign {fa_a[5],  fa_b[5],  fa_c[5]}  = {fa_s[1], b(pp,3,0), fa_k[0]};
  assign {fa_a[6],  fa_b[6],  fa_c[6]}  = {fa_s[2], b(pp,3,1), b(pp,4,0)};
  assign {fa_a[7],  fa_b[7],  fa_c[7]}  = {fa_s[3], b(pp,3,2), b(pp,4,1)};
  assign {fa_a[8],  fa_b[8],  fa_c[8]}  = {b(pp,3,4), b(pp,4,3), fa_k[4]};
  // Layer 3
  assign {fa_a[9],  fa_b[9],  fa_c[9]}  = {fa_s[6], fa_k[1], fa_k[5]};
  assign {fa_a[10], fa_b[10], fa_c[10]} = {fa_s[7], fa_k[2], fa_k[6]};
  assign {fa_a[11], fa_b[11], fa_c[11]} = {fa_s[4], fa_k[3], fa_k[7]};
  // Carry chain
  assign {ha_a[0], ha_b[0]} = {b(pp,0,1), b(pp,1,0)};
  assign {ha_a[1], ha_b[1]} = {fa_s[0],  ha_k[0]};
  assign {ha_a[2], ha_b[2]} = {fa_s[5],  ha_k[1]};
  assign {ha_a[3], ha_b[3]} = {fa_s[9],  ha_k[2]};
  assign {fa_a[12], fa_b[12], fa_c[12]} = {fa_s[10],  fa_k[9],  ha_k[3]};
  assign {fa_a[13], fa_b[13], fa_c[13]} = {fa_s[11],  fa_k[10], fa_k[12]};
  assign {fa_a[14], fa_b[14], fa_c[14]} = {fa_s[8],   fa_k[11], fa_k[13]};
  assign {fa_a[15], fa_b[15], fa_c[15]} = {b(pp,4,4), fa_k[8],  fa_k[14]};

  for (genvar k = 0; k < 15; k++) begin : g_fa
    ft_full_adder u_fa (
      .a(fa_a[k]), .b(fa_b[k]), .cin(fa_c[k]),
      .sum(fa_s[k]), .cout(fa_k[k]), .garbage(fa_g[k])
    );
  end

  // FA16 with D = 1: S = carry ^ 1 adds the 2^9 constant.
  f2pg u_fa16 (
    .a(fa_a[15]), .b(fa_b[15]), .c(fa_c[15]), .d(1'b1), .e(1'b0),
    .p(fa_g[15][2]), .q(fa_g[15][1]), .r(fa_s[15]), .s(fa_k[15]), .t(fa_g[15][0])
  );

  for (genvar k = 0; k < 4; k++) begin : g_ha
    ft_half_adder u_ha (
      .a(ha_a[k]), .b(ha_b[k]),
      .sum(ha_s[k]), .cout(ha_k[k]), .garbage(ha_g[k])
    );
  end

  assign p = {fa_k[15], fa_s[15], fa_s[14], fa_s[13], fa_s[12],
              ha_s[3], ha_s[2], ha_s[1], ha_s[0], b(pp,0,0)};

  always_comb begin
    for (int k = 0; k < 16; k++) garbage[3*k +: 3] = fa_g[k];
    for (int k = 0; k < 4; k++)  garbage[48 + 2*k +: 2] = ha_g[k];
  end

endmodule
