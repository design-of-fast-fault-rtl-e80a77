// pp_gen: fault tolerant reversible partial product generator, 5x5 signed.
//
// Produces the 25 partial product bits of the modified Baugh-Wooley scheme in
// parallel, using only parity preserving reversible gates:
//   * pp(i,j) = x_i AND y_j for i,j < 4 and for i = j = 4: one Fredkin gate
//     each (A = x_i, B = y_j, C = 0, R = AB)                 -> 17 FRG
//   * pp(i,j) = NAND(x_i, y_j) when exactly one of i, j is 4 (the sign row
//     and column): one MNFT each (A = 1, B = x_i, C = y_j, R = NAND)  -> 8 MNFT
//   * fan-out: a reversible wire drives one gate input, so each y_j and x_4
//     is copied five times by two cascaded Feynman double gates (B = C = 0)
//                                                            -> 12 F2G
//   * x_i for i < 4 needs no copies: it is cascaded along its row through the
//     pass-through output P of the row's four Fredkin gates into the row's MNFT.
// The gate kinds and counts (37 gates, 49 constant inputs, 34 garbage outputs)
// are the published ones; the exact cascade is this design's reconstruction,
// chosen to reproduce all of those counts.
//
// Interface: pp[i*N + j] has weight 2^(i+j). garbage holds every output not
// used further, so the parity of {x, y, constants} equals that of
// {pp, garbage} for a fault-free circuit. Purely combinational.
module pp_gen
  import ft_mult_pkg::*;
(
  input  logic [N-1:0]           x,
  input  logic [N-1:0]           y,
  output logic [NPP-1:0]         pp,
  output logic [PPG_GARBAGE-1:0] garbage
);
  localparam int unsigned M = N - 1;  // index of the sign bit

  // ycp[j][k]: copy k of y_j, consumed by row k. xs[k]: copy k of x_4.
  logic [N-1:0] ycp [N];
  logic [N-1:0] xs;
  logic [N-1:0] ylink;
  logic         xlink;

  // x_i cascaded along row i through the Fredkin P outputs.
  logic [N-1:0] xc [M];

  // Garbage pieces.
  logic [M-1:0] g_frg_q [M];   // Q of the 16 AND gates of rows 0..3
  logic [1:0]   g_row   [M];   // {P, Q} of the MNFT ending rows 0..3
  logic [1:0]   g_col   [M];   // {P, Q} of the MNFT of row 4, columns 0..3
  logic [1:0]   g_sign;        // {P, Q} of the Fredkin gate for x4*y4

  // Fan-out of five: F2G #1 gives three copies, its third copy feeds F2G #2.
  for (genvar j = 0; j < N; j++) begin : g_ycopy
    f2g u_cp0 (.a(y[j]),     .b(1'b0), .c(1'b0), .p(ycp[j][0]), .q(ycp[j][1]), .r(ylink[j]));
    f2g u_cp1 (.a(ylink[j]), .b(1'b0), .c(1'b0), .p(ycp[j][2]), .q(ycp[j][3]), .r(ycp[j][4]));
  end
  f2g u_xcp0 (.a(x[M]),  .b(1'b0), .c(1'b0), .p(xs[0]), .q(xs[1]), .r(xlink));
  f2g u_xcp1 (.a(xlink), .b(1'b0), .c(1'b0), .p(xs[2]), .q(xs[3]), .r(xs[4]));

  // Rows 0..3: four ANDs then a NAND with the sign bit y_4.
  for (genvar i = 0; i < M; i++) begin : g_row_i
    assign xc[i][0] = x[i];
    for (genvar j = 0; j < M; j++) begin : g_and
      frg u_and (
        .a(xc[i][j]), .b(ycp[j][i]), .c(1'b0),
        .p(xc[i][j+1]), .q(g_frg_q[i][j]), .r(pp[i*N + j])
      );
    end
    mnft u_nand (
      .a(1'b1), .b(xc[i][M]), .c(ycp[M][i]),
      .p(g_row[i][1]), .q(g_row[i][0]), .r(pp[i*N + M])
    );
  end

  // Row 4 (sign bit x_4): NANDs with y_0..y_3, AND with y_4.
  for (genvar j = 0; j < M; j++) begin : g_sign_row
    mnft u_nand (
      .a(1'b1), .b(xs[j]), .c(ycp[j][M]),
      .p(g_col[j][1]), .q(g_col[j][0]), .r(pp[M*N + j])
    );
  end
  frg u_sign_and (
    .a(xs[M]), .b(ycp[M][M]), .c(1'b0),
    .p(g_sign[1]), .q(g_sign[0]), .r(pp[M*N + M])
  );

  // Pack the garbage outputs: 16 + 8 + 8 + 2 = 34 bits.
  always_comb begin
    for (int i = 0; i < M; i++) begin
      garbage[i*M +: M]             = g_frg_q[i];
      garbage[M*M + 2*i +: 2]       = g_row[i];
      garbage[M*M + 2*M + 2*i +: 2] = g_col[i];
    end
    garbage[M*M + 4*M +: 2] = g_sign;
  end

endmodule
