// ft_mult_pkg: sizes shared by the fault tolerant reversible signed multiplier.
//
// The multiplier is the 5x5 two's-complement design built from parity
// preserving reversible gates. The operand width (5) and the gate,
// constant-input and garbage-output counts follow the design's published
// characteristics; they are used to size ports and to let testbenches check
// that the netlist has the expected shape.
package ft_mult_pkg;

  // Operand width: 1 sign bit and 4 value bits.
  localparam int unsigned N  = 5;
  // Product width.
  localparam int unsigned PW = 2 * N;
  // Number of partial product bits x_i*y_j.
  localparam int unsigned NPP = N * N;

  // Partial product generator: 8 MNFT + 17 FRG + 12 F2G.
  localparam int unsigned PPG_GARBAGE   = 34;
  localparam int unsigned PPG_CONSTANTS = 49;
  // Wallace tree: 16 F2PG full adders + 4 MIG half adders.
  localparam int unsigned TREE_GARBAGE   = 56;
  localparam int unsigned TREE_CONSTANTS = 41;
  // Whole multiplier.
  localparam int unsigned GARBAGE = PPG_GARBAGE + TREE_GARBAGE;

endpackage
