// tb_f2pg: exhaustive test of the F2PG gate.
//
// All 32 input patterns are applied; the outputs are compared with the
// gate's published truth table (kept here as a constant table, independent
// of the equations in the module). The test also checks that the gate is
// parity preserving and reversible (all 32 output patterns are different),
// and that D = E = 0 turns it into a full adder (R sum, S carry).
module tb_f2pg;
  logic a, b, c, d, e;
  logic p, q, r, s, t;
  int checks = 0, failures = 0;

  // Truth table, {P,Q,R,S,T} for input {A,B,C,D,E} = 0..31.
  localparam logic [4:0] TT [32] = '{
    5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100, 5'b00101, 5'b00110, 5'b00111,
    5'b11100, 5'b11101, 5'b11110, 5'b11111, 5'b01010, 5'b01011, 5'b01000, 5'b01001,
    5'b01101, 5'b01100, 5'b01111, 5'b01110, 5'b11011, 5'b11010, 5'b11001, 5'b11000,
    5'b10010, 5'b10011, 5'b10000, 5'b10001, 5'b10110, 5'b10111, 5'b10100, 5'b10101
  };

  f2pg dut (.a, .b, .c, .d, .e, .p, .q, .r, .s, .t);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] seen;
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      checks++;
      if ({p, q, r, s, t} !== TT[v]) begin
        failures++;
        $display("FAIL in=%05b out=%05b expected=%05b", 5'(v), {p, q, r, s, t}, TT[v]);
      end
      checks++;
      if ((a ^ b ^ c ^ d ^ e) != (p ^ q ^ r ^ s ^ t)) begin
        failures++;
        $display("FAIL parity in=%05b", 5'(v));
      end
      seen[{p, q, r, s, t}] = 1'b1;
      if (d == 0 && e == 0) begin
        checks++;
        if ({s, r} != 2'(int'(a) + int'(b) + int'(c))) begin
          failures++;
          $display("FAIL full adder in=%05b", 5'(v));
        end
      end
    end
    checks++;
    if (seen != '1) begin
      failures++;
      $display("FAIL not reversible: seen=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
