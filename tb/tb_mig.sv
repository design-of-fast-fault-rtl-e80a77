// tb_mig: exhaustive test of the modified Islam gate, its parity
// preservation and reversibility, and the half adder use (C = D = 0).
module tb_mig;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  mig dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    logic [3:0]  exp;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      exp[3] = a;
      exp[2] = (a != b);
      exp[1] = (a && b) != c;
      exp[0] = (a && !b) != d;
      checks++;
      if ({p, q, r, s} !== exp) begin
        failures++;
        $display("FAIL in=%04b out=%04b expected=%04b", 4'(v), {p, q, r, s}, exp);
      end
      checks++;
      if ((a ^ b ^ c ^ d) != (p ^ q ^ r ^ s)) failures++;
      seen[{p, q, r, s}] = 1'b1;
      if (!c && !d) begin
        checks++;
        if ({r, q} != 2'(int'(a) + int'(b))) failures++;
      end
    end
    checks++;
    if (seen != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
