// tb_f2g: exhaustive test of the Feynman double gate, its parity
// preservation and reversibility, and the copy use (B = C = 0).
module tb_f2g;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  f2g dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    logic [2:0] exp;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp = {a, b != a, c != a};
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL in=%03b out=%03b expected=%03b", 3'(v), {p, q, r}, exp);
      end
      checks++;
      if ((a ^ b ^ c) != (p ^ q ^ r)) failures++;
      seen[{p, q, r}] = 1'b1;
      if (!b && !c) begin
        checks++;
        if ({p, q, r} != {3{a}}) failures++;
      end
    end
    checks++;
    if (seen != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
