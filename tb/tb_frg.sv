// tb_frg: exhaustive test of the Fredkin gate: controlled swap behaviour,
// parity preservation, reversibility and the AND use (C = 0, R = AB).
module tb_frg;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  frg dut (.a, .b, .c, .p, .q, .r);

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
      exp = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL in=%03b out=%03b expected=%03b", 3'(v), {p, q, r}, exp);
      end
      checks++;
      if ((a ^ b ^ c) != (p ^ q ^ r)) failures++;
      seen[{p, q, r}] = 1'b1;
      if (!c) begin
        checks++;
        if (r != (a && b)) failures++;
      end
    end
    checks++;
    if (seen != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
