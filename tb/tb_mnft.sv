// tb_mnft: exhaustive test of the MNFT gate against its published truth
// table, plus parity preservation, reversibility and the NAND use (A = 1).
module tb_mnft;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  // {P,Q,R} for input {A,B,C} = 0..7.
  localparam logic [2:0] TT [8] = '{
    3'b000, 3'b001, 3'b010, 3'b110, 3'b111, 3'b011, 3'b101, 3'b100
  };

  mnft dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TT[v]) begin
        failures++;
        $display("FAIL in=%03b out=%03b expected=%03b", 3'(v), {p, q, r}, TT[v]);
      end
      checks++;
      if ((a ^ b ^ c) != (p ^ q ^ r)) begin
        failures++;
        $display("FAIL parity in=%03b", 3'(v));
      end
      seen[{p, q, r}] = 1'b1;
      if (a) begin
        checks++;
        if (r != !(b && c)) begin
          failures++;
          $display("FAIL nand in=%03b", 3'(v));
        end
      end
    end
    checks++;
    if (seen != '1) begin
      failures++;
      $display("FAIL not reversible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
