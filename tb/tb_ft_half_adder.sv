// tb_ft_half_adder: exhaustive test of the single-gate reversible half adder:
// sum and carry against integer addition, and parity preservation.
module tb_ft_half_adder;
  logic a, b, sum, cout;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  ft_half_adder dut (.a, .b, .sum, .cout, .garbage);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL in=%02b out=%b%b", 2'(v), cout, sum);
      end
      checks++;
      if ((a ^ b) != (sum ^ cout ^ (^garbage))) begin
        failures++;
        $display("FAIL parity in=%02b", 2'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
