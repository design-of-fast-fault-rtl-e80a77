// tb_ft_full_adder: exhaustive test of the single-gate reversible full adder:
// sum and carry against integer addition, and parity of
// {a, b, cin, two zero constants} against {sum, cout, garbage}.
module tb_ft_full_adder;
  logic a, b, cin, sum, cout;
  logic [2:0] garbage;
  int checks = 0, failures = 0;

  ft_full_adder dut (.a, .b, .cin, .sum, .cout, .garbage);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL in=%03b out=%b%b", 3'(v), cout, sum);
      end
      checks++;
      if ((a ^ b ^ cin) != (sum ^ cout ^ (^garbage))) begin
        failures++;
        $display("FAIL parity in=%03b", 3'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
