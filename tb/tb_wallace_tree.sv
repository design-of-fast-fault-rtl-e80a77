// tb_wallace_tree: test of the reversible Wallace tree on its own.
//
// The tree must return (sum of pp[i*5+j] * 2^(i+j) + 2^5 + 2^9) mod 2^10 for
// any 25-bit input, the two constants being the Baugh-Wooley corrections.
// Inputs: all-zero, all-one, every single bit, every pair of bits, and
// 20000 random vectors. The tree's constant inputs hold two ones, so
// ^pp must equal ^{p, garbage}.
module tb_wallace_tree;
  import ft_mult_pkg::*;

  logic [NPP-1:0]          pp;
  logic [PW-1:0]           p;
  logic [TREE_GARBAGE-1:0] garbage;
  int checks = 0, failures = 0;

  wallace_tree dut (.pp, .p, .garbage);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [NPP-1:0] v);
    int unsigned sum;
    pp = v;
    #1;
    sum = (1 << 5) + (1 << 9);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (v[i*N + j]) sum += 1 << (i + j);
    checks++;
    if (p !== PW'(sum)) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%b p=%0d exp=%0d", v, p, PW'(sum));
    end
    checks++;
    if ((^v) != (^{p, garbage})) begin
      failures++;
      if (failures < 10) $display("FAIL parity pp=%b", v);
    end
  endtask

  initial begin
    apply('0);
    apply('1);
    for (int k = 0; k < NPP; k++) begin
      apply(NPP'(1) << k);
      for (int m = k + 1; m < NPP; m++) apply((NPP'(1) << k) | (NPP'(1) << m));
    end
    for (int n = 0; n < 20000; n++) apply(NPP'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
