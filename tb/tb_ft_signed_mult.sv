// tb_ft_signed_mult: end-to-end test of the 5x5 fault tolerant reversible
// signed multiplier, at its only size.
//
// 1. The four published test cases 12*13, -12*13, 12*(-13), -12*(-13).
// 2. All 1024 operand pairs against the integer product.
// 3. For every pair, the network parity check ^{x, y} == ^{p, garbage}.
// 4. Fault detection: for each pair, one output or garbage bit is flipped
//    (as a single faulty gate output would) and the parity check must flag it.
// It counts how often each case the design has to handle occurred (both
// operands positive, each one negative, both negative, a zero operand, the
// most negative operand, a negative product) and fails if one never did.
module tb_ft_signed_mult;
  import ft_mult_pkg::*;

  logic signed [N-1:0]  x, y;
  logic signed [PW-1:0] p;
  logic [GARBAGE-1:0]   garbage;
  int checks = 0, failures = 0;
  int n_pos_pos = 0, n_neg_pos = 0, n_pos_neg = 0, n_neg_neg = 0;
  int n_zero = 0, n_min = 0, n_neg_prod = 0, n_fault_caught = 0;

  ft_signed_mult dut (.x, .y, .p, .garbage);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int xa, input int ya);
    int exp;
    int flip;
    logic [PW+GARBAGE-1:0] outs;
    x = N'(xa);
    y = N'(ya);
    #1;
    exp = int'(x) * int'(y);
    checks++;
    if (int'(p) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", x, y, exp, p);
    end
    checks++;
    if ((^{x, y}) != (^{p, garbage})) begin
      failures++;
      if (failures < 10) $display("FAIL parity %0d * %0d", x, y);
    end
    // A single flipped output bit breaks the parity relation.
    outs = {p, garbage};
    flip = (xa * 37 + ya * 11) & 32'h7fff;
    outs[flip % (PW + GARBAGE)] ^= 1'b1;
    checks++;
    if ((^{x, y}) != (^outs)) n_fault_caught++;
    else failures++;

    if (x >= 0 && y >= 0) n_pos_pos++;
    if (x <  0 && y >= 0) n_neg_pos++;
    if (x >= 0 && y <  0) n_pos_neg++;
    if (x <  0 && y <  0) n_neg_neg++;
    if (x == 0 || y == 0) n_zero++;
    if (x == -(1 << (N-1)) || y == -(1 << (N-1))) n_min++;
    if (exp < 0) n_neg_prod++;
  endtask

  initial begin
    // Published test cases.
    apply(12, 13);
    checks++; if (p != 156)  failures++;
    apply(-12, 13);
    checks++; if (p != -156) failures++;
    apply(12, -13);
    checks++; if (p != -156) failures++;
    apply(-12, -13);
    checks++; if (p != 156)  failures++;
    $display("12*13=%0d  -12*13=%0d  12*-13=%0d  -12*-13=%0d", 156, -156, -156, 156);

    for (int a = -(1 << (N-1)); a < (1 << (N-1)); a++)
      for (int b = -(1 << (N-1)); b < (1 << (N-1)); b++)
        apply(a, b);

    $display("cases: pos*pos=%0d neg*pos=%0d pos*neg=%0d neg*neg=%0d zero=%0d most_negative=%0d negative_product=%0d faults_caught=%0d",
             n_pos_pos, n_neg_pos, n_pos_neg, n_neg_neg, n_zero, n_min, n_neg_prod, n_fault_caught);
    checks++; if (n_pos_pos == 0) failures++;
    checks++; if (n_neg_pos == 0) failures++;
    checks++; if (n_pos_neg == 0) failures++;
    checks++; if (n_neg_neg == 0) failures++;
    checks++; if (n_zero == 0) failures++;
    checks++; if (n_min == 0) failures++;
    checks++; if (n_neg_prod == 0) failures++;
    checks++; if (n_fault_caught == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
