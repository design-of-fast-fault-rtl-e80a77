// tb_pp_gen: exhaustive test of the partial product generator.
//
// For all 1024 operand pairs, each of the 25 outputs is compared with the
// modified Baugh-Wooley partial product worked out here: x_i AND y_j, except
// NAND where exactly one of i, j is the sign position 4. The network's parity
// is also checked: the 49 constant inputs hold eight ones (the MNFT A
// inputs), so ^{x, y} must equal ^{pp, garbage}.
module tb_pp_gen;
  import ft_mult_pkg::*;

  logic [N-1:0]           x, y;
  logic [NPP-1:0]         pp;
  logic [PPG_GARBAGE-1:0] garbage;
  int checks = 0, failures = 0;

  pp_gen dut (.x, .y, .pp, .garbage);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPP-1:0] exp;
    for (int v = 0; v < (1 << (2*N)); v++) begin
      {x, y} = (2*N)'(v);
      #1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          exp[i*N + j] = x[i] & y[j];
          if ((i == N-1) != (j == N-1)) exp[i*N + j] = ~exp[i*N + j];
        end
      checks++;
      if (pp !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b y=%b pp=%b exp=%b", x, y, pp, exp);
      end
      checks++;
      if ((^{x, y}) != (^{pp, garbage})) begin
        failures++;
        if (failures < 10) $display("FAIL parity x=%b y=%b", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
