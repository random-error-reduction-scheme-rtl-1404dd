// tb_sc_bernstein: exhaustive check of the degree-3 and degree-6 Bernstein
// circuits: for every combination of coefficient and x bits the output
// must equal the coefficient bit indexed by the number of ones among the x
// bits (counted here with a loop, not with the circuit's adder).
module tb_sc_bernstein;
  logic [3:0] c3; logic [2:0] x3; logic z3;
  logic [6:0] c6; logic [5:0] x6; logic z6;
  int checks = 0, failures = 0;

  sc_bernstein #(.K(3)) dut3 (.coef(c3), .xs(x3), .z(z3));
  sc_bernstein #(.K(6)) dut6 (.coef(c6), .xs(x6), .z(z6));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 7); v++) begin
      int n;
      n = 0;
      {c3, x3} = 7'(v);
      for (int i = 0; i < 3; i++) if (x3[i]) n++;
      #1 checks++;
      if (z3 !== c3[n]) failures++;
    end
    for (int v = 0; v < (1 << 13); v++) begin
      int n;
      n = 0;
      {c6, x6} = 13'(v);
      for (int i = 0; i < 6; i++) if (x6[i]) n++;
      #1 checks++;
      if (z6 !== c6[n]) begin
        failures++;
        if (failures < 10) $display("c=%b x=%b z=%b", c6, x6, z6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
