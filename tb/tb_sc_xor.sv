// tb_sc_xor: truth table of the stochastic XOR, 1000 random bit pairs, then
// a stream test: an 8-bit MCAS for x1 = 64/256 against an alternating x2
// stream (1/2) must give 256*(1/4 + 1/2 - 2*1/8) = 128 ones.
module tb_sc_xor;
  logic x1, x2, z;
  int checks = 0, failures = 0;

  sc_xor dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ones = 0;
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1 checks++;
      if (z !== (v == 1 || v == 2)) failures++;
    end
    for (int i = 0; i < 256; i++) begin
      x1 = (i < 64);
      x2 = i[0];
      #1 ones += z;
    end
    // random bit pairs, each output bit against the gate function
    for (int i = 0; i < 1000; i++) begin
      {x1, x2} = 2'($urandom_range(3));
      #1 checks++;
      if (z !== (x1 ^ x2)) failures++;
    end
    checks++;
    if (ones != 128) begin failures++; $display("ones=%0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
