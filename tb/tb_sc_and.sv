// tb_sc_and: truth table of the stochastic multiplier, an 8-bit worked
// example (10101010 AND 10111101 = 10101000), then a stream test:
// an 8-bit MCAS for x1 = 96/256 against an alternating x2 stream (1/2)
// must give exactly 48 ones. 1000 random bit pairs are also checked one by one.
module tb_sc_and;
  logic x1, x2, z;
  int checks = 0, failures = 0;

  sc_and dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ones = 0;
    static logic [7:0] x1p = 8'b1010_1010, x2p = 8'b1011_1101, zp;
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1 checks++;
      if (z !== (v == 3)) failures++;
    end
    for (int i = 0; i < 256; i++) begin
      x1 = (i < 96);
      x2 = i[0];
      #1 ones += z;
    end
    // the worked example: 10101010 AND 10111101 = 10101000
    for (int i = 7; i >= 0; i--) begin
      x1 = x1p[i]; x2 = x2p[i];
      #1 zp[i] = z;
    end
    checks++;
    if (zp !== 8'b1010_1000) begin failures++; $display("AND example gave %b", zp); end
    // random bit pairs, each output bit against the gate function
    for (int i = 0; i < 1000; i++) begin
      {x1, x2} = 2'($urandom_range(3));
      #1 checks++;
      if (z !== (x1 & x2)) failures++;
    end
    checks++;
    if (ones != 48) begin failures++; $display("ones=%0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
