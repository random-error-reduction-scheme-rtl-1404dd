// tb_sc_mcas_gen: for every n*E_X of a 6-bit stream (0..64) walks the
// counter through one stream and checks that the output is exactly n*E_X
// ones followed by zeros, the definition of an MCAS.
module tb_sc_mcas_gen;
  localparam int unsigned M = 6;
  logic [M:0] nex;
  logic [M-1:0] count;
  logic x;
  int checks = 0, failures = 0;

  sc_mcas_gen #(.M(M)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= (1 << M); v++) begin
      int ones;
      ones = 0;
      nex = (M+1)'(v);
      for (int i = 0; i < (1 << M); i++) begin
        count = M'(i);
        #1;
        checks++;
        if (x !== (i < v)) begin
          failures++;
          if (failures < 10) $display("nex=%0d i=%0d x=%0b", v, i, x);
        end
        ones += x;
      end
      checks++;
      if (ones != v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
