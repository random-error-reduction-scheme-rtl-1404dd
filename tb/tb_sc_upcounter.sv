// tb_sc_upcounter: drives clear/enable and the stream length (len_log2 =
// 0..7, where 6 and 7 must act as 5) at random into the shared up counter
// (M = 5, so it wraps often) and compares count and last against a
// reference counter kept in the testbench every cycle.
module tb_sc_upcounter;
  localparam int unsigned M = 5;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [M-1:0] count;
  logic [2:0] len_log2 = 3'd5;
  logic last;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned ref_cnt = 0;

  sc_upcounter #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (count != M'(ref_cnt) || last != (ref_cnt == (1 << ((len_log2 > M) ? M : len_log2)) - 1)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count=%0d last=%0b expected %0d", c, count, last, ref_cnt);
      end
      clear = ($urandom % 200) == 0;
      en    = ($urandom % 8) != 0;
      if (($urandom % 50) == 0) len_log2 = 3'($urandom);
      @(posedge clk);
      #1;
      if (clear) ref_cnt = 0;
      else if (en) begin
        if (ref_cnt == (1 << M) - 1) wraps++;
        ref_cnt = (ref_cnt + 1) % (1 << M);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
