// tb_sc_bs_gen: BS generator for 256-bit streams with its default 16-bit
// LFSR. For many n*E_X values (0, 1, 255, 256 and random ones) it reseeds
// the generator, runs one stream and compares every bit with a reference
// made from a separately written LFSR (x^16+x^15+x^13+x^4+1) and the rule
// x = (nE_X > upper 8 LFSR bits). It also checks that the number of ones
// is n*E_X within a statistical margin, and exact at 0 and 256, and runs
// 32-bit streams (len_log2 = 5) that must compare with the upper 5 bits.
module tb_sc_bs_gen;
  localparam int unsigned M = 8;
  localparam int unsigned W = 16;
  localparam logic [W-1:0] SEED = 16'h3B1D;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [M:0] nex = 0;
  logic [3:0] len_log2 = 4'd8;
  logic x;
  int checks = 0, failures = 0;

  sc_bs_gen #(.M(M), .SEED(SEED)) dut (.*);  // W defaults to 2M = 16

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(int v);
    logic [W-1:0] r = SEED;
    int ones = 0;
    @(negedge clk);
    nex = (M+1)'(v);
    load = 1; en = 0;
    @(negedge clk);
    load = 0; en = 1;
    for (int i = 0; i < (1 << M); i++) begin
      checks++;
      if (x !== (v > int'(r[15:8]))) begin
        failures++;
        if (failures < 10) $display("nex=%0d bit %0d x=%0b lfsr=%0d", v, i, x, r);
      end
      ones += x;
      @(negedge clk);
      r = {r[14:0], r[15] ^ r[14] ^ r[12] ^ r[3]};
    end
    en = 0;
    checks++;
    if (ones < v - 40 || ones > v + 40 || ((v == 0 || v == 256) && ones != v)) begin
      failures++;
      $display("nex=%0d gave %0d ones", v, ones);
    end
  endtask

  task automatic run_short(int v);
    logic [W-1:0] r = SEED;
    @(negedge clk);
    nex = (M+1)'(v);
    load = 1; en = 0;
    @(negedge clk);
    load = 0; en = 1;
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (x !== (v > int'(r[15:11]))) begin
        failures++;
        if (failures < 10) $display("n=32 nex=%0d bit %0d x=%0b", v, i, x);
      end
      @(negedge clk);
      r = {r[14:0], r[15] ^ r[14] ^ r[12] ^ r[3]};
    end
    en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // shorter streams: n = 2^5, compare with the upper 5 LFSR bits
    len_log2 = 4'd5;
    for (int k = 0; k < 10; k++) run_short(int'($urandom % 33));
    len_log2 = 4'd8;
    run_stream(0);
    run_stream(1);
    run_stream(255);
    run_stream(256);
    run_stream(128);
    for (int k = 0; k < 40; k++) run_stream(int'($urandom % 257));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
