// tb_sc_lfsr: checks a 12-bit LFSR step by step against a
// reference LFSR written out here from the polynomial x^12+x^6+x^4+x+1,
// checks that it runs through all 4095 non-zero states exactly once before
// returning to the seed, and that load and hold (en = 0) behave.
module tb_sc_lfsr;
  localparam int unsigned M = 12;
  localparam logic [M-1:0] SEED = 12'hA5C;
  // The default 24-bit register is only stepped against its own reference.
  localparam logic [23:0] SEED24 = 24'h9B_31C7;
  logic [23:0] state24, r24;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [M-1:0] state;
  int checks = 0, failures = 0;
  logic [M-1:0] r;
  bit seen [1 << M];

  sc_lfsr #(.W(M), .SEED(SEED)) dut (.*);
  sc_lfsr #(.SEED(SEED24)) dut24 (.clk, .rst_n, .load, .en, .state(state24));

  always #5 clk = ~clk;

  function automatic logic [M-1:0] ref_step(logic [M-1:0] s);
    return {s[M-2:0], s[11] ^ s[5] ^ s[3] ^ s[0]};
  endfunction

  task automatic check(string what, logic [M-1:0] exp);
    checks++;
    if (state !== exp) begin
      failures++;
      if (failures < 10) $display("%s: state=%h expected %h", what, state, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk) #1 check("reset", SEED);
    @(negedge clk) rst_n = 1;
    r = SEED;
    en = 1;
    for (int i = 0; i < (1 << M) - 1; i++) begin
      checks++;
      if (seen[state] || state == 0) begin
        failures++;
        if (failures < 10) $display("state %h repeated or zero at step %0d", state, i);
      end
      seen[state] = 1;
      @(negedge clk);
      r = ref_step(r);
      check("step", r);
    end
    check("period", SEED);
    // 24-bit default: x^24+x^23+x^22+x^17+1, compared step by step
    en = 0; load = 1;
    @(negedge clk);
    load = 0; en = 1;
    r24 = SEED24;
    for (int i = 0; i < 5000; i++) begin
      checks++;
      if (state24 !== r24) begin
        failures++;
        if (failures < 10) $display("24-bit step %0d: %h expected %h", i, state24, r24);
      end
      @(negedge clk);
      r24 = {r24[22:0], r24[23] ^ r24[22] ^ r24[21] ^ r24[16]};
    end
    load = 1;
    @(negedge clk);
    load = 0;
    check("reload", SEED);
    en = 1;
    for (int i = 0; i < 4095; i++) @(negedge clk);
    check("period 2", SEED);
    // hold
    en = 0;
    repeat (3) @(negedge clk);
    check("hold", SEED);
    en = 1;
    repeat (37) @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    check("load", SEED);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
