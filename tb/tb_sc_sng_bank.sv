// tb_sc_sng_bank: a bank of four 7-bit generators with state vector
// (MCAS, BS, MCAS, BS). The testbench drives the shared counter itself and
// checks every bit of every stream: MCAS inputs against nE_X > counter, BS
// inputs against the upper 7 bits of reference 14-bit LFSRs
// (x^14+x^5+x^3+x+1) started at the seeds the bank documents,
// sc_pkg::lfsr_seed(2M, SEED_BASE + r), and reloaded for every stream.
module tb_sc_sng_bank;
  localparam int unsigned M = 7;
  localparam int unsigned K = 4;
  localparam int unsigned W = 2 * M;
  localparam logic [K-1:0] V = 4'b1010;
  localparam int unsigned BASE = 5;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [M-1:0] count = 0;
  logic [2:0] len_log2 = 3'd7;
  logic [M:0] nex [K];
  logic [K-1:0] x;
  int checks = 0, failures = 0;

  sc_sng_bank #(.M(M), .K(K), .V_BS(V), .SEED_BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] r [K];
    int ones [K];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 20; s++) begin
      @(negedge clk);
      for (int q = 0; q < K; q++) begin
        nex[q] = (M+1)'($urandom % ((1 << M) + 1));
        r[q] = W'(sc_pkg::lfsr_seed(W, BASE + q));
        ones[q] = 0;
      end
      if (s == 0) begin nex[0] = 0; nex[1] = 1 << M; end
      load = 1;
      @(negedge clk);
      load = 0; en = 1; count = 0;
      for (int i = 0; i < (1 << M); i++) begin
        #1;  // let the combinational outputs follow the new counter value
        for (int q = 0; q < K; q++) begin
          logic e;
          e = V[q] ? (int'(nex[q]) > int'(r[q][W-1:M])) : (int'(nex[q]) > i);
          checks++;
          if (x[q] !== e) begin
            failures++;
            if (failures < 10) $display("stream %0d in %0d bit %0d: %0b expected %0b", s, q, i, x[q], e);
          end
          ones[q] += x[q];
        end
        @(negedge clk);
        count = count + 1'b1;
        for (int q = 0; q < K; q++) r[q] = {r[q][W-2:0], r[q][13] ^ r[q][4] ^ r[q][2] ^ r[q][0]};
      end
      en = 0;
      for (int q = 0; q < K; q++) begin
        checks++;
        if (ones[q] < int'(nex[q]) - 40 || ones[q] > int'(nex[q]) + 40) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
