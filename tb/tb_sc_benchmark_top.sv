// tb_sc_benchmark_top: end-to-end test of the benchmark top at its default
// size (streams of 4096 bits, 12-bit counter and LFSRs).
//
// Each operation picks values for all four circuits, pulses start and waits
// for done. The testbench then checks:
//  - the latency, done exactly n + 1 clocks after the start edge;
//  - every ones count against a bit-exact model written here: MCAS bit i is
//    (nE_X > i), BS bits compare nE_X with the upper 12 bits of reference
//    24-bit LFSRs (x^24+x^23+x^22+x^17+1) started at the seeds
//    sc_pkg::lfsr_seed gives and kept running across streams, and the
//    circuits' Boolean functions;
//  - every result against the real-valued function within 0.05.
// Operations cover the document's B1 (gamma correction) and B2
// coefficients, the end values E_X = 0 and E_X = 1, streams of 32 and 256
// bits between 4096-bit ones, and a start pulse during a running stream,
// which must be ignored. Each of those events is
// counted and a failure is counted for one that never happened.
module tb_sc_benchmark_top;
  localparam int unsigned M = 12;
  localparam int unsigned N = 1 << M;
  localparam int unsigned W = 2 * M;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] len_log2 = 4'd12;
  int unsigned n_run = N;
  logic busy, done;
  logic [M:0] and_nex [2], xor_nex [2], b1_coef_nex [7], b2_coef_nex [4];
  logic [M:0] b1_x_nex, b2_x_nex;
  logic [M:0] and_ones, xor_ones, b1_ones, b2_ones;

  int checks = 0, failures = 0;
  int ev_ignored_start = 0, ev_full = 0, ev_zero = 0, ev_paper_coef = 0;
  int ev_short = 0;

  sc_benchmark_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40 * (N + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- reference model
  function automatic logic [W-1:0] lstep(logic [W-1:0] s);
    return {s[W-2:0], s[23] ^ s[22] ^ s[21] ^ s[16]};
  endfunction

  function automatic real bern(int k, real b [], real x);
    real s = 0.0;
    for (int i = 0; i <= k; i++) begin
      real c = 1.0;
      for (int j = 0; j < i; j++) c = c * real'(k - j) / real'(j + 1);
      s += b[i] * c * (x ** i) * ((1.0 - x) ** (k - i));
    end
    return s;
  endfunction

  // Reference LFSR states of the BS inputs. The LFSRs are seeded by reset
  // and run freely from stream to stream, so the model keeps them too.
  logic [W-1:0] ra, rx, r1 [6], r2 [3];
  initial begin
    ra = W'(sc_pkg::lfsr_seed(W, 0 + 1));
    rx = W'(sc_pkg::lfsr_seed(W, 2 + 1));
    for (int q = 0; q < 6; q++) r1[q] = W'(sc_pkg::lfsr_seed(W, 4 + 7 + q));
    for (int q = 0; q < 3; q++) r2[q] = W'(sc_pkg::lfsr_seed(W, 17 + 4 + q));
  end

  function automatic int top_bits(logic [W-1:0] r);
    return int'(r[W-1:W-M]) >> (M - int'(len_log2));
  endfunction

  function automatic logic [M:0] full();
    return (M+1)'(n_run);
  endfunction

  // ones of AND, XOR, B1, B2 for the current inputs
  task automatic model(output int e_and, output int e_xor, output int e_b1, output int e_b2);
    e_and = 0; e_xor = 0; e_b1 = 0; e_b2 = 0;
    for (int i = 0; i < n_run; i++) begin
      int n1 = 0, n2 = 0;
      e_and += int'((int'(and_nex[0]) > i) && (int'(and_nex[1]) > top_bits(ra)));
      e_xor += int'((int'(xor_nex[0]) > i) != (int'(xor_nex[1]) > top_bits(rx)));
      for (int q = 0; q < 6; q++) n1 += int'(int'(b1_x_nex) > top_bits(r1[q]));
      for (int q = 0; q < 3; q++) n2 += int'(int'(b2_x_nex) > top_bits(r2[q]));
      e_b1 += int'(int'(b1_coef_nex[n1]) > i);
      e_b2 += int'(int'(b2_coef_nex[n2]) > i);
      ra = lstep(ra); rx = lstep(rx);
      for (int q = 0; q < 6; q++) r1[q] = lstep(r1[q]);
      for (int q = 0; q < 3; q++) r2[q] = lstep(r2[q]);
    end
  endtask

  task automatic check_val(string what, int got, int exp_bits, real exact);
    real tol;
    tol = 2.0 / $sqrt(real'(n_run));
    if (tol < 0.05) tol = 0.05;
    checks++;
    if (got != exp_bits) begin
      failures++;
      $display("%s: %0d ones, model says %0d", what, got, exp_bits);
    end
    checks++;
    if ((real'(got) / n_run - exact) > tol || (exact - real'(got) / n_run) > tol) begin
      failures++;
      $display("%s: %f, exact %f", what, real'(got) / n_run, exact);
    end
  endtask

  task automatic run_op(bit poke_start);
    int lat = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    fork
      begin
        while (!done) begin
          @(negedge clk);
          lat++;
          if (poke_start && lat == n_run / 2) begin
            start = 1;
            @(negedge clk);
            lat++;
            start = 0;
            ev_ignored_start++;
          end
        end
      end
    join
    checks++;
    if (lat != n_run) begin
      failures++;
      $display("done %0d clocks after start edge, expected %0d", lat + 1, n_run + 1);
    end
  endtask

  task automatic check_results();
    int e_and, e_xor, e_b1, e_b2;
    real b1 [] = new[7];
    real b2 [] = new[4];
    real a0, a1, x0, x1;
    model(e_and, e_xor, e_b1, e_b2);
    a0 = real'(and_nex[0]) / n_run; a1 = real'(and_nex[1]) / n_run;
    x0 = real'(xor_nex[0]) / n_run; x1 = real'(xor_nex[1]) / n_run;
    for (int i = 0; i < 7; i++) b1[i] = real'(b1_coef_nex[i]) / n_run;
    for (int i = 0; i < 4; i++) b2[i] = real'(b2_coef_nex[i]) / n_run;
    check_val("AND", int'(and_ones), e_and, a0 * a1);
    check_val("XOR", int'(xor_ones), e_xor, x0 + x1 - 2.0 * x0 * x1);
    check_val("B1", int'(b1_ones), e_b1, bern(6, b1, real'(b1_x_nex) / n_run));
    check_val("B2", int'(b2_ones), e_b2, bern(3, b2, real'(b2_x_nex) / n_run));
  endtask

  function automatic logic [M:0] q(real v);
    return (M+1)'(int'(v * n_run + 0.5));
  endfunction

  function automatic logic [M:0] rnd();
    return (M+1)'($urandom % (n_run + 1));
  endfunction

  // Sets the ports, runs one stream and checks it. Inputs are held on the
  // ports for the whole stream so the model sees what was captured.
  initial begin
    static real pb1 [7] = '{0.0955, 0.7207, 0.3476, 0.9988, 0.7017, 0.9695, 0.9939};
    static real pb2 [4] = '{0.2500, 0.6250, 0.3750, 0.7500};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 14; op++) begin
      // two short streams (n = 32 and n = 256) between full-length ones
      len_log2 = (op == 5) ? 4'd5 : (op == 8) ? 4'd8 : 4'd12;
      n_run = 1 << len_log2;
      if (len_log2 != 4'd12) ev_short++;
      for (int i = 0; i < 2; i++) begin and_nex[i] = rnd(); xor_nex[i] = rnd(); end
      b1_x_nex = rnd(); b2_x_nex = rnd();
      if (op % 2 == 0) begin
        for (int i = 0; i < 7; i++) b1_coef_nex[i] = q(pb1[i]);
        for (int i = 0; i < 4; i++) b2_coef_nex[i] = q(pb2[i]);
        ev_paper_coef++;
      end else begin
        for (int i = 0; i < 7; i++) b1_coef_nex[i] = rnd();
        for (int i = 0; i < 4; i++) b2_coef_nex[i] = rnd();
      end
      if (op == 1) begin
        and_nex = '{full(), full()}; xor_nex = '{full(), 0}; b1_x_nex = full(); b2_x_nex = 0;
        ev_full++; ev_zero++;
      end
      if (op == 2) begin
        and_nex = '{0, full()}; xor_nex = '{0, 0}; b1_x_nex = 0; b2_x_nex = full();
        ev_full++; ev_zero++;
      end
      run_op(op == 3);
      check_results();
      checks++;
      if (busy) failures++;
    end
    checks += 5;
    if (ev_short == 0) begin failures++; $display("no short stream"); end
    if (ev_ignored_start == 0) begin failures++; $display("no start during a stream"); end
    if (ev_full == 0) begin failures++; $display("E_X = 1 never used"); end
    if (ev_zero == 0) begin failures++; $display("E_X = 0 never used"); end
    if (ev_paper_coef == 0) begin failures++; $display("document coefficients never used"); end
    $display("events: ignored start %0d, E_X=1 %0d, E_X=0 %0d, document coefficients %0d, short streams %0d",
             ev_ignored_start, ev_full, ev_zero, ev_paper_coef, ev_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
