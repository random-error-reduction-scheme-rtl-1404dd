// tb_sc_random_error: the random-error evaluation of the reduction scheme.
//
// Two copies of the benchmark top are built at their default size: one
// with the MCAS/BS state vectors of the scheme, one with every input a BS
// (the conventional generation). Each runs every stream length 2^m,
// m = 5..12, selected at run time. Both get the same
// SAMPLES pseudo-random sample points: uniform values for the AND and XOR
// inputs and for x, and the fixed coefficients of B1 (degree 6, gamma
// correction) and B2 (degree 3). The random error of a configuration is the
// mean of |result - exact value| over the sample points, the exact value
// being computed in real arithmetic from the same quantised inputs.
//
// Checks: every run finishes with done after 2^m + 1 clocks, the scheme's
// random error is below the all-BS error for every circuit and length, and
// the scheme's error is below 0.5/sqrt(n) (a loose bound: a Bernoulli
// stream of probability 1/2 has a mean absolute error of 0.4/sqrt(n)).
module tb_sc_random_error;
  localparam int SAMPLES = 5000;
  localparam int NM = 8;          // m = 5..12
  localparam int M0 = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real err [2][NM][4];            // [all-BS, scheme][m][AND, XOR, B1, B2]
  bit  fin [2][NM];

  initial begin
    #(64'd10 * SAMPLES * 9000 + 64'd100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Deterministic pseudo-random integer in 0..n for sample s, input j.
  function automatic int unsigned pick(int unsigned s, int unsigned j, int unsigned n);
    logic [31:0] h;
    h = (s * 32'd2654435761) ^ (j * 32'd40503) ^ 32'h1234_5678;
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    return h % (n + 1);
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

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int unsigned M = 12;
    logic start = 0, busy, done;
    logic [3:0] len_log2;
    logic [M:0] and_nex [2], xor_nex [2], b1_coef_nex [7], b2_coef_nex [4];
    logic [M:0] b1_x_nex, b2_x_nex;
    logic [M:0] and_ones, xor_ones, b1_ones, b2_ones;

    // default size; only the state vectors differ between the two copies
    sc_benchmark_top #(
      .V_AND(c ? 2'b10 : 2'b11),
      .V_XOR(c ? 2'b10 : 2'b11),
      .V_B1 (c ? 13'b1_1111_1000_0000 : 13'h1FFF),
      .V_B2 (c ? 7'b111_0000 : 7'h7F)
    ) dut (.*);

    initial begin
      static real pb1 [7] = '{0.0955, 0.7207, 0.3476, 0.9988, 0.7017, 0.9695, 0.9939};
      static real pb2 [4] = '{0.2500, 0.6250, 0.3750, 0.7500};
      automatic real b1 [] = new[7];
      automatic real b2 [] = new[4];
      automatic real sum [4];
      real a0, a1, x0, x1, v1, v2;
      int lat;
      int unsigned n;
      wait (rst_n);
      for (int g = 0; g < NM; g++) begin
        len_log2 = 4'(M0 + g);
        n = 1 << (M0 + g);
        sum = '{0.0, 0.0, 0.0, 0.0};
        for (int i = 0; i < 7; i++) begin
          b1_coef_nex[i] = (M+1)'(int'(pb1[i] * n + 0.5));
          b1[i] = real'(b1_coef_nex[i]) / n;
        end
        for (int i = 0; i < 4; i++) begin
          b2_coef_nex[i] = (M+1)'(int'(pb2[i] * n + 0.5));
          b2[i] = real'(b2_coef_nex[i]) / n;
        end
        for (int s = 0; s < SAMPLES; s++) begin
          and_nex[0] = (M+1)'(pick(s, 0, n));
          and_nex[1] = (M+1)'(pick(s, 1, n));
          xor_nex[0] = (M+1)'(pick(s, 2, n));
          xor_nex[1] = (M+1)'(pick(s, 3, n));
          b1_x_nex   = (M+1)'(pick(s, 4, n));
          b2_x_nex   = (M+1)'(pick(s, 5, n));
          @(negedge clk) start = 1;
          @(negedge clk) start = 0;
          lat = 1;
          while (!done) begin
            @(negedge clk);
            lat++;
          end
          if (lat != n + 1) begin
            checks++;
            failures++;
            $display("n=%0d: done after %0d clocks", n, lat);
          end
          a0 = real'(and_nex[0]) / n; a1 = real'(and_nex[1]) / n;
          x0 = real'(xor_nex[0]) / n; x1 = real'(xor_nex[1]) / n;
          v1 = real'(b1_x_nex) / n;   v2 = real'(b2_x_nex) / n;
          sum[0] += absr(real'(and_ones) / n - a0 * a1);
          sum[1] += absr(real'(xor_ones) / n - (x0 + x1 - 2.0 * x0 * x1));
          sum[2] += absr(real'(b1_ones) / n - bern(6, b1, v1));
          sum[3] += absr(real'(b2_ones) / n - bern(3, b2, v2));
        end
        for (int b = 0; b < 4; b++) err[c][g][b] = sum[b] / SAMPLES;
        fin[c][g] = 1;
      end
    end
  end

  initial begin
    static string names [4] = '{"AND", "XOR", "B1", "B2"};
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NM; g++) all &= fin[0][g] & fin[1][g];
    end while (!all);
    $display("random error, mean |result - exact| over %0d samples", SAMPLES);
    $display("length   circuit  all-BS    MCAS+BS");
    for (int g = 0; g < NM; g++)
      for (int b = 0; b < 4; b++) begin
        $display("%6d   %-7s  %.5f   %.5f", 1 << (M0 + g), names[b], err[0][g][b], err[1][g][b]);
        checks++;
        if (!(err[1][g][b] < err[0][g][b])) begin
          failures++;
          $display("  scheme not better than all-BS");
        end
        checks++;
        if (err[1][g][b] > 0.5 / $sqrt(real'(1 << (M0 + g)))) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
