// sc_benchmark_top: the four benchmark stochastic circuits, each fed by
// input stream generators chosen by the MCAS/BS random error reduction
// scheme, run together for one stream of n = 2^len_log2 bits (up to 2^M).
//
//   AND  z = x1*x2                     X1 MCAS, X2 BS
//   XOR  z = x1 + x2 - 2*x1*x2         X1 MCAS, X2 BS
//   B1   Bernstein, degree 6 (13 in)   X1..X7 MCAS (b0..b6), X8..X13 BS (x)
//   B2   Bernstein, degree 3 (7 in)    X1..X4 MCAS (b0..b3), X5..X7 BS (x)
//
// All MCAS generators share one up counter (sc_upcounter); every BS
// generator has its own LW-bit LFSR (default 2M bits) with its own seed.
// The LFSRs are seeded by reset and then run freely, one step per stream
// bit, so successive streams of the same value differ as successive
// Bernoulli sequences would (the load input of the banks is unused here).
// The per-circuit state vectors are parameters (bit r = 1 makes X_{r+1} a
// BS) so that the same top can also be built with every input a BS for
// comparison.
//
// Operation: pulse `start` while idle. At that clock edge the stream length
// n = 2^len_log2 and the n*E_X inputs are captured, and the counter and the
// ones-counters are cleared. The next n clocks each produce one bit of
// every stream (busy = 1). One clock after the last bit, `done` pulses for
// a cycle and the *_ones outputs hold the number of ones of each output
// stream (the result is *_ones / n) until the next start. `done` thus
// follows the start edge by n + 1 clocks. start is ignored while busy.
//
// The sequencer, the input capture, the handshake and the run-time length
// are this design's own; the generators, circuits and scheme follow the
// document. Verilator notes that rst_n is used both as an asynchronous
// reset and in the assertions' disable condition; that is intended.
module sc_benchmark_top #(
  parameter int unsigned M        = 12,
  parameter int unsigned LW       = 2 * M,
  parameter logic [1:0]  V_AND    = 2'b10,
  parameter logic [1:0]  V_XOR    = 2'b10,
  parameter logic [12:0] V_B1     = 13'b1_1111_1000_0000,
  parameter logic [6:0]  V_B2     = 7'b111_0000,
  parameter int unsigned LB       = $clog2(M + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // stream length n = 2^len_log2, 0..M (larger values act as M)
  input  logic [LB-1:0] len_log2,
  // n*E_X of each input value (M+1 bits, 0..n)
  input  logic [M:0] and_nex [2],
  input  logic [M:0] xor_nex [2],
  input  logic [M:0] b1_coef_nex [7],
  input  logic [M:0] b1_x_nex,
  input  logic [M:0] b2_coef_nex [4],
  input  logic [M:0] b2_x_nex,
  // number of ones in each output stream, valid from done
  output logic [M:0] and_ones,
  output logic [M:0] xor_ones,
  output logic [M:0] b1_ones,
  output logic [M:0] b2_ones
);

  localparam int unsigned B1_DEG = 6;
  localparam int unsigned B2_DEG = 3;

  typedef enum logic {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } state_e;

  state_e       state;
  logic         go;
  logic         en;
  logic         last;
  logic [M-1:0] count;
  logic [LB-1:0] len_q;

  // Captured inputs, expanded to one n*E_X per generator.
  logic [M:0] and_in [2];
  logic [M:0] xor_in [2];
  logic [M:0] b1_in  [2*B1_DEG+1];
  logic [M:0] b2_in  [2*B2_DEG+1];

  logic [1:0]          and_x, xor_x;
  logic [2*B1_DEG:0]   b1_x;
  logic [2*B2_DEG:0]   b2_x;
  logic                and_z, xor_z, b1_z, b2_z;

  // ---------------------------------------------------------------- control
  assign go   = start && (state == ST_IDLE);
  assign en   = (state == ST_RUN);
  assign busy = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) state <= ST_RUN;
        ST_RUN:  if (last) begin
          state <= ST_IDLE;
          done  <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2; i++) begin
        and_in[i] <= '0;
        xor_in[i] <= '0;
      end
      for (int i = 0; i < 2*B1_DEG+1; i++) b1_in[i] <= '0;
      for (int i = 0; i < 2*B2_DEG+1; i++) b2_in[i] <= '0;
      len_q <= LB'(M);
    end else if (go) begin
      len_q  <= (int'(len_log2) > M) ? LB'(M) : len_log2;
      and_in <= and_nex;
      xor_in <= xor_nex;
      for (int i = 0; i <= B1_DEG; i++) b1_in[i] <= b1_coef_nex[i];
      for (int i = B1_DEG + 1; i < 2*B1_DEG+1; i++) b1_in[i] <= b1_x_nex;
      for (int i = 0; i <= B2_DEG; i++) b2_in[i] <= b2_coef_nex[i];
      for (int i = B2_DEG + 1; i < 2*B2_DEG+1; i++) b2_in[i] <= b2_x_nex;
    end
  end

  // Shared up counter of all MCAS generators; it also times the stream.
  sc_upcounter #(.M(M)) u_count (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(go),
    .en   (en),
    .len_log2(len_q),
    .count(count),
    .last (last)
  );

  // --------------------------------------------------------- AND benchmark
  sc_sng_bank #(.M(M), .LW(LW), .K(2), .V_BS(V_AND), .SEED_BASE(0)) u_and_gen (
    .clk(clk), .rst_n(rst_n), .load(1'b0), .en(en), .len_log2(len_q), .count(count),
    .nex(and_in), .x(and_x)
  );
  sc_and u_and (.x1(and_x[0]), .x2(and_x[1]), .z(and_z));
  sc_stream_counter #(.M(M)) u_and_cnt (
    .clk(clk), .rst_n(rst_n), .clear(go), .en(en), .z(and_z), .ones(and_ones)
  );

  // --------------------------------------------------------- XOR benchmark
  sc_sng_bank #(.M(M), .LW(LW), .K(2), .V_BS(V_XOR), .SEED_BASE(2)) u_xor_gen (
    .clk(clk), .rst_n(rst_n), .load(1'b0), .en(en), .len_log2(len_q), .count(count),
    .nex(xor_in), .x(xor_x)
  );
  sc_xor u_xor (.x1(xor_x[0]), .x2(xor_x[1]), .z(xor_z));
  sc_stream_counter #(.M(M)) u_xor_cnt (
    .clk(clk), .rst_n(rst_n), .clear(go), .en(en), .z(xor_z), .ones(xor_ones)
  );

  // ---------------------------------------------- B1: Bernstein, degree 6
  sc_sng_bank #(.M(M), .LW(LW), .K(2*B1_DEG+1), .V_BS(V_B1), .SEED_BASE(4)) u_b1_gen (
    .clk(clk), .rst_n(rst_n), .load(1'b0), .en(en), .len_log2(len_q), .count(count),
    .nex(b1_in), .x(b1_x)
  );
  sc_bernstein #(.K(B1_DEG)) u_b1 (
    .coef(b1_x[B1_DEG:0]), .xs(b1_x[2*B1_DEG:B1_DEG+1]), .z(b1_z)
  );
  sc_stream_counter #(.M(M)) u_b1_cnt (
    .clk(clk), .rst_n(rst_n), .clear(go), .en(en), .z(b1_z), .ones(b1_ones)
  );

  // ---------------------------------------------- B2: Bernstein, degree 3
  sc_sng_bank #(.M(M), .LW(LW), .K(2*B2_DEG+1), .V_BS(V_B2), .SEED_BASE(17)) u_b2_gen (
    .clk(clk), .rst_n(rst_n), .load(1'b0), .en(en), .len_log2(len_q), .count(count),
    .nex(b2_in), .x(b2_x)
  );
  sc_bernstein #(.K(B2_DEG)) u_b2 (
    .coef(b2_x[B2_DEG:0]), .xs(b2_x[2*B2_DEG:B2_DEG+1]), .z(b2_z)
  );
  sc_stream_counter #(.M(M)) u_b2_cnt (
    .clk(clk), .rst_n(rst_n), .clear(go), .en(en), .z(b2_z), .ones(b2_ones)
  );

  // -------------------------------------------------------------- checks
  // done is a one-cycle pulse, never raised while a stream is running, and
  // a stream ends exactly when the shared counter reaches its last value.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !busy);
  a_end_on_last: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && last) |=> (done && !busy));

endmodule
