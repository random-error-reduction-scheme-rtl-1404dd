// sc_bs_gen: BS generator, an LFSR and a comparator.
//
// x = 1 while nE_X > r, where r is the upper len_log2 bits of a W-bit LFSR
// (the upper M bits shifted right by M - len_log2). Each r is close to
// uniform on 0..n-1 for a stream of n = 2^len_log2 bits, so every bit of
// the stream is 1 with probability nE_X / n and the ones are scattered like
// a Bernoulli sequence. W defaults to 2M: the LFSR period (2^(2M) - 1) is
// then about the square of the longest stream, so a stream sees only a
// small part of the cycle and its count of ones fluctuates like that of a
// Bernoulli sequence instead of being fixed by a full LFSR period. That
// default is how this design reads the evaluation set-up; W = M with
// len_log2 = M gives the plain n-bit LFSR of the generator diagram.
//
// Interface: `load` reseeds the LFSR, `en` advances one bit; x is
// combinational from the LFSR register, nex and len_log2 (values above M
// act as M). nex is M+1 bits so that E_X = 1 (nex = n, all ones) can be
// expressed (this design's choice). The lower W - M LFSR bits only feed
// the LFSR itself, never the comparator, so lint reports them as unused.
module sc_bs_gen #(
  parameter int unsigned  M    = 12,
  parameter int unsigned  W    = 2 * M,
  parameter int unsigned  LB   = $clog2(M + 1),
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          en,
  input  logic [LB-1:0] len_log2,
  input  logic [M:0]    nex,
  output logic          x
);

  logic [W-1:0] r;
  logic [M-1:0] r_len;

  sc_lfsr #(.W(W), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .en   (en),
    .state(r)
  );

  always_comb begin
    if (int'(len_log2) >= M) r_len = r[W-1 -: M];
    else                     r_len = r[W-1 -: M] >> (M - int'(len_log2));
  end

  assign x = (nex > {1'b0, r_len});

endmodule
