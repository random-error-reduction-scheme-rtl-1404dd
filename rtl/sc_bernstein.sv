// sc_bernstein: stochastic logic for a Bernstein polynomial of degree K,
//   B_K(x) = sum_{i=0..K} b_i * C(K,i) * x^i * (1-x)^(K-i).
//
// Inputs are 2K+1 streams: the coefficient streams X_1..X_{K+1} (values
// b_0..b_K, port coef[0..K]) and K independent streams X_{K+2}..X_{2K+1}
// that all carry x (port xs[0..K-1]). Each clock an adder counts the ones
// among the x bits; that count, which is i with probability
// C(K,i) x^i (1-x)^(K-i), selects coefficient stream i through a (K+1)-input
// multiplexer. The output bit is therefore 1 with probability B_K(x).
// Under the reduction scheme the coefficient streams are MCAS and the x
// streams BS. Combinational: the output bit is valid in the cycle of its
// input bits.
module sc_bernstein #(
  parameter int unsigned K = 6
) (
  input  logic [K:0]   coef,
  input  logic [K-1:0] xs,
  output logic         z
);

  localparam int unsigned SW = $clog2(K + 1);

  logic [SW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < K; i++) ones = ones + SW'(xs[i]);
  end

  sc_mux #(.N(K + 1), .SW(SW)) u_mux (
    .d  (coef),
    .sel(ones),
    .z  (z)
  );

endmodule
