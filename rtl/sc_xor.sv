// sc_xor: stochastic XOR, computing z = x1 + x2 - 2*x1*x2 for uncorrelated
// input streams. Neither input is a positive input stream, so the
// reduction scheme makes exactly one of them an MCAS (X1) and the other a
// BS. Combinational.
module sc_xor (
  input  logic x1,
  input  logic x2,
  output logic z
);

  assign z = x1 ^ x2;

endmodule
