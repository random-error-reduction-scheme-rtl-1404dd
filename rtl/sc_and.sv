// sc_and: stochastic multiplier. For two uncorrelated input streams of
// probabilities x1 and x2, the AND of each bit pair is 1 with probability
// x1*x2. In the reduction scheme X1 is an MCAS and X2 a BS (only one
// factor of the single product term may be an MCAS). Combinational.
module sc_and (
  input  logic x1,
  input  logic x2,
  output logic z
);

  assign z = x1 & x2;

endmodule
