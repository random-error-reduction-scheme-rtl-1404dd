// sc_mux: N-input stochastic multiplexer, z = d[sel].
//
// With N = 2 and a select stream S it is the scaled adder
// z = s*x1 + (1-s)*x2 (d[1] = X1, d[0] = X2, sel = S). In the Bernstein
// circuit the select is the binary count of ones of the x streams and the
// data inputs are the coefficient streams. A select value of N or more
// gives 0 (cannot happen in either use). Combinational.
module sc_mux #(
  parameter int unsigned N  = 2,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  d,
  input  logic [SW-1:0] sel,
  output logic          z
);

  always_comb begin
    z = 1'b0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SW'(i)) z = d[i];
  end

endmodule
