// sc_mcas_gen: MCAS generator, the comparator half of the MCAS generator
// (its up counter is sc_upcounter, shared by all MCAS generators).
//
// x = 1 while nE_X > count. With the counter walking 0..2^M-1 the stream
// is nE_X ones followed by 2^M - nE_X zeros: a maximal concentrated
// autocorrelation sequence. nex is one bit wider than the counter so that
// E_X = 1 (nex = 2^M, all ones) can be expressed; that extra bit is this
// design's choice. Purely combinational.
module sc_mcas_gen #(
  parameter int unsigned M = 12
) (
  input  logic [M:0]   nex,
  input  logic [M-1:0] count,
  output logic         x
);

  assign x = (nex > {1'b0, count});

endmodule
