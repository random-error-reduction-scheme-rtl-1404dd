// sc_upcounter: the M-bit up counter shared by all MCAS generators.
//
// An MCAS generator compares nE_X with this counter, so bit i of every MCAS
// stream (i = 1..n) is produced while the counter holds i-1. One counter
// serves any number of MCAS generators, which is what makes the MCAS side of
// the scheme cheaper than the BS side (one LFSR per BS generator). Because
// it walks through 0..n-1 exactly once per stream, its `last` flag also
// marks the final bit of the stream for the sequencer.
//
// The stream length is n = 2^len_log2, chosen at run time (0 <= len_log2
// <= M; larger values act as M), so one circuit serves every length up to
// 2^M. `last` is high while count = n-1.
//
// Interface: `clear` forces 0 (takes priority), `en` advances by one and
// wraps after 2^M-1. `count` comes straight from the register, `last` is a
// compare on it. Reset value 0, the synchronous clear and the run-time
// length are this design's choices.
module sc_upcounter #(
  parameter int unsigned M  = 12,
  parameter int unsigned LB = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic [LB-1:0] len_log2,
  output logic [M-1:0]  count,
  output logic          last
);

  logic [M-1:0] top_index;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (en)    count <= count + 1'b1;
  end

  // n-1 = 2^len_log2 - 1: all ones in the low len_log2 bits
  always_comb begin
    top_index = '0;
    for (int unsigned b = 0; b < M; b++)
      top_index[b] = (b < int'(len_log2));
  end

  assign last = (count == top_index);

endmodule
