// sc_stream_counter: converts an output stream back to a number by counting
// its ones, z' = ones / 2^M.
//
// `clear` (priority) zeroes the count at the start of a stream, and every
// cycle with `en` high adds the current bit z. M+1 bits hold the full range
// 0..2^M. The count stays put while en is low, so it can be read after the
// stream has ended. Reset value and clear are this design's choices.
module sc_stream_counter #(
  parameter int unsigned M = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       z,
  output logic [M:0] ones
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ones <= '0;
    else if (clear)  ones <= '0;
    else if (en & z) ones <= ones + 1'b1;
  end

endmodule
