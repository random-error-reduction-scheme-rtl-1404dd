// sc_lfsr: W-bit maximal-length Fibonacci LFSR, the random source of one
// BS generator.
//
// The register shifts towards its MSB and takes the XOR of the tapped bits
// (sc_pkg::lfsr_taps) into bit 0, so from any non-zero seed it visits all
// 2^W-1 non-zero values before repeating. Every BS generator owns one LFSR;
// they all use the same polynomial and differ only in SEED.
//
// Interface: `load` (priority) and reset put SEED in the register, `en`
// shifts one step per clock; `state` is the register itself. The polynomial
// choice and the reset-to-seed behaviour are this design's own.
module sc_lfsr #(
  parameter int unsigned  W    = 24,
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] state
);

  localparam logic [W-1:0] TAPS = W'(sc_pkg::lfsr_taps(W));

  logic fb;

  initial begin
    assert (TAPS != '0) else $fatal(1, "sc_lfsr: no tap set for W=%0d", W);
    assert (SEED != '0) else $fatal(1, "sc_lfsr: SEED must be non-zero");
  end

  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[W-2:0], fb};
  end

endmodule
