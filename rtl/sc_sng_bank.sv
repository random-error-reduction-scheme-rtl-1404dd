// sc_sng_bank: the input stream generators of one stochastic circuit.
//
// Input r (r = 0..K-1, stream X_{r+1}) is generated from nex[r] = n*E_X.
// Bit r of the state-vector parameter V_BS selects its sequence type (the
// default makes X_1..X_{K-1} MCAS and X_K a BS, the AND/XOR scheme for K=2):
//   0 - MCAS: a comparator against the shared up counter (count input),
//   1 - BS:   an own LW-bit LFSR plus comparator, seeded with
//             sc_pkg::lfsr_seed(LW, SEED_BASE + r).
// The reduction scheme chooses V so that no product term of the circuit's
// Boolean function sees two MCAS factors and only positive inputs are MCAS;
// the bank just builds whatever V says.
//
// Interface: `load` restarts all LFSRs at their seeds, `en` advances one
// stream bit; the up counter must be cleared and advanced in the same
// cycles. len_log2 sets the stream length n = 2^len_log2 (nex counts ones
// out of n). x is combinational from the registers and nex. The seed spreading
// is this design's choice; the document only asks for different seeds.
module sc_sng_bank #(
  parameter int unsigned   M         = 12,
  parameter int unsigned   LW        = 2 * M,
  parameter int unsigned   K         = 2,
  parameter logic [K-1:0]  V_BS      = K'(1) << (K - 1),
  parameter int unsigned   SEED_BASE = 0,
  parameter int unsigned   LB        = $clog2(M + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  input  logic [LB-1:0] len_log2,
  input  logic [M-1:0] count,
  input  logic [M:0]   nex [K],
  output logic [K-1:0] x
);

  for (genvar r = 0; r < K; r++) begin : g_in
    if (V_BS[r] == sc_pkg::SEQ_BS) begin : g_bs
      sc_bs_gen #(
        .M   (M),
        .W   (LW),
        .LB  (LB),
        .SEED(LW'(sc_pkg::lfsr_seed(LW, SEED_BASE + r)))
      ) u_bs (
        .clk  (clk),
        .rst_n(rst_n),
        .load (load),
        .en   (en),
        .len_log2(len_log2),
        .nex  (nex[r]),
        .x    (x[r])
      );
    end else begin : g_mcas
      sc_mcas_gen #(.M(M)) u_mcas (
        .nex  (nex[r]),
        .count(count),
        .x    (x[r])
      );
    end
  end

endmodule
