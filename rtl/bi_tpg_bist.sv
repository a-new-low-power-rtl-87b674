// Low-power test-per-scan BIST built around the bit-interchanging TPG.
//
// An N-bit LFSR (polynomial x^N + x + 1) produces a pseudo-random pattern q.
// The BI-TPG network interchanges adjacent bit pairs of q wherever that removes
// a transition, giving tp, which has the same 1s and 0s but fewer neighbour
// transitions. tp is loaded into the scan-in register and shifted MSB first
// into the scan chain of the circuit under test through scan_in, so fewer
// transitions ripple down the chain while shifting. The chain's serial output
// scan_out is compacted by a signature register. bist_ctrl sequences load,
// N shift clocks (scan_en high) and one capture clock (scan_en low) per
// pattern, for NUM_PATTERNS patterns, then unloads the last response.
// The LFSR -> BI-TPG -> register -> scan chain -> response analyzer path follows
// the document; the controller and the signature register are this design's.
//
// Interface: the circuit under test is outside this module; connect scan_in to
// the head of its scan chain, scan_out from its tail, and use scan_en as the
// chain's shift/capture select. Pulse start to begin a test run; done rises
// 1 + NUM_PATTERNS*(N+1) + N clocks after start is sampled and holds the final
// signature until the next start. lfsr_q and tp show the pattern before and
// after interchange, swap which cells interchanged, state the controller state.
module bi_tpg_bist
  import bi_tpg_pkg::*;
#(
  parameter int unsigned  N            = DEFAULT_SCAN_LEN,
  parameter int unsigned  NUM_PATTERNS = 63,
  parameter int unsigned  SIG_W        = 16,
  parameter logic [N-1:0] SEED         = {{(N-1){1'b0}}, 1'b1},
  localparam int unsigned NCELL        = bi_num_cells(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             scan_en,
  output logic             scan_in,
  input  logic             scan_out,
  output logic [SIG_W-1:0] signature,
  output logic [N-1:0]     lfsr_q,
  output logic [N-1:0]     tp,
  output logic [NCELL-1:0] swap,
  output bist_state_t      state
);

  logic        lfsr_init, lfsr_en, reg_load, reg_shift, ra_clear, ra_en;

  bist_ctrl #(.N(N), .NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst_n, .start,
    .lfsr_init, .lfsr_en, .reg_load, .reg_shift, .scan_en,
    .ra_clear, .ra_en, .busy, .done, .state
  );

  lfsr #(.N(N), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .init(lfsr_init), .en(lfsr_en), .q(lfsr_q)
  );

  bi_tpg #(.N(N)) u_bi_tpg (
    .q(lfsr_q), .tp, .swap
  );

  scan_in_reg #(.N(N)) u_sreg (
    .clk, .rst_n, .load(reg_load), .shift(reg_shift), .d(tp),
    .scan_in, .q()
  );

  sisr #(.W(SIG_W)) u_ra (
    .clk, .rst_n, .clear(ra_clear), .en(ra_en), .din(scan_out), .sig(signature)
  );

endmodule
