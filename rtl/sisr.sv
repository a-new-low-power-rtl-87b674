// Response analyzer: serial-input signature register compacting the scan
// chain output.
//
// Each enabled clock folds one scan_out bit into the W-bit signature as a
// Galois-form CRC step with generator POLY: fb = sig[W-1] ^ din, then
// sig = (sig << 1) ^ (fb ? POLY : 0). 'clear' (priority over en) zeroes the
// signature. The document only names a response analyzer; the signature
// register, its width and the CRC-16-CCITT generator x^16+x^12+x^5+1 are this
// design's choices.
module sisr #(
  parameter int unsigned  W    = 16,
  parameter logic [W-1:0] POLY = 16'h1021
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] sig
);

  logic fb;
  assign fb = sig[W-1] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {sig[W-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

endmodule
