// Behavioural model of a full-scan circuit under test, for simulation only.
//
// N scan flip-flops form one chain: with scan_en high each clock shifts
// scan_in into ff[0] and ff[k] into ff[k+1]; scan_out is ff[N-1]. With scan_en
// low the flip-flops capture a fixed combinational function of their own
// contents, ff[k] <= ff[k] ^ (ff[(k+1) % N] | ff[(k+2) % N]) ^ (k % 2),
// standing in for the next-state logic of a real sequential circuit.
module scan_cut_model #(
  parameter int unsigned N = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  input  logic scan_in,
  output logic scan_out
);
  logic [N-1:0] ff, capt;

  always_comb
    for (int k = 0; k < N; k++)
      capt[k] = ff[k] ^ (ff[(k + 1) % N] | ff[(k + 2) % N]) ^ 1'(k % 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ff <= '0;
    else if (scan_en) ff <= {ff[N-2:0], scan_in};
    else              ff <= capt;
  end

  assign scan_out = ff[N-1];
endmodule
