// Scan-in register: parallel-in, serial-out register between the BI-TPG and
// the scan chain of the circuit under test.
//
// 'load' captures the modified pattern d in one clock; each 'shift' clock then
// moves the register one place towards the MSB, so the pattern leaves on
// scan_in MSB first, one bit per clock, over N clocks. Zeros fill from the LSB.
// load has priority over shift. The register being as long as the scan chain
// follows the document; MSB-first order and the reset to zero are this
// design's choices.
module scan_in_reg #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] d,
  output logic         scan_in,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {q[N-2:0], 1'b0};
  end

  assign scan_in = q[N-1];

endmodule
