// Pseudo-random test pattern source: an N-bit LFSR with characteristic
// polynomial x^N + x + 1.
//
// Each enabled clock edge shifts the register one place towards the MSB and
// feeds q[N-1] ^ q[N-2] into q[0] (Fibonacci form), so the serial sequence obeys
// s(t+N) = s(t+1) ^ s(t), the recurrence of x^N + x + 1. The whole register q is
// the parallel test pattern handed to the bit-interchanging network.
// The polynomial follows the document; the Fibonacci form, the seed, the
// synchronous 'init' (reload the seed) and the active-low asynchronous reset
// are this design's choices. Note that x^8 + x + 1 is not primitive: from the
// default seed the 8-bit register repeats after 63 states.
//
// Interface: init has priority over en. q changes on the clock edge after en.
module lfsr #(
  parameter int unsigned N    = 8,
  parameter logic [N-1:0] SEED = {{(N-1){1'b0}}, 1'b1}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  output logic [N-1:0] q
);

  logic feedback;
  assign feedback = q[N-1] ^ q[N-2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED;
    else if (init)  q <= SEED;
    else if (en)    q <= {q[N-2:0], feedback};
  end

  initial begin
    assert (N >= 3) else $error("lfsr: N must be at least 3");
    assert (SEED != '0) else $error("lfsr: an all-zero seed locks the LFSR");
  end

endmodule
