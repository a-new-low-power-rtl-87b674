// Bit-interchanging test pattern generator (BI-TPG) network.
//
// Turns an N-bit pseudo-random pattern q into a pattern tp with fewer
// transitions between neighbouring bits, keeping the number of 1s and 0s.
// The bits are taken in groups of three from the MSB: in group m the pair
// (q[N-1-3m], q[N-2-3m]) goes to a bi_cell whose check bit is q[N-3-3m]; the
// check bit itself is passed through unchanged. The cell's q0 is the outer bit
// of the pair (the one away from the check bit). When N mod 3 == 2 the last pair,
// (q[1], q[0]), has no bit below it and is checked against q[2] instead, with
// q0 = q[0]. When N mod 3 == 1, q[0] is passed through. For the document's
// 8-bit arrangement this is three cells on (7,6|5), (4,3|2) and (0,1|2), with
// bits 5 and 2 unchanged: six multiplexers, three XOR, three XNOR and three AND
// gates. Placement for other widths is this design's extension of that layout.
//
// A swap never adds a transition, so the number of neighbour transitions in tp
// never exceeds that in q.
//
// Interface: q in, tp out, swap[m] high when cell m interchanges its pair
// (cell 0 is the most significant). Purely combinational.
module bi_tpg
  import bi_tpg_pkg::*;
#(
  parameter int unsigned N = DEFAULT_SCAN_LEN,
  localparam int unsigned NCELL = bi_num_cells(N)
) (
  input  logic [N-1:0]     q,
  output logic [N-1:0]     tp,
  output logic [NCELL-1:0] swap
);

  for (genvar m = 0; m < (N + 2) / 3; m++) begin : g_group
    localparam int unsigned HI = N - 1 - 3 * m;
    if (HI >= 2) begin : g_full
      // pair (HI, HI-1), check bit HI-2 passed through
      bi_cell u_cell (
        .q0  (q[HI]),
        .q1  (q[HI-1]),
        .q2  (q[HI-2]),
        .s0  (tp[HI]),
        .s1  (tp[HI-1]),
        .sel (swap[m])
      );
      assign tp[HI-2] = q[HI-2];
    end else if (HI == 1) begin : g_edge
      // last pair (1, 0) checked against bit 2, which belongs to the group above
      bi_cell u_cell (
        .q0  (q[0]),
        .q1  (q[1]),
        .q2  (q[2]),
        .s0  (tp[0]),
        .s1  (tp[1]),
        .sel (swap[m])
      );
    end else begin : g_single
      assign tp[0] = q[0];
    end
  end

  initial begin
    assert (N >= 3) else $error("bi_tpg: N must be at least 3");
  end

endmodule
