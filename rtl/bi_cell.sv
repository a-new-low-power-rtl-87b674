// One bit-interchanging cell: conditionally swaps two adjacent pattern bits.
//
// Inputs are three consecutive bits of the pattern, q0 and q1 (the pair) and
// q2 (the bit on the far side of q1, used only for the check). The pair is
// interchanged when both conditions hold:
//   condition 1: q0 == q2   (an XNOR gate)
//   condition 2: q0 != q1   (an XOR gate)
// The two results are ANDed into 'sel', which drives two 2:1 multiplexers:
// s0 (the new bit at q0's position) = sel ? q1 : q0, and s1 = sel ? q0 : q1.
// A pattern ...q2 q1 q0 of the form x y x with y != x becomes x x y, removing a
// transition next to q2. The gate structure follows the document.
//
// Purely combinational.
module bi_cell (
  input  logic q0,
  input  logic q1,
  input  logic q2,
  output logic s0,
  output logic s1,
  output logic sel
);

  logic differ_adj;   // XOR:  condition 2
  logic same_next;    // XNOR: condition 1

  assign differ_adj = q0 ^ q1;
  assign same_next  = ~(q0 ^ q2);
  assign sel        = differ_adj & same_next;
  assign s0         = sel ? q1 : q0;
  assign s1         = sel ? q0 : q1;

endmodule
