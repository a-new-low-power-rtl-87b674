// Exhaustive test of one interchange cell: all eight (q0,q1,q2) inputs.
// Expected values come from the rule "q0 and q1 are interchanged exactly when
// the pattern q2 q1 q0 reads 010 or 101".
module tb_bi_cell;
  logic q0, q1, q2, s0, s1, sel;
  int checks = 0, failures = 0;

  bi_cell dut (.q0, .q1, .q2, .s0, .s1, .sel);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] tri_in, exp_out;
      logic       exp_sel;
      tri_in = 3'(v);                 // {q2, q1, q0}
      {q2, q1, q0} = tri_in;
      exp_sel = (tri_in == 3'b010) || (tri_in == 3'b101);
      exp_out = exp_sel ? {tri_in[2], tri_in[0], tri_in[1]} : tri_in;
      #1;
      checks++;
      if ({q2, s1, s0} !== exp_out || sel !== exp_sel) begin
        failures++;
        $display("FAIL q2q1q0=%b: got s1s0=%b%b sel=%b, expected %b%b sel=%b",
                 tri_in, s1, s0, sel, exp_out[1], exp_out[0], exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
