// Test of the bit-interchanging network.
//  * The published sample patterns of the 8-bit arrangement, with the
//    modified pattern and the transition count expected for each.
//  * All 256 8-bit patterns against an independent reference, plus the two
//    invariants of the method: same number of 1s, never more transitions.
//  * Widths 10 and 11 (the N mod 3 == 1 and == 2 layouts) on random patterns.
module tb_bi_tpg;
  int checks = 0, failures = 0;

  logic [7:0]  q8, tp8;
  logic [2:0]  sw8;
  logic [9:0]  q10, tp10;
  logic [2:0]  sw10;
  logic [10:0] q11, tp11;
  logic [3:0]  sw11;

  bi_tpg #(.N(8))  dut8  (.q(q8),  .tp(tp8),  .swap(sw8));
  bi_tpg #(.N(10)) dut10 (.q(q10), .tp(tp10), .swap(sw10));
  bi_tpg #(.N(11)) dut11 (.q(q11), .tp(tp11), .swap(sw11));

  // Reference: walk the pattern from the MSB in steps of three. A pair with a
  // bit below it swaps when it reads "x y x" downwards; a final pair at bits 1,0
  // swaps when bits 2,1,0 read "x y x".
  function automatic logic [63:0] ref_mod(input logic [63:0] v, input int n);
    logic [63:0] r = v;
    for (int hi = n - 1; hi >= 1; hi -= 3) begin
      int lo;
      lo = (hi >= 2) ? hi - 2 : 2;
      if (v[hi] != v[hi-1] && v[hi] == v[lo] && hi >= 2) begin
        r[hi] = v[hi-1]; r[hi-1] = v[hi];
      end else if (hi == 1 && v[0] != v[1] && v[0] == v[2]) begin
        r[1] = v[0]; r[0] = v[1];
      end
    end
    return r;
  endfunction

  function automatic int hst(input logic [63:0] v, input int n);
    int t = 0;
    for (int i = 0; i + 1 < n; i++) t += int'(v[i] != v[i+1]);
    return t;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [7:0] gen; logic [7:0] modp; int hst_gen; int hst_mod; } sample_t;
  sample_t samples[6] = '{
    '{8'hAB, 8'h73, 6, 3},
    '{8'h55, 8'h8E, 7, 3},
    '{8'hB5, 8'h6E, 6, 4},
    '{8'h14, 8'h0C, 4, 2},
    '{8'h10, 8'h10, 2, 2},
    '{8'hE8, 8'hF0, 3, 1}
  };

  initial begin
    int sum_gen, sum_mod;
    sum_gen = 0; sum_mod = 0;
    // sample patterns
    foreach (samples[i]) begin
      q8 = samples[i].gen; #1;
      check(tp8 == samples[i].modp,
            $sformatf("sample %h -> %h, expected %h", q8, tp8, samples[i].modp));
      check(hst(64'(q8), 8) == samples[i].hst_gen && hst(64'(tp8), 8) == samples[i].hst_mod,
            $sformatf("sample %h transitions %0d->%0d", q8, hst(64'(q8), 8), hst(64'(tp8), 8)));
      sum_gen += hst(64'(q8), 8);
      sum_mod += hst(64'(tp8), 8);
    end
    check(sum_gen == 28 && sum_mod == 15, $sformatf("sample totals %0d/%0d", sum_gen, sum_mod));
    // the two fixed bits, bits 5 and 2, are never changed; 55 swaps all three cells
    q8 = 8'h55; #1;
    check(sw8 == 3'b111, $sformatf("55: swap=%b", sw8));
    q8 = 8'h10; #1;
    check(sw8 == 3'b000, $sformatf("10: swap=%b", sw8));
    // exhaustive 8-bit
    for (int v = 0; v < 256; v++) begin
      logic [63:0] e;
      q8 = 8'(v); #1;
      e = ref_mod(64'(v), 8);
      check(tp8 == e[7:0], $sformatf("%h -> %h expected %h", q8, tp8, e[7:0]));
      check($countones(tp8) == $countones(q8) && hst(64'(tp8), 8) <= hst(64'(q8), 8)
            && tp8[5] == q8[5] && tp8[2] == q8[2],
            $sformatf("invariants broken for %h", q8));
      check(sw8 == {tp8[0] != q8[0], tp8[4] != q8[4], tp8[7] != q8[7]},
            $sformatf("swap flags %b for %h", sw8, q8));
    end
    // other widths
    for (int k = 0; k < 500; k++) begin
      logic [63:0] e10, e11;
      q10 = 10'($urandom); q11 = 11'($urandom); #1;
      e10 = ref_mod(64'(q10), 10);
      e11 = ref_mod(64'(q11), 11);
      check(tp10 == e10[9:0], $sformatf("N=10 %h -> %h expected %h", q10, tp10, e10[9:0]));
      check(tp11 == e11[10:0], $sformatf("N=11 %h -> %h expected %h", q11, tp11, e11[10:0]));
      check(hst(64'(tp11), 11) <= hst(64'(q11), 11) && hst(64'(tp10), 10) <= hst(64'(q10), 10),
            "transitions increased");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
