// End-to-end test of the BIST at its default size (8-bit scan chain,
// 63 patterns), driving a behavioural full-scan circuit under test.
//
// An independent reference model works out, for every pattern, the LFSR state
// (from the serial recurrence of x^8+x+1), the interchanged pattern (from the
// "x y x" rule), the circuit's captured response and the final signature
// (bit-serial CRC-16 x^16+x^12+x^5+1). Checked on every clock: the bit on
// scan_in while shifting, the swap flags at each load, the start-to-done
// latency 1 + 63*9 + 8 = 576 clocks; at the end: the signature, for two
// back-to-back runs. Counted mechanisms (each must occur): interchange in
// each of the three cells, a pattern left unchanged, shift clocks, capture
// clocks, unload clocks, done, restart. The per-pattern horizontal transition
// counts before and after interchange are reported as average and peak
// reductions.
module tb_bi_tpg_bist;
  import bi_tpg_pkg::*;
  localparam int N = 8, P = 63, NCELL = 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, scan_en, scan_in, scan_out;
  logic [15:0] signature;
  logic [N-1:0] lfsr_q, tp;
  logic [NCELL-1:0] swap;
  bist_state_t state;
  int checks = 0, failures = 0;

  bi_tpg_bist dut (.clk, .rst_n, .start, .busy, .done, .scan_en, .scan_in, .scan_out,
                   .signature, .lfsr_q, .tp, .swap, .state);
  scan_cut_model #(.N(N)) cut (.clk, .rst_n, .scan_en, .scan_in, .scan_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- reference model ----------------
  logic [N-1:0] ref_gen[P], ref_mod[P], ref_resp[P];
  logic [NCELL-1:0] ref_swap[P];
  logic [15:0] ref_signature;

  function automatic int hst(input logic [N-1:0] v);
    int t = 0;
    for (int i = 0; i + 1 < N; i++) t += int'(v[i] != v[i+1]);
    return t;
  endfunction

  function automatic logic [N-1:0] capture_fn(input logic [N-1:0] c);
    logic [N-1:0] r;
    for (int k = 0; k < N; k++) r[k] = c[k] ^ (c[(k+1)%N] | c[(k+2)%N]) ^ 1'(k % 2);
    return r;
  endfunction

  task automatic build_reference();
    bit s[$];
    logic [15:0] crc = 16'h0;
    // seed 0000_0001, oldest bit first
    for (int i = 0; i < N - 1; i++) s.push_back(1'b0);
    s.push_back(1'b1);
    for (int p = 0; p < P; p++) begin
      logic [N-1:0] g, m;
      for (int i = 0; i < N; i++) g[N-1-i] = s[s.size() - N + i];
      m = g;
      ref_swap[p] = '0;
      // (7,6) checked with 5; (4,3) checked with 2; (1,0) checked with 2
      if (g[7:5] == 3'b101 || g[7:5] == 3'b010) begin m[7] = g[6]; m[6] = g[7]; ref_swap[p][0] = 1; end
      if (g[4:2] == 3'b101 || g[4:2] == 3'b010) begin m[4] = g[3]; m[3] = g[4]; ref_swap[p][1] = 1; end
      if (g[2:0] == 3'b101 || g[2:0] == 3'b010) begin m[1] = g[0]; m[0] = g[1]; ref_swap[p][2] = 1; end
      ref_gen[p] = g;
      ref_mod[p] = m;
      ref_resp[p] = capture_fn(m);
      s.push_back(s[s.size() - N] ^ s[s.size() - N + 1]);
    end
    // responses leave the chain MSB (far end) first
    for (int p = 0; p < P; p++)
      for (int b = N - 1; b >= 0; b--) begin
        bit msb;
        msb = crc[15] ^ ref_resp[p][b];
        crc = crc << 1;
        if (msb) begin crc[12] ^= 1; crc[5] ^= 1; crc[0] ^= 1; end
      end
    ref_signature = crc;
  endtask

  // ---------------- mechanism counters ----------------
  int n_swap[NCELL], n_unchanged, n_shift, n_capture, n_unload, n_done, n_restart;
  int sum_hst_gen, sum_hst_mod, peak_hst_gen, peak_hst_mod;

  task automatic do_run(input int idx);
    int pat, bitn, lat;
    logic [N-1:0] cur;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 0;
    check(state == ST_LOAD, "load after start");
    // at the load clock the network shows the first pattern
    pat = 0;
    while (!done) begin
      if (state == ST_LOAD || (state == ST_CAPTURE && pat < P)) begin
        check(lfsr_q == ref_gen[pat] && tp == ref_mod[pat] && swap == ref_swap[pat],
              $sformatf("pattern %0d: q=%h tp=%h swap=%b expected %h %h %b", pat,
                        lfsr_q, tp, swap, ref_gen[pat], ref_mod[pat], ref_swap[pat]));
        if (idx == 0) begin
          for (int c = 0; c < NCELL; c++) n_swap[c] += int'(swap[c]);
          n_unchanged += int'(tp == lfsr_q);
          sum_hst_gen += hst(lfsr_q);
          sum_hst_mod += hst(tp);
          if (hst(lfsr_q) > peak_hst_gen) peak_hst_gen = hst(lfsr_q);
          if (hst(tp) > peak_hst_mod) peak_hst_mod = hst(tp);
        end
        cur = ref_mod[pat];
        pat++;
        bitn = N - 1;
      end
      if (state == ST_SHIFT) begin
        check(scan_en && scan_in == cur[bitn],
              $sformatf("pattern %0d bit %0d on scan_in", pat - 1, bitn));
        bitn--;
        n_shift++;
      end
      if (state == ST_CAPTURE) begin
        check(!scan_en, "scan_en low in capture");
        n_capture++;
      end
      if (state == ST_UNLOAD) n_unload++;
      @(posedge clk); #1;
      lat++;
    end
    n_done++;
    check(lat == 1 + P * (N + 1) + N, $sformatf("start-to-done latency %0d", lat));
    check(pat == P, $sformatf("%0d patterns applied", pat));
    check(signature == ref_signature,
          $sformatf("signature %h expected %h", signature, ref_signature));
  endtask

  initial begin
    build_reference();
    #12 rst_n = 1;
    @(posedge clk); #1;
    do_run(0);
    repeat (4) @(posedge clk); #1;
    n_restart++;
    do_run(1);
    for (int c = 0; c < NCELL; c++)
      check(n_swap[c] > 0, $sformatf("cell %0d never interchanged", c));
    check(n_unchanged > 0, "no pattern passed unchanged");
    check(n_shift > 0 && n_capture > 0 && n_unload > 0 && n_done == 2 && n_restart == 1,
          "a sequencing step never happened");
    check(sum_hst_mod < sum_hst_gen && peak_hst_mod <= peak_hst_gen, "no transition reduction");
    $display("mechanisms: swaps per cell %0d/%0d/%0d, unchanged %0d, shift %0d, capture %0d, unload %0d, done %0d, restart %0d",
             n_swap[0], n_swap[1], n_swap[2], n_unchanged, n_shift, n_capture, n_unload, n_done, n_restart);
    $display("transitions per pattern: total %0d -> %0d (%0.1f%% fewer), peak %0d -> %0d (%0.1f%% fewer)",
             sum_hst_gen, sum_hst_mod, 100.0 * (sum_hst_gen - sum_hst_mod) / sum_hst_gen,
             peak_hst_gen, peak_hst_mod, 100.0 * (peak_hst_gen - peak_hst_mod) / peak_hst_gen);
    $display("signature %h", signature);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
