// Workload test: the BIST widened to the scan-chain lengths of the five
// ISCAS'89 circuits of the comparison table (s5378: 179, s9234: 211,
// s13207: 638, s38417: 1636, s38584: 1426 scan flip-flops), each driving a
// behavioural full-scan circuit of that length, 40 patterns per circuit,
// each LFSR starting from a pseudo-random seed.
// For every pattern it checks that the interchanged pattern matches an
// independent reference of the interchange rule, keeps the number of 1s, has no
// more neighbour transitions than the LFSR pattern, and is exactly what
// appears on scan_in during the shift clocks; and that the run takes
// 1 + 40*(N+1) + N clocks. It reports, per circuit, the average and peak
// reduction of transitions entering the scan chain.
module tb_iscas_chains;
  localparam int NC = 5;
  localparam int P  = 40;
  localparam int LEN [NC] = '{179, 211, 638, 1636, 1426};
  localparam string NAME [NC] = '{"s5378", "s9234", "s13207", "s38417", "s38584"};

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  int finished = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // A seed of N well-mixed bits (xorshift32), so that each long LFSR starts
  // from a random-looking state instead of a single 1.
  function automatic logic [2047:0] seed_bits(input int n);
    logic [31:0] x = 32'h2545_F491 ^ 32'(n);
    logic [2047:0] r = '0;
    for (int i = 0; i < n; i++) begin
      x ^= x << 13; x ^= x >> 17; x ^= x << 5;
      r[i] = x[0];
    end
    r[0] = 1'b1;
    return r;
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_chain
    localparam int N = LEN[c];
    localparam int NCELL = bi_tpg_pkg::bi_num_cells(N);
    localparam logic [N-1:0] SEED = seed_bits(N);
    logic busy, done, scan_en, scan_in, scan_out;
    logic [15:0] signature;
    logic [N-1:0] lfsr_q, tp;
    logic [NCELL-1:0] swap;
    bi_tpg_pkg::bist_state_t state;

    bi_tpg_bist #(.N(N), .NUM_PATTERNS(P), .SEED(SEED)) dut (
      .clk, .rst_n, .start, .busy, .done, .scan_en, .scan_in, .scan_out,
      .signature, .lfsr_q, .tp, .swap, .state);
    scan_cut_model #(.N(N)) cut (.clk, .rst_n, .scan_en, .scan_in, .scan_out);

    // reference interchange rule, walking groups of three from the MSB
    function automatic logic [N-1:0] ref_mod(input logic [N-1:0] v);
      logic [N-1:0] r = v;
      for (int hi = N - 1; hi >= 1; hi -= 3) begin
        if (hi >= 2) begin
          if (v[hi] != v[hi-1] && v[hi] == v[hi-2]) begin r[hi] = v[hi-1]; r[hi-1] = v[hi]; end
        end else if (v[0] != v[1] && v[0] == v[2]) begin
          r[1] = v[0]; r[0] = v[1];
        end
      end
      return r;
    endfunction

    function automatic int hst(input logic [N-1:0] v);
      int t = 0;
      for (int i = 0; i + 1 < N; i++) t += int'(v[i] != v[i+1]);
      return t;
    endfunction

    initial begin
      int lat, bitn, pats, sum_g, sum_m, pk_g, pk_m, serial_t;
      logic [N-1:0] cur;
      logic prev;
      sum_g = 0; sum_m = 0; pk_g = 0; pk_m = 0; pats = 0; serial_t = 0;
      bitn = 0; cur = '0; prev = 1'b0;
      @(posedge start); @(posedge clk); #1;
      lat = 0;
      while (!done) begin
        if (state == bi_tpg_pkg::ST_LOAD ||
            (state == bi_tpg_pkg::ST_CAPTURE && pats < P)) begin
          check(tp == ref_mod(lfsr_q), $sformatf("%s pattern %0d: interchange", NAME[c], pats));
          check($countones(tp) == $countones(lfsr_q) && hst(tp) <= hst(lfsr_q),
                $sformatf("%s pattern %0d: invariants", NAME[c], pats));
          sum_g += hst(lfsr_q); sum_m += hst(tp);
          if (hst(lfsr_q) > pk_g) pk_g = hst(lfsr_q);
          if (hst(tp) > pk_m) pk_m = hst(tp);
          cur = tp; bitn = N - 1; pats++;
        end
        if (state == bi_tpg_pkg::ST_SHIFT) begin
          if (scan_in != cur[bitn]) check(1'b0, $sformatf("%s scan_in bit %0d", NAME[c], bitn));
          if (bitn < N - 1 && scan_in != prev) serial_t++;
          prev = scan_in;
          bitn--;
        end
        @(posedge clk); #1;
        lat++;
      end
      check(lat == 1 + P * (N + 1) + N, $sformatf("%s latency %0d", NAME[c], lat));
      check(pats == P && serial_t == sum_m, $sformatf("%s patterns %0d, serial transitions %0d/%0d",
            NAME[c], pats, serial_t, sum_m));
      $display("%-7s N=%4d: transitions at scan input %6d -> %6d (%4.1f%% fewer), peak per pattern %4d -> %4d (%4.1f%% fewer)",
               NAME[c], N, sum_g, sum_m, 100.0 * (sum_g - sum_m) / sum_g,
               pk_g, pk_m, 100.0 * (pk_g - pk_m) / pk_g);
      finished++;
    end
  end

  initial begin
    #12 rst_n = 1;
    @(posedge clk); #1;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    wait (finished == NC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
