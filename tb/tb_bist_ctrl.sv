// Test of the test-per-scan controller with N = 8 and 5 patterns, run twice.
// A cycle-by-cycle reference schedule is built from the run description:
// one load clock, then per pattern 8 shift clocks and 1 capture clock, then 8
// unload clocks. Every output is compared with it on every clock, the start to
// done latency (1 + 5*9 + 8 = 54 clocks) is checked, and so is a restart.
module tb_bist_ctrl;
  import bi_tpg_pkg::*;
  localparam int N = 8, P = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic lfsr_init, lfsr_en, reg_load, reg_shift, scan_en, ra_clear, ra_en, busy, done;
  bist_state_t state;
  int checks = 0, failures = 0;

  bist_ctrl #(.N(N), .NUM_PATTERNS(P)) dut (
    .clk, .rst_n, .start, .lfsr_init, .lfsr_en, .reg_load, .reg_shift, .scan_en,
    .ra_clear, .ra_en, .busy, .done, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected {lfsr_en, reg_shift, scan_en, ra_en, busy, done} for one clock
  typedef logic [5:0] exp_t;

  task automatic do_run();
    exp_t sched[$];
    int lat;
    // load
    sched.push_back(6'b1_0_0_0_1_0);
    for (int p = 0; p < P; p++) begin
      for (int b = 0; b < N; b++) sched.push_back({1'b0, 1'b1, 1'b1, (p > 0), 1'b1, 1'b0});
      sched.push_back({(p < P - 1), 1'b0, 1'b0, 1'b0, 1'b1, 1'b0});   // capture
    end
    for (int b = 0; b < N; b++) sched.push_back(6'b0_1_1_1_1_0);      // unload
    // idle/done before start: LFSR held at seed
    check(!busy && lfsr_init && !lfsr_en && !scan_en, "quiet before start");
    start = 1;
    #1 check(ra_clear, "ra_clear with start");
    @(posedge clk); #1;
    start = 0;
    lat = 0;
    foreach (sched[i]) begin
      exp_t got;
      got = {lfsr_en, reg_shift, scan_en, ra_en, busy, done};
      check(got == sched[i] && reg_load == lfsr_en && !lfsr_init && !ra_clear,
            $sformatf("clock %0d: got %b expected %b", i, got, sched[i]));
      @(posedge clk); #1;
      lat++;
    end
    check(done && !busy && lfsr_init, "done after the schedule");
    check(lat == 1 + P * (N + 1) + N, $sformatf("latency %0d", lat));
    repeat (3) @(posedge clk); #1;
    check(done, "done is held");
  endtask

  initial begin
    #12 rst_n = 1;
    @(posedge clk); #1;
    check(state == ST_IDLE, "idle after reset");
    do_run();
    do_run();   // restart from DONE
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
