// Test of the x^N + x + 1 LFSR at N = 8.
// The reference keeps the serial bit sequence s(t) and applies the polynomial's
// recurrence s(t+8) = s(t+1) ^ s(t); the register must always show the last
// eight bits, oldest in the MSB. Also checked: reset and init load the seed,
// en low holds the state, and the sequence from seed 1 repeats after 63 steps.
module tb_lfsr;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  lfsr #(.N(N)) dut (.clk, .rst_n, .init, .en, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit s[$];
    logic [N-1:0] exp_q;
    int period;
    #12 rst_n = 1;
    check(q == 8'h01, $sformatf("reset value %h", q));
    // serial history: oldest first; seed 0000_0001 -> s = 0,0,0,0,0,0,0,1
    for (int i = N - 1; i >= 0; i--) s.push_back(q[i]);
    en = 1;
    period = 0;
    for (int t = 0; t < 200; t++) begin
      @(posedge clk); #1;
      s.push_back(s[s.size() - N] ^ s[s.size() - N + 1]);
      for (int i = 0; i < N; i++) exp_q[N-1-i] = s[s.size() - N + i];
      check(q == exp_q, $sformatf("step %0d: q=%h expected %h", t, q, exp_q));
      if (period == 0 && q == 8'h01) period = t + 1;
    end
    check(period == 63, $sformatf("period %0d, expected 63", period));
    // hold
    en = 0; exp_q = q;
    repeat (5) @(posedge clk); #1;
    check(q == exp_q, "en low must hold the state");
    // init reloads the seed, also with en high
    en = 1; init = 1;
    @(posedge clk); #1;
    check(q == 8'h01, $sformatf("init: q=%h", q));
    init = 0;
    @(posedge clk); #1;
    check(q == 8'h02, $sformatf("first step after init: q=%h", q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
