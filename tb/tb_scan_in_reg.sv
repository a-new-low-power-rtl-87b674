// Test of the scan-in register: random parallel loads, each followed by eight
// shift clocks; scan_in must give the loaded pattern MSB first, one bit per
// clock, and hold when neither load nor shift is high. Load wins over shift.
module tb_scan_in_reg;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, scan_in;
  logic [N-1:0] d, q;
  int checks = 0, failures = 0;

  scan_in_reg #(.N(N)) dut (.clk, .rst_n, .load, .shift, .d, .scan_in, .q);

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

  initial begin
    d = '0;
    #12 rst_n = 1;
    check(q == '0 && scan_in == 1'b0, "reset");
    for (int k = 0; k < 50; k++) begin
      logic [N-1:0] pat;
      pat = N'($urandom);
      d = pat; load = 1; shift = (k % 2 == 1);   // shift high too: load must win
      @(posedge clk); #1;
      load = 0; shift = 0; d = ~pat;
      check(q == pat, $sformatf("load %h got %h", pat, q));
      @(posedge clk); #1;
      check(q == pat, "hold without load or shift");
      for (int b = N - 1; b >= 0; b--) begin
        check(scan_in == pat[b], $sformatf("pattern %h bit %0d", pat, b));
        shift = 1;
        @(posedge clk); #1;
        shift = 0;
      end
      check(q == '0, "register empty after N shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
