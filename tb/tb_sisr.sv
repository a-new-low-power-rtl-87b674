// Test of the signature register. The reference computes the same signature
// as a polynomial remainder: the bit stream d1..dk, taken as a polynomial with
// d1 the highest term, times x^16, modulo x^16+x^12+x^5+1, starting from a
// zero signature. Also checked: en low holds, clear zeroes, clear beats en.
module tb_sisr;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  logic [15:0] sig;
  int checks = 0, failures = 0;

  sisr dut (.clk, .rst_n, .clear, .en, .din, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // remainder of (stream * x^16) mod g, by long division over the whole stream
  function automatic logic [15:0] ref_sig(input bit bits[$]);
    bit r[$];
    bit g[17] = '{1,0,0,0,1,0,0,0,0,0,0,1,0,0,0,0,1}; // x^16 .. x^0
    logic [15:0] out;
    r = bits;
    for (int i = 0; i < 16; i++) r.push_back(1'b0);
    for (int i = 0; i + 16 < r.size(); i++)
      if (r[i]) for (int j = 0; j <= 16; j++) r[i+j] ^= g[j];
    for (int j = 0; j < 16; j++) out[15-j] = r[r.size() - 16 + j];
    return out;
  endfunction

  initial begin
    bit stream[$];
    logic [15:0] held;
    string msg;
    #12 rst_n = 1;
    check(sig == 16'h0, "reset");
    for (int k = 0; k < 300; k++) begin
      bit b;
      b = 1'($urandom);
      din = b; en = 1;
      stream.push_back(b);
      @(posedge clk); #1;
      if (k % 37 == 36) begin
        en = 0; din = ~din; held = sig;
        @(posedge clk); #1;
        check(sig == held, "en low must hold");
      end
      if (k % 10 == 9)
        check(sig == ref_sig(stream), $sformatf("after %0d bits sig=%h expected %h",
              stream.size(), sig, ref_sig(stream)));
    end
    // ASCII "123456789" gives the well-known CRC-16 (zero start) 0x31C3
    clear = 1; en = 1; @(posedge clk); #1; clear = 0;
    check(sig == 16'h0, "clear");
    stream.delete();
    msg = "123456789";
    for (int i = 0; i < msg.len(); i++)
      for (int b = 7; b >= 0; b--) begin
        din = msg[i][b]; @(posedge clk); #1;
      end
    en = 0;
    check(sig == 16'h31C3, $sformatf("check value %h", sig));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
