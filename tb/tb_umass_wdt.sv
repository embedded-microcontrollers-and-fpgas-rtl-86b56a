// tb_umass_wdt: test of the watchdog period and clear.
//
// With an 8-bit counter the timeout must come exactly 256 clocks after reset
// or after the last clear, repeat every 256 clocks, and never come while the
// counter is cleared more often than that.
module tb_umass_wdt;
  logic clk = 0, rst = 1, clr = 0, timeout;
  int checks = 0, failures = 0;

  umass_wdt #(.BITS(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n;
    @(negedge clk); rst = 0;
    n = 1;
    while (!timeout && n < 1000) begin @(negedge clk); n++; end
    chk(n == 256, $sformatf("first timeout after 256 clocks (got %0d)", n));
    n = 0;
    @(negedge clk); n++;
    while (!timeout && n < 1000) begin @(negedge clk); n++; end
    chk(n == 256, $sformatf("period 256 clocks (got %0d)", n));
    // clear every 200 clocks: no timeout
    for (int k = 0; k < 2000; k++) begin
      clr = (k % 200) == 0;
      @(negedge clk);
      chk(!timeout, "no timeout while cleared");
    end
    clr = 1;
    @(negedge clk);
    clr = 0;
    n = 1;
    while (!timeout && n < 1000) begin @(negedge clk); n++; end
    chk(n == 256, $sformatf("timeout 256 clocks after the last clear (got %0d)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
