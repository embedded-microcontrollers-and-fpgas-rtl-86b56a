// tb_umass_phase_gen: test of the four-phase clock and reset unit.
//
// Checks that after MRST rises the phases come as Q1, Q2, Q3, Q4 repeating,
// one clock each and one-hot, starting with Q1; that hold (SLEEP) stops them
// at Q1 and that they resume with Q1; and that a watchdog pulse gives one
// clock of internal reset and restarts at Q1.
module tb_umass_phase_gen;
  logic       clk = 0, mrst_n = 0, wdt_rst = 0, hold = 0, rst;
  logic [3:0] q;
  int checks = 0, failures = 0;

  umass_phase_gen dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q=%b rst=%0d)", what, q, rst); end
  endtask

  initial begin
    int n;
    repeat (5) @(negedge clk);
    chk(rst && q == 4'b0000, "reset while MRST low");
    mrst_n = 1;
    n = 0;
    while (rst && n < 10) begin @(negedge clk); n++; end
    chk(n == 3, $sformatf("reset released 3 clocks after MRST (got %0d)", n));
    for (int i = 0; i < 40; i++) begin
      chk(q == 4'(1 << (i % 4)), $sformatf("phase %0d", i % 4 + 1));
      @(negedge clk);
    end
    // stop after Q4 as the core does on SLEEP
    while (q != 4'b1000) @(negedge clk);
    @(negedge clk);
    hold = 1;
    #1 chk(q == 4'b0000, "hold takes effect at once");
    repeat (10) begin chk(q == 4'b0000, "held"); @(negedge clk); end
    hold = 0;
    #1 chk(q == 4'b0001, "resumes with Q1");
    @(negedge clk);
    chk(q == 4'b0010, "then Q2");
    wdt_rst = 1;
    @(negedge clk); wdt_rst = 0;
    chk(rst, "watchdog gives internal reset");
    @(negedge clk);
    chk(!rst && q == 4'b0001, "restart at Q1 after watchdog reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
