// tb_umass_irq: test of the interrupt scanner.
//
// Raises single pins and checks that exactly input-configured pins produce
// one irq pulse within eight clocks (one bit is read per clock), that output
// pins and falling edges produce none, and that a held level interrupts once.
module tb_umass_irq;
  logic       clk = 0, rst = 1, irq;
  logic [7:0] pins = 0, src_mask = 8'hFF;
  int checks = 0, failures = 0;

  umass_irq dut (.*);
  always #5 clk = ~clk;


  task automatic pulses(int clocks, output int n);
    n = 0;
    repeat (clocks) begin @(negedge clk); if (irq) n++; end
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst = 0;
    pulses(20, n);
    chk(n == 0, "quiet pins give no irq");
    for (int b = 0; b < 8; b++) begin
      src_mask = 8'($urandom);
      pins[b] = 1'b1;
      pulses(10, n);
      chk(n == int'(src_mask[b]), $sformatf("pin %0d rising, mask %0d: %0d pulses", b, src_mask[b], n));
      pulses(20, n);
      chk(n == 0, "held level interrupts once");
      pins[b] = 1'b0;
      pulses(10, n);
      chk(n == 0, "falling edge gives no irq");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
