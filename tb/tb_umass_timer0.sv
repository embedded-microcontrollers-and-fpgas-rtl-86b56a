// tb_umass_timer0: test of the free-running Timer0.
//
// Random ticks and loads against a counting model; the overflow pulse must
// follow exactly the ticks that wrap FFh to 00h.
module tb_umass_timer0;
  logic       clk = 0, rst = 1, tick = 0, wr = 0;
  logic [7:0] wdata = 0, value;
  logic       ovf;
  int m_val, m_ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  umass_timer0 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0; m_val = 0; m_ovf = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (value != 8'(m_val) || ovf != 1'(m_ovf)) begin
        failures++;
        $display("FAIL value=%02h ovf=%0d expected %02h %0d", value, ovf, m_val, m_ovf);
      end
      if (ovf) n_ovf++;
      tick  = $urandom % 4 != 0;
      wr    = $urandom % 200 == 0;
      wdata = 8'($urandom);
      m_ovf = 0;
      if (wr) m_val = wdata;
      else if (tick) begin
        m_ovf = (m_val == 255);
        m_val = (m_val + 1) % 256;
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
