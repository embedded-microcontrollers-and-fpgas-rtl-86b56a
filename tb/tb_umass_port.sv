// tb_umass_port: test of the bidirectional port and its TRIS register.
//
// Checks the reset state (all inputs), then random writes of PORT and TRIS
// with random pad levels: output enables are the inverse of TRIS, the pad
// output follows the latch, and a read returns the pad for input bits and the
// latch for output bits.
module tb_umass_port;
  logic       clk = 0, rst = 1, wr_port = 0, wr_tris = 0;
  logic [7:0] wdata = 0, pin_in = 0, rd_port, tris, pin_out, pin_oe;
  logic [7:0] m_latch, m_tris;
  int checks = 0, failures = 0;

  umass_port dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    m_latch = 8'h00; m_tris = 8'hFF;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (pin_oe != ~m_tris || pin_out != m_latch || tris != m_tris ||
          rd_port != ((m_tris & pin_in) | (~m_tris & m_latch))) begin
        failures++;
        $display("FAIL oe=%02h out=%02h rd=%02h tris=%02h (model latch=%02h tris=%02h pin=%02h)",
                 pin_oe, pin_out, rd_port, tris, m_latch, m_tris, pin_in);
      end
      wr_port = $urandom % 3 == 0;
      wr_tris = $urandom % 3 == 0;
      wdata   = 8'($urandom);
      pin_in  = 8'($urandom);
      if (wr_port) m_latch = wdata;
      if (wr_tris) m_tris  = wdata;
    end
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
