// tb_umass_pam: test of the active expansion memory.
//
// Writes W values to random addresses (ext_wr) and reads them back (ext_rd),
// expecting the product of W's two nibbles, e.g. C5h -> 3Ch. Also checks that
// the read port holds its value when neither strobe is set.
module tb_umass_pam;
  logic       clk = 0, ext_rd = 0, ext_wr = 0;
  logic [7:0] addr = 0, w = 0, wnext;
  logic [7:0] shadow [256];
  bit         valid  [256];
  int checks = 0, failures = 0;

  umass_pam dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] hold;
    // the original design's example
    @(negedge clk); ext_wr = 1; addr = 8'hC5; w = 8'hC5;
    @(negedge clk); ext_wr = 0; ext_rd = 1;
    @(negedge clk); ext_rd = 0;
    chk(wnext, 8'h3C, "PAM[C5h] after EXTWR C5h");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 8'($urandom);
      w    = 8'($urandom);
      if ($urandom % 2) begin
        ext_wr = 1;
        shadow[addr] = 8'(int'(w[7:4]) * int'(w[3:0]));
        valid[addr]  = 1;
        @(negedge clk); ext_wr = 0;
      end else if (valid[addr]) begin
        ext_rd = 1;
        @(negedge clk); ext_rd = 0;
        chk(wnext, shadow[addr], "read back");
        hold = wnext;
        addr = ~addr;
        @(negedge clk);
        chk(wnext, hold, "hold without strobe");
      end
    end
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
