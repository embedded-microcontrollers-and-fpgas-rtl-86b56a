// tb_umass_rom: load and read-back test of the 8K x 14 program memory.
//
// Loads every word through the load port with a pattern derived from its
// address, then reads back the whole memory through the asynchronous port.
module tb_umass_rom;
  logic        clk = 0, we = 0;
  logic [12:0] addr = 0, waddr = 0;
  logic [13:0] data, wdata = 0;
  int checks = 0, failures = 0;

  umass_rom dut (.*);
  always #5 clk = ~clk;

  function automatic logic [13:0] pat(int a);
    return 14'((a * 37) ^ (a >> 3) ^ 14'h2A5A);
  endfunction

  initial begin
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk); we = 1; waddr = 13'(i); wdata = pat(i);
    end
    @(negedge clk); we = 0;
    for (int i = 8191; i >= 0; i--) begin
      addr = 13'(i); #1;
      checks++;
      if (data != pat(i)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%04h data=%04h exp=%04h", i, data, pat(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
