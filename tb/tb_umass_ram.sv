// tb_umass_ram: random read/write test of the 128 x 8 read-first RAM.
//
// Keeps a shadow copy of the memory and issues random operations, checking
// that a read returns the stored word one edge later, that a write returns the
// old word (read-first) and that nothing changes while the enable is low.
module tb_umass_ram;
  logic       clk = 0, en = 0, wr = 0;
  logic [6:0] addr = 0;
  logic [7:0] din = 0, dout;
  logic [7:0] shadow [128];
  int checks = 0, failures = 0;

  umass_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] exp_q;
    // fill
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); en = 1; wr = 1; addr = 7'(i); din = 8'($urandom); shadow[i] = din;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en   = ($urandom % 4) != 0;
      wr   = $urandom % 2;
      addr = 7'($urandom);
      din  = 8'($urandom);
      exp_q = en ? shadow[addr] : dout;
      @(posedge clk); #1;
      if (en && wr) shadow[addr] = din;
      checks++;
      if (dout != exp_q) begin
        failures++;
        $display("FAIL addr=%02h en=%0d wr=%0d dout=%02h exp=%02h", addr, en, wr, dout, exp_q);
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
