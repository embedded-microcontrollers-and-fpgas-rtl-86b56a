// tb_umass_stack: push/pop test of the 8-level return stack.
//
// Random pushes and pops against a reference list, including more than eight
// nested pushes, where the oldest entries are overwritten (circular stack).
module tb_umass_stack;
  logic        clk = 0, rst = 1, push = 0, pop = 0;
  logic [12:0] din = 0, dout;
  logic [12:0] ref_q [$];
  int checks = 0, failures = 0;

  umass_stack dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      push = 0; pop = 0;
      if (ref_q.size() == 0 || ($urandom % 2)) begin
        push = 1; din = 13'($urandom);
        ref_q.push_back(din);
        if (ref_q.size() > 8) void'(ref_q.pop_front());
      end else begin
        checks++;
        if (dout != ref_q[$]) begin
          failures++;
          $display("FAIL top=%04h expected %04h", dout, ref_q[$]);
        end
        pop = 1;
        void'(ref_q.pop_back());
      end
    end
    @(negedge clk); push = 0; pop = 0;
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
