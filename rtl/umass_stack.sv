// umass_stack: return-address stack of the UMASScore.
//
// Eight 13-bit entries with a 3-bit circular pointer, as on the PIC16F84:
// a ninth push overwrites the oldest entry and a pop from an empty stack
// wraps. push stores din on the clock edge; dout always shows the top entry,
// and pop discards it on the clock edge. push and pop are never set together.
// The depth and the wrap-around are own choices (the original design draws a stack
// next to the fetch unit without sizing it).
module umass_stack #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = 13,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic          pop,
  input  logic [AW-1:0] din,
  output logic [AW-1:0] dout
);

  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] sp;     // index of the next free entry

  assign dout = mem[sp - PW'(1)];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp <= '0;
    end else if (push) begin
      mem[sp] <= din;
      sp      <= sp + PW'(1);
    end else if (pop) begin
      sp      <= sp - PW'(1);
    end
  end


  assert property (@(posedge clk) disable iff (rst) !(push && pop))
    else $error("umass_stack: push and pop together");

endmodule
