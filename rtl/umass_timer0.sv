// umass_timer0: free-running 8-bit Timer0 of the UMASScore.
//
// The counter advances by one on every clock edge with tick = 1 (the core
// gives one tick per instruction cycle) and wraps from FFh to 00h, raising
// ovf for that one edge's cycle. A write (wr) loads wdata instead of counting.
// The original design only states that Timer0 is free running; the width, the
// instruction-cycle tick and the missing prescaler are own choices.
module umass_timer0 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tick,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] value,
  output logic         ovf
);

  always_ff @(posedge clk) begin
    if (rst) begin
      value <= '0;
      ovf   <= 1'b0;
    end else begin
      ovf <= 1'b0;
      if (wr) begin
        value <= wdata;
      end else if (tick) begin
        value <= value + W'(1);
        ovf   <= (value == '1);
      end
    end
  end

endmodule
