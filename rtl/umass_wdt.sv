// umass_wdt: watchdog timer of the UMASScore.
//
// A BITS-wide counter advances on every clock. clr (from CLRWDT or SLEEP)
// restarts it. When it reaches its last value it raises timeout for one
// clock, which the core uses as a reset, and starts again. With ENABLE = 0
// (the configuration bit of the PIC16F84) timeout never rises. The original design
// only lists a watchdog circuit; its period and the enable are own choices.
module umass_wdt #(
  parameter int unsigned BITS   = 16,
  parameter bit          ENABLE = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  output logic timeout
);

  logic [BITS-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || clr || !ENABLE) begin
      cnt     <= '0;
      timeout <= 1'b0;
    end else begin
      cnt     <= cnt + BITS'(1);
      timeout <= (cnt == {BITS{1'b1}} - BITS'(1));
    end
  end

endmodule
