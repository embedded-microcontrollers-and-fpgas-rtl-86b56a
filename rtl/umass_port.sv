// umass_port: one bidirectional I/O port with its TRIS register.
//
// The PORT register is the output latch and the TRIS register sets the
// direction per bit: 1 = input (driver off), 0 = output, as on the PIC16F84.
// The pad's tristate buffer is outside this module: pin_out/pin_oe drive it
// and pin_in returns the pad level. Reading the port gives the pad level for
// input bits and the latch for output bits. Both registers are written on the
// clock edge when wr_port / wr_tris is set. After reset all bits are inputs
// (TRIS = FFh) and the latch is 0; the reset values are own choices.
module umass_port #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_port,
  input  logic         wr_tris,
  input  logic [W-1:0] wdata,
  input  logic [W-1:0] pin_in,
  output logic [W-1:0] rd_port,
  output logic [W-1:0] tris,
  output logic [W-1:0] pin_out,
  output logic [W-1:0] pin_oe
);

  logic [W-1:0] latch;

  always_ff @(posedge clk) begin
    if (rst) begin
      latch <= '0;
      tris  <= '1;
    end else begin
      if (wr_port) latch <= wdata;
      if (wr_tris) tris  <= wdata;
    end
  end

  assign pin_out = latch;
  assign pin_oe  = ~tris;
  assign rd_port = (tris & pin_in) | (~tris & latch);

endmodule
