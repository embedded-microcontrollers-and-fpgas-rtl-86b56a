// umass_ram: general-purpose file register memory of the UMASScore.
//
// 128 words of 8 bits, single port, synchronous and read-first, written in
// the style that FPGA tools map onto one block RAM. On a rising clock edge
// with en = 1 the word at addr appears on dout (the old contents, also when
// the same edge writes); with en = 1 and wr = 1 the same edge stores din.
// Size, read-first mode and the enable/write-enable pair follow the original design;
// the contents after configuration are not defined (no reset).
module umass_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      dout <= mem[addr];
      if (wr) mem[addr] <= din;
    end
  end

endmodule
