// umass_rom: program memory of the UMASScore.
//
// Up to 8K words of 14 bits addressed by the 13-bit program counter. The read
// is asynchronous: the core registers the instruction itself (in phase Q2),
// and a ROM this small maps to LUTs, as in the original design. A synchronous
// load port (we/waddr/wdata) places the program; it stands in for the
// synthesis-time contents of the original and is an own addition. The load
// port should be used while the core is held in reset.
module umass_rom #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned AW    = 13,
  parameter int unsigned DW    = 14
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign data = mem[addr];

endmodule
