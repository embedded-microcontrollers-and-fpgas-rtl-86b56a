// umass_pam: Programmable Active Memory (expansion module) of the UMASScore.
//
// A 256 x 8 single-port, read-first block RAM that the core reaches with the
// added instructions EXTWR (write W to the address held in a file register)
// and EXTRD (read the word at that address into W). "Active" means that data
// is transformed on its way in: this instance stores the 4x4-bit product
// W[7:4] * W[3:0], so writing C5h stores 3Ch, as in the original design's example.
// Replace the product by other logic to add functions to the core.
//
// Timing: one clock. ext_wr stores the product at addr on the rising edge;
// ext_rd loads wnext with the word at addr on the rising edge (old contents
// when both are set). wnext holds its value otherwise.
module umass_pam #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ext_rd,
  input  logic          ext_wr,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    w,
  output logic [7:0]    wnext
);

  logic [7:0] mem [DEPTH];
  logic [7:0] store;

  // the active part: 4x4-bit multiplier on the incoming data
  assign store = 8'(w[7:4] * w[3:0]);

  always_ff @(posedge clk) begin
    if (ext_rd || ext_wr) begin
      wnext <= mem[addr];
      if (ext_wr) mem[addr] <= store;
    end
  end

endmodule
