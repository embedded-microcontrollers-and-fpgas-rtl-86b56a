// umass_irq: interrupt scanner of the UMASScore.
//
// Every clock cycle the scanner reads one bit of the input port, taking the
// bits in turn (0, 1, ... W-1, 0, ...), and compares it with the value it
// read from that bit on its previous visit. A rising level on a bit that is
// configured as an input (src_mask bit = 1, i.e. TRIS = 1) raises irq for
// one clock; the core turns that into its external-interrupt flag. A pin
// change therefore shows within W clocks. Scanning one bit per clock follows
// the original design; the rising-edge rule and the use of TRIS as the source mask
// are own choices.
module umass_irq #(
  parameter int unsigned W = 8,
  localparam int unsigned IW = $clog2(W)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] pins,
  input  logic [W-1:0] src_mask,
  output logic         irq
);

  logic [IW-1:0] idx;
  logic [W-1:0]  last;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx  <= '0;
      last <= '1;   // a pin already high at reset does not interrupt
      irq  <= 1'b0;
    end else begin
      last[idx] <= pins[idx];
      irq       <= pins[idx] && !last[idx] && src_mask[idx];
      idx       <= (idx == IW'(W - 1)) ? '0 : idx + IW'(1);
    end
  end

endmodule
