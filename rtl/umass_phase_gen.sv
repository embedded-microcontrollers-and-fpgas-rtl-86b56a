// umass_phase_gen: clock-phase and reset unit ("Sync") of the UMASScore.
//
// One instruction cycle is four clock cycles, Q1..Q4. This module issues them
// as one-hot enables q[0]=Q1 .. q[3]=Q4 of the single clock (the original
// derived four phase clocks instead). The active-low MRST pin is
// synchronised by two flops; while it is low, or while wdt_rst is set, the
// internal reset rst is high and the phase is held at Q1 with no enable
// active. hold (SLEEP) also stops the phases at Q1, so no register of the core
// changes: this is the power-save mode. After release the first enable is Q1.
module umass_phase_gen (
  input  logic       clk,
  input  logic       mrst_n,
  input  logic       wdt_rst,
  input  logic       hold,
  output logic       rst,
  output logic [3:0] q
);

  logic [1:0] sync;
  logic [1:0] phase;

  always_ff @(posedge clk) sync <= {sync[0], mrst_n};

  always_ff @(posedge clk) begin
    rst <= !sync[1] || wdt_rst;
  end

  always_ff @(posedge clk) begin
    if (rst)        phase <= 2'd0;
    else if (!hold) phase <= phase + 2'd1;
  end

  always_comb begin
    q = 4'b0000;
    if (!rst && !hold) q[phase] = 1'b1;
  end

endmodule
