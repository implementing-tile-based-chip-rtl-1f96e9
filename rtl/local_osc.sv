// local_osc: local clock oscillator of one tile.
// Behavioural model (not synthesizable): the real oscillator is a separately
// laid-out hard macro with its own power ring, placed in a corner of the tile.
//
// Every tile has its own oscillator, so the tiles' clocks are unrelated.
// When `en` rises the clock starts after PHASE_PS plus half a period; when
// `en` falls it finishes the running period and stops low, so no short
// pulse is produced. The period and phase are parameters so that an array
// can give each tile a slightly different clock, as unrelated oscillators
// have. Default: 475 MHz (2105 ps), the clock rate of the design described.
module local_osc #(
  parameter int unsigned PERIOD_PS = 2105,
  parameter int unsigned PHASE_PS  = 0
) (
  input  logic en,
  output logic clk
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned HIGH_PS = PERIOD_PS / 2;
  localparam int unsigned LOW_PS  = PERIOD_PS - HIGH_PS;

  initial clk = 1'b0;

  always begin
    if (!en) begin
      clk     = 1'b0;
      wait (en);
      #(PHASE_PS);
    end
    #(LOW_PS)  clk = 1'b1;
    #(HIGH_PS) clk = 1'b0;
  end
endmodule
