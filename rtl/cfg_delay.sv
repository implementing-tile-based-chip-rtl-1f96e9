// cfg_delay: configurable delay on a link's data and valid wires.
// Behavioural model (not synthesizable): the DLY element and the bypass
// multiplexer are sized cells in a real layout; here they are delays.
//
// The signal goes either through the multiplexer alone (D_MUX) or through
// the DLY element and then the multiplexer (D_MUX + D_DLY), chosen by sel.
// One such stage sits at the sending tile's output and one at the
// receiving tile's input, so the inserted delay on a link is
// 2*D_MUX + {0, D_DLY, 2*D_DLY}. To centre the data in the clock period,
// D_MUX is half the receiver's clock-tree delay and D_DLY half the clock
// period: with a 6 FO4 tree and a 20 FO4 period, 3 FO4 and 10 FO4.
// These values follow the design description; the ps value of one FO4 is
// this model's own (the 475 MHz period / 20).
//
// The delays are transport delays: every change of d reaches q, in order,
// after the delay. Each change starts its own small process that holds
// the new value.
module cfg_delay #(
  parameter int unsigned W        = 17,
  parameter int unsigned D_MUX_PS = 315,
  parameter int unsigned D_DLY_PS = 1050
) (
  input  logic         sel,   // 1: include the DLY element
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] q_short, q_long;

  initial begin
    q_short = '0;
    q_long  = '0;
  end

  initial forever begin
    @(d);
    fork
      begin
        automatic logic [W-1:0] v = d;
        #(D_MUX_PS) q_short = v;
        #(D_DLY_PS) q_long = v;
      end
    join_none
  end

  assign q = sel ? q_long : q_short;
endmodule
