// link_sink: testbench receiver at the far end of a link.
//
// It passes the forwarded clock through a clk_tree delay and the data
// through a receiver-side delay stage (DLY element in when dly_sel is set),
// as a receiving tile would, and captures every valid word on its rising edge into an
// unbounded queue (got). `full` back to the sender follows `stall`, which
// the testbench drives in windows to create back-pressure.
module link_sink
  import gals_pkg::*;
(
  input  link_t link,
  input  logic  stall,
  input  logic  dly_sel,
  output logic  full,
  output int    n_got
);
  timeunit 1ps; timeprecision 1ps;

  word_t           got[$];
  logic            rclk;
  logic [DATA_W:0] dv;

  clk_tree #(.D_CLKTREE_PS(D_CLKTREE_PS)) u_tree (.clk_in(link.clk), .clk_out(rclk));

  cfg_delay #(.W(DATA_W + 1), .D_MUX_PS(D_MUX_PS), .D_DLY_PS(D_DLY_PS)) u_dly (
    .sel(dly_sel), .d({link.valid, link.data}), .q(dv)
  );

  initial n_got = 0;

  always @(posedge rclk) begin
    if (dv[DATA_W]) begin
      got.push_back(dv[DATA_W-1:0]);
      n_got = n_got + 1;
    end
  end

  assign full = stall;
endmodule
