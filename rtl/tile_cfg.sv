// tile_cfg: global-signal feed-through and configuration register of a tile.
//
// Signals that every tile needs but that change rarely (configuration,
// reset) are not distributed at full speed. They run on a dedicated slow
// clock and pass through each tile, buffered, to the tile below, so tiles
// abut with no logic between them. Each tile captures a configuration word
// on the slow clock when the write strobe is set and the address is its
// own tile_id or the broadcast address CFG_BCAST.
//
// Feed-through on a slow clock follows the design description; the
// address/data/strobe bus, the broadcast address and the reset values
// (CFG_RESET, oscillator off) are this implementation's own choices. The
// configuration is static: it is written while the fast clocks are
// stopped or the affected links are idle, so its bits are used in the
// fast domains without synchronizers.
//
// Timing: a write is taken at the rising slow_clk edge; cfg follows at once.
// glob_in.rst_n resets cfg asynchronously.
module tile_cfg
  import gals_pkg::*;
(
  input  logic [ID_W-1:0] tile_id,
  input  logic            slow_clk_in,
  input  global_sig_t     glob_in,
  output logic            slow_clk_out,
  output global_sig_t     glob_out,
  output tile_cfg_t       cfg
);
  timeunit 1ps; timeprecision 1ps;

  // Buffered feed-through to the next tile of the column.
  assign slow_clk_out = slow_clk_in;
  assign glob_out     = glob_in;

  logic rst_n;
  assign rst_n = glob_in.rst_n;

  always_ff @(posedge slow_clk_in or negedge rst_n) begin
    if (!rst_n) cfg <= CFG_RESET;
    else if (glob_in.cfg_wr &&
             (glob_in.cfg_addr == tile_id || glob_in.cfg_addr == CFG_BCAST))
      cfg <= glob_in.cfg_data;
  end
endmodule
