// gals_tile: one processor tile of the GALS array, without its core.
//
// Every tile is the same design, so an array is built by repeating it.
// The tile holds:
//   * local_osc   - its own clock (clk_local), started by cfg.osc_en;
//   * tile_cfg    - the slow-clock global signals, fed through to the tile
//                   below, and the tile's configuration register;
//   * an input link: the four neighbour links come in, cfg.in_dir picks
//                   one; its forwarded clock goes through the tile's clock
//                   tree (clk_tree) and clocks the write side of the input
//                   dual_clock_fifo; its data and valid pass the input
//                   cfg_delay stage. Writes are taken only while cfg.in_en
//                   is set, so a tile off the data path ignores a
//                   neighbour's link that it also sees. The FIFO's read
//                   side runs on clk_local
//                   and is the core's input port. The FIFO-full flag goes
//                   back to all neighbours (in_full);
//   * an output link: clk_fwd_link registers the core's output word and
//                   forwards clk_local alongside it; data and valid pass the
//                   output cfg_delay stage. The link is seen by all four
//                   neighbours; cfg.out_mask says which of them listen, and
//                   their full flags (out_full_in) stall the core.
// The processor core is not part of this module: its ports (core_*) are
// synchronous to core_clk.
//
// Link timing: data launched at the sender's edge t arrives after
// 2*D_MUX + {0,1,2}*D_DLY, the forwarded clock after the receiver's clock
// tree. With the reset setting (DLY at the output only) data lags the
// clock edge by half a period and is captured by the forwarded edge t+1.
//
// The blocks and their connections follow the design description. The
// neighbour selection (one input FIFO fed from a chosen neighbour, one
// output seen by all) and the configuration fields are this
// implementation's own choices.
module gals_tile
  import gals_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH_P = FIFO_DEPTH,
  parameter int unsigned OSC_PERIOD   = CLK_PERIOD_PS,
  parameter int unsigned OSC_PHASE    = 0
) (
  input  logic            [ID_W-1:0] tile_id,
  // global signals, from the tile above / to the tile below
  input  logic                       slow_clk_in,
  input  global_sig_t                glob_in,
  output logic                       slow_clk_out,
  output global_sig_t                glob_out,
  // links from the four neighbours (indexed by dir_e) and full flag back
  input  link_t           [3:0]      in_link,
  output logic                       in_full,
  // link to the neighbours and their full flags (indexed by dir_e)
  output link_t                      out_link,
  input  logic            [3:0]      out_full_in,
  // core side
  output logic                       core_clk,
  output logic                       core_rst_n,
  input  word_t                      core_wdata,
  input  logic                       core_wvalid,
  output logic                       core_wstall,
  output word_t                      core_rdata,
  output logic                       core_rvalid,
  input  logic                       core_rd
);
  timeunit 1ps; timeprecision 1ps;

  tile_cfg_t cfg;
  logic      clk_local, rst_n;

  tile_cfg u_cfg (
    .tile_id     (tile_id),
    .slow_clk_in (slow_clk_in),
    .glob_in     (glob_in),
    .slow_clk_out(slow_clk_out),
    .glob_out    (glob_out),
    .cfg         (cfg)
  );

  assign rst_n = glob_in.rst_n;

  local_osc #(.PERIOD_PS(OSC_PERIOD), .PHASE_PS(OSC_PHASE)) u_osc (
    .en (cfg.osc_en),
    .clk(clk_local)
  );

  assign core_clk   = clk_local;
  assign core_rst_n = rst_n;

  // ---------------- input link ----------------
  link_t             sel_link;
  logic              wr_clk;
  logic [DATA_W:0]   in_dv;

  assign sel_link = in_link[cfg.in_dir];

  clk_tree #(.D_CLKTREE_PS(D_CLKTREE_PS)) u_clk_tree (
    .clk_in (sel_link.clk),
    .clk_out(wr_clk)
  );

  cfg_delay #(.W(DATA_W + 1), .D_MUX_PS(D_MUX_PS), .D_DLY_PS(D_DLY_PS)) u_dly_in (
    .sel(cfg.dly_in_sel),
    .d  ({sel_link.valid, sel_link.data}),
    .q  (in_dv)
  );

  dual_clock_fifo #(
    .DATA_W  (DATA_W),
    .DEPTH   (FIFO_DEPTH_P),
    .MAX_SYNC(MAX_SYNC),
    .RESERVE (2)
  ) u_fifo (
    .wr_clk       (wr_clk),
    .wr_rst_n     (rst_n),
    .data_in      (in_dv[DATA_W-1:0]),
    .valid_in     (in_dv[DATA_W] && cfg.in_en),
    .fifo_full_out(in_full),
    .rd_clk       (clk_local),
    .rd_rst_n     (rst_n),
    .rd_en        (core_rd),
    .rd_data      (core_rdata),
    .rd_valid     (core_rvalid),
    .sync_stages  (cfg.sync_stages)
  );

  // ---------------- output link ----------------
  word_t           link_data;
  logic            link_valid;
  logic [DATA_W:0] out_dv;

  assign core_wstall = |(out_full_in & cfg.out_mask);

  clk_fwd_link #(.DATA_W(DATA_W)) u_link (
    .clk      (clk_local),
    .rst_n    (rst_n),
    .data     (core_wdata),
    .valid    (core_wvalid),
    .hold     (core_wstall),
    .always_on(cfg.clk_always_on),
    .data_out (link_data),
    .valid_out(link_valid),
    .clk_out  (out_link.clk)
  );

  cfg_delay #(.W(DATA_W + 1), .D_MUX_PS(D_MUX_PS), .D_DLY_PS(D_DLY_PS)) u_dly_out (
    .sel(cfg.dly_out_sel),
    .d  ({link_valid, link_data}),
    .q  (out_dv)
  );

  assign out_link.valid = out_dv[DATA_W];
  assign out_link.data  = out_dv[DATA_W-1:0];
endmodule
