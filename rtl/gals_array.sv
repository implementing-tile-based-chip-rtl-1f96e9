// gals_array: ROWS x COLS array of identical GALS processor tiles.
//
// Each tile runs on its own local oscillator; there is no global clock.
// Neighbouring tiles are joined by short abutting links: every tile's
// output link (data, valid, forwarded clock) reaches its four neighbours,
// and every tile's FIFO-full flag goes back to them. Links at the array
// edge become ports (n_*, e_*, s_*, w_*), where a chip's pads would join it
// to a neighbouring chip or to the outside. The slow clock and the global
// signals (reset and configuration writes) enter once and run down every
// column through the tiles, so the array grows by adding tiles without
// new distribution logic.
//
// The processor cores are not part of this design; each tile's core port
// is brought out, indexed by tile number r*COLS + c (row 0 is the north
// edge, column 0 the west edge), synchronous to core_clk[tile].
//
// Oscillators are modelled with slightly different periods and phases per
// tile (OSC_SPREAD_PS around OSC_PERIOD_PS, a fixed pseudo-random pattern)
// so that neighbouring clocks are unrelated, as with real free-running
// oscillators; this spread is a modelling choice. The 6x6 size and the
// 475 MHz clock follow the design description.
module gals_array
  import gals_pkg::*;
#(
  parameter int unsigned R             = ROWS,
  parameter int unsigned C             = COLS,
  parameter int unsigned FIFO_DEPTH_P  = FIFO_DEPTH,
  parameter int unsigned OSC_PERIOD_PS = CLK_PERIOD_PS,
  parameter int unsigned OSC_SPREAD_PS = 60
) (
  input  logic                slow_clk,
  input  global_sig_t         glob,
  // core ports, one per tile
  output logic  [R*C-1:0]     core_clk,
  output logic  [R*C-1:0]     core_rst_n,
  input  word_t [R*C-1:0]     core_wdata,
  input  logic  [R*C-1:0]     core_wvalid,
  output logic  [R*C-1:0]     core_wstall,
  output word_t [R*C-1:0]     core_rdata,
  output logic  [R*C-1:0]     core_rvalid,
  input  logic  [R*C-1:0]     core_rd,
  // north edge (one link per column)
  input  link_t [C-1:0]       n_in,
  output logic  [C-1:0]       n_in_full,
  output link_t [C-1:0]       n_out,
  input  logic  [C-1:0]       n_out_full,
  // south edge
  input  link_t [C-1:0]       s_in,
  output logic  [C-1:0]       s_in_full,
  output link_t [C-1:0]       s_out,
  input  logic  [C-1:0]       s_out_full,
  // east edge (one link per row)
  input  link_t [R-1:0]       e_in,
  output logic  [R-1:0]       e_in_full,
  output link_t [R-1:0]       e_out,
  input  logic  [R-1:0]       e_out_full,
  // west edge
  input  link_t [R-1:0]       w_in,
  output logic  [R-1:0]       w_in_full,
  output link_t [R-1:0]       w_out,
  input  logic  [R-1:0]       w_out_full
);
  timeunit 1ps; timeprecision 1ps;

  link_t       [R*C-1:0]      t_out;
  logic        [R*C-1:0]      t_full;
  link_t       [R*C-1:0][3:0] t_in;
  logic        [R*C-1:0][3:0] t_out_full;
  global_sig_t [R*C-1:0]      g_out;
  logic        [R*C-1:0]      sclk_out;

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      localparam int unsigned T = r * C + c;
      // pseudo-random but fixed per-tile oscillator offsets
      localparam int unsigned PER = OSC_PERIOD_PS - OSC_SPREAD_PS / 2
                                    + (T * 37) % (OSC_SPREAD_PS + 1);
      localparam int unsigned PHS = (T * 389) % OSC_PERIOD_PS;

      // neighbour links in, and the full flags of the neighbours we feed
      if (r == 0) begin : g_n_edge
        assign t_in[T][DIR_N]       = n_in[c];
        assign t_out_full[T][DIR_N] = n_out_full[c];
        assign n_out[c]             = t_out[T];
        assign n_in_full[c]         = t_full[T];
      end else begin : g_n
        assign t_in[T][DIR_N]       = t_out[T-C];
        assign t_out_full[T][DIR_N] = t_full[T-C];
      end
      if (r == R - 1) begin : g_s_edge
        assign t_in[T][DIR_S]       = s_in[c];
        assign t_out_full[T][DIR_S] = s_out_full[c];
        assign s_out[c]             = t_out[T];
        assign s_in_full[c]         = t_full[T];
      end else begin : g_s
        assign t_in[T][DIR_S]       = t_out[T+C];
        assign t_out_full[T][DIR_S] = t_full[T+C];
      end
      if (c == C - 1) begin : g_e_edge
        assign t_in[T][DIR_E]       = e_in[r];
        assign t_out_full[T][DIR_E] = e_out_full[r];
        assign e_out[r]             = t_out[T];
        assign e_in_full[r]         = t_full[T];
      end else begin : g_e
        assign t_in[T][DIR_E]       = t_out[T+1];
        assign t_out_full[T][DIR_E] = t_full[T+1];
      end
      if (c == 0) begin : g_w_edge
        assign t_in[T][DIR_W]       = w_in[r];
        assign t_out_full[T][DIR_W] = w_out_full[r];
        assign w_out[r]             = t_out[T];
        assign w_in_full[r]         = t_full[T];
      end else begin : g_w
        assign t_in[T][DIR_W]       = t_out[T-1];
        assign t_out_full[T][DIR_W] = t_full[T-1];
      end

      gals_tile #(
        .FIFO_DEPTH_P(FIFO_DEPTH_P),
        .OSC_PERIOD  (PER),
        .OSC_PHASE   (PHS)
      ) u_tile (
        .tile_id     (ID_W'(T)),
        .slow_clk_in ((r == 0) ? slow_clk : sclk_out[T-C]),
        .glob_in     ((r == 0) ? glob     : g_out[T-C]),
        .slow_clk_out(sclk_out[T]),
        .glob_out    (g_out[T]),
        .in_link     (t_in[T]),
        .in_full     (t_full[T]),
        .out_link    (t_out[T]),
        .out_full_in (t_out_full[T]),
        .core_clk    (core_clk[T]),
        .core_rst_n  (core_rst_n[T]),
        .core_wdata  (core_wdata[T]),
        .core_wvalid (core_wvalid[T]),
        .core_wstall (core_wstall[T]),
        .core_rdata  (core_rdata[T]),
        .core_rvalid (core_rvalid[T]),
        .core_rd     (core_rd[T])
      );
    end
  end
endmodule
