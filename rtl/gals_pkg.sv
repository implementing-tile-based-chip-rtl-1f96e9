// gals_pkg: types and constants shared by the GALS tile array.
//
// The array is a grid of identical processor tiles, each clocked by its own
// local oscillator. Neighbouring tiles talk over source-synchronous links
// (data, valid and a forwarded clock one way, a FIFO-full flag back) that
// end in a dual-clock FIFO at the receiver. Per-tile configuration arrives
// over slow "global signals" that run down every column of tiles.
//
// Numbers taken from the design description: a 6x6 array, 32-word input
// FIFOs, 0 to 4 selectable synchronizer stages, 475 MHz clock, delays of
// 3 FO4 (mux), 10 FO4 (DLY) and 6 FO4 (clock tree) against a 20 FO4 period.
// Own choices: a 16-bit data word, the layout of the configuration word,
// the ps value of one FO4 (the 475 MHz period divided by 20).
package gals_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DATA_W     = 16;  // data word width (own choice)
  localparam int unsigned FIFO_DEPTH = 32;  // words per input FIFO
  localparam int unsigned MAX_SYNC   = 4;   // largest synchronizer depth
  localparam int unsigned ROWS       = 6;
  localparam int unsigned COLS       = 6;
  localparam int unsigned ID_W       = 6;   // tile address on the global bus
  localparam logic [ID_W-1:0] CFG_BCAST = '1;

  // Timing of the behavioural parts, in ps.
  localparam int unsigned CLK_PERIOD_PS = 2105;  // 475 MHz
  localparam int unsigned FO4_PS        = 105;   // period / 20 FO4
  localparam int unsigned D_MUX_PS      = 3 * FO4_PS;
  localparam int unsigned D_DLY_PS      = 10 * FO4_PS;
  localparam int unsigned D_CLKTREE_PS  = 6 * FO4_PS;

  // Neighbour directions; a tile's link ports are indexed by these.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Per-tile configuration word, written over the global signals.
  typedef struct packed {
    logic       osc_en;         // run the local oscillator
    logic       clk_always_on;  // 1: forward the clock always, 0: around data only
    logic       dly_out_sel;    // insert the DLY element on the outgoing link
    logic       dly_in_sel;     // insert the DLY element on the incoming link
    logic       in_en;          // accept words from the selected neighbour
    logic [3:0] out_mask;       // neighbours that listen to this tile's link
    dir_e       in_dir;         // neighbour whose link feeds the input FIFO
    logic [2:0] sync_stages;    // synchronizer stages in the FIFO, 0..4
  } tile_cfg_t;

  localparam tile_cfg_t CFG_RESET = '{
    osc_en:        1'b0,
    clk_always_on: 1'b0,
    dly_out_sel:   1'b1,
    dly_in_sel:    1'b0,
    in_en:         1'b0,
    out_mask:      4'b0010,   // east
    in_dir:        DIR_W,
    sync_stages:   3'd2
  };

  typedef logic [DATA_W-1:0] word_t;

  // One direction of a source-synchronous link between neighbouring tiles.
  // The FIFO-full flag that runs the other way is a separate signal.
  typedef struct packed {
    logic  clk;     // forwarded clock of the sending tile
    logic  valid;
    word_t data;
  } link_t;

  // Global (non-clock) signals fed through every tile of a column.
  typedef struct packed {
    logic            rst_n;     // asynchronous array reset
    logic            cfg_wr;    // write strobe, sampled on the slow clock
    logic [ID_W-1:0] cfg_addr;  // target tile, CFG_BCAST = all tiles
    tile_cfg_t       cfg_data;
  } global_sig_t;

endpackage
