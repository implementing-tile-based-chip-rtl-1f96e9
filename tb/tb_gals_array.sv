// tb_gals_array: end-to-end test of the full 6x6 array at its default size.
//
// The tiles are configured over the global signals (one write per tile on
// the slow clock) into a snake: row 0 west to east, row 1 east to west, and
// so on, entering at the west edge of row 0 and leaving at the south edge
// below tile (5,0). Every tile runs on its own oscillator; its core is a
// core_model that adds one and sometimes pauses. A link_source sends N
// words in at the west edge, a link_sink with back-pressure windows
// collects them at the south edge. Each word must arrive once, in order,
// incremented by the number of tiles (36).
//
// Settings vary along the path so that every mechanism is used:
// synchronizer depths 0..4, the DLY element at the sending or at the
// receiving end of a link, gated and always-on forwarded clocks. Counted,
// each of which must occur: words through tiles of each synchronizer
// depth and of each DLY placement, cycles in which a core was stalled by
// a full FIFO downstream, gated (stopped) forwarded-clock cycles, and
// always-on clock pulses with no data.
module tb_gals_array;
  import gals_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int R = ROWS, C = COLS, NT = ROWS * COLS;
  localparam int N = 400;

  logic               slow_clk = 1'b0;
  global_sig_t        glob;
  logic  [NT-1:0]     core_clk, core_rst_n, core_wvalid, core_wstall, core_rvalid, core_rd;
  word_t [NT-1:0]     core_wdata, core_rdata;
  link_t [C-1:0]      n_in, n_out, s_in, s_out;
  logic  [C-1:0]      n_in_full, n_out_full, s_in_full, s_out_full;
  link_t [R-1:0]      e_in, e_out, w_in, w_out;
  logic  [R-1:0]      e_in_full, e_out_full, w_in_full, w_out_full;

  logic run, stall, sink_full, src_clk;
  int   sent, n_got;
  int   moved [NT];
  int checks = 0, failures = 0;

  gals_array dut (
    .slow_clk, .glob, .core_clk, .core_rst_n, .core_wdata, .core_wvalid, .core_wstall,
    .core_rdata, .core_rvalid, .core_rd,
    .n_in, .n_in_full, .n_out, .n_out_full, .s_in, .s_in_full, .s_out, .s_out_full,
    .e_in, .e_in_full, .e_out, .e_out_full, .w_in, .w_in_full, .w_out, .w_out_full
  );

  link_source #(.PERIOD_PS(2111), .PHASE_PS(777), .N_WORDS(N), .GAP_DIV(6),
                .BASE(16'h3000)) u_src (
    .rst_n(glob.rst_n), .run, .always_on(1'b0), .dly_sel(1'b1), .link(w_in[0]), .full(w_in_full[0]),
    .sent, .clk(src_clk)
  );

  link_sink u_sink (.link(s_out[0]), .stall, .dly_sel(1'b0), .full(sink_full), .n_got);

  for (genvar t = 0; t < NT; t++) begin : g_core
    core_model #(.PAUSE_DIV(9)) u_core (
      .clk(core_clk[t]), .rst_n(core_rst_n[t]), .rdata(core_rdata[t]),
      .rvalid(core_rvalid[t]), .rd(core_rd[t]), .wdata(core_wdata[t]),
      .wvalid(core_wvalid[t]), .wstall(core_wstall[t]), .moved(moved[t])
    );
  end

  always_comb begin
    n_in = '0; s_in = '0; e_in = '0;
    for (int r = 1; r < R; r++) w_in[r] = '0;
    n_out_full = '0; e_out_full = '0; w_out_full = '0;
    s_out_full = '0;
    s_out_full[0] = sink_full;
  end

  always #50_000 slow_clk = ~slow_clk;

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent, n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- path configuration ----------------
  int        order_r [NT], order_c [NT];
  tile_cfg_t cfgs    [NT];

  function automatic dir_e opposite(input dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_E:   return DIR_W;
      default: return DIR_E;
    endcase
  endfunction

  initial begin
    int k;
    dir_e out_d;
    logic prev_dly_out;
    k = 0;
    for (int r = 0; r < R; r++)
      for (int i = 0; i < C; i++) begin
        order_r[k] = r;
        order_c[k] = (r % 2 == 0) ? i : C - 1 - i;
        k++;
      end
    prev_dly_out = 1'b1;  // the source has its DLY element in
    for (int j = 0; j < NT; j++) begin
      int r, c, t;
      tile_cfg_t x;
      r = order_r[j]; c = order_c[j]; t = r * C + c;
      x = CFG_RESET;
      x.osc_en = 1'b1;
      x.in_en  = 1'b1;
      // direction to the next tile on the path (south at a row's end)
      if (j == NT - 1 || order_r[j+1] != r) out_d = DIR_S;
      else out_d = (r % 2 == 0) ? DIR_E : DIR_W;
      x.out_mask = 4'b0001 << out_d;
      // input from where the previous tile is
      if (j == 0) x.in_dir = DIR_W;
      else if (order_r[j-1] != r) x.in_dir = DIR_N;
      else x.in_dir = opposite((r % 2 == 0) ? DIR_E : DIR_W);
      x.sync_stages   = 3'(t % 5);
      // exactly one DLY element per link: at the sender or the receiver
      x.dly_in_sel    = !prev_dly_out;
      x.dly_out_sel   = (j == NT - 1) ? 1'b1 : (j % 7 != 3);
      x.clk_always_on = (t % 6 == 5);
      prev_dly_out    = x.dly_out_sel;
      cfgs[t] = x;
    end
  end

  task automatic cfg_write(input logic [ID_W-1:0] a, input tile_cfg_t d);
    @(negedge slow_clk);
    glob.cfg_wr = 1'b1; glob.cfg_addr = a; glob.cfg_data = d;
    @(negedge slow_clk);
    glob.cfg_wr = 1'b0;
  endtask

  // ---------------- mechanism monitors ----------------
  int stall_cycles = 0, gated_cycles = 0, idle_on_pulses = 0;
  for (genvar c = 0; c < C; c++) begin : g_mon
    // row 0 tiles: their links are visible on the north edge
    logic [2:0] wv_hist = '0;
    always @(posedge core_clk[c]) begin
      wv_hist = {wv_hist[1:0], core_wvalid[c]};
      #1;
      if (!cfgs[c].clk_always_on && cfgs[c].osc_en && !n_out[c].clk) gated_cycles++;
      if (cfgs[c].clk_always_on && n_out[c].clk && wv_hist == 3'b000 && !core_wvalid[c])
        idle_on_pulses++;
    end
  end
  for (genvar t = 0; t < NT; t++) begin : g_stall
    always @(posedge core_clk[t]) if (core_wvalid[t] && core_wstall[t]) stall_cycles++;
  end

  initial begin
    stall = 1'b0;
    forever begin
      #($urandom_range(30_000, 150_000));
      stall = ~stall;
    end
  end

  // progress watchdog: once running, a word must reach the sink every 5 us
  initial begin
    int last;
    wait (run);
    last = -1;
    forever begin
      #5_000_000;
      if (n_got == last && n_got < N) begin
        failures++;
        $display("no progress: sent %0d received %0d", sent, n_got);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      last = n_got;
    end
  end

  // ---------------- stimulus and checks ----------------
  initial begin
    int by_sync [5];
    int by_dly_in [2];
    // reset starts high and falls, so every asynchronous reset sees an edge
    glob = '0; glob.rst_n = 1'b1; run = 1'b0;
    #1000;
    glob.rst_n = 1'b0;
    #200_000;
    glob.rst_n = 1'b1;
    #100_000;
    for (int t = 0; t < NT; t++) cfg_write(ID_W'(t), cfgs[t]);
    #100_000;
    run = 1'b1;
    wait (n_got >= N);
    #200_000;
    checks++;
    if (n_got != N || sent != N) begin
      failures++; $display("sent %0d received %0d", sent, n_got);
    end
    for (int i = 0; i < n_got; i++) begin
      checks++;
      if (u_sink.got[i] !== 16'h3000 + 16'(i) + 16'(NT)) begin
        failures++;
        $display("word %0d: %h expected %h", i, u_sink.got[i], 16'h3000 + 16'(i) + 16'(NT));
      end
    end
    for (int s = 0; s < 5; s++) by_sync[s] = 0;
    by_dly_in[0] = 0; by_dly_in[1] = 0;
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (moved[t] != N) begin failures++; $display("tile %0d moved %0d", t, moved[t]); end
      by_sync[cfgs[t].sync_stages] += moved[t];
      by_dly_in[cfgs[t].dly_in_sel] += moved[t];
    end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (by_sync[s] == 0) begin failures++; $display("no words through %0d-stage sync", s); end
    end
    checks++; if (by_dly_in[0] == 0) begin failures++; $display("DLY never at sender"); end
    checks++; if (by_dly_in[1] == 0) begin failures++; $display("DLY never at receiver"); end
    checks++; if (stall_cycles == 0) begin failures++; $display("no back-pressure stall"); end
    checks++; if (gated_cycles == 0) begin failures++; $display("clock never gated"); end
    checks++; if (idle_on_pulses == 0) begin failures++; $display("always-on never idle"); end
    $display("words=%0d stalls=%0d gated=%0d idle_on=%0d sync=%0d/%0d/%0d/%0d/%0d dly_in=%0d/%0d",
             n_got, stall_cycles, gated_cycles, idle_on_pulses,
             by_sync[0], by_sync[1], by_sync[2], by_sync[3], by_sync[4], by_dly_in[0], by_dly_in[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
