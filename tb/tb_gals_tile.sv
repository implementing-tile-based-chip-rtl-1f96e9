// tb_gals_tile: one tile between a link source (west) and a link sink (east).
//
// The tile is configured over the global signals, its core is a
// core_model that adds one to each word. Two phases with different
// settings (synchronizer depth, which side carries the DLY element,
// gated or always-on forwarded clock) each stream N words through the
// tile while the sink applies back-pressure in windows. Checked: every
// word arrives once, in order, incremented; the tile's FIFO filled up
// (full flag) and the core was stalled at least once; the forwarded clock
// was gated off in gated mode and ran while idle in always-on mode.
module tb_gals_tile;
  import gals_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 300;

  logic        slow_clk = 1'b0, sclk_out;
  global_sig_t glob, gout;
  link_t [3:0] in_link;
  logic        in_full;
  link_t       out_link, src_link;
  logic [3:0]  out_full_in;
  logic        core_clk, core_rst_n, core_wvalid, core_wstall, core_rvalid, core_rd;
  word_t       core_wdata, core_rdata;
  logic        run, stall, sink_full, src_clk;
  logic        src_dly = 1'b1;  // DLY at the source; the tile and sink take the other ends
  int          sent, n_got, moved;
  int checks = 0, failures = 0;
  int full_seen = 0, stall_seen = 0, gated_seen = 0, idle_pulses = 0;
  int expected_total = 0;

  gals_tile dut (
    .tile_id(6'd7), .slow_clk_in(slow_clk), .glob_in(glob), .slow_clk_out(sclk_out),
    .glob_out(gout), .in_link, .in_full, .out_link, .out_full_in,
    .core_clk, .core_rst_n, .core_wdata, .core_wvalid, .core_wstall,
    .core_rdata, .core_rvalid, .core_rd
  );

  link_source #(.PERIOD_PS(1990), .PHASE_PS(333), .N_WORDS(2 * N), .GAP_DIV(5),
                .BASE(16'h2000)) u_src (
    .rst_n(glob.rst_n), .run, .always_on(1'b0), .dly_sel(src_dly), .link(src_link), .full(in_full),
    .sent, .clk(src_clk)
  );

  core_model #(.PAUSE_DIV(0)) u_core (
    .clk(core_clk), .rst_n(core_rst_n), .rdata(core_rdata), .rvalid(core_rvalid),
    .rd(core_rd), .wdata(core_wdata), .wvalid(core_wvalid), .wstall(core_wstall), .moved
  );

  link_sink u_sink (.link(out_link), .stall, .dly_sel(!src_dly), .full(sink_full), .n_got);

  always_comb begin
    in_link        = '0;
    in_link[DIR_W] = src_link;
    out_full_in    = '0;
    out_full_in[DIR_E] = sink_full;
  end

  always #50_000 slow_clk = ~slow_clk;

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired: sent %0d moved %0d received %0d", sent, moved, n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors, sampled just after the tile's clock edge
  // (wv_hist: core_wvalid over the last three edges; all zero = link idle)
  logic       on_phase = 1'b0;
  logic [2:0] wv_hist  = '0;
  always @(posedge core_clk) begin
    wv_hist = {wv_hist[1:0], core_wvalid};
    #1;
    if (in_full) full_seen++;
    if (core_wstall && core_wvalid) stall_seen++;
    if (!on_phase && !out_link.clk) gated_seen++;
    if (on_phase && out_link.clk && wv_hist == 3'b000 && !core_wvalid) idle_pulses++;
  end

  // back-pressure windows from the sink
  initial begin
    stall = 1'b0;
    forever begin
      #($urandom_range(40_000, 120_000));
      stall = ~stall;
    end
  end

  task automatic cfg_write(input logic [ID_W-1:0] a, input tile_cfg_t d);
    @(negedge slow_clk);
    glob.cfg_wr = 1'b1; glob.cfg_addr = a; glob.cfg_data = d;
    @(negedge slow_clk);
    glob.cfg_wr = 1'b0;
  endtask

  task automatic run_phase(input tile_cfg_t c);
    int target;
    cfg_write(6'd7, c);
    target = expected_total + N;
    if (target > 2 * N) target = 2 * N;
    run = 1'b1;
    wait (n_got >= target);
    #20_000;
    run = 1'b0;
    // drain: every accepted word has reached the sink before settings change
    wait (n_got == sent);
    #50_000;
    expected_total = n_got;
  endtask

  function automatic tile_cfg_t mk(input logic [2:0] s, input logic dly_in, input logic on);
    tile_cfg_t c;
    c = CFG_RESET;
    c.osc_en = 1'b1; c.in_en = 1'b1; c.in_dir = DIR_W; c.out_mask = 4'b0010;
    c.sync_stages = s; c.dly_in_sel = dly_in; c.dly_out_sel = !dly_in;
    c.clk_always_on = on;
    return c;
  endfunction

  initial begin
    // reset starts high and falls, so every asynchronous reset sees an edge
    glob = '0; glob.rst_n = 1'b1; run = 1'b0;
    #1000;
    glob.rst_n = 1'b0;
    #200_000;
    glob.rst_n = 1'b1;
    #200_000;
    run_phase(mk(3'd2, 1'b0, 1'b0));
    // source paused and sink drained between phases: link is idle here
    on_phase = 1'b1;
    src_dly  = 1'b0;
    run_phase(mk(3'd4, 1'b1, 1'b1));
    #100_000;
    checks++;
    if (n_got != 2 * N || sent != 2 * N) begin
      failures++; $display("sent %0d received %0d", sent, n_got);
    end
    for (int i = 0; i < n_got; i++) begin
      checks++;
      if (u_sink.got[i] !== 16'h2000 + 16'(i) + 16'd1) begin
        failures++; $display("word %0d: %h expected %h", i, u_sink.got[i], 16'h2001 + 16'(i));
      end
    end
    checks++; if (full_seen == 0)   begin failures++; $display("FIFO never full"); end
    checks++; if (stall_seen == 0)  begin failures++; $display("core never stalled"); end
    checks++; if (gated_seen == 0)  begin failures++; $display("forwarded clock never gated"); end
    checks++; if (idle_pulses == 0) begin failures++; $display("always-on clock never ran idle"); end
    checks++;
    if (gout !== glob) begin failures++; $display("feed-through"); end
    $display("full=%0d stall=%0d gated=%0d idle_on=%0d", full_seen, stall_seen, gated_seen, idle_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
