// tb_dct_workload: a 2-D 8x8 DCT on four tiles of the full 6x6 array,
// comparing the gated forwarded clock with the always-on one.
//
// Tiles (0,0)..(0,3) form a chain fed from the west edge and leaving at
// the north edge above tile (0,3). Their stand-in cores (dct_core_model)
// compute: row DCTs, a transpose, column DCTs, a transpose back. A source
// sends four 8x8 blocks of pixels; the sink's output is compared word by
// word with a reference computed here with the same integer arithmetic.
//
// The workload runs twice: with the clock forwarded only around data, then
// with it forwarded every cycle. For the three links between the four
// tiles it counts forwarded clock pulses, data words and the sending
// tile's clock cycles, and reports the clock active fraction and a
// communication power figure in which a cycle with data costs 1, a clock
// pulse without data 0.5 and a stopped clock 0. The gated run must have
// both lower than the always-on run. The third method, a clock sent only
// with a word, is not built; its figures are computed from the gated run's
// word counts (one pulse per word) and printed alongside.
module tb_dct_workload;
  import gals_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int R = ROWS, C = COLS, NT = ROWS * COLS;
  localparam int NB = 4, NW = NB * 64;

  logic               slow_clk = 1'b0;
  global_sig_t        glob;
  logic  [NT-1:0]     core_clk, core_rst_n, core_wvalid, core_wstall, core_rvalid, core_rd;
  word_t [NT-1:0]     core_wdata, core_rdata;
  link_t [C-1:0]      n_in, n_out, s_in, s_out;
  logic  [C-1:0]      n_in_full, n_out_full, s_in_full, s_out_full;
  link_t [R-1:0]      e_in, e_out, w_in, w_out;
  logic  [R-1:0]      e_in_full, e_out_full, w_in_full, w_out_full;

  logic run, sink_full, src_clk;
  int   sent, n_got;
  int   moved [4];
  int checks = 0, failures = 0;

  gals_array dut (
    .slow_clk, .glob, .core_clk, .core_rst_n, .core_wdata, .core_wvalid, .core_wstall,
    .core_rdata, .core_rvalid, .core_rd,
    .n_in, .n_in_full, .n_out, .n_out_full, .s_in, .s_in_full, .s_out, .s_out_full,
    .e_in, .e_in_full, .e_out, .e_out_full, .w_in, .w_in_full, .w_out, .w_out_full
  );

  link_source #(.PERIOD_PS(2111), .PHASE_PS(777), .N_WORDS(NW), .GAP_DIV(3),
                .BASE(16'h0000)) u_src (
    .rst_n(glob.rst_n), .run, .always_on(1'b0), .dly_sel(1'b1), .link(w_in[0]), .full(w_in_full[0]),
    .sent, .clk(src_clk)
  );

  link_sink u_sink (.link(n_out[3]), .stall(1'b0), .dly_sel(1'b0), .full(sink_full), .n_got);

  for (genvar t = 0; t < 4; t++) begin : g_core
    dct_core_model #(.MODE(t % 2), .PIX_OFFSET(t == 0 ? 128 : 0)) u_core (
      .clk(core_clk[t]), .rst_n(core_rst_n[t]), .rdata(core_rdata[t]),
      .rvalid(core_rvalid[t]), .rd(core_rd[t]), .wdata(core_wdata[t]),
      .wvalid(core_wvalid[t]), .wstall(core_wstall[t]), .moved(moved[t])
    );
  end

  always_comb begin
    for (int t = 4; t < NT; t++) begin
      core_wdata[t] = '0; core_wvalid[t] = 1'b0; core_rd[t] = 1'b0;
    end
    n_in = '0; s_in = '0; e_in = '0;
    for (int r = 1; r < R; r++) w_in[r] = '0;
    e_out_full = '0; w_out_full = '0; s_out_full = '0;
    n_out_full = '0;
    n_out_full[3] = sink_full;
  end

  always #50_000 slow_clk = ~slow_clk;

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent, n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference ----------------
  word_t expected [NW];

  function automatic int cf(input int k, input int n);
    real ck;
    ck = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    return int'($floor(256.0 * ck * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0) + 0.5));
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin
      word_t y [8][8];  // row DCT: y[r][k]
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) begin
          int acc;
          acc = 0;
          for (int c = 0; c < 8; c++)
            acc += (int'($signed(16'(b * 64 + r * 8 + c))) - 128) * cf(k, c);
          y[r][k] = word_t'((acc + 128) >>> 8);
        end
      for (int k = 0; k < 8; k++)
        for (int u = 0; u < 8; u++) begin
          int acc;
          acc = 0;
          for (int r = 0; r < 8; r++) acc += int'($signed(y[r][k])) * cf(u, r);
          // second transpose puts vertical frequency u first
          expected[b * 64 + u * 8 + k] = word_t'((acc + 128) >>> 8);
        end
    end
  end

  // ---------------- configuration ----------------
  task automatic cfg_write(input logic [ID_W-1:0] a, input tile_cfg_t d);
    @(negedge slow_clk);
    glob.cfg_wr = 1'b1; glob.cfg_addr = a; glob.cfg_data = d;
    @(negedge slow_clk);
    glob.cfg_wr = 1'b0;
  endtask

  task automatic configure(input logic always_on);
    for (int t = 0; t < 4; t++) begin
      tile_cfg_t x;
      x = CFG_RESET;
      x.osc_en        = 1'b1;
      x.in_en         = 1'b1;
      x.in_dir        = DIR_W;
      x.out_mask      = (t == 3) ? 4'b0001 : 4'b0010;  // last tile: north edge
      x.dly_out_sel   = 1'b1;
      x.dly_in_sel    = 1'b0;
      x.sync_stages   = 3'd2;
      x.clk_always_on = always_on;
      cfg_write(ID_W'(t), x);
    end
  endtask

  // ---------------- measurement ----------------
  logic measuring = 1'b0;
  int   pulses [3], cycles [3];
  for (genvar c = 0; c < 3; c++) begin : g_meas
    always @(posedge n_out[c].clk) if (measuring) pulses[c]++;
    always @(posedge core_clk[c])  if (measuring) cycles[c]++;
  end

  real frac [2], power [2];
  real frac_data_only;  // clock sent only with a word: one pulse per word

  task automatic run_once(input int idx, input logic always_on);
    int base, words;
    real p;
    glob.rst_n = 1'b0;
    #100_000;
    glob.rst_n = 1'b1;
    #100_000;
    configure(always_on);
    #50_000;
    for (int c = 0; c < 3; c++) begin pulses[c] = 0; cycles[c] = 0; end
    base = n_got;
    measuring = 1'b1;
    run = 1'b1;
    wait (n_got >= base + NW);
    measuring = 1'b0;
    run = 1'b0;
    #50_000;
    checks++;
    if (n_got != base + NW) begin failures++; $display("received %0d words", n_got - base); end
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (u_sink.got[base + i] !== expected[i]) begin
        failures++;
        $display("run %0d word %0d: %h expected %h", idx, i, u_sink.got[base + i], expected[i]);
      end
    end
    frac[idx] = 0.0; power[idx] = 0.0;
    for (int c = 0; c < 3; c++) begin
      words = moved[c];
      p = real'(words) + 0.5 * real'(pulses[c] - words);
      frac[idx]  += real'(pulses[c]) / real'(cycles[c]) / 3.0;
      power[idx] += p / real'(cycles[c]) / 3.0;
      if (idx == 0) frac_data_only += real'(words) / real'(cycles[c]) / 3.0;
      $display("run %0d link %0d->%0d: %0d pulses, %0d words, %0d cycles",
               idx, c, c + 1, pulses[c], words, cycles[c]);
    end
  endtask

  initial begin
    // reset starts high and falls, so every asynchronous reset sees an edge
    glob = '0; glob.rst_n = 1'b1; run = 1'b0;
    frac_data_only = 0.0;
    #1000;
    glob.rst_n = 1'b0;
    #100_000;
    run_once(0, 1'b0);
    run_once(1, 1'b1);
    $display("clock active fraction: gated %0.3f always-on %0.3f (relative %0.3f)",
             frac[0], frac[1], frac[0] / frac[1]);
    $display("communication power:   gated %0.3f always-on %0.3f (relative %0.3f)",
             power[0], power[1], power[0] / power[1]);
    // not built: a clock sent only with data (one pulse per word, no idle
    // pulses); its figures follow from the gated run's word counts
    $display("clock only with data (computed): active %0.3f power %0.3f (relative %0.3f / %0.3f)",
             frac_data_only, frac_data_only, frac_data_only / frac[1],
             frac_data_only / power[1]);
    checks++;
    if (!(frac_data_only <= frac[0])) begin
      failures++; $display("gated clock ran less often than the words need");
    end
    checks++;
    if (!(frac[0] < frac[1])) begin failures++; $display("gating saved no clock activity"); end
    checks++;
    if (!(power[0] < power[1])) begin failures++; $display("gating saved no power"); end
    checks++;
    if (frac[1] < 0.99) begin failures++; $display("always-on clock was not always on"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
