// tb_tile_cfg: checks the configuration register and the feed-through.
// Reset value, writes to the tile's own address, writes to other
// addresses (ignored), broadcast writes, and that the global signals and
// slow clock leave the tile unchanged.
module tb_tile_cfg;
  import gals_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic [ID_W-1:0] tile_id = 6'd13;
  logic            slow_clk = 1'b0, slow_clk_out;
  global_sig_t     glob_in, glob_out;
  tile_cfg_t       cfg, expect_cfg;
  int checks = 0, failures = 0;

  tile_cfg dut (.tile_id, .slow_clk_in(slow_clk), .glob_in, .slow_clk_out, .glob_out, .cfg);

  always #20_000 slow_clk = ~slow_clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(slow_clk or glob_in) begin
    #1;
    checks++;
    if (glob_out !== glob_in || slow_clk_out !== slow_clk) begin
      failures++; $display("feed-through differs");
    end
  end

  task automatic write(input logic [ID_W-1:0] addr, input tile_cfg_t d);
    @(negedge slow_clk);
    glob_in.cfg_wr = 1'b1; glob_in.cfg_addr = addr; glob_in.cfg_data = d;
    @(negedge slow_clk);
    glob_in.cfg_wr = 1'b0; glob_in.cfg_data = tile_cfg_t'($urandom);
  endtask

  initial begin
    glob_in = '0;
    glob_in.rst_n = 1'b0;
    #50_000;
    checks++;
    if (cfg !== CFG_RESET) begin failures++; $display("reset value wrong"); end
    glob_in.rst_n = 1'b1;
    expect_cfg = CFG_RESET;
    for (int i = 0; i < 60; i++) begin
      tile_cfg_t d;
      logic [ID_W-1:0] a;
      d = tile_cfg_t'($urandom);
      case ($urandom % 3)
        0: a = tile_id;
        1: a = CFG_BCAST;
        default: a = ID_W'($urandom % 36);
      endcase
      write(a, d);
      if (a == tile_id || a == CFG_BCAST) expect_cfg = d;
      checks++;
      if (cfg !== expect_cfg) begin
        failures++; $display("addr %0d: cfg %h expected %h", a, cfg, expect_cfg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
