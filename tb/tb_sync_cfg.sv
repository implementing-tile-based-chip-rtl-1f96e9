// tb_sync_cfg: checks that the synchronizer delays its input by exactly the
// configured number of clock edges (0..4; 5..7 behave as 4), with random
// data, against a reference history kept by the testbench.
module tb_sync_cfg;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 6;
  logic         clk = 1'b0, rst_n;
  logic [2:0]   stages;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [8];
  int checks = 0, failures = 0;

  sync_cfg #(.W(W), .MAX_STAGES(4)) dut (.clk, .rst_n, .stages, .d, .q);

  always #500 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; d = '0; stages = '0;
    for (int i = 0; i < 8; i++) hist[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      stages = 3'(s);
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        // hist[k] = value of d k edges ago (hist[0] = current d)
        for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
        d = W'($urandom);
        hist[0] = d;
        #1;
        if (n >= 5) begin
          checks++;
          if (q !== hist[(s > 4) ? 4 : s]) begin
            failures++;
            $display("stages=%0d: q=%h expected %h", s, q, hist[(s > 4) ? 4 : s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
