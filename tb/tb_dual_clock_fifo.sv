// tb_dual_clock_fifo: checks the dual-clock FIFO.
//  1. Crossing latency: with equal clocks and the read clock lagging, a
//     single word shows as rd_valid exactly stages+1 read edges after its
//     write edge, for every stage setting 0..4.
//  2. Throughput: with equal clocks and both sides always willing, one
//     word per cycle passes once the pipeline has filled.
//  3. Random traffic with a fast writer and a slow reader (full flag must
//     rise, no word may be lost) and the other way round (reader drains to
//     empty). Every word read is compared with a reference queue.
module tb_dual_clock_fifo;
  timeunit 1ps; timeprecision 1ps;

  localparam int DW = 16, DEPTH = 32;

  logic          wr_clk = 1'b0, rd_clk = 1'b0;
  logic          rst_n;
  logic [DW-1:0] data_in, rd_data;
  logic          valid_in, fifo_full_out, rd_en, rd_valid;
  logic [2:0]    sync_stages;

  int unsigned wr_half = 1052, rd_half = 1052;
  int checks = 0, failures = 0;
  int full_cycles = 0;
  logic [DW-1:0] ref_q[$];
  logic          rand_mode = 1'b0;
  int unsigned   wr_div = 1, rd_div = 1;
  logic [DW-1:0] next_word = '0;
  int            popped = 0;

  dual_clock_fifo #(.DATA_W(DW), .DEPTH(DEPTH), .MAX_SYNC(4), .RESERVE(2)) dut (
    .wr_clk, .wr_rst_n(rst_n), .data_in, .valid_in, .fifo_full_out,
    .rd_clk, .rd_rst_n(rst_n), .rd_en, .rd_data, .rd_valid, .sync_stages
  );

  initial forever #(wr_half) wr_clk = ~wr_clk;
  initial begin #700; forever #(rd_half) rd_clk = ~rd_clk; end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: words written / words read
  always @(posedge wr_clk) if (rst_n && valid_in) ref_q.push_back(data_in);
  always @(posedge rd_clk) begin
    if (rst_n && rd_en && rd_valid) begin
      checks++;
      popped++;
      if (ref_q.size() == 0) begin
        failures++; $display("read from an empty reference");
      end else begin
        if (rd_data !== ref_q[0]) begin
          failures++; $display("read %h expected %h", rd_data, ref_q[0]);
        end
        void'(ref_q.pop_front());
      end
    end
  end
  always @(posedge wr_clk) if (fifo_full_out) full_cycles++;

  // random drivers, active in rand_mode
  always @(negedge wr_clk) if (rand_mode) begin
    if (valid_in) next_word = next_word + 1'b1;
    valid_in = !fifo_full_out && ($urandom % wr_div == 0);
    data_in  = next_word;
  end
  always @(negedge rd_clk) if (rand_mode) rd_en = ($urandom % rd_div == 0);

  task automatic do_reset(input logic [2:0] s);
    rst_n = 1'b0; valid_in = 1'b0; rd_en = 1'b0; data_in = '0;
    sync_stages = s;
    ref_q.delete();
    #5000;
    rst_n = 1'b1;
    #10_000;
  endtask

  initial begin
    // ---- 1. latency per synchronizer setting
    for (int s = 0; s <= 4; s++) begin
      int n;
      do_reset(3'(s));
      @(negedge wr_clk);
      valid_in = 1'b1; data_in = 16'hA500 + 16'(s);
      @(posedge wr_clk);
      #1 valid_in = 1'b0;
      n = 0;
      do begin
        @(posedge rd_clk); n++; #1;
      end while (!rd_valid && n < 20);
      checks++;
      if (n != s + 1) begin
        failures++; $display("stages=%0d: latency %0d read edges, expected %0d", s, n, s + 1);
      end
      @(negedge rd_clk); rd_en = 1'b1;
      @(negedge rd_clk); rd_en = 1'b0;
      checks++;
      if (rd_valid) begin failures++; $display("not empty after single read"); end
    end

    // ---- 2. throughput: 1 word per cycle
    begin
      int pops = 0;
      do_reset(3'd2);
      rd_en = 1'b1;
      fork
        begin
          for (int i = 0; i < 200; i++) begin
            @(negedge wr_clk); valid_in = !fifo_full_out; data_in = 16'(i);
          end
          @(negedge wr_clk); valid_in = 1'b0;
        end
        begin
          repeat (20) @(posedge rd_clk);
          repeat (150) begin @(posedge rd_clk); if (rd_valid) pops++; end
        end
      join
      checks++;
      if (pops != 150) begin failures++; $display("throughput %0d words in 150 cycles", pops); end
      repeat (20) @(posedge rd_clk);
      rd_en = 1'b0;
    end

    // ---- 3a. fast writer, slow reader
    wr_half = 900; rd_half = 1400;
    do_reset(3'd3);
    full_cycles = 0; popped = 0; next_word = 16'h4000;
    wr_div = 1; rd_div = 2;
    rand_mode = 1'b1;
    repeat (2000) @(posedge wr_clk);
    checks++;
    if (full_cycles == 0) begin failures++; $display("full flag never rose"); end
    // ---- 3b. slow writer, fast reader
    rand_mode = 1'b0; valid_in = 1'b0; rd_en = 1'b1;
    repeat (100) @(posedge rd_clk);
    checks++;
    if (rd_valid || ref_q.size() != 0) begin failures++; $display("FIFO did not drain"); end
    wr_half = 1600; rd_half = 800;
    wr_div = 3; rd_div = 1;
    rand_mode = 1'b1;
    repeat (1500) @(posedge wr_clk);
    rand_mode = 1'b0; valid_in = 1'b0; rd_en = 1'b1;
    repeat (100) @(posedge rd_clk);
    checks++;
    if (ref_q.size() != 0) begin failures++; $display("%0d words lost", ref_q.size()); end
    checks++;
    if (popped < 1000) begin failures++; $display("only %0d words moved", popped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
