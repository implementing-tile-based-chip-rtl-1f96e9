// tb_clk_fwd_link: checks the clock-forwarding link sender.
//  * Gated mode: a burst of N words produces exactly N+2 forwarded clock
//    pulses (one before, one after the data), and none while idle.
//  * A receiver clocked by the forwarded clock sees every accepted word,
//    in order, exactly once, including while `hold` blocks words.
//  * While the sender is held the clock keeps running.
//  * always_on forwards a pulse every cycle.
module tb_clk_fwd_link;
  timeunit 1ps; timeprecision 1ps;

  logic        clk = 1'b0, rst_n;
  logic [15:0] data, data_out;
  logic        valid, hold, always_on, valid_out, clk_out;
  int checks = 0, failures = 0;
  int pulses = 0;
  logic [15:0] sent_q[$];
  logic [15:0] next = 16'h0100;

  clk_fwd_link #(.DATA_W(16)) dut (
    .clk, .rst_n, .data, .valid, .hold, .always_on, .data_out, .valid_out, .clk_out
  );

  always #1052 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_out) pulses++;

  // sender side: record accepted words
  always @(posedge clk) if (rst_n && valid && !hold) sent_q.push_back(data);

  // receiver side: captures on the forwarded clock. A real receiver sees
  // the clock through its clock tree, after the launch edge; the values
  // held during the low phase stand in for that.
  logic [15:0] d_snap;
  logic        v_snap;
  always @(negedge clk) begin
    d_snap = data_out;
    v_snap = valid_out;
  end
  always @(posedge clk_out) begin
    if (v_snap) begin
      checks++;
      if (sent_q.size() == 0 || d_snap !== sent_q[0]) begin
        failures++; $display("received %h unexpected", d_snap);
      end else void'(sent_q.pop_front());
    end
  end

  task automatic burst(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      valid = 1'b1; data = next; next++;
    end
    @(negedge clk);
    valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; valid = 1'b0; hold = 1'b0; always_on = 1'b0; data = '0;
    #5000;
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    // idle: no pulses
    pulses = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (pulses != 0) begin failures++; $display("%0d pulses while idle", pulses); end
    // bursts of 1..6 words
    for (int n = 1; n <= 6; n++) begin
      pulses = 0;
      burst(n);
      repeat (6) @(negedge clk);
      checks++;
      if (pulses != n + 2) begin
        failures++; $display("burst %0d: %0d pulses, expected %0d", n, pulses, n + 2);
      end
    end
    // held sender keeps the clock running, sends nothing
    pulses = 0;
    @(negedge clk); hold = 1'b1; valid = 1'b1; data = next;
    repeat (8) @(negedge clk);
    checks++;
    if (pulses < 7) begin failures++; $display("clock stopped while held (%0d)", pulses); end
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("word sent while held"); end
    hold = 1'b0; next++;
    @(negedge clk); valid = 1'b0;
    // random valid/hold traffic
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (valid && !hold) next++;
      valid = ($urandom % 3) != 0;
      hold  = ($urandom % 4) == 0;
      data  = next;
    end
    @(negedge clk); valid = 1'b0; hold = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("%0d words not received", sent_q.size()); end
    // always-on mode
    always_on = 1'b1;
    @(negedge clk);
    pulses = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (pulses != 10) begin failures++; $display("always-on: %0d pulses in 10 cycles", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
