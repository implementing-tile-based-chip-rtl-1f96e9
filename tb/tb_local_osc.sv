// tb_local_osc: checks that the oscillator is silent while disabled, runs
// at its period (and duty cycle) when enabled, and stops low without a
// short pulse when disabled.
module tb_local_osc;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned P = 2105;
  logic en, clk;
  int checks = 0, failures = 0;
  int edges = 0;
  time last_rise, last_fall;

  local_osc #(.PERIOD_PS(P), .PHASE_PS(300)) dut (.en, .clk);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (edges > 0) begin
      checks++;
      if ($time - last_rise != P) begin
        failures++; $display("period %0t", $time - last_rise);
      end
    end
    last_rise = $time;
    edges++;
  end

  always @(negedge clk) if (edges > 0) begin
    checks++;
    if ($time - last_rise != P / 2) begin
      failures++; $display("high time %0t", $time - last_rise);
    end
    last_fall = $time;
  end

  initial begin
    en = 1'b0;
    #20_000;
    checks++;
    if (edges != 0) begin failures++; $display("clock ran while disabled"); end
    en = 1'b1;
    #(100 * P + 10);
    checks++;
    if (edges < 99 || edges > 100) begin failures++; $display("edges %0d", edges); end
    en = 1'b0;
    #(2 * P);
    edges = 0;
    #(20 * P);
    checks++;
    if (edges != 0 || clk !== 1'b0) begin failures++; $display("clock did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
