// tb_cfg_delay: checks that the delay stage delays its input by D_MUX with
// the DLY element bypassed and by D_MUX + D_DLY with it selected, to the ps.
module tb_cfg_delay;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DM = 315, DD = 1050;
  logic        sel;
  logic [16:0] d, q;
  int checks = 0, failures = 0;

  cfg_delay #(.W(17), .D_MUX_PS(DM), .D_DLY_PS(DD)) dut (.sel, .d, .q);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic [16:0] v);
    int unsigned dl;
    logic [16:0] old;
    dl  = s ? DM + DD : DM;
    old = d;
    sel = s;
    d   = v;
    #(dl - 1);
    checks++;
    if (q !== old) begin failures++; $display("sel=%0d changed early", s); end
    #2;
    checks++;
    if (q !== v) begin failures++; $display("sel=%0d q=%h expected %h", s, q, v); end
    #3000;
  endtask

  initial begin
    sel = 1'b0; d = '0;
    #5000;
    for (int i = 0; i < 20; i++) step(1'(i % 2), 17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
