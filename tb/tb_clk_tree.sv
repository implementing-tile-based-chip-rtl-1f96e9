// tb_clk_tree: checks that every clock edge leaves the tree D_CLKTREE_PS later.
module tb_clk_tree;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 630;
  logic clk_in = 1'b0, clk_out;
  int checks = 0, failures = 0;
  int edges_in = 0, edges_out = 0;

  clk_tree #(.D_CLKTREE_PS(D)) dut (.clk_in, .clk_out);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_out) edges_out++;

  initial begin
    #3000;
    for (int i = 0; i < 30; i++) begin
      clk_in = 1'b1; edges_in++;
      #(D - 1); checks++; if (clk_out !== 1'b0) failures++;
      #2;       checks++; if (clk_out !== 1'b1) failures++;
      #(1052 - D - 1);
      clk_in = 1'b0;
      #(D - 1); checks++; if (clk_out !== 1'b1) failures++;
      #2;       checks++; if (clk_out !== 1'b0) failures++;
      #(1053 - D - 1);
    end
    #2000;
    checks++;
    if (edges_out != edges_in) begin
      failures++; $display("edges in %0d out %0d", edges_in, edges_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
