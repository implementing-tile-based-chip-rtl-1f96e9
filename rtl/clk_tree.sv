// clk_tree: clock tree of the receiving tile, seen as a delay.
// Behavioural model (not synthesizable): a real clock tree is a buffer
// network built during placement and routing.
//
// The clock forwarded from a neighbour is buffered into the receiving
// tile's FIFO write logic; its insertion delay D_CLKTREE_PS (6 FO4 in the
// design description's example) is what the link's inserted data delay has
// to match. The delay must be shorter than a clock half period.
module clk_tree #(
  parameter int unsigned D_CLKTREE_PS = 630
) (
  input  logic clk_in,
  output logic clk_out
);
  timeunit 1ps; timeprecision 1ps;

  logic clk_d;

  initial clk_d = 1'b0;

  initial forever begin
    @(clk_in);
    fork
      begin
        automatic logic v = clk_in;
        #(D_CLKTREE_PS) clk_d = v;
      end
    join_none
  end

  assign clk_out = clk_d;
endmodule
