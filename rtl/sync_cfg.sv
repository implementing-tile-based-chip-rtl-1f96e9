// sync_cfg: synchronizer with a configurable number of flip-flop stages.
//
// A chain of MAX_STAGES flip-flops on the destination clock; a multiplexer
// picks the input itself (0 stages) or the output of stage 1..MAX_STAGES.
// Values of `stages` above MAX_STAGES select the last stage. Used for the
// Gray-coded FIFO pointers that cross between the two clocks of a
// dual-clock FIFO. Fewer stages shorten the crossing latency, more stages
// raise the mean time to failure; 0 to 4 stages are selectable, as in the
// design this follows. The stage count is static configuration.
//
// Latency: `stages` destination clock edges from d to q.
module sync_cfg #(
  parameter int unsigned W          = 6,
  parameter int unsigned MAX_STAGES = 4
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low
  input  logic [2:0]   stages,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  logic [MAX_STAGES-1:0][W-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else begin
      chain[0] <= d;
      for (int i = 1; i < MAX_STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  always_comb begin
    if (stages == 3'd0)                        q = d;
    else if (32'(stages) >= MAX_STAGES)        q = chain[MAX_STAGES-1];
    else                                       q = chain[stages - 3'd1];
  end
endmodule
