// core_model: stand-in for a tile's processor core in testbenches.
//
// It reads each word from the tile's input FIFO, adds one, and offers the
// result to the tile's output link, holding it while the link is stalled.
// With probability 1/PAUSE_DIV per cycle it does not read (0: never
// pauses), so traffic has gaps. `moved` counts words forwarded.
module core_model
  import gals_pkg::*;
#(
  parameter int unsigned PAUSE_DIV = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t rdata,
  input  logic  rvalid,
  output logic  rd,
  output word_t wdata,
  output logic  wvalid,
  input  logic  wstall,
  output int    moved
);
  timeunit 1ps; timeprecision 1ps;

  logic pause;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pause <= 1'b0;
    else        pause <= (PAUSE_DIV != 0) && ($urandom % PAUSE_DIV == 0);
  end

  assign rd = rvalid && !pause && (!wvalid || !wstall);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wvalid <= 1'b0;
      wdata  <= '0;
      moved  <= 0;
    end else if (rd) begin
      wdata  <= rdata + 16'd1;
      wvalid <= 1'b1;
      moved  <= moved + 1;
    end else if (!wstall) begin
      wvalid <= 1'b0;
    end
  end
endmodule
