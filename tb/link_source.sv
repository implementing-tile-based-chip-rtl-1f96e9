// link_source: testbench traffic generator that behaves like a sending tile.
//
// It has its own oscillator (period PERIOD_PS, phase PHASE_PS), a
// clk_fwd_link sender and the sender-side delay stage (DLY element in when
// dly_sel is set), so its link looks to a receiver exactly like a
// neighbouring tile's.
// While `run` is high it offers the words BASE, BASE+1, ... (N_WORDS of
// them), leaving a random idle cycle with probability 1/GAP_DIV, and holds
// a word while `full` is high. `sent` counts accepted words.
module link_source
  import gals_pkg::*;
#(
  parameter int unsigned PERIOD_PS = 2105,
  parameter int unsigned PHASE_PS  = 0,
  parameter int unsigned N_WORDS   = 100,
  parameter int unsigned GAP_DIV   = 4,
  parameter logic [15:0] BASE      = 16'h1000
) (
  input  logic  rst_n,
  input  logic  run,
  input  logic  always_on,
  input  logic  dly_sel,
  output link_t link,
  input  logic  full,
  output int    sent,
  output logic  clk
);
  timeunit 1ps; timeprecision 1ps;

  word_t           data;
  logic            valid;
  word_t           lk_data;
  logic            lk_valid;
  logic [DATA_W:0] dv;

  local_osc #(.PERIOD_PS(PERIOD_PS), .PHASE_PS(PHASE_PS)) u_osc (.en(1'b1), .clk(clk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      data  <= BASE;
      sent  <= 0;
    end else begin
      if (valid && !full) begin
        sent <= sent + 1;
        data <= data + 16'd1;
      end
      if (valid && full) valid <= 1'b1;
      else valid <= run && (sent + int'(valid && !full) < int'(N_WORDS))
                    && ($urandom % GAP_DIV != 0);
    end
  end

  clk_fwd_link #(.DATA_W(DATA_W)) u_link (
    .clk(clk), .rst_n(rst_n), .data(data), .valid(valid), .hold(full),
    .always_on(always_on), .data_out(lk_data), .valid_out(lk_valid), .clk_out(link.clk)
  );

  cfg_delay #(.W(DATA_W + 1), .D_MUX_PS(D_MUX_PS), .D_DLY_PS(D_DLY_PS)) u_dly (
    .sel(dly_sel), .d({lk_valid, lk_data}), .q(dv)
  );

  assign link.valid = dv[DATA_W];
  assign link.data  = dv[DATA_W-1:0];
endmodule
