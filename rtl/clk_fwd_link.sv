// clk_fwd_link: sending end of a source-synchronous inter-tile link.
//
// The word and its valid bit are registered on the tile's clock and sent
// together with a forwarded copy of that clock. To save power the
// forwarded clock runs only around traffic: a clock gate opens when
// the sender offers a word (`valid`), stays open while the registered word
// is on the link (valid_q), and one cycle longer (valid_q2). The receiver
// so gets one clock edge before the word, the edge that captures it, and
// one edge after it. The requirement on data-versus-clock skew is then
// -T < Ddata - Dclk < 2T instead of the much tighter window of a clock that
// pulses only with the data. With always_on set the clock is forwarded
// every cycle, the conservative alternative that inter-chip links may
// prefer.
//
// The register pair and the three-input enable follow the circuit of the
// design description. Own choices: the `hold` input (the receiver's FIFO
// full flag) blocks the word from entering the output register, while
// `valid` alone keeps the gate open, so a stalled sender keeps clocking the
// receiver and its full flag can clear. The gate latches its enable while
// the clock is low (a standard latch-based clock gate), so the forwarded
// clock has no glitches; this latch is intended.
//
// Timing: a word accepted at edge t (valid & !hold) is on data_out/valid_out
// from edge t to t+1; clk_out pulses at edges t, t+1 and t+2 for a single
// word (N+2 pulses for a burst of N words).
module clk_fwd_link #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,        // asynchronous, active low
  input  logic [DATA_W-1:0] data,
  input  logic              valid,        // sender offers `data`
  input  logic              hold,         // receiver full: do not send
  input  logic              always_on,    // forward the clock every cycle
  output logic [DATA_W-1:0] data_out,
  output logic              valid_out,
  output logic              clk_out
);
  timeunit 1ps; timeprecision 1ps;

  logic valid_q2, en, en_latched;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out  <= '0;
      valid_out <= 1'b0;
      valid_q2  <= 1'b0;
    end else begin
      if (valid && !hold) data_out <= data;
      valid_out <= valid && !hold;
      valid_q2  <= valid_out;
    end
  end

  assign en = always_on || valid || valid_out || valid_q2;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign clk_out = clk && en_latched;
endmodule
