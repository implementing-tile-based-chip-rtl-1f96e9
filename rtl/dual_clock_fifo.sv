// dual_clock_fifo: FIFO whose write side and read side run on unrelated clocks.
//
// The write side is clocked by the clock forwarded with the data
// (clk_upstrm); the read side by the receiving tile's own clock
// (clk_dnstrm). The words sit in a DEPTH-entry memory. Each side keeps a
// binary pointer and a Gray-coded copy; the Gray pointer crosses to the
// other side through a sync_cfg synchronizer whose depth (0..4 stages) is
// configuration. The read side derives "not empty" from the synchronized
// write pointer, the write side derives "full" from the synchronized read
// pointer.
//
// Flow control is coarse grain: there is no per-word acknowledge. The
// sender keeps writing one word per cycle while fifo_full_out is low.
// fifo_full_out is raised once only RESERVE free entries remain, so the
// words already on their way (the sender's output register and the
// registered full flag) still find room. A word offered when no entry is
// free at all is dropped and flagged by an assertion.
//
// Timing: a word written at a write-clock edge shows as rd_valid after
// stages+1 read-clock edges: one to update the write pointer (write
// logic), `stages` in the synchronizer, one to register the not-empty flag
// (read logic). With two stages this is the ~4-cycle crossing the design
// describes, counting the edge at which the word is read. Read data is
// shown ahead (first-word fall-through): rd_data is valid while rd_valid
// is high and rd_en pops it. Both sides sustain one word per cycle while
// the FIFO is neither full nor empty.
//
// Depth and stage range follow the design description; the Gray-pointer
// scheme, the full reserve and the fall-through read port are this
// implementation's own choices.
module dual_clock_fifo #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned DEPTH    = 32,   // power of two
  parameter int unsigned MAX_SYNC = 4,
  parameter int unsigned RESERVE  = 2
) (
  // write side (clk_upstrm)
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  input  logic [DATA_W-1:0] data_in,
  input  logic              valid_in,
  output logic              fifo_full_out,
  // read side (clk_dnstrm)
  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_valid,
  // configuration (static)
  input  logic [2:0]        sync_stages
);
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [DATA_W-1:0] mem [DEPTH];

  // ---------------- write side ----------------
  ptr_t wbin, wgray, rgray_w, wcount;
  ptr_t rbin, rgray, wgray_r, rbin_next;
  logic wr_ok;

  sync_cfg #(.W(AW + 1), .MAX_STAGES(MAX_SYNC)) u_sync_r2w (
    .clk(wr_clk), .rst_n(wr_rst_n), .stages(sync_stages),
    .d(rgray), .q(rgray_w)
  );

  assign wcount = wbin - gray2bin(rgray_w);
  assign wr_ok  = valid_in && (wcount < ptr_t'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (wr_ok) mem[wbin[AW-1:0]] <= data_in;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin          <= '0;
      wgray         <= '0;
      fifo_full_out <= 1'b0;
    end else begin
      wbin          <= wbin + ptr_t'(wr_ok);
      wgray         <= bin2gray(wbin + ptr_t'(wr_ok));
      fifo_full_out <= (wcount + ptr_t'(wr_ok)) >= ptr_t'(DEPTH - RESERVE);
    end
  end

  // ---------------- read side ----------------

  sync_cfg #(.W(AW + 1), .MAX_STAGES(MAX_SYNC)) u_sync_w2r (
    .clk(rd_clk), .rst_n(rd_rst_n), .stages(sync_stages),
    .d(wgray), .q(wgray_r)
  );

  assign rbin_next = rbin + ptr_t'(rd_en && rd_valid);
  assign rd_data   = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      rd_valid <= gray2bin(wgray_r) != rbin_next;
    end
  end

  // A word offered with no free entry is lost: the sender ignored the
  // full flag, or RESERVE is too small for its pipeline.
  a_no_overflow: assert property (@(posedge wr_clk) disable iff (!wr_rst_n)
                                  valid_in |-> wcount < ptr_t'(DEPTH))
    else $error("dual_clock_fifo: write to a full FIFO, word dropped");
endmodule
