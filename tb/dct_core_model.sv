// dct_core_model: stand-in core for the 2-D 8x8 DCT workload testbench.
//
// MODE 0 reads groups of 8 words and writes their 8-point DCT:
//   X[k] = (sum_n x[n] * C[k][n] + 128) >>> 8,
//   C[k][n] = round(256 * c(k) * cos((2n+1) k pi / 16)), c(0) = sqrt(1/8), else 1/2,
// with x[n] = word - PIX_OFFSET (128 on the first stage, 0 afterwards).
// MODE 1 reads 64 words (an 8x8 block in row order) and writes it
// transposed. Results queue up and are offered one per cycle to the
// tile's output link, held while it stalls. `moved` counts words written.
module dct_core_model
  import gals_pkg::*;
#(
  parameter int MODE       = 0,
  parameter int PIX_OFFSET = 0
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

  int    coef [8][8];
  int    inbuf[$];
  word_t outq [$];
  localparam int GROUP = (MODE == 0) ? 8 : 64;

  initial begin
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        real ck;
        ck = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
        coef[k][n] = int'($floor(256.0 * ck * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0) + 0.5));
      end
  end

  assign rd = rvalid && (outq.size() < 128);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wvalid <= 1'b0;
      wdata  <= '0;
      moved  <= 0;
      inbuf.delete();
      outq.delete();
    end else begin
      // the word currently offered leaves if not stalled
      if (wvalid && !wstall) moved <= moved + 1;
      if (rd) begin
        inbuf.push_back(int'($signed(rdata)) - PIX_OFFSET);
        if (inbuf.size() == GROUP) begin
          if (MODE == 0) begin
            for (int k = 0; k < 8; k++) begin
              int acc;
              acc = 0;
              for (int n = 0; n < 8; n++) acc += inbuf[n] * coef[k][n];
              outq.push_back(word_t'((acc + 128) >>> 8));
            end
          end else begin
            for (int c = 0; c < 8; c++)
              for (int r = 0; r < 8; r++) outq.push_back(word_t'(inbuf[r * 8 + c]));
          end
          inbuf.delete();
        end
      end
      if (!wvalid || !wstall) begin
        if (outq.size() > 0) begin
          wdata  <= outq.pop_front();
          wvalid <= 1'b1;
        end else begin
          wvalid <= 1'b0;
        end
      end
    end
  end
endmodule
