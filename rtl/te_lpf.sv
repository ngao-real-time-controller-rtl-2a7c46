// te_lpf -- low-pass filter that derives the woofer wavefront.
//
// The on-axis science wavefront leaving the engine is split into a low-order
// part for the woofer DM and a high-order remainder for the tweeter DM. The
// wavefronts are carried as spatial-frequency (Fourier) coefficients, so the
// low-pass filter is an element-wise weighting: every coefficient is multiplied
// by a programmable weight for its spatial frequency (1.0 below the cut-off and
// 0 above it gives a sharp filter; any taper can be loaded instead).
//
// Stream format: NY words per clock, one per array row; within a frame the
// words of each row arrive as real, imaginary, real, ... for columns
// x = 0 .. NX-1 (2*NX valid words). Real and imaginary parts of a coefficient
// use the same weight. frame_sync restarts the column count.
//
// From the design description: the block's name and its place between the
// science wavefront and the woofer wavefront. The frequency-domain weighting,
// the weight format (signed Q2.16, so that 1.0 = 65536 is exact) and the
// saturation of the result to 18 bits are this design's choices.
//
// Interface: weights are written one at a time (w_we, w_x, w_y, w_data) by the
// control processor. Timing: dout/dout_valid follow din/din_valid by one clock.
module te_lpf
  import te_pkg::*;
#(
  parameter int unsigned NX = 88,
  parameter int unsigned NY = 88
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_sync,
  // weight load port
  input  logic  w_we,
  input  logic [$clog2(NX)-1:0] w_x,
  input  logic [$clog2(NY)-1:0] w_y,
  input  word_t w_data,
  // stream
  input  logic  din_valid,
  input  word_t din [NY],
  output logic  dout_valid,
  output word_t dout [NY]
);

  localparam int unsigned CW = $clog2(2 * NX);
  localparam int unsigned FRAC = 16;

  word_t wmem [NX][NY];
  logic [CW-1:0] cnt;
  logic [$clog2(NX)-1:0] col;

  assign col = cnt[CW-1:1];

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_x][w_y] <= w_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      dout_valid <= 1'b0;
      for (int y = 0; y < NY; y++) dout[y] <= '0;
    end else begin
      dout_valid <= din_valid && !frame_sync;
      if (frame_sync) cnt <= '0;
      else if (din_valid) begin
        cnt <= (cnt == CW'(2 * NX - 1)) ? '0 : cnt + 1'b1;
        for (int y = 0; y < NY; y++)
          dout[y] <= bit_select(acc_t'(din[y]) * acc_t'(wmem[col][y]), 5'(FRAC));
      end
    end
  end

endmodule
