// te_frame_delay -- one-frame delay of the woofer wavefront.
//
// The woofer deformable mirror is driven closed loop, so every wavefront
// sensor sees the woofer correction applied in the previous frame. The engine
// adds that woofer wavefront back to the incoming sensor wavefronts. This
// block stores one frame of the woofer wavefront and plays it back during the
// next frame.
//
// The data are a stream of NY words per clock (one per array row), DEPTH words
// per row per frame (real and imaginary parts alternate, so DEPTH = 2*NX).
// Two banks alternate: the bank written during frame f is read during frame
// f+1, so reads and writes in the same frame never collide. frame_sync swaps
// the banks and restarts both word counters.
//
// From the design description: only the block's name and place (a "1-Frame
// Delay" between the woofer wavefront and the adder on the sensor inputs).
// The double-banked memory, the stream format and the look-ahead read are
// this design's choices.
//
// Timing: rd_data always shows the word at the current read position (a
// registered look-ahead), so it can be added to the input word in the same
// clock as rd_en; rd_en advances the position. Writes take effect at the
// clock edge. Memory contents are not reset; instead each bank carries a
// flag, cleared by reset and set by its first write, and a bank that has not
// been written since reset reads as zero. The read register is cleared by
// reset.
module te_frame_delay
  import te_pkg::*;
#(
  parameter int unsigned NY    = 88,
  parameter int unsigned DEPTH = 176
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_sync,
  input  logic  wr_en,
  input  word_t wr_data [NY],
  input  logic  rd_en,
  output word_t rd_data [NY]
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  word_t mem [2][DEPTH][NY];
  logic  wbank;
  logic [1:0] written;
  logic [IW-1:0] wr_idx, rd_idx, rd_nxt;

  assign rd_nxt = (rd_idx == IW'(DEPTH - 1)) ? '0 : rd_idx + 1'b1;

  always_ff @(posedge clk) begin
    if (wr_en && !frame_sync) mem[wbank][wr_idx] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      written <= '0;
      wbank  <= 1'b0;
      wr_idx <= '0;
      rd_idx <= '0;
      for (int y = 0; y < NY; y++) rd_data[y] <= '0;
    end else if (frame_sync) begin
      wbank   <= !wbank;
      wr_idx  <= '0;
      rd_idx  <= '0;
      rd_data <= written[wbank] ? mem[wbank][0] : '{default: '0};
    end else begin
      if (wr_en) begin
        wr_idx          <= (wr_idx == IW'(DEPTH - 1)) ? '0 : wr_idx + 1'b1;
        written[wbank]  <= 1'b1;
      end
      if (rd_en) begin
        rd_idx  <= rd_nxt;
        rd_data <= written[!wbank] ? mem[!wbank][rd_nxt] : '{default: '0};
      end
    end
  end

endmodule
