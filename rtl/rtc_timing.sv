// rtc_timing -- frame clock generation for the real-time controller.
//
// All real-time processing is driven by one frame clock. This block produces
// a one-clock frame_sync pulse every FRAME_DIV clocks of the 100 MHz system
// clock (50,000 clocks = 2 kHz frame rate), or follows an external frame
// clock (rising edges, after a two-flop synchronizer) when use_ext is 1. A
// second pulse, slow_sync, marks every SLOW_DIV-th frame for the slower
// low-order sensors (8 frames = 250 Hz). frame_count numbers the frames
// (time stamp for telemetry) and frame_phase gives clocks since the last
// frame_sync.
//
// From the design description: the 100 MHz clock, the 2 kHz high-order and
// 250 Hz low-order frame rates, frame synchronization from an internal or an
// external frame clock. This design's own: the divider structure, the
// synchronizer and the counters.
//
// Timing: with the internal source, frame_sync is high on the clock where
// frame_phase wraps to 0; the first pulse comes FRAME_DIV clocks after reset.
module rtc_timing #(
  parameter int unsigned FRAME_DIV = 50_000,  // clocks per frame
  parameter int unsigned SLOW_DIV  = 8        // frames per low-order frame
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        use_ext,
  input  logic        ext_frame,
  output logic        frame_sync,
  output logic        slow_sync,
  output logic [31:0] frame_count,
  output logic [31:0] frame_phase
);

  logic [2:0]  ext_sr;
  logic        tick;
  logic [31:0] div_cnt;
  logic [$clog2(SLOW_DIV+1)-1:0] slow_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ext_sr <= '0;
    end else begin
      ext_sr <= {ext_sr[1:0], ext_frame};
    end
  end

  assign tick = use_ext ? (ext_sr[1] && !ext_sr[2]) : (div_cnt == 32'(FRAME_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt     <= '0;
      slow_cnt    <= '0;
      frame_sync  <= 1'b0;
      slow_sync   <= 1'b0;
      frame_count <= '0;
      frame_phase <= '0;
    end else begin
      frame_sync <= tick;
      slow_sync  <= tick && (slow_cnt == '0);
      div_cnt    <= tick ? '0 : div_cnt + 1'b1;
      if (tick) begin
        frame_count <= frame_count + 1'b1;
        frame_phase <= '0;
        slow_cnt    <= (slow_cnt == ($bits(slow_cnt))'(SLOW_DIV - 1)) ? '0 : slow_cnt + 1'b1;
      end else begin
        frame_phase <= frame_phase + 1'b1;
      end
    end
  end

endmodule
