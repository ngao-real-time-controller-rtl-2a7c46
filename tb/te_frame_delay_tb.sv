// te_frame_delay_tb -- self-checking test of the one-frame delay of the woofer
// wavefront (NY = 4 rows, DEPTH = 8 words per frame). In each frame a random
// wavefront is written; after the next frame_sync the reader must see exactly
// that wavefront, first word right after frame_sync and one new word per
// rd_en, while the next frame is being written at the same time.
module te_frame_delay_tb;
  import te_pkg::*;
  localparam int NY = 4, DEPTH = 8;
  logic clk = 0, rst_n = 0, frame_sync = 0, wr_en = 0, rd_en = 0;
  word_t wr_data [NY], rd_data [NY];
  word_t hist [2][DEPTH][NY];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  te_frame_delay #(.NY(NY), .DEPTH(DEPTH)) dut (.clk, .rst_n, .frame_sync, .wr_en, .wr_data, .rd_en, .rd_data);
  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    for (int y = 0; y < NY; y++) wr_data[y] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      frame_sync = 1; @(negedge clk); frame_sync = 0;
      for (int i = 0; i < DEPTH; i++) begin
        // read side: word i of the previous frame is presented now
        if (f > 0) begin
          for (int y = 0; y < NY; y++) begin
            checks++;
            if (rd_data[y] !== hist[(f-1)%2][i][y]) begin
              failures++;
              if (failures < 10) $display("frame %0d word %0d row %0d: %h exp %h", f, i, y, rd_data[y], hist[(f-1)%2][i][y]);
            end
          end
        end
        wr_en = 1; rd_en = 1;
        for (int y = 0; y < NY; y++) begin wr_data[y] = word_t'($urandom); hist[f%2][i][y] = wr_data[y]; end
        @(negedge clk);
        wr_en = 0; rd_en = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
