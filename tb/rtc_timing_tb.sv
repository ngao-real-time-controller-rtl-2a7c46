// rtc_timing_tb -- self-checking test of the frame clock generator at its
// full-size setting (50,000 clocks per frame, low-order pulse every 8th frame).
// Checks the spacing of frame_sync pulses in clocks, slow_sync on every 8th
// frame, frame_count and frame_phase, and then switches to an external frame
// clock and checks that each rising edge produces one frame_sync three clocks
// later.
module rtc_timing_tb;
  logic clk = 0, rst_n = 0, use_ext = 0, ext_frame = 0;
  logic frame_sync, slow_sync;
  logic [31:0] frame_count, frame_phase;
  int checks = 0, failures = 0;
  longint cyc = 0, last_sync = -1;
  int nsync = 0, nslow = 0;
  always #5 clk = ~clk;
  rtc_timing dut (.clk, .rst_n, .use_ext, .ext_frame, .frame_sync, .slow_sync, .frame_count, .frame_phase);
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask
  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (frame_sync && !use_ext) begin
      if (last_sync >= 0) chk(cyc - last_sync == 50000, $sformatf("frame period %0d", cyc - last_sync));
      last_sync = cyc;
      chk(frame_count == 32'(nsync + 1), "frame_count");
      chk(frame_phase == 0, "phase 0 at sync");
      chk(slow_sync == (nsync % 8 == 0), "slow_sync on every 8th frame");
      nsync++;
      if (slow_sync) nslow++;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (nsync == 17);
    chk(nslow == 3, "three slow pulses in 17 frames");
    // external frame clock
    @(negedge clk); use_ext = 1;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      int seen;
      seen = -1;
      ext_frame = 1;
      for (int c = 1; c <= 6; c++) begin
        @(negedge clk);
        if (frame_sync) begin chk(seen < 0, "single pulse per edge"); seen = c; end
      end
      chk(seen == 3, $sformatf("ext sync latency %0d", seen));
      ext_frame = 0;
      repeat (20 + $urandom_range(0, 30)) begin @(negedge clk); chk(!frame_sync, "no sync without edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
