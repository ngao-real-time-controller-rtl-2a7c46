// rtc_param_bank_tb -- self-checking test of the frame-synchronous parameter
// registers. Random writes at random times; after every clock the active
// registers must equal the testbench's model, which copies the shadow
// values only on frame_sync. Writes in the same clock as frame_sync must
// take effect only at the following frame_sync; both cases are counted and
// must occur. Also checks read-back of the shadow copy and the pending flag.
module rtc_param_bank_tb;
  localparam int NREG = 16;
  logic clk = 0, rst_n = 0, frame_sync = 0, wr_en = 0;
  logic [3:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic pending;
  logic [31:0] active [NREG];
  logic [31:0] m_sh [NREG], m_act [NREG];
  logic m_pend;
  int checks = 0, failures = 0, n_same = 0, n_commit = 0;
  always #5 clk = ~clk;
  rtc_param_bank #(.NREG(NREG)) dut (.clk, .rst_n, .frame_sync, .wr_en, .wr_addr, .wr_data,
                                     .rd_addr, .rd_data, .pending, .active);
  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    for (int i = 0; i < NREG; i++) begin m_sh[i] = 0; m_act[i] = 0; end
    m_pend = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      frame_sync = ($urandom_range(0, 19) == 0);
      wr_en      = ($urandom_range(0, 2) == 0);
      wr_addr    = 4'($urandom);
      wr_data    = $urandom;
      rd_addr    = 4'($urandom);
      #1;
      checks++;
      if (rd_data !== m_sh[rd_addr]) begin failures++; $display("readback mismatch"); end
      @(posedge clk);
      if (frame_sync) begin m_act = m_sh; n_commit++; if (wr_en) n_same++; end
      if (wr_en) m_sh[wr_addr] = wr_data;
      m_pend = wr_en || (m_pend && !frame_sync);
      @(negedge clk);
      for (int i = 0; i < NREG; i++) begin
        checks++;
        if (active[i] !== m_act[i]) begin failures++; if (failures < 10) $display("t=%0d active[%0d]=%h exp %h", t, i, active[i], m_act[i]); end
      end
      checks++;
      if (pending !== m_pend) begin failures++; $display("pending mismatch"); end
    end
    checks++;
    if (n_same == 0 || n_commit == 0) begin failures++; $display("write-at-sync case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
