// te_frame_ctrl_tb -- self-checking test of the tomography frame controller.
// Acts as the sequencer: acknowledges frame starts and signals iteration ends
// with chosen sums of squares. Scenarios, each counted and required:
//   convergence after 3 iterations, stop at the iteration limit, stop because
//   too little of the frame is left, and an overrun (frame never started).
// Checks the status bits two clocks after an iteration end, the end-of-frame
// event outputs at the next frame_sync, and the clearing of the sum.
module te_frame_ctrl_tb;
  import te_pkg::*;
  logic clk = 0, rst_n = 0, frame_sync = 0, evt = 0, ssq_en = 0, ssq_clr;
  logic [63:0] ssq = 0, err_limit = 1000, ev_err;
  logic [7:0] max_iter = 5, ev_iters;
  logic [31:0] frame_len = 1000, iter_cycles = 100;
  logic [STATUS_W-1:0] status;
  logic ev_valid, ev_converged, ev_iter_max, ev_too_late, ev_overrun, invalid_state;
  logic [15:0] invalid_count;
  int checks = 0, failures = 0;
  int n_conv = 0, n_max = 0, n_late = 0, n_over = 0;
  always #5 clk = ~clk;
  te_frame_ctrl dut (.clk, .rst_n, .frame_sync, .evt, .ssq_en, .ssq, .ssq_clr, .err_limit, .max_iter,
    .frame_len, .iter_cycles, .status, .ev_valid, .ev_iters, .ev_converged, .ev_iter_max, .ev_too_late,
    .ev_overrun, .ev_err, .invalid_state, .invalid_count);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask
  task automatic sync();
    @(negedge clk); frame_sync = 1; @(negedge clk); frame_sync = 0;
  endtask
  task automatic ack();
    chk(status[ST_FRAME_GO], "FRAME_GO pending");
    evt = 1; ssq_en = 0; #1; chk(ssq_clr, "ssq_clr on ack");
    @(negedge clk); evt = 0;
    chk(status[ST_CONTINUE] && !status[ST_FRAME_GO], "running after ack");
  endtask
  task automatic iter_end(input logic [63:0] v);
    evt = 1; ssq_en = 1; ssq = v;
    @(negedge clk); evt = 0; ssq_en = 0;
    #1; chk(ssq_clr, "ssq_clr after iteration end");
    @(negedge clk);
  endtask
  task automatic check_events(input int iters, input bit conv, input bit mx, input bit late, input bit over, input logic [63:0] err);
    sync();
    chk(ev_valid, "ev_valid pulse");
    chk(ev_iters == 8'(iters), $sformatf("ev_iters %0d exp %0d", ev_iters, iters));
    chk(ev_converged == conv && ev_iter_max == mx && ev_too_late == late && ev_overrun == over,
        $sformatf("flags c%0d m%0d l%0d o%0d", ev_converged, ev_iter_max, ev_too_late, ev_overrun));
    chk(ev_err == err, "ev_err");
    if (ev_converged) n_conv++;
    if (ev_iter_max) n_max++;
    if (ev_too_late) n_late++;
    if (ev_overrun) n_over++;
    @(negedge clk); chk(!ev_valid, "ev_valid one clock");
  endtask

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    sync();
    // frame 1: converges in the 3rd iteration
    ack();
    iter_end(5000); chk(status[ST_CONTINUE], "continue after 1");
    iter_end(2000); chk(status[ST_CONTINUE], "continue after 2");
    iter_end(900);  chk(!status[ST_CONTINUE] && status[ST_CONVERGED], "converged");
    check_events(3, 1, 0, 0, 0, 900);
    // frame 2: iteration limit
    max_iter = 3;
    ack();
    for (int i = 0; i < 3; i++) iter_end(64'(5000 + i));
    chk(!status[ST_CONTINUE] && status[ST_ITER_MAX], "iteration limit");
    check_events(3, 0, 1, 0, 0, 5002);
    // frame 3: too late after the 2nd iteration
    max_iter = 20; iter_cycles = 100; frame_len = 20;
    @(negedge clk);
    frame_len = 1000;
    ack();
    repeat (800) @(negedge clk);
    iter_end(7000); chk(status[ST_CONTINUE], "time left after 1st");
    repeat (100) @(negedge clk);
    iter_end(6000); chk(!status[ST_CONTINUE] && status[ST_TOO_LATE], "too late");
    check_events(2, 0, 0, 1, 0, 6000);
    // frame 4: never acknowledged
    repeat (10) @(negedge clk);
    check_events(0, 0, 0, 0, 1, 6000);
    chk(!invalid_state && invalid_count == 0, "no invalid state");
    chk(n_conv == 1 && n_max == 1 && n_late == 1 && n_over == 1, "all stop reasons seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
