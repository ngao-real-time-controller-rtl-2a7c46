// te_cacs_tb -- self-checking test of the cycle-accurate control sequencer.
// Loads a short program using every instruction type (control word, counter
// loads, idle, conditional and unconditional branch), runs it with the
// branch status bit low and then high, and checks the control bus, the
// coefficient counters and the idle flag clock by clock against the timing
// derived by hand from the instruction definitions: one clock per
// instruction, IDLE N holding N clocks, effects visible after the clock in
// which an instruction executes, and branches costing no extra clock.
module te_cacs_tb;
  import te_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, prog_we = 0;
  logic [9:0] prog_addr = 0, pc;
  logic [23:0] prog_data = 0;
  logic [STATUS_W-1:0] status = 0;
  cbus_t cbus;
  logic [10:0] cnt_a, cnt_b;
  logic idling;
  int checks = 0, failures = 0, edge_n;
  always #5 clk = ~clk;
  te_cacs dut (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data, .status, .cbus, .cnt_a, .cnt_b, .pc, .idling);

  task automatic wr(input int a, input logic [23:0] d);
    @(negedge clk); prog_we = 1; prog_addr = 10'(a); prog_data = d;
    @(negedge clk); prog_we = 0;
  endtask
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL edge %0d: %s", edge_n, msg); end
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
    wr(0, 24'h000011);                       // control word 0x11
    wr(1, 24'h600005);                       // load both counters with 5
    wr(2, 24'h800004);                       // idle 4 clocks
    wr(3, 24'h000022);                       // control word 0x22
    wr(4, 24'h100000 | (9 << 16) | 0);       // if status[1] == 0 goto 0
    wr(5, 24'h000033);                       // control word 0x33
    wr(6, 24'h400100);                       // load real counter 0x100
    wr(7, 24'h100005);                       // goto 5
    for (int sc = 0; sc < 2; sc++) begin
      status = (sc != 0) ? 8'h02 : 8'h00;
      @(negedge clk); run = 1;
      for (edge_n = 1; edge_n <= 40; edge_n++) begin
        @(negedge clk);
        if (edge_n == 1) chk(cbus == '0 && cnt_a == 11'd1, "after start");
        if (edge_n >= 2 && edge_n < 8) chk(cbus == cbus_t'(20'h11), "cbus 0x11 after I0");
        if (edge_n >= 3 && edge_n <= 8) chk(cnt_a == 11'(5 + edge_n - 3) && cnt_b == cnt_a, "counters loaded and counting");
        if (edge_n >= 4 && edge_n <= 6) chk(idling, "idling during IDLE");
        if (edge_n == 7) chk(!idling, "idle ends");
        if (edge_n == 8 || edge_n == 9) chk(cbus == cbus_t'(20'h22), "cbus 0x22 after I3");
        if (sc == 0) begin
          // loop 0..4 of 8 clocks
          if (edge_n >= 10) begin
            int ph;
            ph = (edge_n - 10) % 8;
            chk(cbus == cbus_t'(ph < 6 ? 20'h11 : 20'h22), "loop 0..4 control word");
            if (ph >= 1 && ph <= 6) chk(cnt_a == 11'(5 + ph - 1), "counter reload in loop");
          end
        end else begin
          if (edge_n >= 10) chk(cbus == cbus_t'(20'h33), "cbus 0x33 in loop 5..7");
          if (edge_n >= 11) begin
            int ph;
            ph = (edge_n - 11) % 3;
            chk(cnt_a == 11'(32'h100 + ph) && cnt_b == 11'(edge_n - 3 + 5), "real counter reload only");
          end
        end
      end
      @(negedge clk); run = 0;
      @(negedge clk);
      chk(cbus == '0 && pc == '0, "run=0 restarts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
