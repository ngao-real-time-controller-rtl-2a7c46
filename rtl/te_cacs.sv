// te_cacs -- Cycle Accurate Control Sequencer of the tomography engine.
//
// The whole PE array runs one program with no per-PE branching, so control is
// a stream of wide control words from a small sequencer: a program RAM, a
// program counter, an idle down-counter, two coefficient address up-counters
// and the control bus register. Each 24-bit instruction is one of:
//   bit 23 set  IDLE:    hold the program counter so the instruction occupies
//                        N = data[19:0] clocks in total (N = 0 counts as 1);
//                        the control bus keeps its value meanwhile.
//   bit 20 set  BRANCH:  if the condition in data[19:16] holds, jump to the
//                        address in data[PAW-1:0], else fall through.
//   bit 22 / 21 LOAD:    load the real (22) and/or imaginary (21) coefficient
//                        counter with data[COEF_AW-1:0].
//   none set    CONTROL: the control bus register takes data[19:0].
// Priority when several flags are set: IDLE, then BRANCH, then the counter
// loads (22 and 21 may be combined). The coefficient counters count up by one
// every clock the sequencer runs unless loaded.
// Branch conditions (data[19:16]): 0 = always, 1..7 = status[c] is 1,
// 8 = never, 9..15 = status[c-8] is 0.
//
// From the design description: the instruction bits 23/22/21/20 and their
// meaning, the control sequence up-counter as program counter, idle counts
// that save program space, two coefficient up-counters, cycle-by-cycle control
// bus changes and a BlockRAM program memory loaded by the control processor.
// This design's own: the condition field, the priority of the flags, the
// program size (PAW) and the write port used to load the program.
//
// Timing: the program RAM is read synchronously at the next program counter,
// so every instruction, including a taken branch, takes one clock (an IDLE N
// takes N clocks). Effects of an instruction (control bus, counters) appear
// in the clock after it executes. While run is 0 the sequencer restarts at
// address 0 and the control bus is held at all zeroes.
module te_cacs
  import te_pkg::*;
#(
  parameter int unsigned PAW = 10     // program address width (1024 words)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  // program load port (control processor)
  input  logic                prog_we,
  input  logic [PAW-1:0]      prog_addr,
  input  logic [INSTR_W-1:0]  prog_data,
  // status from the frame controller
  input  logic [STATUS_W-1:0] status,
  // outputs
  output cbus_t               cbus,
  output logic [COEF_AW-1:0]  cnt_a,
  output logic [COEF_AW-1:0]  cnt_b,
  output logic [PAW-1:0]      pc,
  output logic                idling
);

  logic [INSTR_W-1:0] prog [2**PAW];
  logic [INSTR_W-1:0] instr_q;
  logic [PAW-1:0]     pc_q, pc_next;
  logic [19:0]        idle_q;
  logic               started;      // instr_q holds a valid instruction
  logic [19:0]        data;
  logic               take;

  assign data = instr_q[19:0];

  function automatic logic cond_true(input logic [3:0] c, input logic [STATUS_W-1:0] st);
    if (c == 4'd0)       return 1'b1;
    else if (c == 4'd8)  return 1'b0;
    else if (c < 4'd8)   return st[c[2:0]];
    else                 return !st[c[2:0]];
  endfunction

  assign take = cond_true(data[19:16], status);

  // Next program counter.
  always_comb begin
    pc_next = pc_q;
    if (!run || !started) pc_next = '0;
    else if (idle_q != 0) pc_next = (idle_q == 20'd1) ? pc_q + 1'b1 : pc_q;
    else if (instr_q[I_IDLE]) pc_next = (data > 20'd1) ? pc_q : pc_q + 1'b1;
    else if (instr_q[I_BRANCH]) pc_next = take ? data[PAW-1:0] : pc_q + 1'b1;
    else pc_next = pc_q + 1'b1;
  end

  // Program RAM: write port and synchronous read at the next PC.
  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_data;
    instr_q <= prog[pc_next];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !run) begin
      pc_q    <= '0;
      idle_q  <= '0;
      started <= 1'b0;
      cbus    <= '0;
      cnt_a   <= '0;
      cnt_b   <= '0;
    end else begin
      started <= 1'b1;
      pc_q    <= pc_next;
      cnt_a   <= cnt_a + 1'b1;
      cnt_b   <= cnt_b + 1'b1;
      if (!started) begin
        idle_q <= '0;
      end else if (idle_q != 0) begin
        idle_q <= idle_q - 1'b1;
      end else if (instr_q[I_IDLE]) begin
        idle_q <= (data > 20'd1) ? data - 20'd1 : 20'd0;
      end else if (instr_q[I_BRANCH]) begin
        // branch only
      end else if (instr_q[I_LDRE] || instr_q[I_LDIM]) begin
        if (instr_q[I_LDRE]) cnt_a <= data[COEF_AW-1:0];
        if (instr_q[I_LDIM]) cnt_b <= data[COEF_AW-1:0];
      end else begin
        cbus <= cbus_t'(data[CBUS_W-1:0]);
      end
    end
  end

  assign pc     = pc_q;
  assign idling = (idle_q != 0);

endmodule
