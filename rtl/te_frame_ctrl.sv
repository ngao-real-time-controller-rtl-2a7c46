// te_frame_ctrl -- frame-level control of the tomography engine.
//
// The engine is frame based: a frame starts with the global frame sync, the
// sequencer loads new wavefronts, then iterates the tomography loop until the
// error is small enough, a fixed iteration limit is reached, or it is too
// close to the end of the frame to start another iteration. This block keeps
// that bookkeeping and hands it to the sequencer as branch status bits; all
// events of a frame are reported together at the end of the frame.
//
// Handshake with the sequencer (through the control bus, bits evt/ssq_en):
//   evt=1, ssq_en=0  frame start acknowledged: clears the pending frame start,
//                    the iteration count and the sum-of-squares register.
//   evt=1, ssq_en=1  end of an iteration's error transform: one clock later
//                    the accumulated sum of squares is compared with
//                    err_limit, the iteration count is incremented and the sum
//                    is cleared for the next iteration.
// Status outputs (te_pkg ST_*): FRAME_GO (a frame start is pending), CONTINUE
// (running, not converged, below max_iter and not too late), CONVERGED,
// ITER_MAX, TOO_LATE. They reflect an iteration end two clocks after the evt
// word is on the control bus.
// At each frame_sync the frame's outcome is latched into the ev_* outputs: the
// iterations run, whether it converged, hit the limit or stopped for time,
// the last error, and an overrun flag when the previous frame was never
// started by the sequencer. The iteration count and stop flags restart from
// zero at every frame_sync. An invalid state of the controller's state
// machine is counted, flagged on invalid_state and recovered by returning to
// the waiting state.
//
// From the design description: frame-synchronous start, a fixed maximum
// number of iterations, the running sum of squares compared with a criterion
// to stop iterating, the too-close-to-end-of-frame test, events signalled at
// the end of the frame, and the log and external signal for an invalid state.
// This design's own: the evt/ssq_en encoding, the status bit positions, the
// too-late rule (cycles since sync + iter_cycles > frame_len) and the widths.
module te_frame_ctrl
  import te_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_sync,
  input  logic                evt,
  input  logic                ssq_en,
  input  logic [63:0]         ssq,
  output logic                ssq_clr,
  // configuration
  input  logic [63:0]         err_limit,
  input  logic [7:0]          max_iter,
  input  logic [31:0]         frame_len,    // clocks per frame
  input  logic [31:0]         iter_cycles,  // clocks one more iteration needs
  // to the sequencer
  output logic [STATUS_W-1:0] status,
  // end-of-frame events
  output logic                ev_valid,     // one-clock pulse at frame_sync
  output logic [7:0]          ev_iters,
  output logic                ev_converged,
  output logic                ev_iter_max,
  output logic                ev_too_late,
  output logic                ev_overrun,
  output logic [63:0]         ev_err,
  output logic                invalid_state,
  output logic [15:0]         invalid_count
);

  typedef enum logic [2:0] {
    S_IDLE = 3'd0,   // no frame yet
    S_WAIT = 3'd1,   // frame start pending, sequencer not yet acknowledged
    S_RUN  = 3'd2,   // iterating
    S_DONE = 3'd3    // iterations finished for this frame
  } state_e;

  state_e      state;
  logic [7:0]  iters;
  logic        converged, hit_max, stop_late;
  logic [63:0] last_err;
  logic [31:0] cyc;
  logic        iter_end_q;
  logic        too_late, can_continue;

  assign too_late     = (cyc + iter_cycles) > frame_len;
  assign can_continue = (state == S_RUN) && !converged && (iters < max_iter) && !too_late;

  always_comb begin
    status = '0;
    status[ST_FRAME_GO]  = (state == S_WAIT);
    status[ST_CONTINUE]  = can_continue;
    status[ST_CONVERGED] = converged;
    status[ST_ITER_MAX]  = (iters >= max_iter);
    status[ST_TOO_LATE]  = too_late;
  end

  assign ssq_clr = (evt && !ssq_en) || iter_end_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      iters         <= '0;
      converged     <= 1'b0;
      hit_max       <= 1'b0;
      stop_late     <= 1'b0;
      last_err      <= '0;
      cyc           <= '0;
      iter_end_q    <= 1'b0;
      ev_valid      <= 1'b0;
      ev_iters      <= '0;
      ev_converged  <= 1'b0;
      ev_iter_max   <= 1'b0;
      ev_too_late   <= 1'b0;
      ev_overrun    <= 1'b0;
      ev_err        <= '0;
      invalid_state <= 1'b0;
      invalid_count <= '0;
    end else begin
      ev_valid   <= 1'b0;
      iter_end_q <= evt && ssq_en && (state == S_RUN);
      cyc        <= frame_sync ? 32'd1 : cyc + 1'b1;

      if (frame_sync) begin
        ev_valid     <= 1'b1;
        ev_iters     <= iters;
        ev_converged <= converged;
        ev_iter_max  <= hit_max;
        ev_too_late  <= stop_late;
        ev_overrun   <= (state == S_WAIT);
        ev_err       <= last_err;
        state        <= S_WAIT;
        iters        <= '0;
        converged    <= 1'b0;
        hit_max      <= 1'b0;
        stop_late    <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_WAIT: if (evt && !ssq_en) begin
            state     <= S_RUN;
            iters     <= '0;
            converged <= 1'b0;
            hit_max   <= 1'b0;
            stop_late <= 1'b0;
          end
          S_RUN: begin
            if (iter_end_q) begin
              iters     <= iters + 1'b1;
              last_err  <= ssq;
              converged <= (ssq <= err_limit);
              hit_max   <= (iters + 1'b1 >= max_iter);
              stop_late <= too_late && (ssq > err_limit) && (iters + 1'b1 < max_iter);
              if ((ssq <= err_limit) || (iters + 1'b1 >= max_iter) || too_late) state <= S_DONE;
            end
          end
          S_DONE: ;
          default: begin
            invalid_state <= 1'b1;
            invalid_count <= invalid_count + 1'b1;
            state         <= S_IDLE;
          end
        endcase
      end
    end
  end

endmodule
