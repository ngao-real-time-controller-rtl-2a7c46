// tomography_engine_tb -- end-to-end test of the tomography engine (NX = 4,
// NY = 3, NL = 3 layers, NGS = 2 sensors). Loads a sequencer program that
//   once:      shifts a coefficient (0.5) in from the north edge and writes
//              it into every PE's RAM;
//   per frame: waits for the frame start, acknowledges it while loading the
//              sensor wavefronts from the west edge (plus the delayed woofer
//              wavefront), then iterates: every PE multiplies its value by
//              its coefficient (halving it), the rows recirculate once while
//              the sum of squares is formed, the iteration end is signalled
//              and the program branches back while CONTINUE is set.
// The testbench drives frame syncs (one frame gets a second sync one clock
// after the first, before the sequencer could acknowledge it), sensor data in the load window and a
// science wavefront, and checks against values computed here:
//   * the end-of-frame events: iteration count, stop reason (converged,
//     iteration limit, too late, overrun) and the last sum of squares;
//   * woofer (low-pass) and DM (science minus woofer) outputs;
//   * that the woofer wavefront of one frame is added to the sensor data
//     in the next frame (through the last sum of squares).
// Every mechanism is counted and must have happened.
module tomography_engine_tb;
  import te_pkg::*;
  localparam int NX = 4, NY = 3, NL = 3, NGS = 2, PAW = 6, FL = 300;
  logic clk = 0, rst_n = 0, frame_sync = 0, run = 0, prog_we = 0;
  logic [PAW-1:0] prog_addr = 0, pc;
  logic [23:0] prog_data = 0;
  logic [63:0] err_limit = 0, ssq, ev_err;
  logic [7:0] max_iter = 1, ev_iters;
  logic [31:0] frame_len = FL, iter_cycles = 1;
  logic lpf_we = 0;
  logic [1:0] lpf_x = 0, lpf_y = 0;
  word_t lpf_data = 0;
  word_t north_in [NL][NX], south_out [NL][NX], wfs_in [NGS][NY], east_out [NL][NY];
  word_t sci_in [NY], woofer_out [NY], dm_out [NY];
  logic wfs_valid = 0, load_phase, sci_valid = 0, woofer_valid, dm_valid;
  logic [STATUS_W-1:0] status;
  logic ev_valid, ev_converged, ev_iter_max, ev_too_late, ev_overrun, invalid_state, idling;
  logic [15:0] invalid_count;
  int checks = 0, failures = 0;
  int n_conv = 0, n_max = 0, n_late = 0, n_over = 0, n_woof = 0, n_dm = 0, n_wadd = 0, n_err = 0;
  int lpf_w [NX][NY];
  int woof_prev [NX][NY], woof_cur [NX][NY];
  int S [NX][NGS][NY];
  longint exp_err [6];
  int exp_iters [6];
  int wq_head, wq_tail;
  int wq_w [64][NY], wq_d [64][NY];

  always #5 clk = ~clk;

  tomography_engine #(.NX(NX), .NY(NY), .NL(NL), .NGS(NGS), .PAW(PAW)) dut (
    .clk, .rst_n, .frame_sync, .run, .prog_we, .prog_addr, .prog_data,
    .err_limit, .max_iter, .frame_len, .iter_cycles, .lpf_we, .lpf_x, .lpf_y, .lpf_data,
    .north_in, .south_out, .wfs_valid, .wfs_in, .load_phase, .east_out,
    .sci_valid, .sci_in, .woofer_valid, .woofer_out, .dm_valid, .dm_out,
    .pc, .status, .ssq, .ev_valid, .ev_iters, .ev_converged, .ev_iter_max, .ev_too_late,
    .ev_overrun, .ev_err, .invalid_state, .invalid_count, .idling);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  function automatic int sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return int'(v);
  endfunction
  function automatic logic [23:0] c(logic ev, logic se, logic rc, int sh, ra_mode_e ra, mac_op_e re, sw_e w, src_e s, dir_e d);
    cbus_t b;
    b = '0;
    b.evt = ev; b.ssq_en = se; b.recirc = rc; b.shift = 5'(sh); b.ra_mode = ra; b.re_op = re;
    b.sw = w; b.src = s; b.dir = d;
    return {4'h0, b};
  endfunction
  function automatic logic [23:0] idle(int n);     return 24'h800000 | 24'(n); endfunction
  function automatic logic [23:0] ldre(int v);     return 24'h400000 | 24'(v); endfunction
  function automatic logic [23:0] br(int cnd, int t); return 24'h100000 | (24'(cnd) << 16) | 24'(t); endfunction

  task automatic load_prog();
    logic [23:0] p [20];
    logic [23:0] park;
    park = c(0, 0, 1, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_LOOP, DIR_H);
    p[0]  = c(0, 0, 0, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_V);   // north load
    p[1]  = idle(NY - 1);
    p[2]  = ldre(2047);
    p[3]  = c(0, 0, 1, 0, RA_WRITE, MAC_HOLD, SW_PASS, SRC_LOOP, DIR_H);   // RAM[0] <= own value
    p[4]  = park;
    p[5]  = br(8 + ST_FRAME_GO, 5);                                        // wait for frame
    p[6]  = c(1, 0, 0, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_H);   // ack + load
    p[7]  = c(0, 0, 0, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_H);
    p[8]  = idle(NX - 3);                                                 // + LDRE clock = NX
    p[9]  = ldre(2047);
    p[10] = c(0, 0, 1, 0, RA_COEF, MAC_LOAD, SW_PASS, SRC_LOOP, DIR_H);    // x * RAM[0]
    p[11] = park;
    p[12] = c(0, 0, 1, 17, RA_COEF, MAC_HOLD, SW_ACC_RE, SRC_LOOP, DIR_H); // write back
    p[13] = c(0, 1, 1, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_H);   // row ring + ssq
    p[14] = idle(NX - 1);
    p[15] = c(1, 1, 1, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_LOOP, DIR_H);    // iteration end
    p[16] = park;
    p[17] = idle(1);
    p[18] = br(ST_CONTINUE, 9);
    p[19] = br(0, 5);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = PAW'(i); prog_data = p[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  // expected sum of squares after n halvings of this frame's loaded data
  function automatic longint ssq_after(int n);
    longint s;
    s = 0;
    for (int j = 0; j < NX; j++) for (int g = 0; g < NGS; g++) for (int y = 0; y < NY; y++) begin
      longint v;
      v = longint'(sat18(longint'(S[j][g][y]) + longint'(woof_prev[j][y])));
      for (int i = 0; i < n; i++) v = v >>> 1;
      s += v * v;
    end
    return s;
  endfunction

  // woofer / DM output checker
  always @(posedge clk) if (rst_n) begin
    if (woofer_valid) begin
      chk(dm_valid, "dm_valid with woofer_valid");
      for (int y = 0; y < NY; y++) begin
        chk(woofer_out[y] == word_t'(wq_w[wq_head][y]), $sformatf("woofer y%0d %0d exp %0d", y, woofer_out[y], wq_w[wq_head][y]));
        chk(dm_out[y] == word_t'(wq_d[wq_head][y]), "dm data");
      end
      n_woof++; n_dm++;
      wq_head = (wq_head + 1) % 64;
    end
  end

  int frame_no = 0;
  int cyc_in_frame = 0;
  int win = 0;
  logic run_sched [7];

  // frame driver: sync, load-window data, science stream
  always @(negedge clk) if (rst_n && frame_no > 0) begin
    cyc_in_frame++;
    wfs_valid = 0;
    sci_valid = 0;
    if (load_phase && win < NX) begin
      wfs_valid = 1;
      for (int g = 0; g < NGS; g++) for (int y = 0; y < NY; y++) wfs_in[g][y] = word_t'(S[win][g][y]);
      win++;
    end
    if (cyc_in_frame >= 150 && cyc_in_frame < 150 + NX) begin
      int j;
      j = cyc_in_frame - 150;
      sci_valid = 1;
      for (int y = 0; y < NY; y++) begin
        int sv, wv;
        sv = $urandom_range(0, 40000) - 20000;
        sci_in[y] = word_t'(sv);
        wv = sat18((longint'(sv) * lpf_w[j / 2][y]) >>> 16);
        woof_cur[j][y] = wv;
        wq_w[wq_tail][y] = wv;
        wq_d[wq_tail][y] = sat18(longint'(sv) - longint'(wv));
      end
      wq_tail = (wq_tail + 1) % 64;
    end
  end

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wq_head = 0; wq_tail = 0;
    for (int k = 0; k < NL; k++) for (int x = 0; x < NX; x++) north_in[k][x] = word_t'(65536);
    for (int g = 0; g < NGS; g++) for (int y = 0; y < NY; y++) wfs_in[g][y] = '0;
    for (int y = 0; y < NY; y++) sci_in[y] = '0;
    for (int j = 0; j < NX; j++) for (int y = 0; y < NY; y++) begin woof_prev[j][y] = 0; woof_cur[j][y] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_prog();
    for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++) begin
      lpf_we = 1; lpf_x = 2'(x); lpf_y = 2'(y); lpf_w[x][y] = $urandom_range(0, 65536); lpf_data = word_t'(lpf_w[x][y]);
      @(negedge clk);
    end
    lpf_we = 0;
    run = 1;
    repeat (40) @(negedge clk);
    // frames 1..5; frame 4 runs with the sequencer stopped (overrun)
    for (int f = 1; f <= 6; f++) begin
      // configuration for frame f
      case (f)
        1, 4, 5: begin err_limit = 64'h7fff_ffff_ffff; max_iter = 10; iter_cycles = 1; end
        2:    begin err_limit = 0; max_iter = 3; iter_cycles = 1; end
        3:    begin err_limit = 0; max_iter = 200; iter_cycles = 200; end
        default: ;
      endcase
      frame_sync = 1;
      @(negedge clk);
      frame_sync = 0;
      if (f > 1) begin
        chk(ev_valid, "event pulse");
        case (f)
          2, 6: begin
            chk(ev_converged && !ev_iter_max && !ev_too_late && !ev_overrun && ev_iters == 1, $sformatf("converged frame: iters %0d", ev_iters));
            chk(ev_err == 64'(exp_err[f-1]), $sformatf("ev_err %0d exp %0d", ev_err, exp_err[f-1]));
            if (ev_converged) n_conv++;
            n_err++;
          end
          3: begin
            chk(ev_iter_max && !ev_converged && ev_iters == 3, "iteration limit frame");
            chk(ev_err == 64'(exp_err[2]), $sformatf("ev_err %0d exp %0d", ev_err, exp_err[2]));
            if (ev_iter_max) n_max++;
          end
          4: begin
            chk(ev_too_late && !ev_iter_max && !ev_converged && ev_iters > 1 && ev_iters < 20, $sformatf("too-late frame, iters %0d", ev_iters));
            if (ev_too_late) n_late++;
            // a second frame sync before the sequencer acknowledged: overrun
            frame_sync = 1;
            @(negedge clk);
            frame_sync = 0;
            chk(ev_valid && ev_overrun && ev_iters == 0, "overrun frame");
            if (ev_overrun) n_over++;
            // the extra sync also advanced the woofer frame delay, so the
            // sum of squares of frame 4 is not checked
          end
          5: begin
            chk(ev_converged && ev_iters == 1, "converged frame after overrun");
            if (ev_converged) n_conv++;
          end
          default: ;
        endcase
      end
      if (f == 6) break;
      // data for this frame
      for (int j = 0; j < NX; j++) for (int y = 0; y < NY; y++) woof_prev[j][y] = woof_cur[j][y];
      for (int j = 0; j < NX; j++) for (int g = 0; g < NGS; g++) for (int y = 0; y < NY; y++)
        S[j][g][y] = $urandom_range(0, 10000) - 5000;
      exp_err[f] = ssq_after(1);
      if (f == 2) exp_err[f] = ssq_after(3);
      if (f == 5) begin
        longint no_woof;
        int keep [NX][NY];
        keep = woof_prev;
        for (int j = 0; j < NX; j++) for (int y = 0; y < NY; y++) woof_prev[j][y] = 0;
        no_woof = ssq_after(1);
        woof_prev = keep;
        if (no_woof != exp_err[f]) n_wadd++;
      end
      win = 0;
      cyc_in_frame = 0;
      frame_no = f;
      repeat (FL - 1) @(negedge clk);
    end
    chk(n_conv == 3 && n_max == 1 && n_late == 1 && n_over == 1 && n_err == 2, "all stop reasons seen");
    chk(n_woof > 0 && n_dm > 0 && n_wadd > 0, "woofer, DM and woofer feedback exercised");
    chk(!invalid_state, "no invalid state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
