// ngao_rtc_top_tb -- end-to-end test of the real-time controller top level
// at a reduced size (2 sensors with 8 x 8 pixel cameras and 2 x 2
// sub-apertures, a 4 x 3 x 3 tomography array, 400-clock frames, low-order
// pulse every 2nd frame). The control processor side writes the control
// registers, the sequencer program, low-pass weights and sensor tables; the
// camera side sends one spot per sub-aperture every frame; the
// reconstructor side feeds wavefronts into the tomography load window and a
// science wavefront back. Checked against values computed here, and each
// mechanism counted (the test fails if any never happened):
//   frame period and low-order pulse, register changes taking effect only at
//   a frame start, centroids and tip/tilt of both sensors, tip/tilt removed
//   from the centroid stream, tomography frames stopping by convergence and
//   by the iteration limit, woofer and DM outputs.
module ngao_rtc_top_tb;
  import te_pkg::*;
  localparam int NX = 4, NY = 3, NL = 3, NGS = 2, PAW = 6, PIX = 8, SUB = 4, FD = 400, SD = 2;
  localparam int NS = PIX / SUB;
  logic clk = 0, rst_n = 0, ext_frame = 0;
  logic cp_we = 0, cp_pending;
  logic [2:0] cp_addr = 0, cp_rd_addr = 0;
  logic [31:0] cp_wdata = 0, cp_rd_data;
  logic prog_we = 0;
  logic [PAW-1:0] prog_addr = 0, te_pc;
  logic [23:0] prog_data = 0;
  logic lpf_we = 0;
  logic [1:0] lpf_x = 0, lpf_y = 0;
  word_t lpf_data = 0;
  logic wfs_ld_we [NGS], mask_we [NGS], cam_valid [NGS];
  logic [2:0] wfs_ld_sel = 0;
  logic [5:0] wfs_ld_addr = 0;
  logic signed [17:0] wfs_ld_data = 0;
  logic [1:0] mask_addr = 0;
  logic mask_data = 0;
  logic [15:0] cam_pix [NGS];
  logic cent_valid [NGS], tt_valid [NGS];
  logic [1:0] cent_idx [NGS];
  logic signed [17:0] cent_x [NGS], cent_y [NGS], tip [NGS], tilt [NGS];
  word_t north_in [NL][NX], south_out [NL][NX], wfs_in [NGS][NY], east_out [NL][NY];
  word_t sci_in [NY], woofer_out [NY], dm_out [NY];
  logic wfs_valid = 0, load_phase, sci_valid = 0, woofer_valid, dm_valid;
  logic frame_sync, slow_sync;
  logic [31:0] frame_count, frame_phase;
  logic [STATUS_W-1:0] te_status;
  logic [63:0] te_ssq, ev_err;
  logic ev_valid, ev_converged, ev_iter_max, ev_too_late, ev_overrun, invalid_state, te_idling;
  logic [7:0] ev_iters;
  logic [15:0] invalid_count;
  int checks = 0, failures = 0;
  int n_period = 0, n_slow = 0, n_commit = 0, n_cent = 0, n_tt = 0, n_conv = 0, n_max = 0, n_woof = 0;
  longint cyc = 0, last_sync = -1;
  int nsync = 0;
  int ecx [NGS][NS*NS], ecy [NGS][NS*NS], etip [NGS], etilt [NGS], ncent [NGS];
  int sci_v [NY], woof_e [NY];
  int lpf_w [NX][NY];

  always #5 clk = ~clk;

  ngao_rtc_top #(.NX(NX), .NY(NY), .NL(NL), .NGS(NGS), .PAW(PAW), .PIX(PIX), .SUB(SUB),
                 .FRAME_DIV(FD), .SLOW_DIV(SD)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL (cycle %0d): %s", cyc, msg); end
  endtask
  function automatic logic [23:0] c(logic ev, logic se, logic rc, int sh, ra_mode_e ra, mac_op_e re, sw_e w, src_e s, dir_e d);
    cbus_t b;
    b = '0;
    b.evt = ev; b.ssq_en = se; b.recirc = rc; b.shift = 5'(sh); b.ra_mode = ra; b.re_op = re;
    b.sw = w; b.src = s; b.dir = d;
    return {4'h0, b};
  endfunction
  task automatic cp_write(int a, logic [31:0] d);
    @(negedge clk); cp_we = 1; cp_addr = 3'(a); cp_wdata = d;
    @(negedge clk); cp_we = 0;
  endtask
  task automatic wfs_load(int sel, int a, int d);
    @(negedge clk);
    for (int g = 0; g < NGS; g++) wfs_ld_we[g] = 1;
    wfs_ld_sel = 3'(sel); wfs_ld_addr = 6'(a); wfs_ld_data = 18'(d);
    @(negedge clk);
    for (int g = 0; g < NGS; g++) wfs_ld_we[g] = 0;
  endtask

  // sequencer program: same structure as the tomography engine test
  task automatic load_prog();
    logic [23:0] p [20];
    logic [23:0] park;
    park = c(0, 0, 1, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_LOOP, DIR_H);
    p[0]  = c(0, 0, 0, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_V);
    p[1]  = 24'h800000 | 24'(NY - 1);
    p[2]  = 24'h400000 | 24'd2047;
    p[3]  = c(0, 0, 1, 0, RA_WRITE, MAC_HOLD, SW_PASS, SRC_LOOP, DIR_H);
    p[4]  = park;
    p[5]  = 24'h100000 | (24'(8 + ST_FRAME_GO) << 16) | 24'd5;
    p[6]  = c(1, 0, 0, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_H);
    p[7]  = c(0, 0, 0, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_H);
    p[8]  = 24'h800000 | 24'(NX - 3);
    p[9]  = 24'h400000 | 24'd2047;
    p[10] = c(0, 0, 1, 0, RA_COEF, MAC_LOAD, SW_PASS, SRC_LOOP, DIR_H);
    p[11] = park;
    p[12] = c(0, 0, 1, 17, RA_COEF, MAC_HOLD, SW_ACC_RE, SRC_LOOP, DIR_H);
    p[13] = c(0, 1, 1, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_NEIGH, DIR_H);
    p[14] = 24'h800000 | 24'(NX - 1);
    p[15] = c(1, 1, 1, 0, RA_COEF, MAC_HOLD, SW_PASS, SRC_LOOP, DIR_H);
    p[16] = park;
    p[17] = 24'h800001;
    p[18] = 24'h100000 | (24'(ST_CONTINUE) << 16) | 24'd9;
    p[19] = 24'h100000 | 24'd5;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = PAW'(i); prog_data = p[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (frame_sync) begin
      if (last_sync >= 0) begin chk(cyc - last_sync == longint'(FD), "frame period"); n_period++; end
      chk(slow_sync == (nsync % SD == 0), "low-order pulse");
      if (slow_sync) n_slow++;
      last_sync = cyc;
      nsync++;
    end
    for (int g = 0; g < NGS; g++) begin
      if (tt_valid[g]) begin
        chk(tip[g] == 18'(etip[g]) && tilt[g] == 18'(etilt[g]), $sformatf("tip/tilt %0d", g));
        n_tt++;
      end
      if (cent_valid[g]) begin
        int i;
        i = ncent[g];
        chk(cent_idx[g] == 2'(i), "centroid order");
        chk(cent_x[g] == 18'(ecx[g][i] - etip[g]) && cent_y[g] == 18'(ecy[g][i] - etilt[g]),
            $sformatf("centroid g%0d i%0d (%0d,%0d)", g, i, cent_x[g], cent_y[g]));
        ncent[g]++;
        n_cent++;
      end
    end
    if (woofer_valid) begin
      for (int y = 0; y < NY; y++) begin
        chk(woofer_out[y] == word_t'(woof_e[y]), "woofer");
        chk(dm_out[y] == word_t'(sci_v[y] - woof_e[y]), "dm");
      end
      n_woof++;
    end
  end

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int g = 0; g < NGS; g++) begin
      wfs_ld_we[g] = 0; mask_we[g] = 0; cam_valid[g] = 0; cam_pix[g] = 0; ncent[g] = 0;
      for (int y = 0; y < NY; y++) wfs_in[g][y] = '0;
    end
    for (int k = 0; k < NL; k++) for (int x = 0; x < NX; x++) north_in[k][x] = word_t'(65536);
    for (int y = 0; y < NY; y++) sci_in[y] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // control registers: run, no error limit reached, 10 iterations max
    cp_write(0, 32'h1);
    cp_write(1, 32'h0); cp_write(2, 32'h7fff_ffff);
    cp_write(3, 32'd10); cp_write(4, 32'd1);
    chk(cp_pending, "pending after writes");
    load_prog();
    for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++) begin
      @(negedge clk);
      lpf_we = 1; lpf_x = 2'(x); lpf_y = 2'(y); lpf_w[x][y] = $urandom_range(0, 65536); lpf_data = word_t'(lpf_w[x][y]);
    end
    @(negedge clk); lpf_we = 0;
    for (int i = 0; i < PIX * PIX; i++) begin wfs_load(0, i, 0); wfs_load(1, i, 0); end
    for (int s = 0; s < NS * NS; s++) begin wfs_load(2, s, 0); wfs_load(3, s, 0); end
    for (int r = 0; r < SUB; r++) for (int q = 0; q < SUB; q++) begin
      wfs_load(4, r * SUB + q, 2 * q - 3); wfs_load(5, r * SUB + q, 2 * r - 3);
    end
    wfs_load(6, 0, 10);
    for (int s = 0; s < NS * NS; s++) begin
      @(negedge clk); mask_we[0] = 1; mask_we[1] = 1; mask_addr = 2'(s); mask_data = 1;
    end
    @(negedge clk); mask_we[0] = 0; mask_we[1] = 0;
    // before the first frame start the sequencer is not yet running
    chk(te_pc == 0 && !dut.regs[0][0], "registers not active before frame start");
    for (int f = 0; f < 6; f++) begin
      @(posedge clk iff frame_sync);
      @(negedge clk);
      if (f == 0) begin chk(dut.regs[0][0] && !cp_pending, "registers active after frame start"); n_commit++; end
      if (f >= 2) begin
        chk(ev_valid, "event pulse");
        if (f < 4) begin chk(ev_converged && ev_iters == 1, "converged frame"); if (ev_converged) n_conv++; end
        if (f == 5) begin chk(ev_iter_max && ev_iters == 2, "iteration limit frame"); if (ev_iter_max) n_max++; end
      end
      // change the limits during frame 3: error limit 0, 2 iterations;
      // effective from frame 4 on
      if (f == 3) begin cp_write(2, 32'h0); cp_write(3, 32'd2); end
      fork
        // tomography load window
        begin
          int w;
          w = 0;
          while (w < NX) begin
            @(negedge clk);
            wfs_valid = 0;
            if (load_phase) begin
              wfs_valid = 1;
              for (int g = 0; g < NGS; g++) for (int y = 0; y < NY; y++) wfs_in[g][y] = word_t'($urandom_range(0, 2000) - 1000);
              w++;
            end
          end
          @(negedge clk); wfs_valid = 0;
        end
        // cameras: one spot per sub-aperture
        begin
          int img [NGS][PIX*PIX];
          for (int g = 0; g < NGS; g++) begin
            longint sx, sy;
            sx = 0; sy = 0;
            for (int i = 0; i < PIX * PIX; i++) img[g][i] = 0;
            for (int s = 0; s < NS * NS; s++) begin
              int r, q;
              r = $urandom_range(0, SUB - 1); q = $urandom_range(0, SUB - 1);
              img[g][((s / NS) * SUB + r) * PIX + (s % NS) * SUB + q] = 1000 + s;
              ecx[g][s] = (2 * q - 3) * 256; ecy[g][s] = (2 * r - 3) * 256;
              sx += longint'(ecx[g][s]); sy += longint'(ecy[g][s]);
            end
            etip[g] = int'(sx / (NS * NS)); etilt[g] = int'(sy / (NS * NS));
            ncent[g] = 0;
          end
          repeat (40) @(negedge clk);
          for (int i = 0; i < PIX * PIX; i++) begin
            for (int g = 0; g < NGS; g++) begin cam_valid[g] = 1; cam_pix[g] = 16'(img[g][i]); end
            @(negedge clk);
          end
          for (int g = 0; g < NGS; g++) cam_valid[g] = 0;
        end
        // science wavefront from the layer-combination stage
        begin
          repeat (150) @(negedge clk);
          sci_valid = 1;
          for (int y = 0; y < NY; y++) begin
            sci_v[y] = $urandom_range(0, 20000) - 10000;
            sci_in[y] = word_t'(sci_v[y]);
            woof_e[y] = int'((longint'(sci_v[y]) * lpf_w[0][y]) >>> 16);
          end
          @(negedge clk);
          sci_valid = 0;
        end
      join
      repeat (20) @(negedge clk);
      for (int g = 0; g < NGS; g++) chk(ncent[g] == NS * NS, "all centroids of the frame");
    end
    chk(n_period > 0 && n_slow > 0 && n_commit > 0 && n_cent > 0 && n_tt > 0 && n_conv > 0 && n_max > 0 && n_woof > 0,
        $sformatf("mechanisms: period %0d slow %0d commit %0d cent %0d tt %0d conv %0d max %0d woofer %0d",
                  n_period, n_slow, n_commit, n_cent, n_tt, n_conv, n_max, n_woof));
    chk(!invalid_state, "no invalid state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
