// wfs_centroider_tb -- self-checking test of the centroider on a 16 x 16 pixel
// camera with 4 x 4 pixel sub-apertures (4 x 4 sub-apertures). Loads random
// dark, background and reference tables, a threshold and centre-of-mass
// weights, streams random frames (one pixel per clock, and with random gaps)
// and compares every centroid with one computed independently here. Checks
// the three-clock latency after a sub-aperture's last pixel, the index
// order, and that thresholding and the S = 0 case both occurred.
module wfs_centroider_tb;
  localparam int PIX = 16, SUB = 4, NS = PIX / SUB;
  logic clk = 0, rst_n = 0, frame_sync = 0, pix_valid = 0, ld_we = 0;
  logic [15:0] pix = 0;
  logic [2:0] ld_sel = 0;
  logic [7:0] ld_addr = 0;
  logic signed [17:0] ld_data = 0;
  logic cent_valid;
  logic [3:0] cent_idx;
  logic signed [17:0] cent_x, cent_y;
  int dark [PIX*PIX], bg [PIX*PIX], refx [NS*NS], refy [NS*NS], wx [16], wy [16];
  int thr;
  int img [PIX*PIX];
  int exp_x [NS*NS], exp_y [NS*NS];
  int checks = 0, failures = 0, n_thr = 0, n_zero = 0;
  longint cyc = 0, last_pix_cyc [NS*NS];
  int got = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  wfs_centroider #(.PIX(PIX), .SUB(SUB)) dut (.clk, .rst_n, .frame_sync, .pix_valid, .pix,
    .ld_we, .ld_sel, .ld_addr, .ld_data, .cent_valid, .cent_idx, .cent_x, .cent_y);

  task automatic load(input int sel, input int addr, input int data);
    ld_we = 1; ld_sel = 3'(sel); ld_addr = 8'(addr); ld_data = 18'(data);
    @(negedge clk);
    ld_we = 0;
  endtask

  function automatic int sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return int'(v);
  endfunction

  task automatic compute_expected();
    for (int s = 0; s < NS * NS; s++) begin
      longint sx, sy, ss;
      sx = 0; sy = 0; ss = 0;
      for (int r = 0; r < SUB; r++) for (int c = 0; c < SUB; c++) begin
        int row, col, v, p;
        row = (s / NS) * SUB + r; col = (s % NS) * SUB + c;
        v = img[row*PIX+col] - dark[row*PIX+col] - bg[row*PIX+col];
        p = (v > thr) ? v : 0;
        if (v > 0 && v <= thr) n_thr++;
        sx += longint'(wx[r*SUB+c] * p); sy += longint'(wy[r*SUB+c] * p); ss += longint'(p);
      end
      if (ss == 0) begin
        n_zero++;
        exp_x[s] = sat18(-longint'(refx[s])); exp_y[s] = sat18(-longint'(refy[s]));
      end else begin
        exp_x[s] = sat18((sx * 256) / ss - longint'(refx[s]));
        exp_y[s] = sat18((sy * 256) / ss - longint'(refy[s]));
      end
    end
  endtask

  always @(posedge clk) if (cent_valid) begin
    checks += 3;
    if (cent_idx !== 4'(got)) begin failures++; $display("index %0d expected %0d", cent_idx, got); end
    if (cent_x !== 18'(exp_x[got]) || cent_y !== 18'(exp_y[got])) begin
      failures++;
      if (failures < 10) $display("sub %0d: (%0d,%0d) expected (%0d,%0d)", got, cent_x, cent_y, exp_x[got], exp_y[got]);
    end
    if (cyc - last_pix_cyc[got] != 3) begin failures++; $display("latency %0d", cyc - last_pix_cyc[got]); end
    got++;
  end

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < PIX * PIX; i++) begin
      dark[i] = $urandom_range(0, 300); bg[i] = $urandom_range(0, 300);
      load(0, i, dark[i]); load(1, i, bg[i]);
    end
    for (int s = 0; s < NS * NS; s++) begin
      refx[s] = $urandom_range(0, 400) - 200; refy[s] = $urandom_range(0, 400) - 200;
      load(2, s, refx[s]); load(3, s, refy[s]);
    end
    for (int r = 0; r < SUB; r++) for (int c = 0; c < SUB; c++) begin
      wx[r*SUB+c] = 2 * c - 3; wy[r*SUB+c] = 2 * r - 3;
      load(4, r*SUB+c, wx[r*SUB+c]); load(5, r*SUB+c, wy[r*SUB+c]);
    end
    thr = 100; load(6, 0, thr);
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < PIX * PIX; i++) begin
        int s;
        s = ((i / PIX) / SUB) * NS + (i % PIX) / SUB;
        // sub-aperture 5 stays dark so that S = 0 is exercised
        img[i] = (s == 5) ? 0 : $urandom_range(0, 4000);
      end
      compute_expected();
      got = 0;
      frame_sync = 1; @(negedge clk); frame_sync = 0;
      for (int i = 0; i < PIX * PIX; i++) begin
        int s;
        s = ((i / PIX) / SUB) * NS + (i % PIX) / SUB;
        if (f >= 2) repeat ($urandom_range(0, 1)) @(negedge clk);
        pix_valid = 1; pix = 16'(img[i]);
        @(negedge clk);
        last_pix_cyc[s] = cyc;
        pix_valid = 0;
      end
      repeat (6) @(negedge clk);
      checks++;
      if (got != NS * NS) begin failures++; $display("frame %0d: %0d centroids", f, got); end
    end
    checks++;
    if (n_thr == 0 || n_zero == 0) begin failures++; $display("threshold or S=0 case not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
