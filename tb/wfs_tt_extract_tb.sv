// wfs_tt_extract_tb -- self-checking test of tip/tilt extraction for 4 x 4
// sub-apertures. Loads a random valid mask, sends random centroid frames
// (with gaps), checks tip and tilt against the mean over the valid
// sub-apertures computed here (truncating division), the two-clock
// tt_valid latency after the last centroid, and the replayed stream:
// every index once, in order, one per clock, tip/tilt removed, masked
// sub-apertures zero.
module wfs_tt_extract_tb;
  localparam int NSUB = 4, N = NSUB * NSUB;
  logic clk = 0, rst_n = 0, mask_we = 0, mask_data = 0, in_valid = 0;
  logic [3:0] mask_addr = 0, in_idx = 0, out_idx;
  logic signed [17:0] in_x = 0, in_y = 0, tip, tilt, out_x, out_y;
  logic tt_valid, out_valid;
  int m [N], cx [N], cy [N];
  int etip, etilt, nout, checks = 0, failures = 0;
  longint cyc = 0, last_in, tt_cyc, prev_out;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  wfs_tt_extract #(.NSUB(NSUB)) dut (.clk, .rst_n, .mask_we, .mask_addr, .mask_data, .in_valid, .in_idx,
    .in_x, .in_y, .tt_valid, .tip, .tilt, .out_valid, .out_idx, .out_x, .out_y);

  always @(posedge clk) if (rst_n) begin
    if (tt_valid) begin
      checks += 3;
      tt_cyc = cyc;
      if (cyc - last_in != 2) begin failures++; $display("tt latency %0d", cyc - last_in); end
      if (tip !== 18'(etip) || tilt !== 18'(etilt)) begin failures++; $display("tt (%0d,%0d) exp (%0d,%0d)", tip, tilt, etip, etilt); end
    end
    if (out_valid) begin
      checks += 2;
      if (out_idx !== 4'(nout)) begin failures++; $display("replay index %0d exp %0d", out_idx, nout); end
      if (nout > 0 && cyc - prev_out != 1) begin failures++; $display("replay gap"); end
      if (out_x !== 18'((m[nout] != 0) ? cx[nout] - etip : 0) || out_y !== 18'((m[nout] != 0) ? cy[nout] - etilt : 0)) begin
        failures++; $display("replay %0d value (%0d,%0d)", nout, out_x, out_y);
      end
      prev_out = cyc;
      nout++;
    end
  end

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      longint sx, sy, n;
      sx = 0; sy = 0; n = 0;
      for (int i = 0; i < N; i++) begin
        m[i] = (f == 5) ? 0 : int'($urandom_range(0, 3) != 0);
        mask_we = 1; mask_addr = 4'(i); mask_data = m[i][0];
        @(negedge clk);
      end
      mask_we = 0;
      for (int i = 0; i < N; i++) begin
        cx[i] = $urandom_range(0, 20000) - 10000; cy[i] = $urandom_range(0, 20000) - 10000;
        if (m[i] != 0) begin sx += longint'(cx[i]); sy += longint'(cy[i]); n++; end
      end
      etip = (n == 0) ? 0 : int'(sx / n); etilt = (n == 0) ? 0 : int'(sy / n);
      nout = 0;
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_idx = 4'(i); in_x = 18'(cx[i]); in_y = 18'(cy[i]);
        @(negedge clk);
        last_in = cyc;
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat (N + 10) @(negedge clk);
      checks++;
      if (nout != N) begin failures++; $display("frame %0d replayed %0d", f, nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
