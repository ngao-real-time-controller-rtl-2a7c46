// te_lpf_tb -- self-checking test of the woofer low-pass (spatial-frequency
// weighting) stage, NX = 4, NY = 3. Loads random Q2.16 weights, streams
// frames of 2*NX words per row (real/imaginary pairs per column) and checks
// each output word against the product computed in the testbench
// (arithmetic shift by 16, saturation to 18 bits), one clock after input.
module te_lpf_tb;
  import te_pkg::*;
  localparam int NX = 4, NY = 3;
  logic clk = 0, rst_n = 0, frame_sync = 0, w_we = 0, din_valid = 0, dout_valid;
  logic [1:0] w_x = 0, w_y = 0;
  word_t w_data = 0, din [NY], dout [NY];
  word_t wt [NX][NY];
  int checks = 0, failures = 0, nsat = 0;
  always #5 clk = ~clk;
  te_lpf #(.NX(NX), .NY(NY)) dut (.clk, .rst_n, .frame_sync, .w_we, .w_x, .w_y, .w_data, .din_valid, .din, .dout_valid, .dout);
  function automatic word_t expect_w(word_t d, word_t w);
    longint p;
    p = (longint'(d) * longint'(w)) >>> 16;
    if (p > 131071) return word_t'(131071);
    if (p < -131072) return word_t'(-131072);
    return word_t'(p);
  endfunction
  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    for (int y = 0; y < NY; y++) din[y] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++) begin
      w_we = 1; w_x = 2'(x); w_y = 2'(y);
      w_data = (x == 0 && y == 0) ? word_t'(18'h1ffff) : word_t'($urandom_range(0, 131071));
      wt[x][y] = w_data;
      @(negedge clk);
    end
    w_we = 0;
    for (int f = 0; f < 4; f++) begin
      frame_sync = 1; @(negedge clk); frame_sync = 0;
      for (int i = 0; i < 2 * NX; i++) begin
        din_valid = 1;
        for (int y = 0; y < NY; y++) din[y] = word_t'($urandom);
        @(negedge clk);
        din_valid = 0;
        checks++;
        if (!dout_valid) begin failures++; $display("no dout_valid"); end
        for (int y = 0; y < NY; y++) begin
          word_t e;
          e = expect_w(din[y], wt[i/2][y]);
          if (e == word_t'(131071) || e == word_t'(-131072)) nsat++;
          checks++;
          if (dout[y] !== e) begin failures++; if (failures < 10) $display("f%0d i%0d y%0d: %h exp %h", f, i, y, dout[y], e); end
        end
        if ($urandom_range(0, 1) != 0) begin @(negedge clk); checks++; if (dout_valid) begin failures++; $display("spurious valid"); end end
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
