// te_array_tb -- self-checking test of the systolic array (NX = 5, NY = 4,
// NL = 3). Exercises each data movement and the per-PE arithmetic, with
// expected values kept here:
//   * a different coefficient for every PE shifted in from the north edge
//     (column shift) and written into each PE's RAM from its own register;
//   * data shifted in from the west edge (row shift, load window);
//   * every PE multiplying its data by its own coefficient and writing the
//     result back (SIMD control, distinct data);
//   * a full row recirculation: the words seen on the east edge, one per
//     clock, and the sum of squares accumulated while they pass;
//   * one layer shift (ring over layers) and one column recirculation
//     (south edge) with the expected wrap-around.
// Each mechanism is counted and must have been checked at least once.
module te_array_tb;
  import te_pkg::*;
  localparam int NX = 5, NY = 4, NL = 3;
  logic clk = 0, rst_n = 0, ssq_clr = 0;
  cbus_t ctrl;
  logic [10:0] cnt_a = 0, cnt_b = 0;
  word_t west_in [NL][NY], east_out [NL][NY], north_in [NL][NX], south_out [NL][NX];
  logic [63:0] ssq;
  int V [NL][NY][NX], D [NL][NY][NX], P [NL][NY][NX];
  int checks = 0, failures = 0;
  int n_row = 0, n_col = 0, n_layer = 0, n_mac = 0, n_ssq = 0;
  always #5 clk = ~clk;
  te_array #(.NX(NX), .NY(NY), .NL(NL)) dut (.clk, .rst_n, .ctrl, .cnt_a, .cnt_b, .west_in, .east_out,
    .north_in, .south_out, .ssq_clr, .ssq);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask
  function automatic cbus_t cw(dir_e d, src_e s, sw_e w, mac_op_e re, ra_mode_e ra, logic rc, logic se);
    cbus_t c;
    c = '0;
    c.dir = d; c.src = s; c.sw = w; c.re_op = re; c.ra_mode = ra; c.recirc = rc; c.ssq_en = se;
    return c;
  endfunction
  task automatic step(cbus_t c);
    ctrl = c;
    @(negedge clk);
  endtask

  initial begin
    #5_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    ctrl = '0;
    for (int k = 0; k < NL; k++) begin
      for (int y = 0; y < NY; y++) west_in[k][y] = '0;
      for (int x = 0; x < NX; x++) north_in[k][x] = '0;
    end
    for (int k = 0; k < NL; k++) for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) begin
      V[k][y][x] = $urandom_range(0, 600) - 300;
      D[k][y][x] = $urandom_range(0, 600) - 300;
      P[k][y][x] = V[k][y][x] * D[k][y][x];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // coefficients from the north edge, last row first
    for (int j = 0; j < NY; j++) begin
      for (int k = 0; k < NL; k++) for (int x = 0; x < NX; x++) north_in[k][x] = word_t'(V[k][NY-1-j][x]);
      step(cw(DIR_V, SRC_NEIGH, SW_PASS, MAC_HOLD, RA_COEF, 1'b0, 1'b0));
    end
    for (int k = 0; k < NL; k++) for (int x = 0; x < NX; x++) begin
      chk(south_out[k][x] == word_t'(V[k][NY-1][x]), "column shift to south edge");
      n_col++;
    end
    cnt_a = 0;
    step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_HOLD, RA_WRITE, 1'b1, 1'b0));
    // data from the west edge, last column first
    for (int j = 0; j < NX; j++) begin
      for (int k = 0; k < NL; k++) for (int y = 0; y < NY; y++) west_in[k][y] = word_t'(D[k][y][NX-1-j]);
      step(cw(DIR_H, SRC_NEIGH, SW_PASS, MAC_HOLD, RA_COEF, 1'b0, 1'b0));
    end
    for (int k = 0; k < NL; k++) for (int y = 0; y < NY; y++) chk(east_out[k][y] == word_t'(D[k][y][NX-1]), "row load");
    // every PE: own data times own coefficient
    step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_LOAD, RA_COEF, 1'b1, 1'b0));
    step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_HOLD, RA_COEF, 1'b1, 1'b0));
    step(cw(DIR_H, SRC_LOOP, SW_ACC_RE, MAC_HOLD, RA_COEF, 1'b1, 1'b0));
    ssq_clr = 1;
    step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_HOLD, RA_COEF, 1'b1, 1'b0));
    ssq_clr = 0;
    chk(ssq == 0, "ssq cleared");
    // row recirculation with sum of squares
    begin
      longint e_ssq;
      e_ssq = 0;
      for (int j = 0; j < NX; j++) begin
        for (int k = 0; k < NL; k++) for (int y = 0; y < NY; y++) begin
          chk(east_out[k][y] == word_t'(P[k][y][NX-1-j]), $sformatf("east word %0d k%0d y%0d", j, k, y));
          e_ssq += longint'(P[k][y][NX-1-j]) * longint'(P[k][y][NX-1-j]);
          n_row++; n_mac++;
        end
        step(cw(DIR_H, SRC_NEIGH, SW_PASS, MAC_HOLD, RA_COEF, 1'b1, 1'b1));
      end
      step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_HOLD, RA_COEF, 1'b1, 1'b0));
      chk(ssq == 64'(e_ssq), $sformatf("sum of squares %0d exp %0d", ssq, e_ssq));
      n_ssq++;
    end
    for (int k = 0; k < NL; k++) for (int y = 0; y < NY; y++) chk(east_out[k][y] == word_t'(P[k][y][NX-1]), "ring returns");
    // layer shift
    step(cw(DIR_L, SRC_NEIGH, SW_PASS, MAC_HOLD, RA_COEF, 1'b1, 1'b0));
    for (int k = 0; k < NL; k++) for (int y = 0; y < NY; y++) begin
      chk(east_out[k][y] == word_t'(P[(k + NL - 1) % NL][y][NX-1]), "layer ring");
      n_layer++;
    end
    // column recirculation
    step(cw(DIR_V, SRC_NEIGH, SW_PASS, MAC_HOLD, RA_COEF, 1'b1, 1'b0));
    for (int k = 0; k < NL; k++) for (int x = 0; x < NX; x++) begin
      chk(south_out[k][x] == word_t'(P[(k + NL - 1) % NL][NY-2][x]), "column ring");
      n_col++;
    end
    chk(n_row > 0 && n_col > 0 && n_layer > 0 && n_mac > 0 && n_ssq > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
