// te_pe_tb -- self-checking test of one tomography-engine processing element.
// Drives the control word, the coefficient counters and the three neighbour
// inputs directly and checks, against values computed here:
//   * input selection (horizontal, vertical, next layer, zero), the
//     loopback path and the constant-1 source, one clock per hop;
//   * coefficient RAM writes from the data path;
//   * complex multiply-accumulate of random (real, imaginary) pairs with
//     random coefficients over several terms, using the {C,-c} / {c,C}
//     table convention, including the two-clock timing;
//   * write-back of both accumulators with a bit shift (SW_ACC_RE) and
//     shifting out the imaginary part (SW_DELAY), with saturation;
//   * squaring of the data word (RA_DATA) and table look-up addressed by
//     the real accumulator (RA_INDEX).
module te_pe_tb;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  cbus_t ctrl;
  logic [10:0] cnt_a = 0, cnt_b = 0;
  word_t in_h = 0, in_v = 0, in_l = 0, out;
  acc_t acc_re, acc_im;
  word_t ram [2048];
  int checks = 0, failures = 0, n_sat = 0;
  always #5 clk = ~clk;
  te_pe dut (.clk, .rst_n, .ctrl, .cnt_a, .cnt_b, .in_h, .in_v, .in_l, .out, .acc_re, .acc_im);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask
  function automatic cbus_t cw(dir_e d, src_e s, sw_e w, mac_op_e re, mac_op_e im, ra_mode_e ra, int sh);
    cbus_t c;
    c = '0;
    c.dir = d; c.src = s; c.sw = w; c.re_op = re; c.im_op = im; c.ra_mode = ra; c.shift = 5'(sh);
    return c;
  endfunction
  function automatic word_t sat(longint v, int sh);
    longint s;
    s = v >>> sh;
    if (s > 131071) begin n_sat++; return word_t'(131071); end
    if (s < -131072) begin n_sat++; return word_t'(-131072); end
    return word_t'(s);
  endfunction
  task automatic step(cbus_t c);
    ctrl = c;
    @(negedge clk);
  endtask
  task automatic write_ram(int a, word_t v);
    cnt_a = 11'(a); in_h = v;
    step(cw(DIR_H, SRC_NEIGH, SW_PASS, MAC_HOLD, MAC_HOLD, RA_WRITE, 0));
    ram[a] = v;
  endtask

  initial begin
    #5_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    ctrl = '0;
    repeat (2) @(negedge clk);
    chk(out == '0 && acc_re == '0 && acc_im == '0, "reset");
    rst_n = 1;
    // input selection
    for (int i = 0; i < 50; i++) begin
      dir_e d;
      word_t e;
      d = dir_e'($urandom_range(0, 3));
      in_h = word_t'($urandom); in_v = word_t'($urandom); in_l = word_t'($urandom);
      e = (d == DIR_H) ? in_h : (d == DIR_V) ? in_v : (d == DIR_L) ? in_l : '0;
      step(cw(d, SRC_NEIGH, SW_PASS, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
      chk(out == e, $sformatf("dir %0d", d));
      step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
      chk(out == e, "loopback holds value");
    end
    step(cw(DIR_H, SRC_ONE, SW_PASS, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
    chk(out == word_t'(1), "constant 1");
    // complex MAC: sum over K terms of x_k * (C_k + j c_k)
    for (int rep = 0; rep < 30; rep++) begin
      int K;
      longint er, ei;
      int sh;
      word_t xr [8], xi [8], cr [8], ci [8];
      K = $urandom_range(1, 8);
      sh = (rep % 3 == 0) ? 0 : 17;
      for (int k = 0; k < K; k++) begin
        xr[k] = word_t'($urandom); xi[k] = word_t'($urandom);
        cr[k] = word_t'($urandom); ci[k] = word_t'($urandom);
        write_ram(100 + 4 * k, cr[k]);           // port A, real input: C
        write_ram(101 + 4 * k, -ci[k]);          // port A, imaginary input: -c
        write_ram(102 + 4 * k, ci[k]);           // port B, real input: c
        write_ram(103 + 4 * k, cr[k]);           // port B, imaginary input: C
      end
      er = 0; ei = 0;
      for (int k = 0; k < K; k++) begin
        er += longint'(xr[k]) * longint'(cr[k]) - longint'(xi[k]) * longint'(ci[k]);
        ei += longint'(xr[k]) * longint'(ci[k]) + longint'(xi[k]) * longint'(cr[k]);
        cnt_a = 11'(100 + 4 * k); cnt_b = 11'(102 + 4 * k); in_h = xr[k];
        step(cw(DIR_H, SRC_NEIGH, SW_PASS, (k == 0) ? MAC_LOAD : MAC_ADD, (k == 0) ? MAC_LOAD : MAC_ADD, RA_COEF, 0));
        cnt_a = 11'(101 + 4 * k); cnt_b = 11'(103 + 4 * k); in_h = xi[k];
        step(cw(DIR_H, SRC_NEIGH, SW_PASS, MAC_ADD, MAC_ADD, RA_COEF, 0));
      end
      step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
      chk(acc_re == acc_t'(er) && acc_im == acc_t'(ei), $sformatf("complex MAC K=%0d", K));
      step(cw(DIR_H, SRC_LOOP, SW_ACC_RE, MAC_HOLD, MAC_HOLD, RA_COEF, sh));
      chk(out == sat(er, sh), "real write-back");
      step(cw(DIR_H, SRC_NEIGH, SW_DELAY, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
      chk(out == sat(ei, sh), "imaginary via delay register");
    end
    chk(n_sat > 0, "saturation exercised");
    // square of the data word
    for (int i = 0; i < 20; i++) begin
      word_t x;
      x = word_t'($urandom);
      in_h = x;
      step(cw(DIR_H, SRC_NEIGH, SW_PASS, MAC_LOAD, MAC_HOLD, RA_DATA, 0));
      step(cw(DIR_H, SRC_LOOP, SW_PASS, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
      chk(acc_re == acc_t'(longint'(x) * longint'(x)), "square");
    end
    // table look-up addressed by the real accumulator
    for (int i = 0; i < 20; i++) begin
      int idx;
      word_t tv;
      idx = $urandom_range(200, 2047);
      tv = word_t'($urandom);
      write_ram(idx, tv);
      write_ram(150, word_t'(idx));
      cnt_a = 11'(150);
      step(cw(DIR_H, SRC_ONE, SW_PASS, MAC_LOAD, MAC_HOLD, RA_COEF, 0));   // acc_re = 1 * idx
      step(cw(DIR_H, SRC_ONE, SW_PASS, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
      chk(acc_re == acc_t'(idx), "index in accumulator");
      step(cw(DIR_H, SRC_ONE, SW_PASS, MAC_LOAD, MAC_HOLD, RA_INDEX, 0));  // acc_re = 1 * RAM[idx]
      step(cw(DIR_H, SRC_ONE, SW_PASS, MAC_HOLD, MAC_HOLD, RA_COEF, 0));
      chk(acc_re == acc_t'(tv), "table look-up");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
