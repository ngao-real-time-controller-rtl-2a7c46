// te_pe -- processing element (PE) of the tomography engine's systolic array.
//
// A PE owns one voxel (a layer slice of one sub-aperture) and a complex value
// for it. Complex numbers travel over a single 18-bit path: the real part on
// one clock, the imaginary part on the next. A PE therefore holds a complex
// value in two registers, delay_q (fed from the data path) and out_q (the PE
// output), and with the switch at SW_DELAY a value moves one PE every two
// clocks. With SW_PASS a word moves one PE per clock through out_q only.
//
// Arithmetic uses two MACCs. The real MACC multiplies the incoming word by
// RAM port A, the imaginary MACC by RAM port B. A complex multiply-accumulate
// of an incoming value (xr, xi) by a coefficient (C + jc) is done with the
// coefficient table holding, per input value, {C, -c} on port A and {c, C}
// on port B, and both MACCs adding: re += xr*C - xi*c, im += xr*c + xi*C. With
// the data circulating around a ring this accumulates a DFT in place.
// SW_ACC_RE writes the scaled accumulators back into the two registers in one
// clock (real part to out_q, imaginary part to delay_q), replacing the data.
//
// Following the design description: the coefficient BRAM with its two counter
// addresses, the two 18x18/48-bit MACCs, the delay register, the 4-way output
// switch with codes 00 = input, 01 = delayed input, 10 = real accumulator,
// 11 = imaginary accumulator, the single 18-bit input and output, the input
// choice of horizontal, vertical or next-layer neighbour, and (from the PE
// detail figure) the loopback path, the constant-1 input, the bit select from
// 48 to 18 bits, the RAM write from the data path and the accum_real[10:0]
// look-up address. This design's own: the one-clock operand register in
// front of the MACCs (matching the RAM read latency), the parallel load of
// both registers on code 10, saturation in the bit select, and the control
// field encodings (te_pkg).
//
// Timing: ctrl, cnt_a and cnt_b apply in the clock they are presented. The
// data path word and the MACC operations of clock t are multiplied with the
// RAM words addressed in clock t, and the product reaches the accumulators at
// the end of clock t+1; an accumulator written back with SW_ACC_RE must have
// seen its last operation at least one clock earlier.
//
// Only the control-bus fields a PE uses are read here; evt, ssq_en and recirc
// belong to the frame controller and the array boundary, so those bits of
// ctrl are unused inside the PE.
module te_pe
  import te_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cbus_t              ctrl,
  input  logic [COEF_AW-1:0] cnt_a,   // real coefficient counter
  input  logic [COEF_AW-1:0] cnt_b,   // imaginary coefficient counter
  input  word_t              in_h,    // from horizontal neighbour
  input  word_t              in_v,    // from vertical neighbour
  input  word_t              in_l,    // from next layer
  output word_t              out,
  output acc_t               acc_re,  // accumulators, for observation
  output acc_t               acc_im
);

  word_t data_in, data_path, delay_q, out_q;
  word_t a_q, dout_a, dout_b, b_re;
  mac_op_e  re_op_q, im_op_q;
  ra_mode_e ra_mode_q;
  logic [COEF_AW-1:0] addr_a;
  word_t sel_re, sel_im;

  // Neighbour selection (switching lattice).
  always_comb begin
    unique case (ctrl.dir)
      DIR_H:    data_in = in_h;
      DIR_V:    data_in = in_v;
      DIR_L:    data_in = in_l;
      DIR_ZERO: data_in = '0;
    endcase
  end

  // Data path source: neighbour, loopback or constant 1.
  always_comb begin
    unique case (ctrl.src)
      SRC_LOOP: data_path = out_q;
      SRC_ONE:  data_path = word_t'(1);
      default:  data_path = data_in;
    endcase
  end

  // Coefficient RAM.
  assign addr_a = (ctrl.ra_mode == RA_INDEX) ? acc_re[COEF_AW-1:0] : cnt_a;

  te_coef_ram #(.AW(COEF_AW)) u_ram (
    .clk    (clk),
    .addr_a (addr_a),
    .we_a   (ctrl.ra_mode == RA_WRITE),
    .din_a  (data_path),
    .dout_a (dout_a),
    .addr_b (cnt_b),
    .dout_b (dout_b)
  );

  // Operand register stage, aligned with the RAM read latency.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q       <= '0;
      re_op_q   <= MAC_HOLD;
      im_op_q   <= MAC_HOLD;
      ra_mode_q <= RA_COEF;
    end else begin
      a_q       <= data_path;
      re_op_q   <= ctrl.re_op;
      im_op_q   <= ctrl.im_op;
      ra_mode_q <= ctrl.ra_mode;
    end
  end

  assign b_re = (ra_mode_q == RA_DATA) ? a_q : dout_a;

  te_macc u_macc_re (.clk(clk), .rst_n(rst_n), .a(a_q), .b(b_re),   .op(re_op_q), .p(acc_re));
  te_macc u_macc_im (.clk(clk), .rst_n(rst_n), .a(a_q), .b(dout_b), .op(im_op_q), .p(acc_im));

  assign sel_re = bit_select(acc_re, ctrl.shift);
  assign sel_im = bit_select(acc_im, ctrl.shift);

  // Delay register and output register with the 4-way switch.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      delay_q <= '0;
      out_q   <= '0;
    end else begin
      delay_q <= (ctrl.sw == SW_ACC_RE) ? sel_im : data_path;
      unique case (ctrl.sw)
        SW_PASS:   out_q <= data_path;
        SW_DELAY:  out_q <= delay_q;
        SW_ACC_RE: out_q <= sel_re;
        SW_ACC_IM: out_q <= sel_im;
      endcase
    end
  end

  assign out = out_q;

endmodule
