// te_array -- the tomography engine's 3-D systolic array of processing elements.
//
// NX x NY x NL PEs are mapped onto the atmosphere: x and y over the (extended)
// sub-apertures, the third index over the layers, which double as guide-star
// planes. Every PE receives the same control word and the same two coefficient
// addresses (SIMD); what differs is the data and each PE's own coefficients.
//
// Interconnect: each PE takes its input from its horizontal neighbour (x-1),
// its vertical neighbour (y-1) or the PE of the next layer (k-1), chosen by the
// common control word, so data shifts in a circle along rows, columns or
// layers. The rings close through boundary multiplexors:
//   * West edge ("DFT row recirculate / WFS input multiplexor"): PE x=0 takes
//     the east-edge output of its row when ctrl.recirc is 1, else west_in.
//   * East edge ("DFT row recirculate / DM data output splitter"): the outputs
//     of the PEs at x=NX-1 are brought out as east_out.
//   * North edge ("command and parameter input and DFT column recirculate"):
//     PE y=0 takes the south-edge output of its column when ctrl.recirc is 1,
//     else north_in.
//   * South edge ("telemetry, diagnostics and DFT column recirculation"):
//     the outputs of the PEs at y=NY-1 are brought out as south_out.
//   * Layers always close as a ring (layer 0 receives layer NL-1).
// While ctrl.ssq_en is 1 (and ctrl.evt is 0: evt with ssq_en marks the end
// of an iteration for the frame controller) the array adds the squares of every word leaving the
// east edge into a sum-of-squares register. During a row transform each word
// of the array passes the east edge exactly once, so this yields the squared
// norm of the data (the error measure used for the convergence test).
//
// From the design description: one PE per voxel, the x/y/layer ring
// connections, I/O only at the left and right of the mesh for wavefront and
// DM data, recirculation at all four boundaries, parameters entering at the
// top, telemetry leaving at the bottom, the sum of squares computed while the
// transform shifts data across the rows, and NX = NY = 88 extended
// sub-apertures with NL = 5 layers. This design's own: one recirculate bit
// for all four boundaries, combinational boundary multiplexors (no extra
// ring register, so 2*NX clocks return every value to its PE), a single
// broadcast control word for the whole array, and the 64-bit sum register.
//
// Timing: all PE registers update on the rising edge; ssq updates on the edge
// after the words it sums appear on east_out. ssq_clr clears it (priority over
// accumulation).
//
// Size: the full NGAO array is 88 x 88 x 5 and is spread over many FPGAs,
// each holding a square sub-domain of all layers (10 x 10 sub-apertures per
// chip in the design study). The defaults here are one such sub-domain,
// NX = NY = 10, NL = 5: a netlist of the whole 88 x 88 x 5 array does not
// fit in the memory of the synthesis host. The code is the same for any size.
module te_array
  import te_pkg::*;
#(
  parameter int unsigned NX = 10,   // extended sub-apertures per row
  parameter int unsigned NY = 10,   // extended sub-apertures per column
  parameter int unsigned NL = 5     // layers (max of layers and guide stars)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cbus_t              ctrl,
  input  logic [COEF_AW-1:0] cnt_a,
  input  logic [COEF_AW-1:0] cnt_b,
  input  word_t              west_in   [NL][NY],
  output word_t              east_out  [NL][NY],
  input  word_t              north_in  [NL][NX],
  output word_t              south_out [NL][NX],
  input  logic               ssq_clr,
  output logic [63:0]        ssq
);

  word_t pe_out [NL][NY][NX];

  for (genvar k = 0; k < NL; k++) begin : g_layer
    for (genvar y = 0; y < NY; y++) begin : g_row
      for (genvar x = 0; x < NX; x++) begin : g_col
        word_t in_h, in_v, in_l;
        acc_t  acc_re_unused, acc_im_unused;

        if (x == 0) begin : g_west
          assign in_h = ctrl.recirc ? pe_out[k][y][NX-1] : west_in[k][y];
        end else begin : g_inner_h
          assign in_h = pe_out[k][y][x-1];
        end

        if (y == 0) begin : g_north
          assign in_v = ctrl.recirc ? pe_out[k][NY-1][x] : north_in[k][x];
        end else begin : g_inner_v
          assign in_v = pe_out[k][y-1][x];
        end

        assign in_l = pe_out[(k + NL - 1) % NL][y][x];

        te_pe u_pe (
          .clk    (clk),
          .rst_n  (rst_n),
          .ctrl   (ctrl),
          .cnt_a  (cnt_a),
          .cnt_b  (cnt_b),
          .in_h   (in_h),
          .in_v   (in_v),
          .in_l   (in_l),
          .out    (pe_out[k][y][x]),
          .acc_re (acc_re_unused),
          .acc_im (acc_im_unused)
        );
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NL; k++) begin
      for (int y = 0; y < NY; y++) east_out[k][y] = pe_out[k][y][NX-1];
      for (int x = 0; x < NX; x++) south_out[k][x] = pe_out[k][NY-1][x];
    end
  end

  // Sum of squares of the words crossing the east boundary.
  logic [63:0] sq_sum;
  always_comb begin
    sq_sum = '0;
    for (int k = 0; k < NL; k++)
      for (int y = 0; y < NY; y++)
        sq_sum += 64'(acc_t'(pe_out[k][y][NX-1]) * acc_t'(pe_out[k][y][NX-1]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || ssq_clr) ssq <= '0;
    else if (ctrl.ssq_en && !ctrl.evt) ssq <= ssq + sq_sum;
  end

endmodule
