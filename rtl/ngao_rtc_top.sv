// ngao_rtc_top -- FPGA part of the NGAO real-time controller.
//
// Contains the parts of the real-time controller that are built as logic:
//   * rtc_timing      frame clock (internal 2 kHz or external), low-order
//                     250 Hz pulse, frame number;
//   * rtc_param_bank  frame-synchronous control registers written by the
//                     control processor;
//   * NGS tomography wavefront-sensor front ends, each a wfs_centroider
//     followed by a wfs_tt_extract;
//   * tomography_engine  the systolic tomography engine with its woofer /
//                     tweeter split.
// Everything the design description assigns to processors, GPUs, cameras or
// analog electronics is outside this module and connected through ports:
// camera pixels come in, centroids and tip/tilt go out to the wavefront
// reconstructors and tip/tilt drivers, reconstructed wavefronts come back in
// as tomography inputs, the array's layer outputs go to the stage that forms
// the science-direction wavefront and that wavefront comes back as sci_in,
// and DM data goes out to the DM command generators.
//
// Control registers (rtc_param_bank, active from the next frame_sync):
//   0  bit 0: tomography sequencer run, bit 1: use external frame clock
//   1  error limit, low 32 bits      2  error limit, high 32 bits
//   3  maximum iterations (bits 7:0) 4  clocks one iteration needs
// The frame length given to the tomography engine is FRAME_DIV.
//
// From the design description: the partitioning into sensor processing,
// tomography, woofer/tweeter split and DM command generation, four
// tomography sensors, 64 x 64 sub-apertures on a 256 x 256 camera, the 88 x 88
// x 5 tomography array, the 100 MHz clock and 2 kHz frame. This design's own:
// the register map and all port formats.
//
// Size: the full NGAO array is 88 x 88 x 5 and is spread over many FPGAs,
// each holding a square sub-domain of all layers (10 x 10 sub-apertures per
// chip in the design study). The defaults here are one such sub-domain,
// NX = NY = 10, NL = 5: a netlist of the whole 88 x 88 x 5 array does not
// fit in the memory of the synthesis host. The code is the same for any size.
module ngao_rtc_top
  import te_pkg::*;
#(
  parameter int unsigned NX        = 10,
  parameter int unsigned NY        = 10,
  parameter int unsigned NL        = 5,
  parameter int unsigned NGS       = 4,
  parameter int unsigned PAW       = 10,
  parameter int unsigned PIX       = 256,
  parameter int unsigned SUB       = 4,
  parameter int unsigned FRAME_DIV = 50_000,
  parameter int unsigned SLOW_DIV  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ext_frame,
  // control processor register bus
  input  logic        cp_we,
  input  logic [2:0]  cp_addr,
  input  logic [31:0] cp_wdata,
  input  logic [2:0]  cp_rd_addr,
  output logic [31:0] cp_rd_data,
  output logic        cp_pending,
  // control processor table loads
  input  logic                       prog_we,
  input  logic [PAW-1:0]             prog_addr,
  input  logic [INSTR_W-1:0]         prog_data,
  input  logic                       lpf_we,
  input  logic [$clog2(NX)-1:0]      lpf_x,
  input  logic [$clog2(NY)-1:0]      lpf_y,
  input  word_t                      lpf_data,
  input  logic                       wfs_ld_we  [NGS],
  input  logic [2:0]                 wfs_ld_sel,
  input  logic [$clog2(PIX*PIX)-1:0] wfs_ld_addr,
  input  logic signed [17:0]         wfs_ld_data,
  input  logic                       mask_we    [NGS],
  input  logic [$clog2((PIX/SUB)*(PIX/SUB))-1:0] mask_addr,
  input  logic                       mask_data,
  // cameras
  input  logic                       cam_valid  [NGS],
  input  logic [15:0]                cam_pix    [NGS],
  // to the wavefront reconstructors and tip/tilt drivers
  output logic                       cent_valid [NGS],
  output logic [$clog2((PIX/SUB)*(PIX/SUB))-1:0] cent_idx [NGS],
  output logic signed [17:0]         cent_x     [NGS],
  output logic signed [17:0]         cent_y     [NGS],
  output logic                       tt_valid   [NGS],
  output logic signed [17:0]         tip        [NGS],
  output logic signed [17:0]         tilt       [NGS],
  // tomography engine data
  input  word_t                      north_in   [NL][NX],
  output word_t                      south_out  [NL][NX],
  input  logic                       wfs_valid,
  input  word_t                      wfs_in     [NGS][NY],
  output logic                       load_phase,
  output word_t                      east_out   [NL][NY],
  input  logic                       sci_valid,
  input  word_t                      sci_in     [NY],
  output logic                       woofer_valid,
  output word_t                      woofer_out [NY],
  output logic                       dm_valid,
  output word_t                      dm_out     [NY],
  // timing and status
  output logic                       frame_sync,
  output logic                       slow_sync,
  output logic [31:0]                frame_count,
  output logic [31:0]                frame_phase,
  output logic [PAW-1:0]             te_pc,
  output logic [STATUS_W-1:0]        te_status,
  output logic [63:0]                te_ssq,
  output logic                       ev_valid,
  output logic [7:0]                 ev_iters,
  output logic                       ev_converged,
  output logic                       ev_iter_max,
  output logic                       ev_too_late,
  output logic                       ev_overrun,
  output logic [63:0]                ev_err,
  output logic                       invalid_state,
  output logic [15:0]                invalid_count,
  output logic                       te_idling
);

  localparam int unsigned NSUB = PIX / SUB;

  logic [31:0] regs [8];

  rtc_timing #(.FRAME_DIV(FRAME_DIV), .SLOW_DIV(SLOW_DIV)) u_timing (
    .clk, .rst_n,
    .use_ext (regs[0][1]),
    .ext_frame,
    .frame_sync, .slow_sync, .frame_count, .frame_phase
  );

  rtc_param_bank #(.NREG(8), .W(32)) u_regs (
    .clk, .rst_n, .frame_sync,
    .wr_en (cp_we), .wr_addr (cp_addr), .wr_data (cp_wdata),
    .rd_addr (cp_rd_addr), .rd_data (cp_rd_data),
    .pending (cp_pending),
    .active (regs)
  );

  for (genvar g = 0; g < NGS; g++) begin : g_wfs
    logic                  c_valid;
    logic [$clog2(NSUB*NSUB)-1:0] c_idx;
    logic signed [17:0]    c_x, c_y;

    wfs_centroider #(.PIX(PIX), .SUB(SUB)) u_cent (
      .clk, .rst_n, .frame_sync,
      .pix_valid (cam_valid[g]), .pix (cam_pix[g]),
      .ld_we (wfs_ld_we[g]), .ld_sel (wfs_ld_sel), .ld_addr (wfs_ld_addr),
      .ld_data (wfs_ld_data),
      .cent_valid (c_valid), .cent_idx (c_idx), .cent_x (c_x), .cent_y (c_y)
    );

    wfs_tt_extract #(.NSUB(NSUB)) u_tt (
      .clk, .rst_n,
      .mask_we (mask_we[g]), .mask_addr, .mask_data,
      .in_valid (c_valid), .in_idx (c_idx), .in_x (c_x), .in_y (c_y),
      .tt_valid (tt_valid[g]), .tip (tip[g]), .tilt (tilt[g]),
      .out_valid (cent_valid[g]), .out_idx (cent_idx[g]),
      .out_x (cent_x[g]), .out_y (cent_y[g])
    );
  end

  tomography_engine #(.NX(NX), .NY(NY), .NL(NL), .NGS(NGS), .PAW(PAW)) u_te (
    .clk, .rst_n, .frame_sync,
    .run (regs[0][0]),
    .prog_we, .prog_addr, .prog_data,
    .err_limit ({regs[2], regs[1]}),
    .max_iter (regs[3][7:0]),
    .frame_len (32'(FRAME_DIV)),
    .iter_cycles (regs[4]),
    .lpf_we, .lpf_x, .lpf_y, .lpf_data,
    .north_in, .south_out,
    .wfs_valid, .wfs_in, .load_phase,
    .east_out,
    .sci_valid, .sci_in,
    .woofer_valid, .woofer_out, .dm_valid, .dm_out,
    .pc (te_pc), .status (te_status), .ssq (te_ssq), .idling (te_idling),
    .ev_valid, .ev_iters, .ev_converged, .ev_iter_max, .ev_too_late,
    .ev_overrun, .ev_err, .invalid_state, .invalid_count
  );

endmodule
