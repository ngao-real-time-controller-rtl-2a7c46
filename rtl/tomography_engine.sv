// tomography_engine -- the NGAO tomography engine (TE).
//
// The engine turns the wavefronts of the tomography wavefront sensors into an
// estimate of the turbulent atmosphere (a stack of layers) and projects it
// onto the science direction. It is a 3-D systolic array of simple complex
// MAC processing elements, all executing one program from a cycle-accurate
// sequencer, with a frame controller deciding when to start and stop
// iterating. Around the array sits the signal path of the engine's block
// diagram:
//
//   WFS wavefronts --(+)--> systolic array --> east outputs (to the stage that
//                    ^                          forms the science wavefront)
//                    |
//              1-frame delay <-- woofer wavefront <-- low-pass <-- science
//                                                                  wavefront
//   tweeter (on-axis DM) data = science wavefront - woofer wavefront
//
// Inputs and outputs are streams of NY words per clock (one per array row):
// real and imaginary parts alternate, 2*NX words per frame.
//  * wfs_in[g] (g < NGS) plus the delayed woofer wavefront enters the west
//    edge of layer g of the array; layers NGS..NL-1 receive zeros. The array
//    only takes west inputs while the program has the boundary recirculation
//    switched off (load_phase = 1); the sensor stream must be aligned with
//    the program's load window (wfs_valid advances the delay read position).
//  * east_out[k] is the east edge of layer k, valid in the same load window.
//  * sci_in is the on-axis science wavefront, returned by the stage that
//    combines the layer outputs and the LOWFS modes (outside this block).
//  * woofer_out and dm_out follow sci_in by two clocks.
// Coefficients and other PE parameters enter through north_in (one word per
// column per layer per clock) and leave for telemetry through south_out.
//
// From the design description: the array, the sequencer and frame control,
// the adder of WFS data and 1-frame-delayed woofer wavefront, the low-pass
// filter producing the woofer wavefront, the subtraction giving the on-axis
// DM data, parameter input at the top and telemetry at the bottom. This
// design's own: the stream formats, zero input on the layers that have no
// guide star, the saturating adders and the configuration ports.
//
// Size: the full NGAO array is 88 x 88 x 5 and is spread over many FPGAs,
// each holding a square sub-domain of all layers (10 x 10 sub-apertures per
// chip in the design study). The defaults here are one such sub-domain,
// NX = NY = 10, NL = 5: a netlist of the whole 88 x 88 x 5 array does not
// fit in the memory of the synthesis host. The code is the same for any size.
module tomography_engine
  import te_pkg::*;
#(
  parameter int unsigned NX  = 10,  // extended sub-apertures across
  parameter int unsigned NY  = 10,
  parameter int unsigned NL  = 5,   // layers
  parameter int unsigned NGS = 4,   // tomography guide stars / WFSs
  parameter int unsigned PAW = 10   // sequencer program address width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_sync,
  input  logic                run,
  // sequencer program load
  input  logic                prog_we,
  input  logic [PAW-1:0]      prog_addr,
  input  logic [INSTR_W-1:0]  prog_data,
  // configuration
  input  logic [63:0]         err_limit,
  input  logic [7:0]          max_iter,
  input  logic [31:0]         frame_len,
  input  logic [31:0]         iter_cycles,
  input  logic                lpf_we,
  input  logic [$clog2(NX)-1:0] lpf_x,
  input  logic [$clog2(NY)-1:0] lpf_y,
  input  word_t               lpf_data,
  // parameter input (top edge) and telemetry (bottom edge)
  input  word_t               north_in  [NL][NX],
  output word_t               south_out [NL][NX],
  // wavefront sensor input
  input  logic                wfs_valid,
  input  word_t               wfs_in    [NGS][NY],
  output logic                load_phase,
  // array east edge
  output word_t               east_out  [NL][NY],
  // science wavefront in, DM data out
  input  logic                sci_valid,
  input  word_t               sci_in    [NY],
  output logic                woofer_valid,
  output word_t               woofer_out [NY],
  output logic                dm_valid,
  output word_t               dm_out     [NY],
  // status and end-of-frame events
  output logic [PAW-1:0]      pc,
  output logic [STATUS_W-1:0] status,
  output logic [63:0]         ssq,
  output logic                ev_valid,
  output logic [7:0]          ev_iters,
  output logic                ev_converged,
  output logic                ev_iter_max,
  output logic                ev_too_late,
  output logic                ev_overrun,
  output logic [63:0]         ev_err,
  output logic                invalid_state,
  output logic [15:0]         invalid_count,
  output logic                idling
);

  cbus_t              cbus;
  logic [COEF_AW-1:0] cnt_a, cnt_b;
  logic               ssq_clr;
  word_t              west_in [NL][NY];
  word_t              woof_dly [NY];
  word_t              lpf_out  [NY];
  logic               lpf_valid;
  word_t              sci_q    [NY];

  function automatic word_t sat_add(input word_t a, input word_t b, input logic sub);
    logic signed [WORD_W:0] s;
    s = sub ? ((WORD_W+1)'(a) - (WORD_W+1)'(b)) : ((WORD_W+1)'(a) + (WORD_W+1)'(b));
    if (s > (WORD_W+1)'(2**(WORD_W-1) - 1))   return word_t'(2**(WORD_W-1) - 1);
    else if (s < -(WORD_W+1)'(2**(WORD_W-1))) return word_t'(-(2**(WORD_W-1)));
    else                                       return s[WORD_W-1:0];
  endfunction

  // Sequencer and frame control.
  te_cacs #(.PAW(PAW)) u_cacs (
    .clk, .rst_n, .run,
    .prog_we, .prog_addr, .prog_data,
    .status, .cbus, .cnt_a, .cnt_b, .pc, .idling
  );

  te_frame_ctrl u_fctl (
    .clk, .rst_n, .frame_sync,
    .evt    (cbus.evt),
    .ssq_en (cbus.ssq_en),
    .ssq, .ssq_clr,
    .err_limit, .max_iter, .frame_len, .iter_cycles,
    .status,
    .ev_valid, .ev_iters, .ev_converged, .ev_iter_max, .ev_too_late,
    .ev_overrun, .ev_err, .invalid_state, .invalid_count
  );

  assign load_phase = !cbus.recirc;

  // WFS input adder: sensor wavefront plus the woofer wavefront of the
  // previous frame.
  always_comb begin
    for (int k = 0; k < NL; k++)
      for (int y = 0; y < NY; y++)
        west_in[k][y] = (k < NGS) ? sat_add(wfs_in[k][y], woof_dly[y], 1'b0) : '0;
  end

  te_array #(.NX(NX), .NY(NY), .NL(NL)) u_array (
    .clk, .rst_n,
    .ctrl (cbus), .cnt_a, .cnt_b,
    .west_in, .east_out, .north_in, .south_out,
    .ssq_clr, .ssq
  );

  // Woofer / tweeter split of the science wavefront.
  te_lpf #(.NX(NX), .NY(NY)) u_lpf (
    .clk, .rst_n, .frame_sync,
    .w_we (lpf_we), .w_x (lpf_x), .w_y (lpf_y), .w_data (lpf_data),
    .din_valid (sci_valid), .din (sci_in),
    .dout_valid (lpf_valid), .dout (lpf_out)
  );

  te_frame_delay #(.NY(NY), .DEPTH(2 * NX)) u_fdly (
    .clk, .rst_n, .frame_sync,
    .wr_en (lpf_valid), .wr_data (lpf_out),
    .rd_en (wfs_valid), .rd_data (woof_dly)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      woofer_valid <= 1'b0;
      dm_valid     <= 1'b0;
      for (int y = 0; y < NY; y++) begin
        sci_q[y]      <= '0;
        woofer_out[y] <= '0;
        dm_out[y]     <= '0;
      end
    end else begin
      sci_q        <= sci_in;
      woofer_valid <= lpf_valid;
      dm_valid     <= lpf_valid;
      woofer_out   <= lpf_out;
      for (int y = 0; y < NY; y++) dm_out[y] <= sat_add(sci_q[y], lpf_out[y], 1'b1);
    end
  end

endmodule
