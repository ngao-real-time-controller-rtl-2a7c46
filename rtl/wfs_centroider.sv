// wfs_centroider -- Hartmann wavefront-sensor image processing and centroiding.
//
// A high-order wavefront sensor camera images an array of Hartmann spots, one
// per sub-aperture, each on a SUB x SUB block of pixels (4 x 4 for a 256 x 256
// camera behind 64 x 64 sub-apertures). For every pixel this block subtracts
// the dark-current and background values of that pixel and applies a
// threshold (values at or below it become 0). For every sub-aperture it then
// forms two weighted sums, Sx = sum(wx*p) and Sy = sum(wy*p), and the plain
// sum S = sum(p), and outputs the centroid (Sx/S, Sy/S) minus the reference
// centroid of that sub-aperture. Centre-of-mass, quad-cell and binned
// quad-cell centroiding are all obtained by loading different 4x4 weight
// sets wx, wy.
//
// From the design description: the dark-current, background and
// reference-centroid arrays, thresholding, weights on a 4 x 4 pixel grid that
// define the centroiding algorithm, the 256 x 256 camera with 64 x 64
// sub-apertures, 16-bit camera data. This design's own: the threshold rule,
// 8-bit signed weights, centroids as signed fixed point with CFRAC fraction
// bits, raster pixel order, one pixel per clock, and the load port.
//
// Interface: pixels arrive in raster order (row by row, PIX per row) with
// pix_valid; frame_sync restarts the raster position. Tables are written
// through ld_we/ld_sel/ld_addr/ld_data: sel 0 dark[pixel], 1 background[pixel],
// 2 reference x[sub-aperture], 3 reference y[sub-aperture], 4 wx[r*SUB+c],
// 5 wy[r*SUB+c], 6 threshold.
// Timing: a centroid leaves three clocks after the last pixel of its
// sub-aperture, in order of sub-aperture index (row-major, cent_idx).
module wfs_centroider #(
  parameter int unsigned PIX   = 256,  // pixels across the camera
  parameter int unsigned SUB   = 4,    // pixels across a sub-aperture
  parameter int unsigned CFRAC = 8     // fraction bits of the centroid
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         frame_sync,
  input  logic                         pix_valid,
  input  logic [15:0]                  pix,
  // table load port
  input  logic                         ld_we,
  input  logic [2:0]                   ld_sel,
  input  logic [$clog2(PIX*PIX)-1:0]   ld_addr,
  input  logic signed [17:0]           ld_data,
  // centroid output
  output logic                         cent_valid,
  output logic [$clog2((PIX/SUB)*(PIX/SUB))-1:0] cent_idx,
  output logic signed [17:0]           cent_x,
  output logic signed [17:0]           cent_y
);

  localparam int unsigned NS  = PIX / SUB;          // sub-apertures across
  localparam int unsigned PW  = $clog2(PIX);
  localparam int unsigned SW  = $clog2(NS * NS);
  localparam int unsigned QW  = $clog2(SUB);

  typedef logic signed [17:0] s18_t;

  // Tables.
  logic [15:0]     dark_mem [PIX*PIX];
  logic [15:0]     bg_mem   [PIX*PIX];
  s18_t            refx_mem [NS*NS];
  s18_t            refy_mem [NS*NS];
  logic signed [7:0] wx [SUB*SUB];
  logic signed [7:0] wy [SUB*SUB];
  logic [15:0]     thresh;

  always_ff @(posedge clk) begin
    if (ld_we) begin
      unique case (ld_sel)
        3'd0: dark_mem[ld_addr] <= ld_data[15:0];
        3'd1: bg_mem[ld_addr]   <= ld_data[15:0];
        3'd2: refx_mem[ld_addr[SW-1:0]] <= ld_data;
        3'd3: refy_mem[ld_addr[SW-1:0]] <= ld_data;
        3'd4: wx[ld_addr[2*QW-1:0]] <= ld_data[7:0];
        3'd5: wy[ld_addr[2*QW-1:0]] <= ld_data[7:0];
        3'd6: thresh <= ld_data[15:0];
        default: ;
      endcase
    end
  end

  // Stage 0: raster position and table read.
  logic [PW-1:0] row, col;
  logic          s1_valid;
  logic [PW-1:0] s1_row, s1_col;
  logic [15:0]   s1_pix, s1_dark, s1_bg;

  always_ff @(posedge clk) begin
    if (!rst_n || frame_sync) begin
      row <= '0;
      col <= '0;
    end else if (pix_valid) begin
      col <= (col == PW'(PIX - 1)) ? '0 : col + 1'b1;
      if (col == PW'(PIX - 1)) row <= (row == PW'(PIX - 1)) ? '0 : row + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    s1_dark <= dark_mem[{row, col}];
    s1_bg   <= bg_mem[{row, col}];
    s1_pix  <= pix;
    s1_row  <= row;
    s1_col  <= col;
    if (!rst_n || frame_sync) s1_valid <= 1'b0;
    else                      s1_valid <= pix_valid;
  end

  // Stage 1: correction, threshold and accumulation per sub-aperture column.
  logic signed [18:0] corr;
  logic [16:0]        p;
  logic [QW-1:0]      qr, qc;
  logic [PW-QW-1:0]   sc;
  logic signed [31:0] cx_p, cy_p;
  logic signed [31:0] sx_acc [NS];
  logic signed [31:0] sy_acc [NS];
  logic [23:0]        s_acc  [NS];
  logic signed [31:0] sx_new, sy_new;
  logic [23:0]        s_new;
  logic               first, last;

  assign corr  = 19'(s1_pix) - 19'(s1_dark) - 19'(s1_bg);
  assign p     = (corr > signed'(19'(thresh))) ? corr[16:0] : '0;
  assign qr    = s1_row[QW-1:0];
  assign qc    = s1_col[QW-1:0];
  assign sc    = s1_col[PW-1:QW];
  assign cx_p  = 32'(wx[{qr, qc}]) * signed'(32'(p));
  assign cy_p  = 32'(wy[{qr, qc}]) * signed'(32'(p));
  assign first = (qr == '0) && (qc == '0);
  assign last  = (qr == QW'(SUB - 1)) && (qc == QW'(SUB - 1));
  assign sx_new = (first ? 32'sd0 : sx_acc[sc]) + cx_p;
  assign sy_new = (first ? 32'sd0 : sy_acc[sc]) + cy_p;
  assign s_new  = (first ? 24'd0  : s_acc[sc])  + 24'(p);

  logic               s2_valid;
  logic signed [31:0] s2_sx, s2_sy;
  logic [23:0]        s2_s;
  logic [SW-1:0]      s2_idx, fin_idx;
  s18_t               s2_refx, s2_refy;

  assign fin_idx = SW'({s1_row[PW-1:QW], sc});

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      sx_acc[sc] <= sx_new;
      sy_acc[sc] <= sy_new;
      s_acc[sc]  <= s_new;
    end
    s2_sx   <= sx_new;
    s2_sy   <= sy_new;
    s2_s    <= s_new;
    s2_idx  <= fin_idx;
    s2_refx <= refx_mem[fin_idx];
    s2_refy <= refy_mem[fin_idx];
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid && last && !frame_sync;
  end

  // Stage 2: division and reference subtraction.
  function automatic s18_t centroid(input logic signed [31:0] num, input logic [23:0] den,
                                    input s18_t ref_c);
    logic signed [47:0] q;
    if (den == 0) q = '0;
    else          q = (48'(num) <<< CFRAC) / signed'(48'(den));
    q = q - 48'(ref_c);
    if (q > 48'sd131071)       return 18'sd131071;
    else if (q < -48'sd131072) return -18'sd131072;
    else                       return q[17:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cent_valid <= 1'b0;
      cent_idx   <= '0;
      cent_x     <= '0;
      cent_y     <= '0;
    end else begin
      cent_valid <= s2_valid;
      if (s2_valid) begin
        cent_idx <= s2_idx;
        cent_x   <= centroid(s2_sx, s2_s, s2_refx);
        cent_y   <= centroid(s2_sy, s2_s, s2_refy);
      end
    end
  end

endmodule
