// wfs_tt_extract -- tip/tilt extraction from a frame of wavefront-sensor
// centroids.
//
// Overall tip and tilt of a wavefront are the mean x and mean y centroid over
// the illuminated sub-apertures. This block stores one frame of centroids,
// sums x and y over the sub-apertures marked valid in a loadable mask, and at
// the end of the frame divides by their number. The tip/tilt pair is sent on
// (to the tip/tilt mirror path) and the stored centroids are then replayed,
// in index order, with tip and tilt subtracted; masked sub-apertures are
// replayed as zero. The replay is the centroid stream used for
// reconstruction.
//
// From the design description: tip/tilt are extracted from the centroids and
// subtracted from them before reconstruction, and the tip/tilt values go to
// the tip/tilt command generation. This design's own: mean over a valid-mask
// of sub-apertures, the store-and-replay structure, and the timing. The
// piston term of the description has no meaning for slopes and is left to
// the reconstructor.
//
// Interface: centroids arrive with in_valid/in_idx/in_x/in_y; the arrival of
// the last index (NSUB*NSUB-1) ends the frame. Two clocks later tt_valid
// pulses with tip/tilt, and the replay runs one centroid per clock on
// out_valid/out_idx/out_x/out_y (NSUB*NSUB clocks, first one three clocks
// after tt_valid). mask_we/mask_addr/mask_data write the valid mask.
// A new frame must not begin before the replay has finished.
module wfs_tt_extract #(
  parameter int unsigned NSUB = 64   // sub-apertures across
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          mask_we,
  input  logic [$clog2(NSUB*NSUB)-1:0]  mask_addr,
  input  logic                          mask_data,
  input  logic                          in_valid,
  input  logic [$clog2(NSUB*NSUB)-1:0]  in_idx,
  input  logic signed [17:0]            in_x,
  input  logic signed [17:0]            in_y,
  output logic                          tt_valid,
  output logic signed [17:0]            tip,
  output logic signed [17:0]            tilt,
  output logic                          out_valid,
  output logic [$clog2(NSUB*NSUB)-1:0]  out_idx,
  output logic signed [17:0]            out_x,
  output logic signed [17:0]            out_y
);

  localparam int unsigned N  = NSUB * NSUB;
  localparam int unsigned IW = $clog2(N);

  typedef logic signed [17:0] s18_t;

  logic               mask [N];
  s18_t               bx [N];
  s18_t               by [N];
  logic signed [35:0] sum_x, sum_y;
  logic [IW:0]        cnt;
  logic               fin, div_go;
  logic               replay;
  logic [IW-1:0]      rd_idx;
  logic               rd_valid;
  logic               rd_mask;
  s18_t               rd_x, rd_y;

  always_ff @(posedge clk) begin
    if (mask_we) mask[mask_addr] <= mask_data;
  end

  // Store and accumulate.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      bx[in_idx] <= in_x;
      by[in_idx] <= in_y;
    end
  end

  logic first_in;
  assign first_in = in_valid && (in_idx == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_x <= '0;
      sum_y <= '0;
      cnt   <= '0;
      fin   <= 1'b0;
    end else begin
      fin <= in_valid && (in_idx == IW'(N - 1));
      if (in_valid) begin
        if (mask[in_idx]) begin
          sum_x <= (first_in ? 36'sd0 : sum_x) + 36'(in_x);
          sum_y <= (first_in ? 36'sd0 : sum_y) + 36'(in_y);
          cnt   <= (first_in ? '0 : cnt) + 1'b1;
        end else if (first_in) begin
          sum_x <= '0;
          sum_y <= '0;
          cnt   <= '0;
        end
      end
    end
  end

  // Mean (one division per frame).
  function automatic s18_t mean(input logic signed [35:0] s, input logic [IW:0] n);
    logic signed [36:0] q;
    if (n == 0) return '0;
    q = 37'(s) / signed'(37'(n));
    if (q > 37'sd131071)       return 18'sd131071;
    else if (q < -37'sd131072) return -18'sd131072;
    else                       return q[17:0];
  endfunction

  assign div_go = fin;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tt_valid <= 1'b0;
      tip      <= '0;
      tilt     <= '0;
    end else begin
      tt_valid <= div_go;
      if (div_go) begin
        tip  <= mean(sum_x, cnt);
        tilt <= mean(sum_y, cnt);
      end
    end
  end

  // Replay with tip/tilt removed.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      replay   <= 1'b0;
      rd_idx   <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= replay;
      if (tt_valid) begin
        replay <= 1'b1;
        rd_idx <= '0;
      end else if (replay) begin
        rd_idx <= rd_idx + 1'b1;
        if (rd_idx == IW'(N - 1)) replay <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    rd_x    <= bx[rd_idx];
    rd_y    <= by[rd_idx];
    rd_mask <= mask[rd_idx];
  end

  function automatic s18_t sat_sub(input s18_t a, input s18_t b);
    logic signed [18:0] d;
    d = 19'(a) - 19'(b);
    if (d > 19'sd131071)       return 18'sd131071;
    else if (d < -19'sd131072) return -18'sd131072;
    else                       return d[17:0];
  endfunction

  logic [IW-1:0] rd_idx_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_x     <= '0;
      out_y     <= '0;
      rd_idx_q  <= '0;
    end else begin
      rd_idx_q  <= rd_idx;
      out_valid <= rd_valid;
      out_idx   <= rd_idx_q;
      out_x     <= rd_mask ? sat_sub(rd_x, tip)  : '0;
      out_y     <= rd_mask ? sat_sub(rd_y, tilt) : '0;
    end
  end

endmodule
