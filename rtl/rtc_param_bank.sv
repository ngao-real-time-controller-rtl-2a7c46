// rtc_param_bank -- frame-synchronous parameter registers.
//
// The control processor may update parameters at any time, but the real-time
// path must only see a change at the start of a frame. Each register is
// therefore double buffered: writes go to a shadow copy, and at frame_sync all
// shadow values are copied to the active registers together. A write in the
// same clock as frame_sync lands in the shadow copy only and takes effect at
// the next frame. pending shows that the shadow copy differs from what is
// active; reads return the shadow copy.
//
// From the design description: parameter updates are applied at the start of
// a frame, and anything arriving too late for it at the start of the next
// frame. This design's own: the register count, width and the bus.
module rtc_param_bank #(
  parameter int unsigned NREG = 16,
  parameter int unsigned W    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     frame_sync,
  input  logic                     wr_en,
  input  logic [$clog2(NREG)-1:0]  wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic [$clog2(NREG)-1:0]  rd_addr,
  output logic [W-1:0]             rd_data,
  output logic                     pending,
  output logic [W-1:0]             active [NREG]
);

  logic [W-1:0] shadow [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending <= 1'b0;
      for (int i = 0; i < NREG; i++) begin
        shadow[i] <= '0;
        active[i] <= '0;
      end
    end else begin
      if (frame_sync) active <= shadow;
      if (wr_en) shadow[wr_addr] <= wr_data;
      pending <= wr_en || (pending && !frame_sync);
    end
  end

  assign rd_data = shadow[rd_addr];

endmodule
