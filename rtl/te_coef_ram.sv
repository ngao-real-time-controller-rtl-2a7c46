// te_coef_ram -- coefficient block RAM of a tomography-engine processing element.
//
// Each PE keeps its own Fourier coefficients, filter weights and scale factors
// in a local dual-port RAM; there is no global memory. Port A is addressed by
// the real-coefficient counter (or by the low bits of the real accumulator for
// table look-ups) and is the only port that can be written, so parameters are
// shifted into the array and stored through it. Port B is addressed by the
// imaginary-coefficient counter and is read-only.
//
// From the design description: the two address counters, the dual read ports
// feeding the real and imaginary MACCs, the write port on side A and an 11-bit
// address (accum_real[10:0] in the PE detail figure). Depth and the read-first
// behaviour of a write are this design's choice.
//
// Timing: both reads are synchronous (one clock, like a block RAM with output
// on the next edge). A write on port A returns the old word on dout_a.
// The RAM is not reset; its contents are loaded by the control processor.
module te_coef_ram
  import te_pkg::*;
#(
  parameter int unsigned AW = COEF_AW
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  input  logic          we_a,
  input  word_t         din_a,
  output word_t         dout_a,
  input  logic [AW-1:0] addr_b,
  output word_t         dout_b
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= din_a;
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
  end

endmodule
