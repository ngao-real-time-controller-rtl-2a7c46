// te_macc -- multiply-accumulate unit of a tomography-engine processing element.
//
// Models the DSP48 slice the PE is built around: an 18 x 18 signed multiply
// feeding a 48-bit accumulator that can be loaded, added to, subtracted from
// or held. The 48-bit width of the accumulator and the 18-bit operands follow
// the design description ("18-bit MACs, with a 48-bit accumulate register").
// The four-way operation encoding (te_pkg::mac_op_e) is this design's own.
//
// Interface: a, b operands and op are sampled on the rising edge; p is the
// registered accumulator, updated one clock after the operands are presented.
// Synchronous reset clears p.
module te_macc
  import te_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  word_t   a,
  input  word_t   b,
  input  mac_op_e op,
  output acc_t    p
);

  acc_t prod;
  assign prod = acc_t'(a) * acc_t'(b);

  always_ff @(posedge clk) begin
    if (!rst_n) p <= '0;
    else begin
      unique case (op)
        MAC_HOLD: p <= p;
        MAC_LOAD: p <= prod;
        MAC_ADD:  p <= p + prod;
        MAC_SUB:  p <= p - prod;
      endcase
    end
  end

endmodule
