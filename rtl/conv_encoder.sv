// conv_encoder: K=3, rate-1/2 convolutional encoder.
//
// Two flip-flops hold the previous two input bits, in(t-1) and in(t-2). The
// code symbol is combinational in the current input and those flip-flops:
// sym_out[0] = OUT_high = in ^ in(t-1) ^ in(t-2) and
// sym_out[1] = OUT_low  = in ^ in(t-2), the bit order the decoder's data_in
// uses. On every rising clk edge with en high the input bit is shifted in.
// rst_n (asynchronous, active low) clears the register, so the encoder starts
// in state 00 as the decoder expects.
//
// The shift register, the two generator polynomials and the zero start state
// follow the design description. The enable input and the asynchronous reset
// are this implementation's choices.
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,       // shift bit_in in at this clock edge
  input  logic bit_in,   // information bit in(t)
  output sym_t sym_out   // {OUT_low, OUT_high} for bit_in
);

  logic d1, d2;  // in(t-1), in(t-2)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= 1'b0;
      d2 <= 1'b0;
    end else if (en) begin
      d1 <= bit_in;
      d2 <= d1;
    end
  end

  assign sym_out = encode(bit_in, d1, d2);

endmodule
