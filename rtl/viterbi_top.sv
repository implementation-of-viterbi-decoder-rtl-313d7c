// viterbi_top: the coding link of the design, the convolutional encoder and
// the Viterbi decoder side by side.
//
// The two halves share clk and the active-low asynchronous reset rst_all but
// are otherwise independent, as a transmitter and a receiver are: the encoder
// turns enc_bit_in into the symbol pair enc_sym_out (combinational in the
// current bit, register shifts on each clk edge with enc_en high); the
// decoder takes a received pair on data_in every clock and returns the
// decoded bit on data_out WINDOW_LENGTH+1 clocks later. The channel between
// them, where errors occur, is outside this module: connect enc_sym_out to
// data_in through it.
//
// The decoder pins keep the names of the design description. Bringing the
// encoder out beside the decoder is this implementation's choice.
module viterbi_top
  import viterbi_pkg::*;
#(
  parameter int unsigned WINDOW_LENGTH = WINDOW_LENGTH_DEFAULT
) (
  input  logic clk,
  input  logic rst_all,      // asynchronous reset, active low
  // encoder
  input  logic enc_en,       // shift enc_bit_in into the encoder
  input  logic enc_bit_in,
  output sym_t enc_sym_out,  // {OUT_low, OUT_high}
  // decoder
  input  sym_t data_in,      // received {OUT_low, OUT_high}
  output logic data_out
);

  conv_encoder u_enc (
    .clk     (clk),
    .rst_n   (rst_all),
    .en      (enc_en),
    .bit_in  (enc_bit_in),
    .sym_out (enc_sym_out)
  );

  viterbi #(.WINDOW_LENGTH(WINDOW_LENGTH)) u_dec (
    .clk      (clk),
    .rst_all  (rst_all),
    .data_in  (data_in),
    .data_out (data_out)
  );

endmodule
