// viterbi_system: convolutional encoder and Viterbi decoder joined through a
// digital stand-in for the channel.
//
// Information bits enter the rate 1/2, K = 9 encoder; each code symbol passes
// a channel stage that XORs it with err_mask, so that a test can flip any code
// bit, and then goes to the decoder as hard-decision values (a 0 as 0, a 1 as
// the largest SOFT_BITS-bit value). The decoded bits leave on dec_bit. This
// chain of encoder, channel and decoder follows the described communication
// system; the error mask in place of an analog noisy channel, quantizer and
// synchronizer is this design's choice.
//
// Interface: in_bit/in_valid/in_last/in_ready accept information bits, in_last
// on the final bit of a frame. code_sym/code_valid show the symbol entering
// the decoder (after the error mask) in the cycle it is accepted, and err_mask
// applies to that symbol. dec_bit/dec_valid/dec_last give the decoded bits in
// order, dec_last on the final bit of a frame.
//
// Timing: the encoder registers its output, so a bit reaches the decoder one
// cycle after it is accepted; the decoder's traceback stalls propagate back to
// in_ready.
module viterbi_system
  import vit_pkg::*;
#(
  parameter int unsigned K          = K_DEFAULT,
  parameter logic [8:0]  G0         = G0_DEFAULT,
  parameter logic [8:0]  G1         = G1_DEFAULT,
  parameter int unsigned SOFT_BITS  = 1,
  parameter int unsigned PM_W       = SOFT_BITS + 7,   // state-metric width, see acs_array
  parameter int unsigned TB_LEN     = TB_LEN_DEFAULT,
  parameter bit          TERMINATE  = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_bit,
  input  logic       in_valid,
  input  logic       in_last,
  output logic       in_ready,
  input  logic [1:0] err_mask,
  output logic [1:0] code_sym,
  output logic       code_valid,
  output logic       dec_bit,
  output logic       dec_valid,
  output logic       dec_last
);

  logic [1:0] enc_sym;
  logic       enc_valid, enc_last, dec_ready;

  conv_encoder #(.K(K), .G0(G0), .G1(G1), .TERMINATE(TERMINATE)) u_enc (
    .clk, .rst_n,
    .in_bit, .in_valid, .in_last, .in_ready,
    .out_sym(enc_sym), .out_valid(enc_valid), .out_last(enc_last), .out_ready(dec_ready)
  );

  assign code_sym   = enc_sym ^ err_mask;
  assign code_valid = enc_valid && dec_ready;

  viterbi_decoder #(
    .K(K), .G0(G0), .G1(G1), .SOFT_BITS(SOFT_BITS), .PM_W(PM_W),
    .TB_LEN(TB_LEN), .TERMINATED(TERMINATE)
  ) u_dec (
    .clk, .rst_n,
    .in_r0   ({SOFT_BITS{code_sym[1]}}),
    .in_r1   ({SOFT_BITS{code_sym[0]}}),
    .in_valid(enc_valid),
    .in_last (enc_last),
    .in_ready(dec_ready),
    .out_bit (dec_bit),
    .out_valid(dec_valid),
    .out_last(dec_last)
  );

endmodule
