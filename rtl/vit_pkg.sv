// vit_pkg: constants and helper functions shared by the convolutional encoder
// and the Viterbi decoder.
//
// The code is the rate 1/2, constraint length K = 9 convolutional code. The
// constraint length and rate are the ones this design is built around; the
// generator polynomials are this design's choice, since none are specified:
// the widely used K = 9 pair 561 / 753 (octal), as in IS-95 and 3GPP.
//
// Bit convention used everywhere: the encoder register is {u, s}, where u is
// the current input bit and s is the 8-bit state. s[K-2] holds the previous
// input bit and s[0] the oldest one, so the next state is {u, s[K-2:1]}. Bit
// K-1 of a generator taps the current input. A code symbol is the
// 2-bit value {c0, c1}, c0 from G0 and c1 from G1.
package vit_pkg;

  localparam int unsigned K_DEFAULT      = 9;
  localparam logic [8:0]  G0_DEFAULT     = 9'o561;
  localparam logic [8:0]  G1_DEFAULT     = 9'o753;
  // Traceback (trellis) length; the survivor memory holds two of these.
  localparam int unsigned TB_LEN_DEFAULT = 32;

endpackage
