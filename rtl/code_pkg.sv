// code_pkg -- constants shared by the (24,14) burst-5 cyclic codec.
//
// The codec protects a 24-bit word made of 14 information bits and 10 parity
// bits. The code is the (27,17) cyclic burst-5 correcting code shortened by 3
// bits; its generator polynomial
//     g(X) = 1 + X^3 + X^4 + X^5 + X^7 + X^8 + X^10
// has period 341, so the code is really the length-341 cyclic code shortened
// by 317 bits. The decoder feeds the received bits into the syndrome register
// through the connection polynomial
//     C(X) = X^(10+317) mod g(X) = 1 + X + X^2 + X^5 + X^7 + X^9,
// which lines a burst in the top five bit positions of the word up with the
// top five syndrome stages.
//
// Polynomials of degree below n-k are stored as bit vectors with bit i the
// coefficient of X^i. For g(X) the leading X^(n-k) term is implied and left
// out, so GEN_POLY[i] says whether the feedback is added in front of stage i.
//
// All numbers are those of the built codec; nothing here is a free choice
// except the phase type, which names the two steps of the decoder.
package code_pkg;

  localparam int unsigned CODE_N  = 24;               // code word length n
  localparam int unsigned CODE_K  = 14;               // information bits k
  localparam int unsigned PARITY  = CODE_N - CODE_K;  // n-k = 10
  localparam int unsigned BURST_L = 5;                // correctable burst length

  // g(X) without its X^10 term: 1 + X^3 + X^4 + X^5 + X^7 + X^8
  localparam logic [PARITY-1:0] GEN_POLY  = 10'b01_1011_1001;
  // C(X) = 1 + X + X^2 + X^5 + X^7 + X^9
  localparam logic [PARITY-1:0] CONN_POLY = 10'b10_1010_0111;

  // Decoder step: forming the syndrome of a new word, or correcting and
  // shifting out the stored one.
  typedef enum logic {
    PH_RECEIVE = 1'b0,
    PH_CORRECT = 1'b1
  } dec_phase_e;

endpackage
