// fsk_burst_codec -- the (24,14) burst-5 error-correcting codec for a
// frequency-shift-keyed link, with its bench error simulator and display.
//
// Data path, one bit per bit_en strobe:
//   msg_bit -> cyclic_encoder -> tx_bit (to the FSK modulator)
//                     |
//                     +-> error_simulator --+
//   rx_ext_bit (from the FSK detector) -----+-> rx_sel -> realtime_decoder
//                                                            -> dec_bit
// Each 24-bit code word carries 14 message bits followed by 10 parity bits,
// highest order first. The decoder corrects any burst of up to 5 bits in a
// word and delivers the corrected 24-bit word one word time later. Two
// display registers hold the last encoded word and the last corrected word.
//
// The encoder, decoder pair, burst length and polynomials follow the built
// codec. The FSK modem is analog and stays outside: its two serial signals are
// ports. The error simulator's circuit, the rx_sel input choosing between it
// and the external detector, and the continuous word timing are this design's
// choices.
//
// Timing: the encoder, simulator and decoder count the same strobes from
// reset, so word boundaries line up. msg_take is high during the 14 bit times
// of a word that consume msg_bit. dec_bit is valid when dec_valid is high;
// dec_first marks the first bit of each decoded word. rst_n is synchronous,
// active low.
module fsk_burst_codec
  import code_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      bit_en,
  // message side
  input  logic                      msg_bit,
  output logic                      msg_take,
  // FSK modem side
  output logic                      tx_bit,
  input  logic                      rx_ext_bit,
  input  logic                      rx_sel,       // 1: decode rx_ext_bit
  // error simulator controls
  input  logic                      err_en,
  input  logic [BURST_L-1:0]        err_pattern,
  input  logic [$clog2(CODE_N)-1:0] err_pos,
  // decoded output
  output logic                      dec_bit,
  output logic                      dec_valid,
  output logic                      dec_first,
  output logic                      dec_corr,
  output logic                      dec_sel,
  // display
  output logic [CODE_N-1:0]         tx_word,
  output logic [CODE_N-1:0]         dec_word
);

  logic sim_bit;
  logic rx_bit;
  logic tx_last;   // last bit of a word, for encoder and decoder alike

  cyclic_encoder u_enc (
    .clk, .rst_n, .bit_en, .msg_bit, .msg_take,
    .code_bit   (tx_bit),
    .word_first (),
    .word_last  (tx_last)
  );

  error_simulator #(.N(CODE_N), .L(BURST_L)) u_sim (
    .clk, .rst_n, .bit_en,
    .in_bit (tx_bit),
    .err_en, .err_pattern, .err_pos,
    .out_bit (sim_bit)
  );

  assign rx_bit = rx_sel ? rx_ext_bit : sim_bit;

  realtime_decoder u_dec (
    .clk, .rst_n, .bit_en, .rx_bit,
    .out_bit   (dec_bit),
    .out_valid (dec_valid),
    .out_first (dec_first),
    .corr      (dec_corr),
    .sel       (dec_sel)
  );

  word_display #(.N(CODE_N)) u_tx_disp (
    .clk, .rst_n, .bit_en, .bit_in(tx_bit), .last(tx_last), .word(tx_word)
  );

  word_display #(.N(CODE_N)) u_dec_disp (
    .clk, .rst_n,
    .bit_en (bit_en & dec_valid),
    .bit_in (dec_bit),
    .last   (tx_last),
    .word   (dec_word)
  );

endmodule
