// error_simulator -- adds a burst error to a serial code word stream, for
// demonstrating the codec on the bench.
//
// Each word passes through unchanged except for the bits selected by the
// burst: bit X^(err_pos+j) of the word is inverted when err_pattern[j] is one.
// The bit position is taken from a word counter aligned with the encoder's
// (both count the same bit_en strobes from reset); the bit sent in bit time c
// of a word is the coefficient of X^(N-1-c). Bits of the pattern that would
// fall above X^(N-1) are dropped.
//
// A simulator board was built for the demonstration, but only its purpose is
// known; this XOR injector is the simplest circuit serving that purpose and is
// this design's own. err_en, err_pattern and err_pos are sampled at the first
// bit of each word and held for the rest of that word.
//
// Interface: out_bit is combinational from in_bit, valid in every bit time.
// rst_n is synchronous, active low.
module error_simulator #(
  parameter int unsigned N = 24,
  parameter int unsigned L = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_en,
  input  logic                 in_bit,
  input  logic                 err_en,
  input  logic [L-1:0]         err_pattern,
  input  logic [$clog2(N)-1:0] err_pos,
  output logic                 out_bit
);

  localparam int unsigned W = $clog2(N);

  logic [W-1:0]   count;
  logic           first, last;
  logic [N-1:0]   mask_now;    // error mask for the word, from the live inputs
  logic [N-1:0]   mask_held;   // error mask held for the rest of the word
  logic [N-1:0]   mask;
  logic [W-1:0]   expo;        // exponent of the current bit

  bit_counter #(.N(N)) u_count (.clk, .rst_n, .bit_en, .count, .first, .last);

  always_comb begin
    mask_now = '0;
    if (err_en)
      for (int j = 0; j < L; j++)
        if (int'(err_pos) + j < N && err_pattern[j])
          mask_now[int'(err_pos) + j] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                mask_held <= '0;
    else if (bit_en && first)  mask_held <= mask_now;
  end

  assign mask    = first ? mask_now : mask_held;
  assign expo    = W'(N - 1) - count;
  assign out_bit = in_bit ^ mask[expo];

endmodule
