// cyclic_encoder -- systematic serial encoder for an (N,K) cyclic code.
//
// The code word is v(X) = X^(N-K) m(X) + p(X), where p(X) is the remainder
// of X^(N-K) m(X) divided by g(X). It leaves the encoder highest order bit
// first: the K message bits unchanged, then the N-K parity bits.
//
// How it works: an (N-K)-stage parity register divides by g(X). For the first
// K bit times the gate G1 is on and the output switch is at A: each message
// bit goes to the output and, added to the top stage, is fed back into stage
// 0 and in front of every stage i where g has an X^i term. After the K-th bit
// G1 turns off and the switch moves to B: the register simply shifts and its
// top stage, the parity bits p_{N-K-1} .. p_0, goes to the output. After N
// bit times the register is empty and the next word can start at once.
//
// This is the general cyclic encoder with the taps of the built (24,14)
// burst-5 encoder as defaults. The continuous word-after-word timing (a
// wrapping bit counter rather than a count that holds until cleared) is a
// choice of this design.
//
// Interface: one code bit per bit_en strobe. msg_take is high during the bit
// times that consume msg_bit (switch at A); code_bit is combinational and
// valid in every bit time; word_first and word_last mark the first and
// last bit of a word.
// rst_n is synchronous, active low.
module cyclic_encoder
  import code_pkg::*;
#(
  parameter int unsigned        N = CODE_N,
  parameter int unsigned        K = CODE_K,
  parameter logic [N-K-1:0]     G = GEN_POLY   // g(X) without X^(N-K)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_en,
  input  logic msg_bit,
  output logic msg_take,
  output logic code_bit,
  output logic word_first,
  output logic word_last
);

  localparam int unsigned P = N - K;
  localparam int unsigned W = $clog2(N);
  localparam logic [W-1:0] K_IDX = W'(K);

  logic [W-1:0]         count;
  logic [P-1:0]         par;       // parity register S0..S(P-1)
  logic                 feedback;  // output of G1

  bit_counter #(.N(N)) u_count (
    .clk, .rst_n, .bit_en, .count, .first(word_first), .last(word_last)
  );

  // Switch A (message) for the first K bit times, B (parity) after.
  assign msg_take = (count < K_IDX);
  assign feedback = msg_take & (msg_bit ^ par[P-1]);
  assign code_bit = msg_take ? msg_bit : par[P-1];

  always_ff @(posedge clk) begin
    if (!rst_n)
      par <= '0;
    else if (bit_en)
      par <= {par[P-2:0], 1'b0} ^ (feedback ? G : '0);
  end

  initial assert (G[0] == 1'b1) else $error("g(X) must have a constant term");

endmodule
