// burst_trap_decoder -- error-trapping decoder for a shortened cyclic
// burst-correcting code (one half of the real-time decoder).
//
// Step 1 (phase = PH_RECEIVE, gate G2 on): the N received bits, highest order
// first, are shifted into an N-stage buffer and, through the connection
// polynomial C(X), into the (N-K)-stage syndrome register, which divides by
// g(X). At the end the register holds C(X) r(X) mod g(X). C(X) pre-multiplies
// the input by X^(N-K) times the number of bits the code was shortened by, so
// that an error in bit X^(N-1) shows as a one in the top syndrome stage.
//
// Step 2 (phase = PH_CORRECT): the buffer is shifted out, highest order bit
// first, while the syndrome register keeps shifting with the input cut off.
// A burst of length L or less has been trapped when the N-K-L low stages are
// all zero and the top stage is one; a NOR of those low stages and of the
// inverted top stage then adds a one to the bit leaving the buffer, and the
// same signal cancels the feedback from the top stage (G1), so the burst
// drains out of the register and leaves it zero. A burst bit that is zero
// inside the burst simply produces no correction.
//
// The structure and taps are those of the built (24,14) burst-5 decoder. The
// clearing of the syndrome register at the first bit of every step 1 is a
// choice of this design (the board had a manual clear): it keeps a word with
// an uncorrectable error from spoiling the next one.
//
// Interface: one bit per bit_en strobe. word_first marks the first bit time of
// a step. out_bit and corr are combinational and are meaningful in
// PH_CORRECT; the word appears there N bit times after its first bit entered,
// which a single decoder cannot overlap with receiving the next word.
// rst_n is synchronous, active low.
module burst_trap_decoder
  import code_pkg::*;
#(
  parameter int unsigned    N = CODE_N,
  parameter int unsigned    K = CODE_K,
  parameter int unsigned    L = BURST_L,
  parameter logic [N-K-1:0] G = GEN_POLY,   // g(X) without X^(N-K)
  parameter logic [N-K-1:0] C = CONN_POLY   // syndrome input connections
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  dec_phase_e   phase,
  input  logic         word_first,
  input  logic         rx_bit,
  output logic         out_bit,
  output logic         corr,
  output logic [N-K-1:0] syndrome
);

  localparam int unsigned P = N - K;
  localparam int unsigned Z = P - L;   // stages that must be zero

  logic [P-1:0] syn;
  logic [N-1:0] buffer;
  logic [P-1:0] syn_base;   // register contents the next shift starts from
  logic         feedback;   // output of G1
  logic         rx_gated;   // output of G2

  assign syndrome = syn;

  // 6-input NOR: S0..S(Z-1) and not S(P-1), used only in step 2.
  assign corr     = (phase == PH_CORRECT) && (syn[Z-1:0] == '0) && syn[P-1];
  assign out_bit  = buffer[N-1] ^ corr;

  assign rx_gated = (phase == PH_RECEIVE) & rx_bit;
  assign syn_base = (phase == PH_RECEIVE && word_first) ? '0 : syn;
  assign feedback = syn_base[P-1] ^ corr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      syn    <= '0;
      buffer <= '0;
    end else if (bit_en) begin
      syn <= {syn_base[P-2:0], 1'b0} ^ (feedback ? G : '0) ^ (rx_gated ? C : '0);
      if (phase == PH_RECEIVE) buffer <= {buffer[N-2:0], rx_bit};
      else                     buffer <= {buffer[N-2:0], 1'b0};
    end
  end

  initial begin
    assert (L < P) else $error("burst length exceeds the syndrome register");
    assert (G[0] == 1'b1) else $error("g(X) must have a constant term");
  end

endmodule
