// realtime_decoder -- two burst-trapping decoders working in turn, so that a
// continuous stream of code words is decoded with a delay of one word.
//
// A single burst_trap_decoder needs two word times per word: one to form the
// syndrome and one to correct and shift the word out. Here an input switch
// sends each received word to one decoder while an output switch takes the
// corrected previous word from the other; both switches change position after
// every N-bit word. The first word after reset produces no output
// (out_valid low) because its syndrome is still being formed.
//
// The arrangement is the one proposed for real-time operation; driving both
// switches from one wrapping word counter is this design's choice.
//
// Interface: one bit per bit_en strobe, words back to back, first word
// starting at the first strobe after reset. out_bit/out_first/corr are
// combinational, for the bit time that is now being clocked. Word i leaves
// N bit times after it entered: bit j of the output in word time i+1 is bit j
// of received word i, corrected. sel tells which decoder is receiving.
// rst_n is synchronous, active low.
module realtime_decoder
  import code_pkg::*;
#(
  parameter int unsigned    N = CODE_N,
  parameter int unsigned    K = CODE_K,
  parameter int unsigned    L = BURST_L,
  parameter logic [N-K-1:0] G = GEN_POLY,
  parameter logic [N-K-1:0] C = CONN_POLY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_en,
  input  logic rx_bit,
  output logic out_bit,
  output logic out_valid,
  output logic out_first,
  output logic corr,
  output logic sel
);

  logic [$clog2(N)-1:0] count;
  logic                 first, last;
  logic                 primed;     // one word has been received
  dec_phase_e           phase [2];
  logic                 dec_out [2];
  logic                 dec_corr [2];
  logic [N-K-1:0]       dec_syn [2];

  bit_counter #(.N(N)) u_count (.clk, .rst_n, .bit_en, .count, .first, .last);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel    <= 1'b0;
      primed <= 1'b0;
    end else if (bit_en && last) begin
      sel    <= ~sel;
      primed <= 1'b1;
    end
  end

  // sel = 0: decoder 0 receives, decoder 1 corrects.
  assign phase[0] = sel ? PH_CORRECT : PH_RECEIVE;
  assign phase[1] = sel ? PH_RECEIVE : PH_CORRECT;

  for (genvar d = 0; d < 2; d++) begin : g_dec
    burst_trap_decoder #(.N(N), .K(K), .L(L), .G(G), .C(C)) u_dec (
      .clk, .rst_n, .bit_en,
      .phase      (phase[d]),
      .word_first (first),
      .rx_bit,
      .out_bit    (dec_out[d]),
      .corr       (dec_corr[d]),
      .syndrome   (dec_syn[d])
    );
  end

  assign out_bit   = sel ? dec_out[0]  : dec_out[1];
  assign corr      = (sel ? dec_corr[0] : dec_corr[1]) & primed;
  assign out_valid = primed;
  assign out_first = primed & first;

endmodule
