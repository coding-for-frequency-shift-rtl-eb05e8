// dec_harness -- drives one burst_trap_decoder through every correctable
// burst and compares the output with the sent code word.
//
// For each burst of length 1..L (first and last bit one, any bits between)
// at every position inside the N-bit word, a random message is encoded by
// long division by g(X) (written here as a plain loop, not as a shift
// register), the burst is added, and the word is run through the decoder's
// two steps: N bit times receiving, N bit times correcting. The testbench
// checks the corrected word, the number of corrected bits (the burst weight),
// that the syndrome register ends at zero, and that the output leaves in the
// N bit times right after the word entered. It also sends clean words, and a
// word of random noise followed by a clean word, to check that a bad word
// does not spoil the next one. done rises when all words are through.
module dec_harness
  import code_pkg::*;
#(
  parameter int unsigned    N = 24,
  parameter int unsigned    K = 14,
  parameter int unsigned    L = 5,
  parameter logic [N-K-1:0] G = GEN_POLY,
  parameter logic [N-K-1:0] C = CONN_POLY
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   corrected_words
);

  localparam int unsigned P = N - K;

  logic       rst_n = 1'b0;
  logic       bit_en = 1'b0;
  dec_phase_e phase = PH_RECEIVE;
  logic       word_first = 1'b0;
  logic       rx_bit = 1'b0;
  logic       out_bit, corr;
  logic [P-1:0] syndrome;

  burst_trap_decoder #(.N(N), .K(K), .L(L), .G(G), .C(C)) dut (
    .clk, .rst_n, .bit_en, .phase, .word_first, .rx_bit, .out_bit, .corr, .syndrome
  );

  function automatic logic [N-1:0] div_encode(input logic [K-1:0] m);
    logic [N-1:0] r;
    logic [P:0]   g_full;
    g_full = {1'b1, G};
    r = N'(m) << P;
    for (int i = N - 1; i >= int'(P); i--)
      if (r[i]) r ^= N'(g_full) << (i - P);
    return (N'(m) << P) | r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (%0d,%0d,L=%0d) %s", N, K, L, what); end
  endtask

  // Sends r, returns the decoder output and the number of corrections.
  task automatic run_word(input logic [N-1:0] r, output logic [N-1:0] got, output int ncorr);
    ncorr = 0;
    for (int j = 0; j < int'(N); j++) begin
      @(negedge clk);
      bit_en = 1'b1; phase = PH_RECEIVE; word_first = (j == 0); rx_bit = r[N - 1 - j];
      @(posedge clk);
    end
    for (int j = 0; j < int'(N); j++) begin
      @(negedge clk);
      bit_en = 1'b1; phase = PH_CORRECT; word_first = (j == 0); rx_bit = 1'($urandom_range(1));
      #1;
      got[N - 1 - j] = out_bit;
      if (corr) ncorr++;
      @(posedge clk);
    end
  endtask

  task automatic test_word(input logic [N-1:0] e, input string what);
    logic [N-1:0] v, got;
    int ncorr;
    v = div_encode(K'({$urandom, $urandom}));
    run_word(v ^ e, got, ncorr);
    check(got == v, $sformatf("%s: got %h exp %h", what, got, v));
    check(ncorr == $countones(e), $sformatf("%s: %0d corrections for weight %0d", what, ncorr, $countones(e)));
    #1 check(syndrome == '0, $sformatf("%s: syndrome not cleared", what));
    if (ncorr != 0) corrected_words++;
  endtask

  initial begin
    logic [N-1:0] e, junk;
    int ncorr;
    done = 1'b0; checks = 0; failures = 0; corrected_words = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 8; i++) test_word('0, "clean");
    for (int len = 1; len <= int'(L); len++)
      for (int mid = 0; mid < ((len > 2) ? (1 << (len - 2)) : 1); mid++)
        for (int pos = 0; pos + len <= int'(N); pos++) begin
          e = '0;
          for (int b = 0; b < len; b++)
            if (b == 0 || b == len - 1 || mid[b - 1]) e[pos + b] = 1'b1;
          test_word(e, $sformatf("burst len %0d mid %0d pos %0d", len, mid, pos));
        end
    // A noisy word, then a clean one: the clean one must come out intact.
    for (int i = 0; i < 4; i++) begin
      junk = N'({$urandom, $urandom});
      run_word(junk, e, ncorr);
      test_word('0, "clean after noise");
    end
    done = 1'b1;
  end

endmodule
