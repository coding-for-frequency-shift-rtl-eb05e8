// tb_burst_trap_decoder -- exhaustive burst test of the error-trapping
// decoder in three configurations:
//   - the built (24,14) code, bursts up to 5 bits (g and C of the codec);
//   - the (48,40) burst-3 code, g = 1+X+X^2+X^5+X^8, C = X^2+X^5+X^6+X^7;
//   - the (48,40) burst-3 code with the reciprocal generator as drawn in the
//     circuit diagram, g = 1+X^3+X^6+X^7+X^8, C = 1+X^3+X^5;
//   - the (48,40) single-error code, g = 1+X^3+X^6+X^7+X^8, C = 1+X^3+X^5,
//     where a burst of length 1 is a single error.
// Each runs in a dec_harness; this module sums their counts, checks that
// every configuration corrected words, and prints TB_RESULT. A watchdog ends
// a hung run.
module tb_burst_trap_decoder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c, done_d;
  int   ch_a, ch_b, ch_c, ch_d, f_a, f_b, f_c, f_d, cw_a, cw_b, cw_c, cw_d;
  int   checks, failures;

  dec_harness #(.N(24), .K(14), .L(5)) h_main (
    .clk, .done(done_a), .checks(ch_a), .failures(f_a), .corrected_words(cw_a));
  dec_harness #(.N(48), .K(40), .L(3), .G(8'b0010_0111), .C(8'b1110_0100)) h_b3 (
    .clk, .done(done_b), .checks(ch_b), .failures(f_b), .corrected_words(cw_b));
  dec_harness #(.N(48), .K(40), .L(1), .G(8'b1100_1001), .C(8'b0010_1001)) h_sec (
    .clk, .done(done_c), .checks(ch_c), .failures(f_c), .corrected_words(cw_c));
  dec_harness #(.N(48), .K(40), .L(3), .G(8'b1100_1001), .C(8'b0010_1001)) h_b3r (
    .clk, .done(done_d), .checks(ch_d), .failures(f_d), .corrected_words(cw_d));

  initial begin
    wait (done_a && done_b && done_c && done_d);
    checks   = ch_a + ch_b + ch_c + ch_d + 4;
    failures = f_a + f_b + f_c + f_d;
    if (cw_a < 300) begin failures++; $display("FAIL (24,14) corrected only %0d words", cw_a); end
    if (cw_b < 100) begin failures++; $display("FAIL (48,40) burst-3 corrected only %0d words", cw_b); end
    if (cw_d < 100) begin failures++; $display("FAIL (48,40) reciprocal burst-3 corrected only %0d words", cw_d); end
    if (cw_c < 40)  begin failures++; $display("FAIL (48,40) single corrected only %0d words", cw_c); end
    $display("corrected words: %0d %0d %0d %0d", cw_a, cw_b, cw_c, cw_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch_a + ch_b + ch_c + ch_d, f_a + f_b + f_c + f_d + 1);
    $finish;
  end

endmodule
