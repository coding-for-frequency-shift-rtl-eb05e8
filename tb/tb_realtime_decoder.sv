// tb_realtime_decoder -- continuous stream through the two-decoder
// arrangement.
//
// Sends 300 code words back to back (bit_en sometimes low between bits),
// each clean or hit by a random burst of 1 to 5 bits. It checks that
//   - nothing is valid during the first word (one-word start-up delay),
//   - the word leaving during word time i+1 is code word i, corrected, bit
//     for bit in the same bit times (latency of exactly one word),
//   - out_first marks the first output bit of each word,
//   - the number of corrected bits equals the burst weight,
//   - both decoders were used for correction (sel = 0 and sel = 1),
// and counts how often each of those happened.
module tb_realtime_decoder;
  import code_ref_pkg::*;

  localparam int WORDS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bit_en = 1'b0;
  logic rx_bit = 1'b0;
  logic out_bit, out_valid, out_first, corr, sel;
  int checks = 0, failures = 0;
  int corr_by_dec [2] = '{0, 0};
  int clean_words = 0, burst_words = 0, switch_count = 0;
  logic last_sel;

  always #5 clk = ~clk;

  realtime_decoder dut (.clk, .rst_n, .bit_en, .rx_bit, .out_bit, .out_valid, .out_first, .corr, .sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [23:0] sent [WORDS + 1];
    logic [23:0] err  [WORDS + 1];
    logic [23:0] got;
    int ncorr, len;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    last_sel = sel;
    for (int w = 0; w <= WORDS; w++) begin
      sent[w] = h_encode(14'($urandom));
      if (w == WORDS || $urandom_range(3) == 0) err[w] = '0;
      else begin
        len = $urandom_range(1, 5);
        err[w] = burst(len, $urandom_range(7), $urandom_range(24 - len));
      end
      ncorr = 0;
      for (int j = 0; j < 24; j++) begin
        while ($urandom_range(4) == 0) begin
          @(negedge clk) bit_en = 1'b0; rx_bit = 1'($urandom_range(1));
          @(posedge clk);
        end
        @(negedge clk);
        bit_en = 1'b1;
        rx_bit = sent[w][23 - j] ^ err[w][23 - j];
        #1;
        if (w == 0) check(!out_valid && !corr, "no output during the first word");
        else begin
          check(out_valid, "output valid after the first word");
          check(out_first == (j == 0), "out_first position");
          got[23 - j] = out_bit;
          if (corr) begin ncorr++; corr_by_dec[sel ? 0 : 1]++; end
        end
        @(posedge clk);
        #1;
        if (sel != last_sel) begin switch_count++; last_sel = sel; end
      end
      if (w > 0) begin
        check(got == sent[w - 1], $sformatf("word %0d: got %h exp %h err %h", w - 1, got, sent[w - 1], err[w - 1]));
        check(ncorr == $countones(err[w - 1]), $sformatf("word %0d: %0d corrections", w - 1, ncorr));
        if (err[w - 1] == '0) clean_words++; else burst_words++;
      end
    end
    check(switch_count == WORDS + 1, $sformatf("switch changed %0d times", switch_count));
    check(corr_by_dec[0] > 0, "decoder 0 corrected");
    check(corr_by_dec[1] > 0, "decoder 1 corrected");
    check(clean_words > 0 && burst_words > 0, "clean and burst words seen");
    $display("clean %0d burst %0d corrections dec0 %0d dec1 %0d switches %0d",
             clean_words, burst_words, corr_by_dec[0], corr_by_dec[1], switch_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
