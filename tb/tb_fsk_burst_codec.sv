// tb_fsk_burst_codec -- end-to-end run of the whole codec at its built size
// (24-bit words, 14 message bits, bursts up to 5 bits).
//
// Random 14-bit messages are fed in when the encoder asks for them, words
// back to back with bit_en sometimes low. For the first 240 words the bench
// error simulator corrupts most words with a burst of 1 to 5 bits at a random
// position; for the next 60 the decoder input is switched to the external
// receive port and the testbench adds its own bursts there, as a noisy FSK
// receiver would. It checks:
//   - tx_bit carries the reference code word (H v = 0) of each message,
//   - the decoded stream is the sent code word exactly one word later, so the
//     14 message bits come back intact,
//   - nothing is valid during the first word,
//   - both display registers show the last encoded / corrected word,
// and counts each mechanism: corrections of each burst length through the
// simulator, clean words, corrections through the external port, and
// corrections made by each of the two decoders. A mechanism that never
// happened counts as a failure.
module tb_fsk_burst_codec;
  import code_ref_pkg::*;

  localparam int SIM_WORDS = 240;
  localparam int EXT_WORDS = 60;
  localparam int WORDS     = SIM_WORDS + EXT_WORDS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bit_en = 1'b0;
  logic msg_bit = 1'b0;
  logic rx_ext_bit = 1'b0;
  logic rx_sel = 1'b0;
  logic err_en = 1'b0;
  logic [4:0] err_pattern = '0;
  logic [4:0] err_pos = '0;
  logic msg_take, tx_bit, dec_bit, dec_valid, dec_first, dec_corr, dec_sel;
  logic [23:0] tx_word, dec_word;

  int checks = 0, failures = 0;
  int by_len [6] = '{0, 0, 0, 0, 0, 0};
  int clean_words = 0, ext_corrected = 0;
  int dec_used [2] = '{0, 0};

  always #5 clk = ~clk;

  fsk_burst_codec dut (
    .clk, .rst_n, .bit_en, .msg_bit, .msg_take, .tx_bit, .rx_ext_bit, .rx_sel,
    .err_en, .err_pattern, .err_pos, .dec_bit, .dec_valid, .dec_first, .dec_corr,
    .dec_sel, .tx_word, .dec_word
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [13:0] msg  [WORDS + 1];
    logic [23:0] sent [WORDS + 1];
    logic [23:0] err  [WORDS + 1];
    int          blen [WORDS + 1];
    logic [23:0] tx_got, dec_got;
    int len, pos, ncorr;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w <= WORDS; w++) begin
      msg[w]  = 14'($urandom);
      sent[w] = h_encode(msg[w]);
      err[w]  = '0;
      blen[w] = 0;
      pos     = 0;
      if (w < WORDS && $urandom_range(4) != 0) begin
        len = $urandom_range(1, 5);
        pos = $urandom_range(24 - len);
        err[w]  = burst(len, $urandom_range(7), pos);
        blen[w] = len;
      end
      ncorr = 0;
      for (int j = 0; j < 24; j++) begin
        while ($urandom_range(5) == 0) begin
          @(negedge clk) bit_en = 1'b0; msg_bit = 1'($urandom);
          @(posedge clk);
        end
        @(negedge clk);
        bit_en  = 1'b1;
        msg_bit = (j < 14) ? msg[w][13 - j] : 1'($urandom);
        rx_sel  = (w >= SIM_WORDS);
        if (j == 0) begin
          err_en      = (w < SIM_WORDS) && (err[w] != '0);
          err_pattern = 5'(err[w] >> pos);
          err_pos     = 5'(pos);
        end else begin
          err_en = 1'($urandom); err_pattern = 5'($urandom); err_pos = 5'($urandom);
        end
        #1;
        rx_ext_bit = tx_bit ^ ((w >= SIM_WORDS) ? err[w][23 - j] : 1'b0);
        #1;
        check(msg_take == (j < 14), "msg_take timing");
        tx_got[23 - j] = tx_bit;
        if (w == 0) check(!dec_valid, "no decoded output during the first word");
        else begin
          check(dec_valid && dec_first == (j == 0), "decoded output framing");
          dec_got[23 - j] = dec_bit;
          if (dec_corr) begin ncorr++; dec_used[dec_sel ? 0 : 1]++; end
        end
        @(posedge clk);
      end
      #1;
      check(tx_got == sent[w], $sformatf("word %0d encoded %h exp %h", w, tx_got, sent[w]));
      check(tx_word == sent[w], "encoded word display");
      if (w > 0) begin
        check(dec_got == sent[w - 1], $sformatf("word %0d decoded %h exp %h (err %h)", w - 1, dec_got, sent[w - 1], err[w - 1]));
        check(dec_got[23:10] == msg[w - 1], "message recovered");
        check(dec_word == sent[w - 1], "corrected word display");
        check(ncorr == $countones(err[w - 1]), "number of corrected bits");
        if (err[w - 1] == '0) clean_words++;
        else if (w - 1 < SIM_WORDS) by_len[blen[w - 1]]++;
        else ext_corrected++;
      end
    end
    for (int l = 1; l <= 5; l++) check(by_len[l] > 0, $sformatf("burst of length %0d corrected", l));
    check(clean_words > 0, "clean words passed");
    check(ext_corrected > 0, "bursts corrected through the external receive port");
    check(dec_used[0] > 0 && dec_used[1] > 0, "both decoders corrected");
    $display("bursts corrected by length: 1:%0d 2:%0d 3:%0d 4:%0d 5:%0d  external:%0d  clean:%0d  dec0:%0d dec1:%0d",
             by_len[1], by_len[2], by_len[3], by_len[4], by_len[5], ext_corrected, clean_words,
             dec_used[0], dec_used[1]);
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
