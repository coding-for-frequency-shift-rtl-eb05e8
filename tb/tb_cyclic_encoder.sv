// tb_cyclic_encoder -- checks the serial (24,14) encoder against the parity
// check matrix of the code.
//
// Words follow each other without gaps, with bit_en sometimes held low
// between bits. For each word the testbench supplies 14 message bits when
// msg_take asks for them and collects 24 output bits; it then checks that
//   - msg_take is high for exactly the first 14 bit times of the word
//     (14 message bits per 24 code bits, the code rate),
//   - word_first/word_last mark the ends of the word,
//   - the word equals the reference encoding (H v = 0, message in the top
//     14 bits) and has zero syndrome.
// Messages: all zeros, all ones, every single-one message, then random ones.
module tb_cyclic_encoder;
  import code_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bit_en = 1'b0;
  logic msg_bit = 1'b0;
  logic msg_take, code_bit, word_first, word_last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cyclic_encoder dut (.clk, .rst_n, .bit_en, .msg_bit, .msg_take, .code_bit, .word_first, .word_last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_word(input logic [13:0] m);
    logic [23:0] got, exp;
    int takes;
    takes = 0;
    for (int j = 0; j < 24; j++) begin
      // idle bit times with bit_en low must change nothing
      while ($urandom_range(3) == 0) begin
        @(negedge clk); bit_en = 1'b0; msg_bit = $urandom_range(1);
        @(posedge clk);
      end
      @(negedge clk);
      bit_en  = 1'b1;
      msg_bit = (j < 14) ? m[13 - j] : 1'($urandom_range(1));
      #1;
      check(msg_take == (j < 14), $sformatf("msg_take at bit %0d", j));
      check(word_first == (j == 0) && word_last == (j == 23), $sformatf("word ends at bit %0d", j));
      if (msg_take) takes++;
      got[23 - j] = code_bit;
      @(posedge clk);
    end
    @(negedge clk) bit_en = 1'b0;
    exp = h_encode(m);
    check(takes == 14, "14 message bits per word");
    check(got == exp, $sformatf("code word for m=%04h: got %06h exp %06h", m, got, exp));
    check(h_syndrome(got) == '0, "zero syndrome");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    send_word(14'h0000);
    send_word(14'h3fff);
    for (int i = 0; i < 14; i++) send_word(14'(1 << i));
    for (int i = 0; i < 200; i++) send_word(14'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
