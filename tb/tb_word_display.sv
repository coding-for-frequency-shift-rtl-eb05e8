// tb_word_display -- checks that the display register shows each complete
// serial word and holds it while the next one is collected.
module tb_word_display;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bit_en = 1'b0;
  logic bit_in = 1'b0;
  logic last = 1'b0;
  logic [23:0] word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  word_display #(.N(24)) dut (.clk, .rst_n, .bit_en, .bit_in, .last, .word);

  initial begin
    logic [23:0] w, shown;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (word != '0) begin failures++; $display("FAIL reset value"); end
    @(negedge clk) rst_n = 1'b1;
    shown = '0;
    for (int n = 0; n < 100; n++) begin
      w = 24'($urandom);
      for (int b = 0; b < 24; b++) begin
        @(negedge clk);
        bit_en = 1'b1; bit_in = w[23 - b]; last = (b == 23);
        @(posedge clk);
        #1;
        checks++;
        if (word != ((b == 23) ? w : shown)) begin
          failures++;
          $display("FAIL word %0d bit %0d: %h", n, b, word);
        end
        if ($urandom_range(2) == 0) begin
          @(negedge clk) bit_en = 1'b0; bit_in = 1'($urandom); last = 1'($urandom);
          @(posedge clk);
        end
      end
      shown = w;
    end
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
