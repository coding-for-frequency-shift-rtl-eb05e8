// tb_error_simulator -- checks the burst injector bit by bit.
//
// For 200 words of random bits it picks err_en, a 5-bit pattern and a
// position (some near the top of the word, where part of the pattern falls
// outside it), applies them at the first bit, then changes them at random
// during the word to show they are held. Every output bit is compared with
// in_bit XOR the expected error bit of that position.
module tb_error_simulator;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bit_en = 1'b0;
  logic in_bit = 1'b0;
  logic err_en = 1'b0;
  logic [4:0] err_pattern = '0;
  logic [4:0] err_pos = '0;
  logic out_bit;
  int checks = 0, failures = 0;
  int flipped = 0, clipped = 0;

  always #5 clk = ~clk;

  error_simulator #(.N(24), .L(5)) dut (.clk, .rst_n, .bit_en, .in_bit, .err_en, .err_pattern, .err_pos, .out_bit);

  initial begin
    logic [23:0] e;
    logic en;
    logic [4:0] pat;
    int pos;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      en  = ($urandom_range(4) != 0);
      pat = 5'($urandom);
      pos = $urandom_range(23);
      e = '0;
      if (en) for (int j = 0; j < 5; j++) if (pos + j < 24 && pat[j]) e[pos + j] = 1'b1;
      if (en && pos > 19 && (pat >> (24 - pos)) != 0) clipped++;
      for (int b = 0; b < 24; b++) begin
        @(negedge clk);
        bit_en = 1'b1;
        in_bit = 1'($urandom_range(1));
        if (b == 0) begin err_en = en; err_pattern = pat; err_pos = 5'(pos); end
        else begin err_en = 1'($urandom); err_pattern = 5'($urandom); err_pos = 5'($urandom_range(23)); end
        #1;
        checks++;
        if (out_bit !== (in_bit ^ e[23 - b])) begin
          failures++;
          $display("FAIL word %0d bit %0d", w, b);
        end
        if (e[23 - b]) flipped++;
        @(posedge clk);
        if ($urandom_range(3) == 0) begin
          @(negedge clk) bit_en = 1'b0;
          @(posedge clk);
        end
      end
    end
    checks += 2;
    if (flipped == 0) begin failures++; $display("FAIL no bit flipped"); end
    if (clipped == 0) begin failures++; $display("FAIL no clipped burst"); end
    $display("flipped %0d clipped %0d", flipped, clipped);
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
