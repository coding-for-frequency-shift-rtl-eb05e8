// tb_bit_counter -- checks the word bit counter against a software count.
//
// Drives bit_en at random (about two strobes in three), with a reset in the
// middle, for N = 24 and N = 14 (the encoder's message count). After every
// clock it compares count, first and last with an independent modulo-N
// counter. Prints TB_RESULT and stops; a watchdog ends a hung run.
module tb_bit_counter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bit_en = 1'b0;
  logic [4:0] c24;
  logic [3:0] c14;
  logic f24, l24, f14, l14;
  int checks = 0, failures = 0;
  int exp24, exp14;
  int wraps = 0;

  always #5 clk = ~clk;

  bit_counter #(.N(24)) dut24 (.clk, .rst_n, .bit_en, .count(c24), .first(f24), .last(l24));
  bit_counter #(.N(14)) dut14 (.clk, .rst_n, .bit_en, .count(c14), .first(f14), .last(l14));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: c24=%0d exp %0d c14=%0d exp %0d", what, c24, exp24, c14, exp14);
    end
  endtask

  initial begin
    exp24 = 0; exp14 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      bit_en = ($urandom_range(2) != 0);
      if (i == 200) rst_n = 1'b0;
      if (i == 201) rst_n = 1'b1;
      @(posedge clk);
      if (!rst_n) begin exp24 = 0; exp14 = 0; end
      else if (bit_en) begin
        if (exp24 == 23) wraps++;
        exp24 = (exp24 + 1) % 24;
        exp14 = (exp14 + 1) % 14;
      end
      #1;
      check(int'(c24) == exp24, "count N=24");
      check(int'(c14) == exp14, "count N=14");
      check(f24 == (exp24 == 0) && l24 == (exp24 == 23), "first/last N=24");
      check(f14 == (exp14 == 0) && l14 == (exp14 == 13), "first/last N=14");
    end
    check(wraps >= 5, "counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
