// word_display -- collects a serial word and holds it for the LED display.
//
// The encoded word and the corrected word were shown bit by bit on LEDs.
// This register shifts in a serial stream, highest order bit first, and when
// the last bit of a word arrives it copies the complete word to the output,
// where it stays until the next word is complete. word[i] is the coefficient
// of X^i. The LEDs and their drivers are outside the logic.
//
// What is displayed follows the demonstration set-up; the serial-in,
// parallel-out register with a holding latch is this design's own circuit.
//
// Timing: bits are taken on the rising clock edge where bit_en is high; word
// changes on the edge that takes a bit flagged by last. rst_n is synchronous,
// active low, and clears both registers.
module word_display #(
  parameter int unsigned N = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_en,
  input  logic         bit_in,
  input  logic         last,
  output logic [N-1:0] word
);

  logic [N-2:0] shift;   // the first N-1 bits of the word being collected

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shift <= '0;
      word  <= '0;
    end else if (bit_en) begin
      shift <= {shift[N-3:0], bit_in};
      if (last) word <= {shift, bit_in};
    end
  end

endmodule
