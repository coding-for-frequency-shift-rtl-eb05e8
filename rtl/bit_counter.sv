// bit_counter -- position of the current bit inside an N-bit word.
//
// Counts bit times (bit_en strobes) modulo N. count is the index of the bit
// being handled now, 0 being the first, highest order bit of the word; first
// and last flag the two ends of the word. The encoder uses it for its gate
// and output switch (14 message bits, then 10 parity bits), the real-time
// decoder for the switches that change position after every word, and the
// error simulator to find the bit to corrupt.
//
// The board counters counted up to 14 or 24 and then held until a clear
// button was pressed. This counter wraps instead, so that words can follow
// each other without gaps; that is a choice of this design.
//
// Timing: count advances on the rising clock edge where bit_en is high.
// rst_n is synchronous and active low and returns count to 0.
module bit_counter #(
  parameter int unsigned N = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_en,
  output logic [$clog2(N)-1:0] count,
  output logic                 first,
  output logic                 last
);

  localparam int unsigned W = $clog2(N);
  localparam logic [W-1:0] LAST_IDX = W'(N - 1);

  assign first = (count == '0);
  assign last  = (count == LAST_IDX);

  always_ff @(posedge clk) begin
    if (!rst_n)        count <= '0;
    else if (bit_en)   count <= last ? '0 : count + 1'b1;
  end

endmodule
