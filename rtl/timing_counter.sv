// timing_counter: synchronous wrap-around counter used for the horizontal
// (pixel) and vertical (line) counts of the video timing.
//
// The count advances by one on every clock where `en` is high and returns to
// zero after LIMIT-1. `wrap` is high combinationally in the cycle where an
// enabled step takes the count from LIMIT-1 back to zero, so the horizontal
// counter's `wrap` is the vertical counter's `en`, which is how the two
// counters are chained. Reset (active low, synchronous) clears the count.
module timing_counter #(
  parameter int unsigned LIMIT = 1344,
  parameter int unsigned W     = $clog2(LIMIT)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         wrap
);

  assign wrap = en && (count == W'(LIMIT - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)    count <= '0;
    else if (wrap) count <= '0;
    else if (en)   count <= count + 1'b1;
  end

  // The count never leaves 0..LIMIT-1.
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) < LIMIT);

endmodule
