// hoc_pattern_gen: produces hierarchical orthogonal code (HOC) stripe
// patterns pixel by pixel, with no frame memory.
//
// Every HOC pattern is the same row repeated on all lines, and within a layer
// the four patterns are the layer's first pattern moved right by one stripe
// width at a time. So the block keeps only one row buffer per layer
// (R1..R4, loaded at reset with the first row of pattern 1 of that layer)
// and builds the row of pattern p by shifting the buffer right by
// p x stripe width: 256 pixels in layer 1, 64 in layer 2, 16 in layer 3 and
// 4 in layer 4 for a 1024-pixel row. A 16-way multiplexer picks the shifted
// row for the selected layer and pattern.
//
// Row buffer layout: bit ROW-1 is the leftmost pixel (column 0), so a
// right shift of the vector moves the stripes to the right on screen, and
// bits shifted in from the left are dark. In layer L (1..4) the stripe
// width is ROW / 4^L, and pixel x of pattern 1 is lit when
// (x / stripe) mod 4 == 0.
//
// Timing: while hcount is outside the active width the line register Rb is
// reloaded from the multiplexer; during active video Rb shifts left by one
// bit per pixel clock and `pixel` is its top bit, so `pixel` belongs to the
// column given by hcount in the same cycle (zero latency). layer/pattern
// must be steady from the start of horizontal blanking before a line until
// that line ends.
//
// The row-buffer-plus-shift scheme and the shift amounts follow the original
// method. Where its block diagram gives 8/12/16 pixels for layer 4, this
// design uses 4/8/12, matching the 4-pixel stripe of that layer. The bit
// order, the reload-in-blanking timing and the lit first stripe are this
// design's choices.
module hoc_pattern_gen
  import sl3d_pkg::*;
#(
  parameter int unsigned ROW   = ROW_PIXELS,
  parameter int unsigned H_ACT = ROW,
  parameter int unsigned HW    = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [HW-1:0] hcount,
  input  logic [1:0]    layer,     // 0..3 for layers 1..4
  input  logic [1:0]    pattern,   // 0..3 for patterns 1..4
  output logic          pixel
);

  typedef logic [ROW-1:0] row_t;

  // Stripe width of layer l (0-based): ROW / 4^(l+1).
  function automatic int unsigned stripe(input int unsigned l);
    return ROW >> (2 * (l + 1));
  endfunction

  row_t first_row [HOC_LAYERS];             // reset contents of R1..R4
  row_t r_buf [HOC_LAYERS];                 // R1..R4
  row_t shifted [HOC_LAYERS][HOC_PATTERNS]; // Rb candidates
  row_t rb;

  // First row of pattern 1 of each layer, column 0 in the top bit.
  for (genvar l = 0; l < HOC_LAYERS; l++) begin : g_first
    for (genvar x = 0; x < ROW; x++) begin : g_col
      assign first_row[l][ROW-1-x] = ((x / stripe(l)) % 4) == 0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) r_buf <= first_row;
  end

  for (genvar l = 0; l < HOC_LAYERS; l++) begin : g_layer
    for (genvar p = 0; p < HOC_PATTERNS; p++) begin : g_pattern
      assign shifted[l][p] = r_buf[l] >> (p * stripe(l));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    rb <= '0;
    else if (hcount >= HW'(H_ACT)) rb <= shifted[layer][pattern];
    else                           rb <= rb << 1;
  end

  assign pixel = rb[ROW-1];

endmodule
