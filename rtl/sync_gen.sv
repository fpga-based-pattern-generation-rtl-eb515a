// sync_gen: decodes one video timing count (pixel of a line, or line of a
// frame) into the sync pulse and the active-video flag.
//
// The count runs through four regions in order: active video
// [0, ACTIVE), front porch, sync pulse, back porch, and LIMIT = the sum of
// the four is where the counter wraps. The sync output takes the level
// POLARITY from the end of the front porch until the back porch begins and
// the opposite level elsewhere. Purely combinational; the VGA interface
// registers the result together with the pixel data.
module sync_gen #(
  parameter int unsigned ACTIVE      = 1024,
  parameter int unsigned FRONT_PORCH = 24,
  parameter int unsigned SYNC_WIDTH  = 136,
  parameter int unsigned BACK_PORCH  = 160,
  parameter bit          POLARITY    = 1'b0,
  parameter int unsigned LIMIT       = ACTIVE + FRONT_PORCH + SYNC_WIDTH + BACK_PORCH,
  parameter int unsigned W           = $clog2(LIMIT)
) (
  input  logic [W-1:0] count,
  output logic         sync,
  output logic         active
);

  localparam int unsigned SYNC_START = ACTIVE + FRONT_PORCH;
  localparam int unsigned SYNC_END   = SYNC_START + SYNC_WIDTH;

  logic in_sync;

  always_comb begin
    active  = (count < W'(ACTIVE));
    in_sync = (count >= W'(SYNC_START)) && (count < W'(SYNC_END));
    sync    = in_sync ? POLARITY : !POLARITY;
  end

endmodule
