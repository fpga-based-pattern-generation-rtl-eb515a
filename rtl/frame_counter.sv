// frame_counter: counts projected frames and selects what each frame shows.
//
// A scan is SCAN_FRAMES frames: frame index 0..15 are the HOC patterns, in
// order layer 1 pattern 1..4, layer 2 pattern 1..4, and so on; index 16 is a
// full-white frame and index 17 a full-black frame. Scans repeat while
// projection is enabled.
//
// All changes happen at the frame boundary, the clock of the last active
// pixel of the last active line (the same instant the camera trigger
// fires), so the selection is steady for the whole of every displayed frame
// and the following blanking lines already see the next frame's selection.
// At a boundary:
//   * `active` takes the value of the `enable_req` command level;
//   * if the frame just ended was projected, the index advances (wrapping
//     after SCAN_FRAMES-1, which pulses `scan_done`);
//   * if projection is just starting, the index restarts at 0.
// `active` is therefore high exactly for the frames that show a pattern.
//
// The scan length of 18 frames follows the original system; the content of
// the two frames after the HOC patterns, the order of the patterns and the
// boundary rules are this design's choices.
module frame_counter
  import sl3d_pkg::*;
#(
  parameter int unsigned H_ACT  = H_ACTIVE,
  parameter int unsigned V_ACT  = V_ACTIVE,
  parameter int unsigned HW     = 11,
  parameter int unsigned VW     = 10,
  parameter int unsigned FRAMES = SCAN_FRAMES,
  parameter int unsigned FW     = $clog2(FRAMES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  input  logic          enable_req,
  output logic          active,
  output logic [FW-1:0] frame_idx,
  output frame_kind_e   kind,
  output logic [1:0]    layer,      // 0..3 for layers 1..4
  output logic [1:0]    pattern,    // 0..3 for patterns 1..4
  output logic          scan_done
);

  localparam int unsigned HOC_FRAMES = HOC_LAYERS * HOC_PATTERNS;

  logic boundary;
  assign boundary = (hcount == HW'(H_ACT - 1)) && (vcount == VW'(V_ACT - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      frame_idx <= '0;
      scan_done <= 1'b0;
    end else begin
      scan_done <= 1'b0;
      if (boundary) begin
        active <= enable_req;
        if (!active) begin
          frame_idx <= '0;
        end else if (frame_idx == FW'(FRAMES - 1)) begin
          frame_idx <= '0;
          scan_done <= 1'b1;
        end else begin
          frame_idx <= frame_idx + 1'b1;
        end
      end
    end
  end

  // The selection only moves at a frame boundary and stays inside the scan.
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             !boundary |=> $stable(frame_idx) && $stable(active));
  a_range:  assert property (@(posedge clk) disable iff (!rst_n) 32'(frame_idx) < FRAMES);

  always_comb begin
    layer   = frame_idx[3:2];
    pattern = frame_idx[1:0];
    if (32'(frame_idx) < HOC_FRAMES)          kind = FRAME_HOC;
    else if (32'(frame_idx) == HOC_FRAMES)    kind = FRAME_WHITE;
    else                                      kind = FRAME_BLACK;
  end

endmodule
