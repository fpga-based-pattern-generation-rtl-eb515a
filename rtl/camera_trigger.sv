// camera_trigger: fires the camera shutter once a projected frame is
// complete.
//
// The block watches the horizontal and vertical counts of the video timing.
// On the clock of the last active pixel of the last active line it starts a
// trigger pulse of PULSE_CLKS pixel clocks, provided `enable` is high (a
// pattern was being projected in the frame that just ended). Firing only on
// projected frames, and the pulse length, are this design's choices; the
// trigger-after-frame-completion rule and the count inputs are the original
// scheme. The output is registered: it rises one clock after the last
// active pixel and stays high for exactly PULSE_CLKS clocks.
module camera_trigger
  import sl3d_pkg::*;
#(
  parameter int unsigned H_ACT      = H_ACTIVE,
  parameter int unsigned V_ACT      = V_ACTIVE,
  parameter int unsigned HW         = 11,
  parameter int unsigned VW         = 10,
  parameter int unsigned PULSE_CLKS = H_TOTAL,  // one line, about 20.7 us
  parameter int unsigned CW         = $clog2(PULSE_CLKS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  output logic          trigger
);

  logic          frame_done;
  logic [CW-1:0] remaining;

  assign frame_done = (hcount == HW'(H_ACT - 1)) && (vcount == VW'(V_ACT - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remaining <= '0;
      trigger   <= 1'b0;
    end else if (frame_done && enable) begin
      remaining <= CW'(PULSE_CLKS - 1);
      trigger   <= 1'b1;
    end else if (remaining != '0) begin
      remaining <= remaining - 1'b1;
    end else begin
      trigger   <= 1'b0;
    end
  end

endmodule
