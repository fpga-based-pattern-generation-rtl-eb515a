// sl3d_top: FPGA side of a structured light 3D camera. It projects
// hierarchical orthogonal code (HOC) stripe patterns through a VGA projector
// at the full video frame rate and triggers the camera once per projected
// frame, so every captured image is known to hold exactly one pattern.
//
// Data flow (all on the pixel clock `clk`, which comes from the board PLL):
//   serial line -> uart_rx -> command_decoder -> projection enable
//   vga_controller -> hcount/vcount/syncs -> frame_counter selects the
//   frame content -> hoc_pattern_gen makes the pixel -> vga_interface drives
//   RGB/HSync/VSync to the DAC; camera_trigger fires after every projected
//   frame.
//
// With the defaults (1024x768, 60 Hz, 65 MHz pixel clock) one frame takes
// 16.67 ms and a scan of 18 frames (16 HOC patterns, one white, one black
// reference frame) takes 0.3 s. Enabling is applied at the next frame
// boundary, so the first projected frame is always HOC layer 1 pattern 1.
// The video outputs lag the counts by one clock; cam_trigger rises on the
// clock the last active pixel of a projected frame reaches the outputs and
// lasts one line time. Status outputs: proj_active (a pattern is on screen),
// frame_idx (which of the 18 frames of the scan), scan_done (one-clock pulse
// when a scan completes) and bad_cmd (an unknown command byte arrived).
module sl3d_top
  import sl3d_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 564  // 115200 baud at 65 MHz
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             uart_rx_i,
  output logic             vga_hsync,
  output logic             vga_vsync,
  output logic [RGB_W-1:0] vga_rgb,
  output logic             cam_trigger,
  output logic             proj_active,
  output logic [$clog2(SCAN_FRAMES)-1:0] frame_idx,
  output logic             scan_done,
  output logic             bad_cmd
);

  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  logic [7:0]    rx_data;
  logic          rx_valid;
  logic          cmd_enable;
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic          hsync, vsync, de;
  frame_kind_e   kind;
  logic [1:0]    layer, pattern;
  logic          pixel;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .rst_n, .rx(uart_rx_i), .data(rx_data), .valid(rx_valid)
  );

  command_decoder u_cmd (
    .clk, .rst_n, .data(rx_data), .valid(rx_valid),
    .enable(cmd_enable), .bad_cmd(bad_cmd)
  );

  vga_controller #(.HW(HW), .VW(VW)) u_vga (
    .clk, .rst_n, .hcount, .vcount,
    .hsync, .vsync, .de
  );

  frame_counter #(.HW(HW), .VW(VW)) u_frames (
    .clk, .rst_n, .hcount, .vcount, .enable_req(cmd_enable),
    .active(proj_active), .frame_idx, .kind, .layer, .pattern, .scan_done
  );

  hoc_pattern_gen #(.HW(HW)) u_hoc (
    .clk, .rst_n, .hcount, .layer, .pattern, .pixel
  );

  vga_interface u_vga_if (
    .clk, .rst_n, .hsync_in(hsync), .vsync_in(vsync), .de,
    .enable(proj_active), .kind, .pixel,
    .hsync(vga_hsync), .vsync(vga_vsync), .rgb(vga_rgb)
  );

  camera_trigger #(.HW(HW), .VW(VW)) u_trigger (
    .clk, .rst_n, .enable(proj_active), .hcount, .vcount, .trigger(cam_trigger)
  );

endmodule
