// vga_controller: video timing for the projector link.
//
// A horizontal counter steps on every pixel clock; when it wraps at the end
// of a line the vertical counter steps. Each count feeds a sync generator
// that knows the active width and the front porch, sync and back porch
// lengths, which gives HSync, VSync and the active-video flags. Defaults are
// the 1024x768 60 Hz mode: 1344 clocks per line and 806 lines per frame, so
// at a 65 MHz pixel clock a line takes 20.68 us and a frame 16.67 ms.
//
// The counter-plus-sync-generator structure, the line and frame periods and
// the 1024-pixel width follow the original system; the porch, sync and
// active-line values are the standard ones for this mode.
//
// hcount/vcount, hsync/vsync and de all describe the same clock cycle (the
// pixel being produced now); downstream logic registers them together.
module vga_controller
  import sl3d_pkg::*;
#(
  parameter int unsigned H_ACT  = H_ACTIVE,
  parameter int unsigned H_FP   = H_FRONT,
  parameter int unsigned H_SW   = H_SYNC,
  parameter int unsigned H_BP   = H_BACK,
  parameter bit          H_POL  = H_SYNC_POL,
  parameter int unsigned V_ACT  = V_ACTIVE,
  parameter int unsigned V_FP   = V_FRONT,
  parameter int unsigned V_SW   = V_SYNC,
  parameter int unsigned V_BP   = V_BACK,
  parameter bit          V_POL  = V_SYNC_POL,
  parameter int unsigned H_LIM  = H_ACT + H_FP + H_SW + H_BP,
  parameter int unsigned V_LIM  = V_ACT + V_FP + V_SW + V_BP,
  parameter int unsigned HW     = $clog2(H_LIM),
  parameter int unsigned VW     = $clog2(V_LIM)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          hsync,
  output logic          vsync,
  output logic          de
);

  logic h_active, v_active;
  logic line_end;

  timing_counter #(.LIMIT(H_LIM), .W(HW)) u_hcounter (
    .clk, .rst_n, .en(1'b1), .count(hcount), .wrap(line_end)
  );

  timing_counter #(.LIMIT(V_LIM), .W(VW)) u_vcounter (
    .clk, .rst_n, .en(line_end), .count(vcount), .wrap()
  );

  sync_gen #(
    .ACTIVE(H_ACT), .FRONT_PORCH(H_FP), .SYNC_WIDTH(H_SW), .BACK_PORCH(H_BP),
    .POLARITY(H_POL), .LIMIT(H_LIM), .W(HW)
  ) u_hsync (
    .count(hcount), .sync(hsync), .active(h_active)
  );

  sync_gen #(
    .ACTIVE(V_ACT), .FRONT_PORCH(V_FP), .SYNC_WIDTH(V_SW), .BACK_PORCH(V_BP),
    .POLARITY(V_POL), .LIMIT(V_LIM), .W(VW)
  ) u_vsync (
    .count(vcount), .sync(vsync), .active(v_active)
  );

  assign de = h_active && v_active;

endmodule
