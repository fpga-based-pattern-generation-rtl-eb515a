// vga_interface: output stage towards the video DAC.
//
// It chooses the colour of the current pixel and registers it together with
// HSync and VSync, so all five video signals leave the FPGA on the same
// clock edge, one pixel clock after the counts that produced them.
// Colour choice: outside the active area the output is black (blanking);
// when projection is disabled it is black as well ("no signal"); otherwise
// an HOC frame shows the pattern pixel on all three colour bits (lit = 111,
// dark = 000), and the two reference frames of a scan are all white and all
// black.
module vga_interface
  import sl3d_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hsync_in,
  input  logic             vsync_in,
  input  logic             de,
  input  logic             enable,
  input  frame_kind_e      kind,
  input  logic             pixel,
  output logic             hsync,
  output logic             vsync,
  output logic [RGB_W-1:0] rgb
);

  logic lit;

  always_comb begin
    lit = 1'b0;
    if (de && enable) begin
      unique case (kind)
        FRAME_HOC:   lit = pixel;
        FRAME_WHITE: lit = 1'b1;
        default:     lit = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hsync <= !H_SYNC_POL;
      vsync <= !V_SYNC_POL;
      rgb   <= '0;
    end else begin
      hsync <= hsync_in;
      vsync <= vsync_in;
      rgb   <= {RGB_W{lit}};
    end
  end

endmodule
