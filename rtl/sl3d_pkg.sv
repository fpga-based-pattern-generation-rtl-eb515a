// sl3d_pkg: constants and types shared by the structured light pattern
// projector. The video timing defaults are the 1024x768 60 Hz mode: 1344
// pixel clocks per line and 806 lines per frame give the 20.67 us line period
// and 16.66 ms frame period of this projector link (with a 65 MHz pixel
// clock). The row width of 1024 pixels and the four HOC layers of four
// patterns each follow the pattern definition; the porch and sync widths are
// the standard values for this mode. The scan length of 18 frames (16 HOC
// patterns plus two reference frames) and the command byte values are this
// design's own choices.
package sl3d_pkg;

  // Horizontal timing, in pixel clocks.
  localparam int unsigned H_ACTIVE = 1024;
  localparam int unsigned H_FRONT  = 24;
  localparam int unsigned H_SYNC   = 136;
  localparam int unsigned H_BACK   = 160;
  localparam int unsigned H_TOTAL  = H_ACTIVE + H_FRONT + H_SYNC + H_BACK; // 1344

  // Vertical timing, in lines.
  localparam int unsigned V_ACTIVE = 768;
  localparam int unsigned V_FRONT  = 3;
  localparam int unsigned V_SYNC   = 6;
  localparam int unsigned V_BACK   = 29;
  localparam int unsigned V_TOTAL  = V_ACTIVE + V_FRONT + V_SYNC + V_BACK;  // 806

  // Both syncs are active low in this mode.
  localparam bit H_SYNC_POL = 1'b0;
  localparam bit V_SYNC_POL = 1'b0;

  // HOC code: four layers, four mutually orthogonal patterns per layer.
  localparam int unsigned HOC_LAYERS   = 4;
  localparam int unsigned HOC_PATTERNS = 4;
  localparam int unsigned ROW_PIXELS   = 1024;

  // One scan: the 16 HOC patterns, then a full-white and a full-black frame.
  localparam int unsigned SCAN_FRAMES = 18;

  // What the projector shows during one frame.
  typedef enum logic [1:0] {
    FRAME_HOC   = 2'd0,  // HOC pattern picked by layer/pattern
    FRAME_WHITE = 2'd1,  // reference frame, all pixels lit
    FRAME_BLACK = 2'd2   // reference frame, all pixels dark
  } frame_kind_e;

  // Command bytes sent by the host over the serial line.
  localparam logic [7:0] CMD_ENABLE  = 8'h45;  // 'E': start projecting scans
  localparam logic [7:0] CMD_DISABLE = 8'h44;  // 'D': stop, output no signal

  // One colour bit per channel; a lit pattern pixel drives all three.
  localparam int unsigned RGB_W = 3;

endpackage
