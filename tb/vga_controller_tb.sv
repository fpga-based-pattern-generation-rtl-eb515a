// vga_controller_tb: runs the default 1024x768 60 Hz timing for two frames
// with a 15.38 ns pixel clock (65 MHz) and measures the outputs: the HSync
// period must be 1344 clocks = 20670.72 ns, the VSync period 806 lines =
// 16660600.32 ns, the sync pulses 136 clocks and 6 lines wide (active low),
// every line must hold 1024 active pixels and every frame 768 active lines.
// The counts are compared with a reference pixel/line position every clock.
module vga_controller_tb;
  import sl3d_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, de;
  int checks = 0, failures = 0;

  vga_controller dut (.*);

  always #7.69 clk = ~clk;

  initial begin
    repeat (3 * H_TOTAL * V_TOTAL) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t h=%0d v=%0d", what, $time, hcount, vcount);
    end
  endtask

  realtime t_hfall_prev = 0, t_vfall_prev = 0;
  int hfalls = 0, vfalls = 0;
  int unsigned h_ref = 0, v_ref = 0;
  int unsigned hlow = 0, vlow_clks = 0, de_line = 0, de_frame = 0;
  logic hsync_q = 1'b1, vsync_q = 1'b1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int unsigned n = 0; n < 2 * H_TOTAL * V_TOTAL + 100; n++) begin
      @(negedge clk);
      check(hcount == 11'(h_ref) && vcount == 10'(v_ref), "count position");
      check(de == (h_ref < H_ACTIVE && v_ref < V_ACTIVE), "display enable");
      if (de) begin de_line++; de_frame++; end
      if (!hsync) hlow++;
      if (!vsync) vlow_clks++;
      // HSync falling edge: check the line period in time and in clocks.
      if (hsync_q && !hsync) begin
        if (hfalls > 0) check($realtime - t_hfall_prev > 20670.7 && $realtime - t_hfall_prev < 20670.8, "line period 20670.72 ns");
        t_hfall_prev = $realtime;
        hfalls++;
        check(h_ref == H_ACTIVE + H_FRONT, "hsync starts after front porch");
      end
      if (!hsync_q && hsync) begin
        check(hlow == H_SYNC, "hsync width 136");
        hlow = 0;
      end
      if (vsync_q && !vsync) begin
        if (vfalls > 0) check($realtime - t_vfall_prev > 16660600.3 && $realtime - t_vfall_prev < 16660600.4, "frame period 16660600.32 ns");
        t_vfall_prev = $realtime;
        vfalls++;
        check(v_ref == V_ACTIVE + V_FRONT && h_ref == 0, "vsync starts after front porch");
      end
      if (!vsync_q && vsync) begin
        check(vlow_clks == V_SYNC * H_TOTAL, "vsync width 6 lines");
        vlow_clks = 0;
      end
      if (h_ref == H_TOTAL - 1) begin
        check(de_line == ((v_ref < V_ACTIVE) ? H_ACTIVE : 0), "active pixels per line");
        de_line = 0;
      end
      if (h_ref == H_TOTAL - 1 && v_ref == V_TOTAL - 1) begin
        check(de_frame == H_ACTIVE * V_ACTIVE, "active pixels per frame");
        de_frame = 0;
      end
      hsync_q = hsync;
      vsync_q = vsync;
      if (h_ref == H_TOTAL - 1) begin
        h_ref = 0;
        v_ref = (v_ref == V_TOTAL - 1) ? 0 : v_ref + 1;
      end else begin
        h_ref++;
      end
    end
    check(hfalls == 2 * V_TOTAL, "hsync pulse count");
    check(vfalls == 2, "vsync pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
