// sl3d_top_tb: end-to-end run of the pattern projector at its default size
// (1024x768 at 60 Hz, 15.38 ns pixel clock, 115200 baud commands).
//
// Sequence: during frame 0 the host sends an unknown byte and then the
// enable command; frames 1..19 must show one whole scan (16 HOC patterns,
// white, black) and the first pattern of the next scan; during frame 19 the
// host sends disable, so frame 20 carries no signal. Every output bit of
// every clock is compared with a reference built here from the raster
// position: HSync/VSync timing, RGB = 111 where the HOC stripe rule
// (x / stripe) mod 4 == pattern says the pixel is lit, and the camera
// trigger, one line long, right after the last active pixel of each
// projected frame. It also checks the 16.66 ms spacing of the triggers and
// the 0.3 s (18-frame) length of a scan, and counts each mechanism (every
// pattern, reference frames, enable, disable, unknown command, scan wrap,
// triggers, no-signal frame); one that never happened is a failure.
module sl3d_top_tb;
  import sl3d_pkg::*;

  localparam int unsigned CPB = 564;
  localparam int unsigned LAST_FRAME = 21;      // stop at line 10 of frame 21
  localparam int unsigned DISABLE_FRAME = 19;

  logic clk = 1'b0, rst_n = 1'b0, uart_rx_i = 1'b1;
  logic vga_hsync, vga_vsync, cam_trigger, proj_active, scan_done, bad_cmd;
  logic [2:0] vga_rgb;
  logic [4:0] frame_idx;
  int checks = 0, failures = 0;

  sl3d_top dut (.*);

  always #7.69 clk = ~clk;

  initial begin
    repeat ((LAST_FRAME + 2) * H_TOTAL * V_TOTAL) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  task automatic send_byte(input logic [7:0] b);
    uart_rx_i <= 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rx_i <= b[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rx_i <= 1'b1;
    repeat (2 * CPB) @(posedge clk);
  endtask

  // Raster position of the counts in the current clock, and frame number.
  int unsigned h = 0, v = 0, f = 0;

  // Host side: commands at line 10 of frames 0 and DISABLE_FRAME.
  initial begin
    wait (rst_n);
    wait (f == 0 && v == 10);
    send_byte(8'h58);           // unknown command
    send_byte(CMD_ENABLE);
    wait (f == DISABLE_FRAME && v == 10);
    send_byte(CMD_DISABLE);
  end

  function automatic bit projected(input int unsigned fr);
    return fr >= 1 && fr <= DISABLE_FRAME;
  endfunction

  // Expected colour bit for raster position (x, y) of frame fr.
  function automatic bit lit(input int unsigned x, input int unsigned y, input int unsigned fr);
    int unsigned idx, stripe;
    if (x >= H_ACTIVE || y >= V_ACTIVE || !projected(fr)) return 1'b0;
    idx = (fr - 1) % SCAN_FRAMES;
    if (idx == 16) return 1'b1;
    if (idx == 17) return 1'b0;
    stripe = ROW_PIXELS / (4 ** (idx / 4 + 1));
    return ((x / stripe) % 4) == idx % 4;
  endfunction

  int pattern_seen [18];
  int n_trig = 0, n_scan = 0, n_bad = 0, n_hs = 0, n_vs = 0, n_dark_frames = 0;
  int n_enable = 0, n_disable = 0;
  realtime t_first_trig = 0, t_prev_trig = 0;

  initial begin
    bit exp_hs = 1, exp_vs = 1, exp_lit = 0, exp_trig = 0;
    bit hs_q = 1, vs_q = 1, trig_q = 0, act_q = 0, frame_lit = 0;
    int unsigned trig_left = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    forever begin
      @(negedge clk);
      // Outputs now reflect the counts of the previous clock.
      check(vga_hsync == exp_hs && vga_vsync == exp_vs, "syncs");
      check(vga_rgb == {3{exp_lit}}, "rgb");
      check(cam_trigger == exp_trig, "camera trigger");
      if (vga_rgb != 0) frame_lit = 1;
      if (hs_q && !vga_hsync) n_hs++;
      if (vs_q && !vga_vsync) n_vs++;
      if (cam_trigger && !trig_q) begin
        n_trig++;
        if (n_trig == 1) t_first_trig = $realtime;
        else check($realtime - t_prev_trig > 16660600.3 && $realtime - t_prev_trig < 16660600.4,
                   "trigger spacing 16.66 ms");
        if (n_trig == 19) check($realtime - t_first_trig > 299890805.7 && $realtime - t_first_trig < 299890805.9,
                                "18 frames per scan take 299.89 ms");
        t_prev_trig = $realtime;
      end
      if (scan_done) n_scan++;
      if (bad_cmd) n_bad++;
      if (proj_active && !act_q) n_enable++;
      if (!proj_active && act_q) n_disable++;
      hs_q = vga_hsync; vs_q = vga_vsync; trig_q = cam_trigger; act_q = proj_active;

      // Expected outputs for the next clock, from the current counts.
      exp_hs  = !(h >= H_ACTIVE + H_FRONT && h < H_ACTIVE + H_FRONT + H_SYNC);
      exp_vs  = !(v >= V_ACTIVE + V_FRONT && v < V_ACTIVE + V_FRONT + V_SYNC);
      exp_lit = lit(h, v, f);
      if (h == 0 && v == 0) begin
        check(proj_active == projected(f), "projection active");
        if (projected(f)) begin
          check(frame_idx == 5'((f - 1) % SCAN_FRAMES), "frame index");
          pattern_seen[(f - 1) % SCAN_FRAMES]++;
        end
      end
      if (trig_left > 0) trig_left--;
      if (h == H_ACTIVE - 1 && v == V_ACTIVE - 1 && projected(f)) trig_left = H_TOTAL;
      exp_trig = trig_left > 0;
      // End of the frame: it must have lit pixels exactly when projected
      // (a black reference frame is dark too).
      if (h == H_TOTAL - 1 && v == V_TOTAL - 1) begin
        check(frame_lit == (projected(f) && (f - 1) % SCAN_FRAMES != 17), "frame has lit pixels");
        if (!projected(f)) n_dark_frames++;
        frame_lit = 0;
      end
      // Advance the raster position.
      if (h == H_TOTAL - 1) begin
        h = 0;
        if (v == V_TOTAL - 1) begin v = 0; f++; end
        else v++;
      end else h++;
      if (f == LAST_FRAME && v == 10) break;
    end

    for (int i = 0; i < 18; i++)
      if (pattern_seen[i] == 0) begin
        failures++;
        $display("frame %0d of the scan was never shown", i);
      end
    check(n_trig == DISABLE_FRAME, "one trigger per projected frame");
    check(n_scan == 1, "scan wrap");
    check(n_bad == 1, "unknown command flagged");
    check(n_enable == 1 && n_disable == 1, "enable and disable applied");
    check(n_dark_frames >= 2, "no-signal frames before enable and after disable");
    check(n_hs == LAST_FRAME * V_TOTAL + 10 && n_vs == LAST_FRAME, "sync pulse counts");
    $display("mechanisms: patterns=%0d..%0d triggers=%0d scans=%0d bad=%0d enable=%0d disable=%0d dark_frames=%0d",
             pattern_seen[0], pattern_seen[17], n_trig, n_scan, n_bad, n_enable, n_disable, n_dark_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
