// frame_counter_tb: drives a small raster (6x4 active in 8x5) and an
// enable request that is raised, dropped and raised again, and checks at
// every frame that the selection follows the scan order: after enabling,
// the first frame shows layer 1 pattern 1, then the 16 HOC patterns in
// order, a white and a black frame, and the scan repeats with a scan_done
// pulse. The selection must not change inside a frame.
module frame_counter_tb;
  import sl3d_pkg::*;
  localparam int unsigned HA = 6, HT = 8, VA = 4, VT = 5;
  localparam int unsigned HW = 3, VW = 3;

  logic clk = 1'b0, rst_n = 1'b0, enable_req = 1'b0;
  logic [HW-1:0] hcount = '0;
  logic [VW-1:0] vcount = '0;
  logic active, scan_done;
  logic [4:0] frame_idx;
  frame_kind_e kind;
  logic [1:0] layer, pattern;
  int checks = 0, failures = 0, scans = 0;

  frame_counter #(.H_ACT(HA), .V_ACT(VA), .HW(HW), .VW(VW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what, input int f);
    checks++;
    if (!ok) begin
      failures++;
      $display("frame %0d: %s (active=%0b idx=%0d kind=%0d L=%0d P=%0d)", f, what,
               active, frame_idx, kind, layer, pattern);
    end
  endtask

  initial begin
    bit   exp_active = 0;
    int   exp_idx = 0;
    logic [4:0] idx0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 60; f++) begin
      // Request changes in the middle of frames 0 (on), 25 (off), 28 (on).
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          if (v == 1 && h == 0) begin
            if (f == 0 || f == 28) enable_req <= 1'b1;
            if (f == 25)           enable_req <= 1'b0;
          end
          hcount <= HW'(h);
          vcount <= VW'(v);
          @(posedge clk);
          #1;
          if (v == 0 && h == 0) idx0 = frame_idx;
          if (v < VA - 1 || (v == VA - 1 && h < HA - 1))
            check(frame_idx == idx0, "selection changed inside a frame", f);
          if (scan_done) scans++;
        end
      // Frame f has just passed its boundary: the reference model moves on.
      if (!exp_active)                  exp_idx = 0;
      else if (exp_idx == SCAN_FRAMES - 1) exp_idx = 0;
      else                              exp_idx++;
      exp_active = enable_req;
      check(active == exp_active, "active", f);
      if (exp_active) begin
        check(frame_idx == 5'(exp_idx), "frame index", f);
        if (exp_idx < 16) begin
          check(kind == FRAME_HOC, "kind HOC", f);
          check(layer == 2'(exp_idx / 4) && pattern == 2'(exp_idx % 4), "layer/pattern", f);
        end else begin
          check(kind == ((exp_idx == 16) ? FRAME_WHITE : FRAME_BLACK), "reference kind", f);
        end
      end
    end
    // Enabled frames 1..25 give one full scan; re-enabled from 29 to 59.
    check(scans == 2, "scan_done count", 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
