// camera_trigger_tb: feeds the trigger block with a small raster (8 active
// pixels of 12, 4 active lines of 6) counted in the bench, switches
// `enable` between frames, and checks every clock that the trigger is high
// exactly for PULSE_CLKS clocks starting one clock after the last active
// pixel of each enabled frame, and never after a disabled frame.
module camera_trigger_tb;
  localparam int unsigned HA = 8, HT = 12, VA = 4, VT = 6, PULSE = 5;
  localparam int unsigned HW = 4, VW = 3;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [HW-1:0] hcount = '0;
  logic [VW-1:0] vcount = '0;
  logic trigger;
  int checks = 0, failures = 0, pulses = 0, skipped = 0;
  int unsigned left = 0;   // clocks of trigger still expected

  camera_trigger #(.H_ACT(HA), .V_ACT(VA), .HW(HW), .VW(VW), .PULSE_CLKS(PULSE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic trig_q = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 40; f++) begin
      enable <= (f % 3 != 1);
      for (int v = 0; v < VT; v++)
        for (int h = 0; h < HT; h++) begin
          hcount <= HW'(h);
          vcount <= VW'(v);
          @(posedge clk);
          #1;
          // Expected after this edge: a new pulse if the edge saw the last
          // active pixel of an enabled frame, else the rest of the old one.
          if (left > 0) left--;
          if (h == HA - 1 && v == VA - 1) begin
            if (enable) left = PULSE; else skipped++;
          end
          checks++;
          if (trigger != (left > 0)) begin
            failures++;
            $display("frame %0d h=%0d v=%0d: trigger=%0b expected %0b", f, h, v, trigger, left > 0);
          end
          if (trigger && !trig_q) pulses++;
          trig_q = trigger;
        end
    end
    checks++;
    if (pulses != 27 || skipped != 13) begin
      failures++;
      $display("pulses=%0d skipped=%0d", pulses, skipped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
