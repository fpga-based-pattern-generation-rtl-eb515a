// sync_gen_tb: sweeps the count through a whole period for a small
// active-low and a small active-high timing and checks the sync and active
// outputs against the region boundaries worked out by hand.
module sync_gen_tb;
  // Regions: active 0..9, front porch 10..11, sync 12..14, back porch 15..18.
  localparam int unsigned W = 5;
  logic [W-1:0] count;
  logic sync_n, act_n, sync_p, act_p;
  int checks = 0, failures = 0;

  sync_gen #(.ACTIVE(10), .FRONT_PORCH(2), .SYNC_WIDTH(3), .BACK_PORCH(4),
             .POLARITY(1'b0), .W(W)) dut_n (.count, .sync(sync_n), .active(act_n));
  sync_gen #(.ACTIVE(10), .FRONT_PORCH(2), .SYNC_WIDTH(3), .BACK_PORCH(4),
             .POLARITY(1'b1), .W(W)) dut_p (.count, .sync(sync_p), .active(act_p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 19; c++) begin
      logic exp_sync, exp_act;
      count = W'(c);
      #1;
      exp_act  = (c <= 9);
      exp_sync = (c >= 12 && c <= 14);
      checks++;
      if (act_n != exp_act || act_p != exp_act || sync_n != !exp_sync || sync_p != exp_sync) begin
        failures++;
        $display("count %0d: act=%0b/%0b sync_n=%0b sync_p=%0b", c, act_n, act_p, sync_n, sync_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
