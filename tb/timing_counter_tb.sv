// timing_counter_tb: drives the counter with a random enable and compares
// count and wrap on every clock with a reference count kept in the bench.
module timing_counter_tb;
  localparam int unsigned LIMIT = 7;
  localparam int unsigned W = $clog2(LIMIT);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] count;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned ref_count = 0;

  timing_counter #(.LIMIT(LIMIT), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (count != W'(ref_count) || wrap != (en && ref_count == LIMIT - 1)) begin
        failures++;
        $display("cycle %0d: count=%0d wrap=%0b, expected %0d", i, count, wrap, ref_count);
      end
      if (wrap) wraps++;
      @(posedge clk);
      if (en) ref_count = (ref_count == LIMIT - 1) ? 0 : ref_count + 1;
    end
    checks++;
    if (wraps < 100) begin
      failures++;
      $display("too few wraps: %0d", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
