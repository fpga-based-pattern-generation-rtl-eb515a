// hoc_pattern_gen_tb: runs lines of the full 1024-pixel row (1344 clocks per
// line) for all 16 layer/pattern selections, in order and then at random,
// and checks every active pixel against the HOC stripe rule: in layer L the
// stripe width is 1024 / 4^L (256, 64, 16, 4) and pixel x of pattern p
// (0..3) is lit exactly when (x / stripe) mod 4 == p. It also checks that
// each pattern lights one quarter of the row.
module hoc_pattern_gen_tb;
  localparam int unsigned ROW = 1024, HT = 1344, HW = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [HW-1:0] hcount = HW'(ROW);   // start in blanking
  logic [1:0] layer = '0, pattern = '0;
  logic pixel;
  int checks = 0, failures = 0;

  hoc_pattern_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One line with the given selection; selection set at start of blanking.
  task automatic run_line(input int l, input int p);
    int lit = 0, stripe;
    stripe = ROW / (4 ** (l + 1));
    layer   <= 2'(l);
    pattern <= 2'(p);
    for (int h = ROW; h < HT; h++) begin
      hcount <= HW'(h);
      @(posedge clk);
    end
    for (int x = 0; x < ROW; x++) begin
      hcount <= HW'(x);
      @(negedge clk);
      checks++;
      if (pixel != (((x / stripe) % 4) == p)) begin
        failures++;
        if (failures < 10) $display("L%0d P%0d x=%0d pixel=%0b", l + 1, p + 1, x, pixel);
      end
      if (pixel) lit++;
      @(posedge clk);
    end
    checks++;
    if (lit != ROW / 4) begin
      failures++;
      $display("L%0d P%0d lit %0d pixels", l + 1, p + 1, lit);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int l = 0; l < 4; l++)
      for (int p = 0; p < 4; p++) run_line(l, p);
    for (int i = 0; i < 40; i++) run_line($urandom_range(0, 3), $urandom_range(0, 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
