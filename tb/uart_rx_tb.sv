// uart_rx_tb: sends 8N1 frames at 16 clocks per bit, with random bytes,
// random idle gaps, a frame with a bad (low) stop bit and a short glitch on
// the idle line, and checks that exactly the good bytes come out, in order,
// each with a single valid pulse, and that the pulse comes between 9 and 14
// clocks after the stop bit begins (half a bit plus the synchronizer).
module uart_rx_tb;
  localparam int unsigned CPB = 16;

  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0;
  logic [7:0] expected [$];
  longint stop_start = 0, cyc = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input bit good_stop);
    rx <= 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx <= b[i];
      repeat (CPB) @(posedge clk);
    end
    rx <= good_stop;
    stop_start = cyc;
    if (good_stop) expected.push_back(b);
    repeat (CPB) @(posedge clk);
    rx <= 1'b1;
    repeat ($urandom_range(1, 3 * CPB)) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && valid) begin
      checks++;
      if (expected.size() == 0) begin
        failures++;
        $display("unexpected byte %h", data);
      end else begin
        logic [7:0] e;
        e = expected.pop_front();
        if (data != e) begin
          failures++;
          $display("got %h expected %h", data, e);
        end
        checks++;
        if (cyc - stop_start < 9 || cyc - stop_start > 14) begin
          failures++;
          $display("valid %0d clocks after stop bit start", cyc - stop_start);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    send(8'h45, 1'b1);
    send(8'h44, 1'b1);
    send(8'hA5, 1'b0);           // framing error: dropped
    rx <= 1'b0;                  // glitch shorter than half a bit
    repeat (3) @(posedge clk);
    rx <= 1'b1;
    repeat (2 * CPB) @(posedge clk);
    for (int i = 0; i < 30; i++) send(8'($urandom), 1'b1);
    repeat (4 * CPB) @(posedge clk);
    checks++;
    if (expected.size() != 0) begin
      failures++;
      $display("%0d bytes never received", expected.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
