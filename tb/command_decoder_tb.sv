// command_decoder_tb: sends a random stream of command bytes (the enable
// and disable codes mixed with other bytes) with random gaps and checks the
// enable level and the unknown-command pulse after every clock against a
// reference that follows the last recognised command.
module command_decoder_tb;
  import sl3d_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [7:0] data = '0;
  logic enable, bad_cmd;
  int checks = 0, failures = 0, n_on = 0, n_off = 0, n_bad = 0;

  command_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_en = 0, exp_bad;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int r;
      logic [7:0] b;
      r = $urandom_range(0, 9);
      b = (r < 3) ? 8'h45 : (r < 6) ? 8'h44 : 8'($urandom);
      valid <= ($urandom_range(0, 1) == 1);
      data  <= b;
      @(posedge clk);
      #1;
      exp_bad = 0;
      if (valid) begin
        if (data == 8'h45) begin exp_en = 1; n_on++; end
        else if (data == 8'h44) begin exp_en = 0; n_off++; end
        else begin exp_bad = 1; n_bad++; end
      end
      checks++;
      if (enable != exp_en || bad_cmd != exp_bad) begin
        failures++;
        $display("byte %h valid %0b: enable=%0b bad=%0b", data, valid, enable, bad_cmd);
      end
    end
    checks++;
    if (n_on == 0 || n_off == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
