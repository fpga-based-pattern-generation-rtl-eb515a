// vga_interface_tb: applies random syncs, display enable, projection
// enable, frame kind and pattern pixel, and checks one clock later that the
// syncs are passed through and the colour is 111 only for an active pixel
// of a projected frame that is lit (an HOC pixel of 1, or a white frame),
// and 000 otherwise.
module vga_interface_tb;
  import sl3d_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hsync_in = 1'b1, vsync_in = 1'b1, de = 1'b0, enable = 1'b0, pixel = 1'b0;
  frame_kind_e kind = FRAME_HOC;
  logic hsync, vsync;
  logic [2:0] rgb;
  int checks = 0, failures = 0, lit_seen = 0;

  vga_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      bit exp_lit;
      logic hs, vs;
      frame_kind_e k;
      hs = 1'($urandom); vs = 1'($urandom);
      k  = frame_kind_e'($urandom_range(0, 2));
      hsync_in <= hs; vsync_in <= vs;
      de <= 1'($urandom); enable <= ($urandom_range(0, 3) != 0);
      kind <= k; pixel <= 1'($urandom);
      @(posedge clk);
      #1;
      exp_lit = de && enable && ((kind == FRAME_HOC && pixel) || kind == FRAME_WHITE);
      if (exp_lit) lit_seen++;
      checks++;
      if (hsync != hs || vsync != vs || rgb != {3{exp_lit}}) begin
        failures++;
        $display("i=%0d de=%0b en=%0b kind=%0d pix=%0b: rgb=%b hs=%0b vs=%0b",
                 i, de, enable, kind, pixel, rgb, hsync, vsync);
      end
    end
    checks++;
    if (lit_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
