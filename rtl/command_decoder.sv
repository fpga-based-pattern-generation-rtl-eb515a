// command_decoder: turns host command bytes into the projection enable.
//
// Each byte from the serial receiver is compared with the command codes:
// CMD_ENABLE switches pattern projection on, CMD_DISABLE switches it off
// (the video output then carries no signal, all colours dark), and any other
// byte is ignored and counted in `bad_cmd` (one-clock pulse). The enable
// level changes on the clock after `valid`; the frame counter applies it at
// the next frame boundary. The byte values are this design's choice.
module command_decoder
  import sl3d_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       enable,
  output logic       bad_cmd
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable  <= 1'b0;
      bad_cmd <= 1'b0;
    end else begin
      bad_cmd <= 1'b0;
      if (valid) begin
        unique case (data)
          CMD_ENABLE:  enable  <= 1'b1;
          CMD_DISABLE: enable  <= 1'b0;
          default:     bad_cmd <= 1'b1;
        endcase
      end
    end
  end

endmodule
