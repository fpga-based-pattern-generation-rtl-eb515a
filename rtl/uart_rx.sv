// uart_rx: serial receiver that brings command bytes from the host PC into
// the FPGA.
//
// Standard asynchronous framing, 8 data bits LSB first, no parity, one stop
// bit, idle high. The line is passed through a two-flop synchronizer. A
// falling edge starts a frame; the start bit is checked again at its middle
// (a glitch shorter than half a bit is ignored), then each data bit and the
// stop bit are sampled in the middle of their bit time, CLKS_PER_BIT clocks
// apart. A byte whose stop bit is high is presented on `data` with a
// one-clock `valid` pulse about half a bit time after the stop bit begins;
// a byte with a low stop bit is dropped. The framing and the default rate
// of 115200 baud at a 65 MHz clock are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 564,   // 65 MHz / 115200 baud
  parameter int unsigned CW           = $clog2(CLKS_PER_BIT)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e     state;
  logic [1:0]    sync_ff;
  logic          rx_s;
  logic [CW-1:0] timer;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  assign rx_s = sync_ff[1];

  always_ff @(posedge clk) begin
    if (!rst_n) sync_ff <= 2'b11;
    else        sync_ff <= {sync_ff[0], rx};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= RX_IDLE;
      timer   <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          if (!rx_s) begin
            timer <= CW'(CLKS_PER_BIT / 2 - 1);
            state <= RX_START;
          end
        end
        RX_START: begin
          if (timer != '0) timer <= timer - 1'b1;
          else if (!rx_s) begin
            timer   <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
            state   <= RX_DATA;
          end else begin
            state <= RX_IDLE;
          end
        end
        RX_DATA: begin
          if (timer != '0) timer <= timer - 1'b1;
          else begin
            shreg <= {rx_s, shreg[7:1]};
            timer <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) state <= RX_STOP;
            else                 bit_idx <= bit_idx + 1'b1;
          end
        end
        RX_STOP: begin
          if (timer != '0) timer <= timer - 1'b1;
          else begin
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end
            state <= RX_IDLE;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  // A byte is announced for exactly one clock.
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n) valid |=> !valid);

endmodule
