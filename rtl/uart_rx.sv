// uart_rx -- RS232 receiver, 8 data bits, no parity, 1 stop bit (8N1).
//
// The serial input is synchronised with two flip-flops. A falling edge
// starts a frame; the start bit is confirmed at its middle, then each data
// bit (LSB first) and the stop bit are sampled in the middle of their bit
// time, CLKS_PER_BIT board clocks apart. A frame with a valid stop bit
// delivers its byte with a one-cycle 'valid' pulse at the middle of the stop
// bit; a frame whose stop bit is low is dropped and pulses 'frame_err'.
// Default: 434 clocks per bit, 115200 baud from 50 MHz.
// The link itself is the host connection of the reference system; its
// format and baud rate are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  rx_state_e        state_q;
  logic [1:0]       sync_q;
  logic [CNT_W-1:0] cnt_q;
  logic [2:0]       bit_q;
  logic [7:0]       shift_q;
  logic             rx_s;

  assign rx_s = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= 2'b11;
      state_q   <= R_IDLE;
      cnt_q     <= '0;
      bit_q     <= '0;
      shift_q   <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state_q)
        R_IDLE: begin
          cnt_q <= '0;
          if (!rx_s) state_q <= R_START;
        end
        R_START: begin
          if (cnt_q == CNT_W'(CLKS_PER_BIT / 2 - 1)) begin
            cnt_q   <= '0;
            bit_q   <= '0;
            state_q <= rx_s ? R_IDLE : R_DATA;   // glitch: back to idle
          end else cnt_q <= cnt_q + 1'b1;
        end
        R_DATA: begin
          if (cnt_q == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            shift_q <= {rx_s, shift_q[7:1]};
            bit_q   <= bit_q + 1'b1;
            if (bit_q == 3'd7) state_q <= R_STOP;
          end else cnt_q <= cnt_q + 1'b1;
        end
        R_STOP: begin
          if (cnt_q == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            state_q <= R_IDLE;
            if (rx_s) begin
              data  <= shift_q;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else cnt_q <= cnt_q + 1'b1;
        end
        default: state_q <= R_IDLE;
      endcase
    end
  end

endmodule
