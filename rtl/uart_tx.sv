// uart_tx -- RS232 transmitter, 8 data bits, no parity, 1 stop bit (8N1).
//
// A byte is accepted with a valid/ready handshake: 'ready' is high while the
// transmitter is idle, and a cycle with 'valid' and 'ready' both high takes
// 'data'. The frame (start bit, data LSB first, stop bit) then leaves on
// 'txd', each bit lasting CLKS_PER_BIT board clocks, and 'ready' returns one
// clock after the stop bit ends. The line idles high.
// The link is the host connection of the reference system; its format and
// baud rate are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]       frame_q;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0]       bits_q;    // bits left in the frame
  logic [CNT_W-1:0] cnt_q;

  assign ready = (bits_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '1;
      bits_q  <= '0;
      cnt_q   <= '0;
      txd     <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (valid) begin
        frame_q <= {1'b1, data, 1'b0};
        bits_q  <= 4'd10;
        cnt_q   <= '0;
        txd     <= 1'b0;               // start bit goes out at once
      end
    end else begin
      if (cnt_q == CNT_W'(CLKS_PER_BIT - 1)) begin
        cnt_q   <= '0;
        frame_q <= {1'b1, frame_q[9:1]};
        bits_q  <= bits_q - 1'b1;
        txd     <= (bits_q == 4'd1) ? 1'b1 : frame_q[1];
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !ready |-> bits_q <= 4'd10);

endmodule
