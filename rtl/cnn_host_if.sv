// cnn_host_if -- byte-command decoder between the RS232 link and the core.
//
// The host loads the initial states and parameters, starts and pauses the
// run and reads back the state history over the serial link. Commands (all
// numbers big-endian, registers and states in Q3.12):
//   0x10+r, hi, lo     write register r (0..7, see cnn_pkg::reg_addr_e)
//   0x20               start: write x(0) to cache address 0 and run
//   0x21               stop (pause after the current iteration)
//   0x22               resume a paused run
//   0x30, ahi, alo     read cache address a: reply x1 hi, x1 lo, x2 hi, x2 lo
//                      (an address >= DEPTH replies four zero bytes)
//   0x40               status: reply n[31:24], n[23:16], n[15:8], n[7:0],
//                      flags {6'b0, overrun, running}
// Other command bytes are ignored, and so are bytes that arrive while a
// reply is being sent. A cache read waits for port B of the cache, which the
// CNN circuit has first claim on (h_rd_req held until h_rd_grant).
// Reply bytes go to the transmitter with a valid/ready handshake.
// That the host loads values and reads results over RS232 follows the
// reference system; the command set and its encoding are this design's.
module cnn_host_if
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH  = 5120,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the receiver
  input  logic [7:0]        rx_data,
  input  logic              rx_valid,
  // to the transmitter
  output logic [7:0]        tx_data,
  output logic              tx_valid,
  input  logic              tx_ready,
  // to the CNN circuit
  output logic              reg_we,
  output reg_addr_e         reg_addr,
  output q3_12_t            reg_wdata,
  output logic              cmd_start,
  output logic              cmd_stop,
  output logic              cmd_resume,
  input  logic [31:0]       n_count,
  input  logic              running,
  input  logic              overrun,
  // cache host read
  output logic              h_rd_req,
  output logic [ADDR_W-1:0] h_rd_addr,
  input  logic              h_rd_grant,
  input  logic              h_rd_valid,
  input  q3_12_t            rd_x1,
  input  q3_12_t            rd_x2
);

  typedef enum logic [2:0] {
    H_CMD, H_WR_HI, H_WR_LO, H_A_HI, H_A_LO, H_RD_REQ, H_RD_WAIT, H_SEND
  } host_state_e;

  host_state_e state_q;
  logic [7:0]  hi_q;
  logic [39:0] buf_q;      // reply bytes, first byte in [39:32]
  logic [2:0]  left_q;     // reply bytes still to send

  assign tx_data  = buf_q[39:32];
  assign tx_valid = (state_q == H_SEND);
  assign h_rd_req = (state_q == H_RD_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= H_CMD;
      hi_q       <= '0;
      buf_q      <= '0;
      left_q     <= '0;
      reg_we     <= 1'b0;
      reg_addr   <= REG_X1_INIT;
      reg_wdata  <= '0;
      cmd_start  <= 1'b0;
      cmd_stop   <= 1'b0;
      cmd_resume <= 1'b0;
      h_rd_addr  <= '0;
    end else begin
      reg_we     <= 1'b0;
      cmd_start  <= 1'b0;
      cmd_stop   <= 1'b0;
      cmd_resume <= 1'b0;
      unique case (state_q)
        H_CMD: if (rx_valid) begin
          if (rx_data[7:3] == {CMD_WRITE, 1'b0}) begin
            reg_addr <= reg_addr_e'(rx_data[2:0]);
            state_q  <= H_WR_HI;
          end else if (rx_data == CMD_START)  cmd_start  <= 1'b1;
          else if (rx_data == CMD_STOP)       cmd_stop   <= 1'b1;
          else if (rx_data == CMD_RESUME)     cmd_resume <= 1'b1;
          else if (rx_data == CMD_READ)       state_q    <= H_A_HI;
          else if (rx_data == CMD_STATUS) begin
            buf_q   <= {n_count, 6'b0, overrun, running};
            left_q  <= 3'd5;
            state_q <= H_SEND;
          end
        end
        H_WR_HI: if (rx_valid) begin
          hi_q    <= rx_data;
          state_q <= H_WR_LO;
        end
        H_WR_LO: if (rx_valid) begin
          reg_wdata <= {hi_q, rx_data};
          reg_we    <= 1'b1;
          state_q   <= H_CMD;
        end
        H_A_HI: if (rx_valid) begin
          hi_q    <= rx_data;
          state_q <= H_A_LO;
        end
        H_A_LO: if (rx_valid) begin
          if ({hi_q, rx_data} < 16'(DEPTH)) begin
            h_rd_addr <= ADDR_W'({hi_q, rx_data});
            state_q   <= H_RD_REQ;
          end else begin
            buf_q   <= '0;
            left_q  <= 3'd4;
            state_q <= H_SEND;
          end
        end
        H_RD_REQ:  if (h_rd_grant) state_q <= H_RD_WAIT;
        H_RD_WAIT: if (h_rd_valid) begin
          buf_q   <= {rd_x1, rd_x2, 8'h00};
          left_q  <= 3'd4;
          state_q <= H_SEND;
        end
        H_SEND: if (tx_ready) begin
          buf_q  <= {buf_q[31:0], 8'h00};
          left_q <= left_q - 1'b1;
          if (left_q == 3'd1) state_q <= H_CMD;
        end
        default: state_q <= H_CMD;
      endcase
    end
  end

endmodule
