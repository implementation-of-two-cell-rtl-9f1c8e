// cnn_top -- CNN core: a two-cell non-autonomous chaotic cellular neural
// network solved in Q3.12 fixed point, with its host link.
//
// Blocks: the clock generator divides the board clock into the iteration
// tick; the CNN circuit holds the model's registers and computes one state
// update per tick; the CNN cache (two dual-port block RAMs) keeps the state
// history the circuit iterates on and the host reads; the RS232 receiver,
// transmitter and command decoder connect the core to a host computer,
// which loads the parameters, starts and pauses the run and reads the
// trajectory. Everything runs on the single board clock 'clk'.
// Ports besides the clock, reset and serial pair are for observation:
// the divided clock, the run flag, an iteration strobe and the latest state.
// The partition into clock generator, CNN circuit and CNN cache and the
// RS232 host link follow the reference design; the clock-enable scheme and
// the observation ports are this design's choices.
module cnn_top
  import cnn_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 50,    // board clocks per iteration
  parameter int unsigned CLKS_PER_BIT = 434,   // 115200 baud at 50 MHz
  parameter int unsigned DEPTH        = 5120   // words per cache memory
) (
  input  logic   clk,         // 50 MHz board clock
  input  logic   rst_n,       // asynchronous, active low
  input  logic   uart_rxd,
  output logic   uart_txd,
  output logic   clk_slow,    // divided clock, f_clk / (2*CLK_DIV)
  output logic   running,
  output logic   iter_done,   // one-cycle pulse per completed iteration
  output q3_12_t x1,          // latest x1[n]
  output q3_12_t x2           // latest x2[n]
);

  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic tick;
  logic overrun;
  logic [31:0] n_count;
  q3_12_t g;

  // register and command path
  logic      reg_we;
  reg_addr_e reg_addr;
  q3_12_t    reg_wdata;
  logic      cmd_start, cmd_stop, cmd_resume;

  // cache
  logic              wr_en, c_rd_en, h_rd_req, h_rd_grant, h_rd_valid;
  logic [ADDR_W-1:0] wr_addr, c_rd_addr, h_rd_addr;
  q3_12_t            wr_x1, wr_x2, rd_x1, rd_x2;

  // serial
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_err, tx_valid, tx_ready;

  cnn_clock_gen #(.DIV(CLK_DIV)) u_clk_gen (
    .clk(clk), .rst_n(rst_n), .enable(1'b1), .tick(tick), .clk_slow(clk_slow)
  );

  cnn_circuit #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_circuit (
    .clk(clk), .rst_n(rst_n), .tick(tick),
    .reg_we(reg_we), .reg_addr(reg_addr), .reg_wdata(reg_wdata),
    .cmd_start(cmd_start), .cmd_stop(cmd_stop), .cmd_resume(cmd_resume),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_x1(wr_x1), .wr_x2(wr_x2),
    .c_rd_en(c_rd_en), .c_rd_addr(c_rd_addr), .rd_x1(rd_x1), .rd_x2(rd_x2),
    .running(running), .overrun(overrun), .iter_done(iter_done),
    .n_count(n_count), .x1(x1), .x2(x2), .g(g)
  );

  cnn_cache #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_cache (
    .clk(clk), .rst_n(rst_n),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_x1(wr_x1), .wr_x2(wr_x2),
    .c_rd_en(c_rd_en), .c_rd_addr(c_rd_addr),
    .h_rd_req(h_rd_req), .h_rd_addr(h_rd_addr),
    .h_rd_grant(h_rd_grant), .h_rd_valid(h_rd_valid),
    .rd_x1(rd_x1), .rd_x2(rd_x2)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(clk), .rst_n(rst_n), .rxd(uart_rxd),
    .data(rx_data), .valid(rx_valid), .frame_err(rx_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(clk), .rst_n(rst_n), .data(tx_data), .valid(tx_valid),
    .ready(tx_ready), .txd(uart_txd)
  );

  cnn_host_if #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_host (
    .clk(clk), .rst_n(rst_n),
    .rx_data(rx_data), .rx_valid(rx_valid),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .reg_we(reg_we), .reg_addr(reg_addr), .reg_wdata(reg_wdata),
    .cmd_start(cmd_start), .cmd_stop(cmd_stop), .cmd_resume(cmd_resume),
    .n_count(n_count), .running(running), .overrun(overrun),
    .h_rd_req(h_rd_req), .h_rd_addr(h_rd_addr),
    .h_rd_grant(h_rd_grant), .h_rd_valid(h_rd_valid),
    .rd_x1(rd_x1), .rd_x2(rd_x2)
  );

endmodule
