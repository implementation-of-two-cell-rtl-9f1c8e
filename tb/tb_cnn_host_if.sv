// tb_cnn_host_if -- feeds command bytes to the decoder and checks its
// actions: register writes (address and 16-bit value), the start, stop and
// resume pulses, cache reads (address, waiting for a busy port, the four
// reply bytes), out-of-range reads, the status reply and ignored bytes.
// The transmitter and the cache port are modelled here, with random stalls.
module tb_cnn_host_if;
  import cnn_pkg::*;
  localparam int DEPTH = 5120;
  localparam int AW = 13;

  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 0, tx_valid, tx_ready = 0;
  logic reg_we, cmd_start, cmd_stop, cmd_resume;
  reg_addr_e reg_addr;
  q3_12_t reg_wdata;
  logic [31:0] n_count = 32'h12345678;
  logic running = 1, overrun = 0;
  logic h_rd_req, h_rd_grant, h_rd_valid = 0;
  logic [AW-1:0] h_rd_addr;
  q3_12_t rd_x1 = '0, rd_x2 = '0;
  int checks = 0, failures = 0;
  int n_we = 0, n_start = 0, n_stop = 0, n_resume = 0, n_blocked = 0;
  logic [2:0] last_addr;
  logic [15:0] last_data;
  logic [7:0] txq [$];
  bit port_busy = 0;

  cnn_host_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // models of the transmitter and of cache port B
  assign h_rd_grant = h_rd_req && !port_busy;
  always @(posedge clk) begin
    if (tx_valid && tx_ready) txq.push_back(tx_data);
    tx_ready  <= ($urandom_range(3) == 0);
    port_busy <= ($urandom_range(2) == 0);
    if (h_rd_req && port_busy) n_blocked++;
    h_rd_valid <= h_rd_grant;
    if (h_rd_grant) begin
      rd_x1 <= 16'(h_rd_addr * 3 + 1);
      rd_x2 <= 16'(16'hF000 ^ h_rd_addr);
    end
    if (rst_n && reg_we) begin n_we++; last_addr <= reg_addr; last_data <= reg_wdata; end
    if (rst_n && cmd_start) n_start++;
    if (rst_n && cmd_stop) n_stop++;
    if (rst_n && cmd_resume) n_resume++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input logic [7:0] b);
    @(negedge clk);
    rx_data = b; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic get_reply(input int n, output logic [39:0] r);
    int wait_cycles = 0;
    r = '0;
    while (txq.size() < n && wait_cycles < 1000) begin @(negedge clk); wait_cycles++; end
    chk(txq.size() == n, $sformatf("reply of %0d bytes, got %0d", n, txq.size()));
    for (int i = 0; i < n && txq.size() > 0; i++) r = {r[31:0], txq.pop_front()};
  endtask

  initial begin
    logic [39:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // register writes
    for (int a = 0; a < 8; a++) begin
      int w0;
      logic [15:0] v;
      v = 16'($urandom);
      w0 = n_we;
      put(8'h10 | 8'(a)); put(v[15:8]); put(v[7:0]);
      chk(n_we == w0 + 1 && last_addr == 3'(a) && last_data == v,
          $sformatf("register %0d write", a));
    end
    // commands
    put(CMD_START);  chk(n_start == 1, "start pulse");
    put(CMD_STOP);   chk(n_stop == 1, "stop pulse");
    put(CMD_RESUME); chk(n_resume == 1, $sformatf("resume pulse %0d %0d %0d", n_start, n_stop, n_resume));
    put(8'h18); put(8'h77); put(8'h55);   // not a command: all ignored
    chk(n_we == 8 && n_start == 1 && n_stop == 1 && n_resume == 1, "unknown bytes ignored");
    // cache reads
    for (int i = 0; i < 40; i++) begin
      logic [15:0] a;
      a = 16'($urandom_range(DEPTH - 1));
      if (i == 0) a = 0;
      if (i == 1) a = 16'(DEPTH - 1);
      put(CMD_READ); put(a[15:8]); put(a[7:0]);
      get_reply(4, r);
      chk(r[31:16] == 16'(a * 3 + 1) && r[15:0] == 16'(16'hF000 ^ a),
          $sformatf("read %0d reply %h", a, r[31:0]));
    end
    put(CMD_READ); put(8'hFF); put(8'hFF);
    get_reply(4, r);
    chk(r[31:0] == 32'h0, "out-of-range read replies zeros");
    // status
    overrun = 1;
    put(CMD_STATUS);
    get_reply(5, r);
    chk(r == {32'h12345678, 8'h03}, $sformatf("status %h", r));
    chk(n_blocked > 0, "a host read waited for the port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
