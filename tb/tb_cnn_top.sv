// tb_cnn_top -- end-to-end test of the CNN core through its serial link.
//
// A host model sends command bytes on uart_rxd and decodes the replies on
// uart_txd (8 clocks per bit and a 64-word cache here, to keep the run
// short; the iteration clock keeps its default of 50 board clocks). It
// loads all eight registers with the reference network, starts the run,
// and every completed iteration seen on the observation ports is checked
// against the floating-point model within 2 LSB. The cache is read back over
// the link while running and while paused and compared with the observed
// trajectory; the status reply must give the iteration count and flags.
// Counted, each must happen: register write, start, iteration, address wrap
// of the cache, saturation of f, host read during a run, stop, status read,
// resume, restart from new initial values.
module tb_cnn_top;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;
  localparam int CPB   = 8;
  localparam int DEPTH = 64;

  logic clk = 0, rst_n = 0, uart_rxd = 1;
  logic uart_txd, clk_slow, running, iter_done;
  q3_12_t x1, x2;

  int checks = 0, failures = 0;
  int iters = 0;
  int px1, px2;
  real t_acc = 0.0;
  real p_t = 20.0 / 4096.0, p_amp = 4.04;
  q3_12_t hist1 [longint], hist2 [longint];
  logic [7:0] rxq [$];

  // mechanism counters
  int m_regwr = 0, m_start = 0, m_iter = 0, m_wrap = 0, m_sat = 0;
  int m_read_run = 0, m_stop = 0, m_status = 0, m_resume = 0, m_restart = 0;

  cnn_top #(.CLKS_PER_BIT(CPB), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // ---- host side of the serial link ----
  task automatic send(input logic [7:0] b);
    @(negedge clk);
    uart_rxd = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    uart_rxd = 1;
    repeat (2 * CPB) @(negedge clk);
  endtask

  initial begin : host_receiver
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (rst_n && !uart_txd) begin
        repeat (CPB / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(negedge clk);
          b[i] = uart_txd;
        end
        repeat (CPB) @(negedge clk);
        rxq.push_back(b);
      end
    end
  end

  task automatic recv(input int n, output logic [39:0] r);
    int w = 0;
    r = '0;
    while (rxq.size() < n && w < 20000) begin @(negedge clk); w++; end
    chk(rxq.size() == n, $sformatf("reply of %0d bytes", n));
    for (int i = 0; i < n && rxq.size() > 0; i++) r = {r[31:0], rxq.pop_front()};
  endtask

  task automatic write_reg(input int a, input int v);
    send(8'h10 | 8'(a)); send(8'(v >> 8)); send(8'(v));
    m_regwr++;
  endtask

  task automatic read_cache(input int a, output q3_12_t v1, output q3_12_t v2);
    logic [39:0] r;
    send(CMD_READ); send(8'(a >> 8)); send(8'(a));
    recv(4, r);
    v1 = r[31:16]; v2 = r[15:0];
  endtask

  task automatic status(output logic [31:0] n, output logic [7:0] flags);
    logic [39:0] r;
    send(CMD_STATUS);
    recv(5, r);
    n = r[39:8]; flags = r[7:0];
    m_status++;
  endtask

  task automatic wait_iters(input int n);
    int target;
    target = iters + n;
    while (iters < target) @(negedge clk);
  endtask

  // ---- every iteration against the model ----
  always @(negedge clk) begin
    if (rst_n && iter_done) begin
      real r1, r2, gi;
      gi = p_amp * $sin(2.0 * PI * t_acc / 4.0);
      r1 = ref_next(q2r(px1), q2r(px1), q2r(px2), 2.0, -4915.0 / 4096.0, gi, p_t);
      r2 = ref_next(q2r(px2), q2r(px1), q2r(px2), 4915.0 / 4096.0, 2.0, 0.0, p_t);
      chk(lsb_err(int'(x1), r1) <= 2.0 && lsb_err(int'(x2), r2) <= 2.0,
          $sformatf("iteration %0d x=(%0d,%0d) ref=(%f,%f)", iters + 1, x1, x2,
                    r1 * SCALE, r2 * SCALE));
      if (px1 > 4096 || px1 < -4096 || px2 > 4096 || px2 < -4096) m_sat++;
      t_acc += p_t;
      if (t_acc >= 4.0) t_acc -= 4.0;
      px1 = int'(x1); px2 = int'(x2);
      iters++;
      m_iter++;
      hist1[longint'(iters)] = x1;
      hist2[longint'(iters)] = x2;
      if (iters % DEPTH == 0) m_wrap++;
    end
  end

  initial begin
    q3_12_t v1, v2;
    logic [31:0] n;
    logic [7:0] flags;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // load the reference network through the link
    write_reg(REG_X1_INIT, 573);
    write_reg(REG_X2_INIT, -410);
    write_reg(REG_A11, 8192);
    write_reg(REG_A12, -4915);
    write_reg(REG_A21, 4915);
    write_reg(REG_A22, 8192);
    write_reg(REG_T, 20);
    write_reg(REG_AMP, 16548);
    px1 = 573; px2 = -410;
    hist1[0] = 573; hist2[0] = -410;
    send(CMD_START);
    m_start++;
    wait_iters(1);
    chk(running, "running after start");
    read_cache(0, v1, v2);
    chk(v1 == 573 && v2 == -410, "x(0) in cache address 0 after start");
    wait_iters(150);
    // reads while running: entries 20 iterations old cannot be overwritten
    for (int k = 0; k < 6; k++) begin
      longint nn;
      nn = longint'(iters) - 20 + k;
      read_cache(int'(nn % DEPTH), v1, v2);
      chk(v1 == hist1[nn] && v2 == hist2[nn], $sformatf("read while running n=%0d", nn));
      m_read_run++;
    end
    send(CMD_STOP);
    m_stop++;
    repeat (300) @(negedge clk);
    status(n, flags);
    chk(n == 32'(iters) && flags == 8'h00, $sformatf("status n=%0d flags=%h, seen %0d", n, flags, iters));
    begin
      int i0;
      i0 = iters;
      repeat (2000) @(negedge clk);
      chk(iters == i0, "stopped");
    end
    // the whole cache against the trajectory
    for (int k = 0; k < DEPTH; k++) begin
      longint nn;
      nn = longint'(iters) - k;
      read_cache(int'(nn % DEPTH), v1, v2);
      chk(v1 == hist1[nn] && v2 == hist2[nn], $sformatf("cache n=%0d", nn));
    end
    send(CMD_RESUME);
    m_resume++;
    wait_iters(80);
    begin
      int i0;
      i0 = iters;
      status(n, flags);
      chk(flags == 8'h01 && n >= 32'(i0) && n <= 32'(iters),
          $sformatf("status while running n=%0d flags=%h", n, flags));
    end
    // restart from another initial state
    send(CMD_STOP);
    repeat (300) @(negedge clk);
    write_reg(REG_X1_INIT, -1000);
    write_reg(REG_X2_INIT, 2000);
    px1 = -1000; px2 = 2000; t_acc = 0.0;
    iters = 0;
    hist1.delete(); hist2.delete();
    hist1[0] = -1000; hist2[0] = 2000;
    send(CMD_START);
    m_restart++;
    wait_iters(30);
    read_cache(0, v1, v2);
    chk(v1 == -1000 && v2 == 2000, "restart x(0)");
    wait_iters(10);
    $display("register writes %0d, starts %0d, iterations %0d, cache wraps %0d, saturated f %0d",
             m_regwr, m_start, m_iter, m_wrap, m_sat);
    $display("reads while running %0d, stops %0d, status reads %0d, resumes %0d, restarts %0d",
             m_read_run, m_stop, m_status, m_resume, m_restart);
    chk(m_regwr > 0, "register write happened");
    chk(m_start > 0, "start happened");
    chk(m_iter > 0, "iteration happened");
    chk(m_wrap > 0, "cache wrap happened");
    chk(m_sat > 0, "saturation of f happened");
    chk(m_read_run > 0, "read while running happened");
    chk(m_stop > 0, "stop happened");
    chk(m_status > 0, "status read happened");
    chk(m_resume > 0, "resume happened");
    chk(m_restart > 0, "restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
