// tb_cnn_top_full -- the CNN core at its default sizes (115200 baud from
// 50 MHz, 50 board clocks per iteration, 5120-word cache) running the
// reference experiment: p = 2, s = 1.2, A = 4.04, T = 0.005, x(0) =
// (0.14, -0.1) for 80,000 iterations, the length of the published time
// series. Registers are loaded and the run started over the serial link;
// every iteration is checked against the floating-point model within 2 LSB;
// then the run is stopped, the status read and the last cache entries read
// back over the link. The attractor must span the range of the published
// plots: x1 peaks between 4.5 and 5.5 in both directions, x2 between 2 and
// 3 in both, roughly point-symmetric.
module tb_cnn_top_full;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;
  localparam int CPB    = 434;
  localparam int DEPTH  = 5120;
  localparam int NITER  = 80000;

  logic clk = 0, rst_n = 0, uart_rxd = 1;
  logic uart_txd, clk_slow, running, iter_done;
  q3_12_t x1, x2;

  int checks = 0, failures = 0, step_fail = 0;
  int iters = 0;
  int px1 = 573, px2 = -410;
  int max1 = 0, min1 = 0, max2 = 0, min2 = 0, sat = 0;
  real t_acc = 0.0;
  q3_12_t last1 [DEPTH], last2 [DEPTH];
  logic [7:0] rxq [$];

  cnn_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    uart_rxd = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    uart_rxd = 1;
    repeat (CPB) @(negedge clk);
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
    while (rxq.size() < n && w < 100000) begin @(negedge clk); w++; end
    chk(rxq.size() == n, $sformatf("reply of %0d bytes", n));
    for (int i = 0; i < n && rxq.size() > 0; i++) r = {r[31:0], rxq.pop_front()};
  endtask

  always @(negedge clk) begin
    if (rst_n && iter_done) begin
      real r1, r2, gi;
      gi = 4.04 * $sin(2.0 * PI * t_acc / 4.0);
      r1 = ref_next(q2r(px1), q2r(px1), q2r(px2), 2.0, -4915.0 / 4096.0, gi, 20.0 / 4096.0);
      r2 = ref_next(q2r(px2), q2r(px1), q2r(px2), 4915.0 / 4096.0, 2.0, 0.0, 20.0 / 4096.0);
      checks++;
      if (lsb_err(int'(x1), r1) > 2.0 || lsb_err(int'(x2), r2) > 2.0) begin
        failures++;
        step_fail++;
        if (step_fail < 10)
          $display("FAIL iteration %0d x=(%0d,%0d) ref=(%f,%f)", iters + 1, x1, x2,
                   r1 * SCALE, r2 * SCALE);
      end
      if (px1 > 4096 || px1 < -4096 || px2 > 4096 || px2 < -4096) sat++;
      t_acc += 20.0 / 4096.0;
      if (t_acc >= 4.0) t_acc -= 4.0;
      px1 = int'(x1); px2 = int'(x2);
      if (px1 > max1) max1 = px1;
      if (px1 < min1) min1 = px1;
      if (px2 > max2) max2 = px2;
      if (px2 < min2) min2 = px2;
      iters++;
      last1[iters % DEPTH] = x1;
      last2[iters % DEPTH] = x2;
    end
  end

  initial begin
    logic [39:0] r;
    int vals [8];
    vals = '{573, -410, 8192, -4915, 4915, 8192, 20, 16548};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int a = 0; a < 8; a++) begin
      send(8'h10 | 8'(a)); send(8'(vals[a] >> 8)); send(8'(vals[a]));
    end
    send(CMD_START);
    while (iters < NITER) @(negedge clk);
    send(CMD_STOP);
    repeat (200) @(negedge clk);
    send(CMD_STATUS);
    recv(5, r);
    chk(r[39:8] == 32'(iters) && r[7:0] == 8'h00,
        $sformatf("status n=%0d flags=%h after %0d iterations", r[39:8], r[7:0], iters));
    chk(iters >= NITER, "reference run completed");
    for (int k = 0; k < 4; k++) begin
      int n;
      n = iters - k;
      send(CMD_READ); send(8'((n % DEPTH) >> 8)); send(8'(n % DEPTH));
      recv(4, r);
      chk(r[31:16] == last1[n % DEPTH] && r[15:0] == last2[n % DEPTH],
          $sformatf("cache entry of iteration %0d", n));
    end
    $display("x1 range %f .. %f, x2 range %f .. %f, iterations with saturated f %0d",
             q2r(min1), q2r(max1), q2r(min2), q2r(max2), sat);
    chk(max1 > 4.5 * SCALE && max1 < 5.5 * SCALE, "x1 maximum as published");
    chk(min1 < -4.5 * SCALE && min1 > -5.5 * SCALE, "x1 minimum as published");
    chk(max2 > 2.0 * SCALE && max2 < 3.0 * SCALE, "x2 maximum as published");
    chk(min2 < -2.0 * SCALE && min2 > -3.0 * SCALE, "x2 minimum as published");
    chk(rabs(q2r(max1 + min1)) < 0.5 && rabs(q2r(max2 + min2)) < 0.5, "point symmetry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
