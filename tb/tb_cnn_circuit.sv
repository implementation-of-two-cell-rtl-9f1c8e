// tb_cnn_circuit -- runs the CNN circuit on its cache (64 words here, so the
// address wraps) with the reference parameters and checks every iteration
// against the floating-point model: x[n+1] computed from the previous state
// with the ideal drive A sin(2 pi t / 4) must match within 2 LSB. Also
// checked: x(0) written at address 0 by start; the 44-cycle latency from
// tick to iter_done; stop (no more iterations), register writes while
// paused taking effect after resume; the cache holding the last 64 states;
// and the overrun flag when ticks come faster than iterations, cleared by
// the next start.
module tb_cnn_circuit;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = 6;

  logic clk = 0, rst_n = 0, tick = 0;
  logic reg_we = 0;
  reg_addr_e reg_addr = REG_X1_INIT;
  q3_12_t reg_wdata = '0;
  logic cmd_start = 0, cmd_stop = 0, cmd_resume = 0;
  logic wr_en, c_rd_en, h_rd_req = 0, h_rd_grant, h_rd_valid;
  logic [AW-1:0] wr_addr, c_rd_addr, h_rd_addr = '0;
  q3_12_t wr_x1, wr_x2, rd_x1, rd_x2;
  logic running, overrun, iter_done;
  logic [31:0] n_count;
  q3_12_t x1, x2, g;

  int checks = 0, failures = 0;
  int tick_period = 50, cyc = 0, last_tick_cyc = 0;
  bit ticking = 0;
  int iters = 0, saturations = 0;
  // model state
  real p_a11 = 2.0, p_a12 = -1.2, p_a21 = 1.2, p_a22 = 2.0, p_t = 20.0/4096.0, p_amp = 4.04;
  real t_acc = 0.0;            // time n*T reached by the drive
  int  px1, px2;               // previous state
  q3_12_t hist1 [longint], hist2 [longint];

  cnn_circuit #(.DEPTH(DEPTH)) dut (.*);
  cnn_cache #(.DEPTH(DEPTH)) cache (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_x1, .wr_x2, .c_rd_en, .c_rd_addr,
    .h_rd_req, .h_rd_addr, .h_rd_grant, .h_rd_valid, .rd_x1, .rd_x2);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // tick generator
  always @(negedge clk) begin
    cyc++;
    tick <= 0;
    if (ticking && cyc - last_tick_cyc >= tick_period) begin
      tick <= 1;
      last_tick_cyc = cyc;
    end
  end

  // iteration checker
  always @(negedge clk) begin
    if (rst_n && iter_done) begin
      real r1, r2, gi;
      int lat;
      lat = cyc - last_tick_cyc;
      gi  = p_amp * $sin(2.0 * PI * t_acc / 4.0);
      r1  = ref_next(q2r(px1), q2r(px1), q2r(px2), p_a11, p_a12, gi, p_t);
      r2  = ref_next(q2r(px2), q2r(px1), q2r(px2), p_a21, p_a22, 0.0, p_t);
      chk(lsb_err(int'(x1), r1) <= 2.0 && lsb_err(int'(x2), r2) <= 2.0,
          $sformatf("n=%0d x=(%0d,%0d) ref=(%f,%f)", n_count, x1, x2, r1 * SCALE, r2 * SCALE));
      if (tick_period >= 45) chk(lat == 44, $sformatf("latency %0d", lat));
      if (px1 > 4096 || px1 < -4096 || px2 > 4096 || px2 < -4096) saturations++;
      t_acc += p_t;
      if (t_acc >= 4.0) t_acc -= 4.0;
      px1 = int'(x1); px2 = int'(x2);
      hist1[longint'(n_count)] = x1;
      hist2[longint'(n_count)] = x2;
      iters++;
    end
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic write_reg(input reg_addr_e a, input int v);
    @(negedge clk);
    reg_we = 1; reg_addr = a; reg_wdata = 16'(v);
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic host_read(input int a, output q3_12_t v1, output q3_12_t v2);
    @(negedge clk);
    h_rd_req = 1; h_rd_addr = AW'(a);
    while (!h_rd_grant) @(negedge clk);
    @(negedge clk);
    h_rd_req = 0;
    v1 = rd_x1; v2 = rd_x2;
  endtask

  task automatic wait_iters(input int n);
    int target;
    target = iters + n;
    while (iters < target) @(negedge clk);
  endtask

  initial begin
    q3_12_t v1, v2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!running && n_count == 0, "idle after reset");
    // start with the reset values (the reference network)
    px1 = 573; px2 = -410;
    pulse(cmd_start);
    repeat (3) @(negedge clk);
    chk(running && n_count == 0 && x1 == 573 && x2 == -410, "start loads x(0)");
    ticking = 1;
    wait_iters(150);
    // pause
    pulse(cmd_stop);
    repeat (3 * tick_period) @(negedge clk);
    begin
      int n0;
      n0 = iters;
      repeat (5 * tick_period) @(negedge clk);
      chk(iters == n0 && !running, "no iterations while stopped");
    end
    // cache holds the last DEPTH states at address n mod DEPTH
    for (int k = 0; k < DEPTH; k++) begin
      longint n;
      n = longint'(n_count) - k;
      host_read(int'(n % DEPTH), v1, v2);
      chk(v1 == hist1[n] && v2 == hist2[n], $sformatf("cache entry n=%0d", n));
    end
    // new parameters while paused, then resume
    write_reg(REG_T, 16);     p_t = 16.0 / 4096.0;
    write_reg(REG_AMP, 12288); p_amp = 3.0;
    write_reg(REG_A11, 6144); p_a11 = 1.5;
    write_reg(REG_A21, 4096); p_a21 = 1.0;
    pulse(cmd_resume);
    wait_iters(100);
    chk(!overrun, "no overrun at a 50-cycle tick");
    // ticks faster than one iteration
    tick_period = 30;
    wait_iters(10);
    chk(overrun, "overrun flagged");
    tick_period = 45;
    // restart: x(0) from new initial-value registers, drive phase back to 0
    write_reg(REG_X1_INIT, -2000);
    write_reg(REG_X2_INIT, 1500);
    pulse(cmd_stop);
    repeat (100) @(negedge clk);
    px1 = -2000; px2 = 1500; t_acc = 0.0;
    pulse(cmd_start);
    repeat (3) @(negedge clk);
    chk(!overrun && n_count == 0, "start clears overrun and count");
    host_read(0, v1, v2);
    chk(v1 == -2000 && v2 == 1500, "x(0) in cache address 0");
    wait_iters(100);
    chk(!overrun, "no overrun at a 45-cycle tick");
    chk(saturations > 0, "f saturated in some iteration");
    $display("iterations %0d, with saturated f: %0d", iters, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
