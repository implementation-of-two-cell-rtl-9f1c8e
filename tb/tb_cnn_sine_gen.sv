// tb_cnn_sine_gen -- checks the drive g[n] = A sin(2 pi n T / 4).
// Each sample is compared with the double-precision sine (tolerance set by
// the quarter-wave table resolution) and with the exact value of the
// table formula round(32767 sin(pi/2 k/256)) scaled by A. Also checked:
// the period of 4 time units (phase returns to 0 after 4/T samples), clear,
// hold without step, and the one-cycle output latency.
module tb_cnn_sine_gen;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  q3_12_t t_step = 16'sd16, amp = AMP_DEFAULT, g;
  logic [13:0] phase;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  cnn_sine_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int table_g(input int ph, input int a);
    int q, i, k, s;
    longint p;
    q = (ph >> 12) & 3;
    i = (ph >> 4) & 255;
    k = (q == 1 || q == 3) ? 256 - i : i;
    s = int'($floor(32767.0 * $sin(PI / 2.0 * real'(k) / 256.0) + 0.5));
    if (s > 32767) s = 32767;
    if (q >= 2) s = -s;
    p = longint'(a) * longint'(s) + 64'sd16384;
    return int'(p >>> 15);
  endfunction

  task automatic check_sample(input longint n, input real t);
    real e;
    checks += 2;
    if (int'(g) != table_g(int'(phase), int'(amp))) begin
      failures++;
      $display("FAIL n=%0d phase=%0d g=%0d table=%0d", n, phase, g, table_g(int'(phase), int'(amp)));
    end
    e = lsb_err(int'(g), ideal_g(n, t, q2r(int'(amp))));
    if (e > max_err) max_err = e;
    if (e > 110.0) begin
      failures++;
      $display("FAIL n=%0d g=%0d ideal=%f", n, g, ideal_g(n, t, q2r(int'(amp))) * SCALE);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    @(negedge clk);
    // T = 16/4096: one period of 4 time units is 1024 samples
    for (longint n = 0; n < 1100; n++) begin
      check_sample(n, 16.0 / 4096.0);
      if (n == 1024) begin
        checks++;
        if (phase != 0) begin failures++; $display("FAIL period: phase=%0d", phase); end
      end
      step = 1;
      @(negedge clk);
      step = 0;
      @(negedge clk);       // g follows phase one cycle later
    end
    // hold: no step, phase and g unchanged
    begin
      logic [13:0] ph0;
      q3_12_t g0;
      ph0 = phase; g0 = g;
      repeat (20) @(negedge clk);
      checks++;
      if (phase != ph0 || g != g0) begin failures++; $display("FAIL hold"); end
    end
    // reference configuration T = 20/4096 (0.005), 2000 samples, other amplitude
    clear = 1; t_step = T_DEFAULT; amp = 16'sd8192;
    @(negedge clk);
    clear = 0;
    @(negedge clk);
    checks++;
    if (phase != 0 || g != 0) begin failures++; $display("FAIL clear"); end
    for (longint n = 0; n < 2000; n++) begin
      check_sample(n, 20.0 / 4096.0);
      step = 1;
      @(negedge clk);
      step = 0;
      @(negedge clk);
    end
    $display("largest deviation from the ideal sine: %0.1f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
