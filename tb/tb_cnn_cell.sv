// tb_cnn_cell -- checks one cell update against the floating-point form of
//   x[n+1] = ( x[n]/T + c1 f(x1) + c2 f(x2) + u ) / (1 + 1/T)
// for the reference parameters and for random operands: the hardware must
// be within 1 LSB of the real result (or saturated where it is out of
// range). Also checks that 'done' comes 40 cycles after 'start'.
module tb_cnn_cell;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  q3_12_t x_self = '0, f1 = '0, f2 = '0, c1 = '0, c2 = '0, u = '0, t_step = T_DEFAULT;
  logic busy, done;
  q3_12_t x_next;
  int checks = 0, failures = 0, saturated = 0;

  cnn_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat_clamp(input int v);
    if (v > 4096) return 4096;
    if (v < -4096) return -4096;
    return v;
  endfunction

  // x1, x2 are the two states; the cell's own state is x1 when self1 is set
  task automatic run(input int x1v, input int x2v, input bit self1,
                     input int c1v, input int c2v, input int uv, input int tv);
    real r, rq;
    int cycles = 0;
    @(negedge clk);
    x_self = 16'(self1 ? x1v : x2v);
    f1 = 16'(sat_clamp(x1v)); f2 = 16'(sat_clamp(x2v));
    c1 = 16'(c1v); c2 = 16'(c2v); u = 16'(uv); t_step = 16'(tv);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    r = ref_next(q2r(self1 ? x1v : x2v), q2r(x1v), q2r(x2v), q2r(c1v), q2r(c2v),
                 q2r(uv), q2r(tv));
    rq = r * SCALE;
    checks += 2;
    if (rq >= 32767.5 || rq < -32768.5) begin
      saturated++;
      if (!((rq > 0 && x_next == 16'sh7FFF) || (rq < 0 && x_next == -16'sh8000))) begin
        failures++;
        $display("FAIL saturation ref=%f got %0d", rq, x_next);
      end
    end else if (lsb_err(int'(x_next), r) > 1.0) begin
      failures++;
      $display("FAIL x=(%0d,%0d) c=(%0d,%0d) u=%0d T=%0d: got %0d ref %f",
               x1v, x2v, c1v, c2v, uv, tv, x_next, rq);
    end
    if (cycles != 40) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 40", cycles);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reference network: cell 1 (p, -s, g) and cell 2 (s, p, 0) from x(0)
    run(573, -410, 1, 8192, -4915, 0, 20);
    run(573, -410, 0, 4915, 8192, 0, 20);
    run(573, -410, 1, 8192, -4915, 16548, 20);
    run(20000, -15000, 1, 8192, -4915, -16548, 20);   // both f saturated
    run(-20000, 3000, 0, 4915, 8192, 0, 20);
    for (int i = 0; i < 400; i++) begin
      int x1v, x2v, c1v, c2v, uv, tv;
      x1v = int'($urandom_range(65535)) - 32768;
      x2v = int'($urandom_range(65535)) - 32768;
      c1v = int'($urandom_range(65535)) - 32768;
      c2v = int'($urandom_range(65535)) - 32768;
      uv  = int'($urandom_range(65535)) - 32768;
      tv  = (i % 4 == 0) ? int'($urandom_range(32767)) : int'($urandom_range(200));
      if (tv == 0) tv = 1;
      run(x1v, x2v, i[0], c1v, c2v, uv, tv);
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL no saturated result seen"); end
    $display("saturated results: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
