// tb_cnn_clock_gen -- checks the iteration clock at the default divide ratio
// of 50: ticks are single-cycle and exactly 50 board clocks apart, clk_slow
// toggles on each tick (period 100 clocks), and 'enable' low holds both.
module tb_cnn_clock_gen;
  localparam int DIV = 50;

  logic clk = 0, rst_n = 0, enable = 0, tick, clk_slow;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, ticks = 0;
  logic last_slow;

  cnn_clock_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cyc++;
    if (rst_n && tick) begin
      ticks++;
      checks += 2;
      if (last_tick >= 0 && cyc - last_tick != DIV) begin
        failures++;
        $display("FAIL tick spacing %0d", cyc - last_tick);
      end
      if (clk_slow == last_slow) begin
        failures++;
        $display("FAIL clk_slow did not toggle on tick");
      end
      last_tick = cyc;
    end else if (rst_n && clk_slow != last_slow) begin
      checks++;
      failures++;
      $display("FAIL clk_slow toggled without tick");
    end
    last_slow = clk_slow;
  end

  initial begin
    last_slow = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    checks++;
    if (ticks != 0) begin failures++; $display("FAIL tick while disabled"); end
    enable = 1;
    repeat (DIV * 40 + 5) @(negedge clk);
    checks++;
    if (ticks != 40) begin failures++; $display("FAIL %0d ticks, expected 40", ticks); end
    enable = 0;
    repeat (DIV * 3) @(negedge clk);
    checks++;
    if (ticks != 40) begin failures++; $display("FAIL tick while held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
