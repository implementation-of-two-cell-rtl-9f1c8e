// tb_cnn_pwl -- checks the nonlinearity f(x) = 0.5(|x+1| - |x-1|) for every
// one of the 65536 Q3.12 codes against the formula evaluated in integers.
module tb_cnn_pwl;
  import cnn_pkg::*;

  q3_12_t x, y;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0, linear = 0;

  cnn_pwl dut (.x(x), .y(y));

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v <= 32767; v++) begin
      int expected;
      x = 16'(v);
      #1;
      expected = (iabs(v + 4096) - iabs(v - 4096)) / 2;
      checks++;
      if (int'(y) != expected) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d expected=%0d", v, y, expected);
      end
      if (expected == 4096 && v > 4096) sat_hi++;
      else if (expected == -4096 && v < -4096) sat_lo++;
      else linear++;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || linear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
