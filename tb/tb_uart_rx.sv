// tb_uart_rx -- drives 8N1 frames at 16 clocks per bit and checks that every
// byte arrives once with 'valid', that a frame with a low stop bit is
// dropped with 'frame_err', and that a short glitch starts no frame.
module tb_uart_rx;
  localparam int CPB = 16;

  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0, got = 0, errs = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (valid) begin got++; last = data; end
    if (frame_err) errs++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = stop;
    repeat (CPB) @(negedge clk);
    rxd = 1;
    repeat (CPB) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      logic [7:0] b;
      int g0;
      b = (i < 256) ? 8'(i) : 8'($urandom);
      g0 = got;
      send(b, 1'b1);
      checks += 2;
      if (got != g0 + 1) begin failures++; $display("FAIL byte %h not received once", b); end
      if (last != b) begin failures++; $display("FAIL got %h expected %h", last, b); end
    end
    begin
      int g0, e0;
      g0 = got; e0 = errs;
      send(8'hA5, 1'b0);
      repeat (2 * CPB) @(negedge clk);
      checks += 2;
      if (got != g0) begin failures++; $display("FAIL bad frame delivered"); end
      if (errs != e0 + 1) begin failures++; $display("FAIL no frame error"); end
      // glitch shorter than half a bit
      rxd = 0;
      repeat (CPB / 4) @(negedge clk);
      rxd = 1;
      repeat (12 * CPB) @(negedge clk);
      checks++;
      if (got != g0 || errs != e0 + 1) begin failures++; $display("FAIL glitch started a frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
