// tb_uart_tx -- sends bytes at 16 clocks per bit and decodes 'txd' in the
// testbench: start bit low, eight data bits LSB first, stop bit high, each
// exactly 16 clocks long; 'ready' low for the 10-bit frame, the line high
// between frames.
module tb_uart_tx;
  localparam int CPB = 16;

  logic clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic send_and_decode(input logic [7:0] b);
    logic [7:0] rx;
    int busy_cycles = 0;
    while (!ready) @(negedge clk);
    data = b; valid = 1;
    @(negedge clk);
    valid = 0; data = ~b;
    // now in the first cycle of the start bit; sample at bit centres
    repeat (CPB / 2 - 1) @(negedge clk);
    chk(txd == 0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      rx[i] = txd;
    end
    repeat (CPB) @(negedge clk);
    chk(txd == 1, "stop bit");
    chk(rx == b, $sformatf("data %h decoded as %h", b, rx));
    // ready comes back when the stop bit ends
    while (!ready) begin @(negedge clk); busy_cycles++; end
    chk(busy_cycles == CPB / 2 + 1, $sformatf("frame length, tail %0d", busy_cycles));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(ready && txd, "idle line");
    for (int i = 0; i < 200; i++) send_and_decode((i < 4) ? 8'(8'h55 << i) : 8'($urandom));
    repeat (3 * CPB) @(negedge clk);
    chk(txd == 1, "line idles high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
