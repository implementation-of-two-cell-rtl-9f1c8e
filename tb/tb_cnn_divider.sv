// tb_cnn_divider -- random and corner-case divisions against the '/' and '%'
// operators, and the latency: 'done' must come NUM_W cycles after 'start'.
module tb_cnn_divider;
  localparam int unsigned NUM_W = 39;
  localparam int unsigned DEN_W = 18;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NUM_W-1:0] dividend = '0, quotient;
  logic [DEN_W-1:0] divisor = 18'd1, remainder;
  logic busy, done;
  int checks = 0, failures = 0;

  cnn_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [NUM_W-1:0] n, input logic [DEN_W-1:0] d);
    int cycles = 0;
    @(negedge clk);
    dividend = n; divisor = d; start = 1;
    @(negedge clk);
    start = 0;
    dividend = '1; divisor = '1;     // operands must have been sampled
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks += 3;
    if (quotient != n / d) begin
      failures++;
      $display("FAIL q %0d/%0d = %0d got %0d", n, d, n / d, quotient);
    end
    if (remainder != n % d) begin
      failures++;
      $display("FAIL r %0d %% %0d = %0d got %0d", n, d, n % d, remainder);
    end
    if (cycles != NUM_W) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, NUM_W);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(39'd0, 18'd4116);
    run(39'd4116, 18'd4116);
    run({1'b0, {38{1'b1}}}, 18'd4096);
    run({NUM_W{1'b1}}, 18'd1);
    run(39'd123456789, 18'd262143);
    for (int i = 0; i < 300; i++) begin
      logic [NUM_W-1:0] n;
      logic [DEN_W-1:0] d;
      n = {$urandom, $urandom} & {NUM_W{1'b1}};
      n = n >> ($urandom % 30);
      d = DEN_W'($urandom);
      if (d == 0) d = 1;
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
