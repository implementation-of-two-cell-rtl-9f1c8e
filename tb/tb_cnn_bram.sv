// tb_cnn_bram -- checks the 5120 x 16 dual-port memory against a shadow
// array: a full write/read sweep, random traffic with a write and a read
// in the same cycle, read-during-write of the same address (old word), the
// one-cycle read latency and that rd_data holds without rd_en.
module tb_cnn_bram;
  localparam int DEPTH = 5120;
  localparam int AW = 13;

  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [15:0] wr_data = '0, rd_data;
  logic [15:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  cnn_bram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rd(input logic [15:0] v, input string what);
    checks++;
    if (rd_data !== v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, rd_data, v);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = 16'(a * 7 + 3);
      shadow[a] = 16'(a * 7 + 3);
      @(negedge clk);
    end
    wr_en = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      expect_rd(shadow[a], "sweep");
    end
    // random simultaneous write and read
    for (int i = 0; i < 20000; i++) begin
      int wa, ra;
      logic [15:0] old;
      wa = $urandom_range(DEPTH - 1);
      ra = (i % 10 == 0) ? wa : $urandom_range(DEPTH - 1);
      wr_en = 1; wr_addr = AW'(wa); wr_data = 16'($urandom);
      rd_en = 1; rd_addr = AW'(ra);
      old = shadow[ra];
      @(negedge clk);
      shadow[wa] = wr_data;
      expect_rd(old, (ra == wa) ? "read during write" : "random");
    end
    // hold without rd_en
    begin
      logic [15:0] held;
      wr_en = 0; rd_en = 0;
      held = rd_data;
      rd_addr = rd_addr + 1'b1;
      repeat (5) @(negedge clk);
      expect_rd(held, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
