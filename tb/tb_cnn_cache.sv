// tb_cnn_cache -- checks the two-memory state cache: state pairs written
// through port A read back through port B by the circuit and by the host;
// the circuit's read has priority, a blocked host request is granted as soon
// as port B is free, and h_rd_valid flags the host's data one cycle later.
module tb_cnn_cache;
  import cnn_pkg::*;
  localparam int DEPTH = 5120;
  localparam int AW = 13;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, c_rd_en = 0, h_rd_req = 0, h_rd_grant, h_rd_valid;
  logic [AW-1:0] wr_addr = '0, c_rd_addr = '0, h_rd_addr = '0;
  q3_12_t wr_x1 = '0, wr_x2 = '0, rd_x1, rd_x2;
  q3_12_t sh1 [DEPTH], sh2 [DEPTH];
  int checks = 0, failures = 0, blocked = 0;

  cnn_cache dut (.*);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a);
      wr_x1 = 16'($urandom); wr_x2 = 16'($urandom);
      sh1[a] = wr_x1; sh2[a] = wr_x2;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 5000; i++) begin
      int ca, ha;
      bit c_on, h_on;
      ca = $urandom_range(DEPTH - 1);
      ha = $urandom_range(DEPTH - 1);
      c_on = $urandom_range(1);
      h_on = $urandom_range(1);
      c_rd_en = c_on; c_rd_addr = AW'(ca);
      h_rd_req = h_on; h_rd_addr = AW'(ha);
      #1;
      chk(h_rd_grant == (h_on && !c_on), "grant");
      if (h_on && c_on) blocked++;
      @(negedge clk);
      c_rd_en = 0; h_rd_req = 0;
      chk(h_rd_valid == (h_on && !c_on), "valid");
      if (c_on) chk(rd_x1 == sh1[ca] && rd_x2 == sh2[ca], "circuit read data");
      else if (h_on) chk(rd_x1 == sh1[ha] && rd_x2 == sh2[ha], "host read data");
    end
    chk(blocked > 0, "host request blocked at least once");
    $display("host requests blocked by circuit reads: %0d", blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
