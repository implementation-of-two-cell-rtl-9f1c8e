// cnn_cache -- state history memory of the CNN core ("CNN cache").
//
// Two dual-port block RAMs of DEPTH x 16 bits (10 KB each at the default
// 5120 words, 20 KB together), one per state variable: x1[n] and x2[n] are
// stored at the same address n mod DEPTH. The CNN circuit writes each new
// state pair through port A and reads the previous pair back through port B.
// The host link reads the history through port B too. Port B is shared with a
// fixed priority: a circuit read (c_rd_en) always wins; a host request
// (h_rd_req) is granted in a cycle without a circuit read (h_rd_grant, a
// combinational answer), and its data is valid in the next cycle, flagged by
// h_rd_valid. A circuit read's data is valid in the cycle after c_rd_en.
// Size and the dual-port organisation follow the reference design; the
// sharing of port B and its priority are this design's choices.
module cnn_cache
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH  = 5120,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // circuit write (port A)
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  q3_12_t            wr_x1,
  input  q3_12_t            wr_x2,
  // circuit read (port B, priority)
  input  logic              c_rd_en,
  input  logic [ADDR_W-1:0] c_rd_addr,
  // host read (port B)
  input  logic              h_rd_req,
  input  logic [ADDR_W-1:0] h_rd_addr,
  output logic              h_rd_grant,
  output logic              h_rd_valid,
  // read data, shared by both readers
  output q3_12_t            rd_x1,
  output q3_12_t            rd_x2
);

  logic              rd_en;
  logic [ADDR_W-1:0] rd_addr;

  always_comb begin
    h_rd_grant = h_rd_req && !c_rd_en;
    rd_en      = c_rd_en || h_rd_req;
    rd_addr    = c_rd_en ? c_rd_addr : h_rd_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_rd_valid <= 1'b0;
    else        h_rd_valid <= h_rd_grant;
  end

  cnn_bram #(.DEPTH(DEPTH), .WIDTH(WORD_W), .ADDR_W(ADDR_W)) u_bram_x1 (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_x1),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_x1)
  );

  cnn_bram #(.DEPTH(DEPTH), .WIDTH(WORD_W), .ADDR_W(ADDR_W)) u_bram_x2 (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_x2),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_x2)
  );

endmodule
