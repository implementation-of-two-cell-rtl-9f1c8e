// cnn_bram -- simple dual-port block RAM, one write port and one read port.
//
// DEPTH words of WIDTH bits. Port A writes 'wr_data' at 'wr_addr' on a clock
// edge with 'wr_en'; port B returns the word at 'rd_addr' one clock after a
// cycle with 'rd_en' (registered read, as a block RAM does) and holds it
// otherwise. Both ports work in the same cycle on different addresses; a
// read of the address being written returns the old word.
// The default 5120 x 16 bits is one 10 KB memory of the reference cache;
// the one-write / one-read port split is this design's choice. The array is
// not reset: its words are only read after they have been written.
module cnn_bram #(
  parameter int unsigned DEPTH = 5120,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A: write
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  // port B: read
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
