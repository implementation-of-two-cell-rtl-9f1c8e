// cnn_clock_gen -- low-frequency iteration clock from the 50 MHz board clock.
//
// A 32-bit counter runs from 0 to DIV-1 on the board clock. When it wraps it
// emits a one-cycle 'tick', the clock enable that starts one iteration of the
// model, and toggles 'clk_slow', a square wave of frequency f_clk / (2*DIV)
// that can be brought to a pin. 'enable' low holds the counter. With the
// default DIV = 50 the iteration rate is 1 MHz.
// The divider function follows the reference design; the divide ratio and
// the use of a clock enable (the whole core stays on the board clock) are
// this design's choices.
module cnn_clock_gen #(
  parameter int unsigned DIV = 50   // board-clock cycles per tick, >= 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic tick,
  output logic clk_slow
);

  logic [31:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      tick     <= 1'b0;
      clk_slow <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (enable) begin
        if (cnt_q == 32'(DIV - 1)) begin
          cnt_q    <= '0;
          tick     <= 1'b1;
          clk_slow <= ~clk_slow;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
