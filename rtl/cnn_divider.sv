// cnn_divider -- sequential unsigned restoring divider.
//
// Computes quotient = dividend / divisor and the remainder, one quotient bit
// per clock, most significant bit first. A 'start' pulse loads the operands;
// 'done' pulses exactly NUM_W clock cycles later with the results valid, and
// they stay valid until the next start. 'busy' is high in between; a start
// while busy is ignored. A zero divisor gives an all-ones quotient.
// The core uses it for the division by a = 1 + 1/T of the state update; a
// bit-serial restoring divider is this design's choice of divider.
module cnn_divider #(
  parameter int unsigned NUM_W = 39,  // dividend and quotient width
  parameter int unsigned DEN_W = 18   // divisor width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] dividend,
  input  logic [DEN_W-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quotient,
  output logic [DEN_W-1:0] remainder
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] num_q;   // dividend bits still to shift in / quotient bits
  logic [DEN_W-1:0] den_q;
  logic [DEN_W:0]   rem_q;   // one spare bit for the trial subtraction
  logic [CNT_W-1:0] cnt_q;

  logic [DEN_W:0] rem_shift;
  logic [DEN_W:0] rem_trial;
  logic           fits;

  always_comb begin
    rem_shift = {rem_q[DEN_W-1:0], num_q[NUM_W-1]};
    rem_trial = rem_shift - {1'b0, den_q};
    fits      = (rem_shift >= {1'b0, den_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q <= '0;
      den_q <= '0;
      rem_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num_q <= dividend;
        den_q <= divisor;
        rem_q <= '0;
        cnt_q <= CNT_W'(NUM_W);
        busy  <= 1'b1;
      end else if (busy) begin
        rem_q <= fits ? rem_trial : rem_shift;
        num_q <= {num_q[NUM_W-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = num_q;
  assign remainder = rem_q[DEN_W-1:0];

endmodule
