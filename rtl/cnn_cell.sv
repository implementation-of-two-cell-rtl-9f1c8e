// cnn_cell -- state update of one cell of the discrete-time chaotic CNN.
//
// Computes one step of the discretised cell equation
//   x[n+1] = ( x[n]/T + c1*f(x1[n]) + c2*f(x2[n]) + u[n] ) / a,  a = 1 + 1/T
// in the algebraically equal form
//   x[n+1] = ( x[n] + T*(c1*f1 + c2*f2 + u) ) / (1 + T),
// which needs one multiplication by T and one division by 1 + T instead of
// two divisions. Cell 1 uses c1 = p, c2 = -s, u = g[n]; cell 2 uses c1 = s,
// c2 = p, u = 0. All ports are Q3.12.
//
// Internals: the weighted sum is formed exactly in Q.24 (34 bits); the
// product with T is rounded back to Q.24; the numerator x + T*sum (Q.24) is
// divided by 1 + T (Q.12) in a bit-serial divider, rounding the magnitude to
// the nearest Q3.12 code, and the result saturates to the Q3.12 range.
// Timing: operands are sampled at 'start'; 'done' pulses DIV_W + 1 = 40
// cycles later with x_next valid, which then holds until the next done.
// The equation follows the reference model; the rearranged form, internal
// widths, rounding and saturation are this design's choices. T is taken as
// positive.
module cnn_cell
  import cnn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  q3_12_t x_self,  // x_i[n]
  input  q3_12_t f1,      // f(x1[n])
  input  q3_12_t f2,      // f(x2[n])
  input  q3_12_t c1,      // weight of f(x1)
  input  q3_12_t c2,      // weight of f(x2)
  input  q3_12_t u,       // external input (g[n] for cell 1)
  input  q3_12_t t_step,  // sampling period T
  output logic   busy,
  output logic   done,
  output q3_12_t x_next   // x_i[n+1]
);

  localparam int unsigned DIV_W = 39;
  localparam int unsigned DEN_W = 18;

  logic signed [31:0] prod1;      // c1 * f1, Q.24
  logic signed [31:0] prod2;      // c2 * f2, Q.24
  logic signed [33:0] acc;        // c1*f1 + c2*f2 + u, Q.24
  logic signed [49:0] t_acc;      // T * acc, Q.36
  logic signed [49:0] t_acc_rnd;  // rounded to Q.24
  logic signed [38:0] num;        // x + T*acc, Q.24
  logic        [37:0] num_mag;
  logic        [DIV_W-1:0] dividend;
  logic        [DEN_W-1:0] den;

  always_comb begin
    prod1     = c1 * f1;
    prod2     = c2 * f2;
    acc       = 34'(prod1) + 34'(prod2) + (34'(u) <<< FRAC_W);
    t_acc     = 50'(t_step) * 50'(acc);
    t_acc_rnd = (t_acc + 50'sd2048) >>> FRAC_W;
    num       = (39'(x_self) <<< FRAC_W) + 39'(t_acc_rnd);
    num_mag   = num[38] ? 38'(-num) : 38'(num);
    dividend  = {num_mag, 1'b0};               // 2|num|: one extra bit for rounding
    den       = DEN_W'(Q_ONE) + DEN_W'($unsigned(t_step));
  end

  logic              neg_q;
  logic              div_done;
  logic [DIV_W-1:0]  quot2;
  logic [DEN_W-1:0]  unused_rem;
  logic [DIV_W-1:0]  q_mag;
  logic [DIV_W:0]    q_signed;    // two's complement of the rounded quotient
  q3_12_t            q_sat;

  cnn_divider #(.NUM_W(DIV_W), .DEN_W(DEN_W)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .dividend (dividend),
    .divisor  (den),
    .busy     (busy),
    .done     (div_done),
    .quotient (quot2),
    .remainder(unused_rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 neg_q <= 1'b0;
    else if (start && !busy)    neg_q <= num[38];
  end

  always_comb begin
    q_mag    = (quot2 + 1'b1) >> 1;                 // round half up in magnitude
    q_signed = neg_q ? -{1'b0, q_mag} : {1'b0, q_mag};
    if (!neg_q && q_mag > DIV_W'(32767))      q_sat = 16'sh7FFF;
    else if (neg_q && q_mag > DIV_W'(32768))  q_sat = -16'sh8000;
    else                                      q_sat = q_signed[15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_next <= '0;
      done   <= 1'b0;
    end else begin
      done <= div_done;
      if (div_done) x_next <= q_sat;
    end
  end

endmodule
