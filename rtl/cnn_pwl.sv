// cnn_pwl -- CNN output nonlinearity f(x) = 0.5 * (|x + 1| - |x - 1|).
//
// For Q3.12 operands the piecewise-linear function is exactly a clamp of x
// to [-1, +1]: x passes through unchanged inside the band and saturates to
// +1.0 (4096) or -1.0 (-4096) outside it. The block is purely combinational.
// The formula is the reference model's; realising it as a clamp with two
// comparators instead of two absolute values is this design's choice.
module cnn_pwl
  import cnn_pkg::*;
(
  input  q3_12_t x,   // cell state, Q3.12
  output q3_12_t y    // f(x), Q3.12, in [-1, 1]
);

  always_comb begin
    if (x > Q_ONE)       y = Q_ONE;
    else if (x < -Q_ONE) y = -Q_ONE;
    else                 y = x;
  end

endmodule
