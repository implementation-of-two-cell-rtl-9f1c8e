// tb_cnn_ref_pkg -- floating-point reference of the discrete-time two-cell
// CNN, used by the testbenches to check the fixed-point hardware.
//
// ref_next evaluates the cell equation in its original form
//   x[n+1] = ( x[n]/T + c1 f(x1) + c2 f(x2) + u ) / (1 + 1/T)
// with f(x) = 0.5 (|x+1| - |x-1|), and ideal_g the drive A sin(2 pi n T / 4),
// all in double precision. Values cross the boundary as Q3.12 integers.
package tb_cnn_ref_pkg;

  localparam real SCALE = 4096.0;
  localparam real PI    = 3.14159265358979323846;

  function automatic real q2r(input int v);
    return real'(v) / SCALE;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real fpwl(input real x);
    return 0.5 * (rabs(x + 1.0) - rabs(x - 1.0));
  endfunction

  // one cell update, all arguments and the result in real units
  function automatic real ref_next(input real xself, input real x1, input real x2,
                                   input real c1, input real c2, input real u,
                                   input real t);
    return (xself / t + c1 * fpwl(x1) + c2 * fpwl(x2) + u) / (1.0 + 1.0 / t);
  endfunction

  // ideal sinusoidal drive g[n] = A sin(2 pi n T / 4)
  function automatic real ideal_g(input longint n, input real t, input real a);
    return a * $sin(2.0 * PI * real'(n) * t / 4.0);
  endfunction

  // distance in Q3.12 codes between a hardware value and a real reference
  function automatic real lsb_err(input int hw, input real ref_v);
    return rabs(real'(hw) - ref_v * SCALE);
  endfunction

endpackage
