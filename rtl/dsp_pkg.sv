// dsp_pkg: elaboration-time helpers for the FFT and DCT sub-accelerators.
//
// cos_r/sin_r evaluate a Taylor series on reals; they are only ever called
// in constant expressions, to compute the fixed-point twiddle factors and
// DCT coefficients, so no trigonometric table has to be typed in or read
// from a file. Coefficients are Q1.14: an integer c stands for c/2^14.
package dsp_pkg;
  localparam real PI = 3.14159265358979323846;
  localparam int  COEF_FRAC = 14;           // fraction bits of a coefficient
  localparam real COEF_ONE  = 16384.0;      // 2**COEF_FRAC

  function automatic real cos_r(input real x);
    real y, term, sum;
    // reduce to [-pi, pi] so that the series converges quickly
    y = x;
    while (y > PI)  y = y - 2.0 * PI;
    while (y < -PI) y = y + 2.0 * PI;
    term = 1.0;
    sum  = 1.0;
    for (int k = 1; k < 24; k++) begin
      term = -term * y * y / real'((2*k - 1) * (2*k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic real sin_r(input real x);
    return cos_r(x - PI / 2.0);
  endfunction

  // Nearest Q1.14 integer of a real coefficient.
  function automatic int to_coef(input real v);
    return int'(v * COEF_ONE);
  endfunction

  // Index k with its LOG low bits reversed.
  function automatic int unsigned bit_reverse(input int unsigned k, input int unsigned log_n);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < log_n; b++) r = (r << 1) | ((k >> b) & 1);
    return r;
  endfunction
endpackage
