// fir_ref_pkg: floating-point reference taps for the converter testbenches,
// computed from their defining formulas (not from the RTL's tables):
// a square-root raised cosine of roll-off 0.25 at 2 samples per symbol,
// 21 taps, and a 15-tap Hamming-windowed halfband, both with unit DC gain.
//
// The filter types follow the reference design; roll-off, lengths and window
// are this design's own choices, repeated here independently.
package fir_ref_pkg;
  localparam real PI = 3.14159265358979;
  function automatic real srrc_t(input real t);
    real b = 0.25;
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if (t == 1.0 / (4.0 * b) || t == -1.0 / (4.0 * b))
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) /
           (PI * t * (1.0 - (4.0 * b * t) * (4.0 * b * t)));
  endfunction
  function automatic void srrc_taps(output real h [21]);
    real s = 0.0;
    for (int n = 0; n < 21; n++) begin h[n] = srrc_t(real'(n - 10) / 2.0); s += h[n]; end
    for (int n = 0; n < 21; n++) h[n] = h[n] / s;
  endfunction
  function automatic void hb_taps(output real h [15]);
    real s = 0.0;
    for (int n = 0; n < 15; n++) begin
      real m = real'(n - 7);
      real v = (n == 7) ? 0.5 : $sin(PI * m / 2.0) / (PI * m);
      h[n] = v * (0.54 - 0.46 * $cos(2.0 * PI * real'(n) / 14.0));
      s += h[n];
    end
    for (int n = 0; n < 15; n++) h[n] = h[n] / s;
  endfunction
endpackage
