// llrf_pkg: constants and constant functions shared by the LLRF board blocks.
//
// The functions are evaluated at elaboration only: sine_entry fills the DDS lookup tables and
// cordic_atan gives the CORDIC arctangent constants, so no table is stored as
// a list of numbers.
package llrf_pkg;

  localparam real PI = 3.14159265358979323846;

  // round(amp * sin(2*pi*k / 2^lut_w))
  function automatic int sine_entry(int k, int lut_w, int amp);
    real v;
    v = real'(amp) * $sin(2.0 * PI * real'(k) / real'(1 << lut_w));
    return int'(v);  // int' of a real rounds to nearest
  endfunction

  // round(atan(2^-i) / (2*pi) * 2^phase_w): CORDIC micro-rotation angle
  function automatic int cordic_atan(int i, int phase_w);
    real v;
    v = $atan(1.0 / real'(1 << i)) / (2.0 * PI) * real'(1 << phase_w);
    return int'(v);
  endfunction

  // round(2^frac / prod(sqrt(1 + 2^-2i))): inverse CORDIC gain
  function automatic int cordic_inv_gain(int iter, int frac);
    real k;
    k = 1.0;
    for (int i = 0; i < iter; i++) k = k * $sqrt(1.0 + 1.0 / real'(1 << (2 * i)));
    return int'(real'(1 << frac) / k);
  endfunction

endpackage
