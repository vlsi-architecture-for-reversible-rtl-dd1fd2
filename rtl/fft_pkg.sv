// fft_pkg: constants and helpers shared by the reversible-gate radix-2 FFT.
//
// method_e selects which reversible gate family builds the butterfly
// adders: METHOD_DKG (programmable DKG adder/subtractor, the main design) or
// METHOD_PERES_TR (Peres-gate ripple adder plus TR-gate ripple subtractor).
// tw_cos / tw_sin give the fixed-point twiddle constants
// W_M^k = cos(2*pi*k/M) - j*sin(2*pi*k/M), rounded to nearest at `frac`
// fractional bits; they are evaluated only at elaboration time. clog2 of the
// point count and the twiddle scaling are this design's own choices.
package fft_pkg;

  typedef enum logic {
    METHOD_DKG      = 1'b0,
    METHOD_PERES_TR = 1'b1
  } method_e;

  localparam real PI = 3.14159265358979323846;

  function automatic int round_real(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // Real part of W_M^k, scaled by 2^frac.
  function automatic int tw_cos(int k, int m, int frac);
    return round_real($cos(2.0 * PI * k / m) * (2.0 ** frac));
  endfunction

  // Magnitude of the negated imaginary part of W_M^k (W = c - j*s), scaled.
  function automatic int tw_sin(int k, int m, int frac);
    return round_real($sin(2.0 * PI * k / m) * (2.0 ** frac));
  endfunction

  // Index i with its low `bits` bits in reverse order (DIT input order).
  function automatic int bitrev(int i, int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) r = (r << 1) | ((i >> b) & 1);
    return r;
  endfunction

endpackage
