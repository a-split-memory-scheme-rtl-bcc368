// fft_pkg: constants, types and helper functions shared by the split-memory
// FFT processor.
//
// The processor keeps complex samples as {re, im} pairs of two's-complement
// integers and twiddle coefficients as {re, im} pairs of signed fixed-point
// numbers with TW_FRAC(CW) fraction bits (Q2.(CW-2): +1.0 is representable).
// The coefficient ROM contents are computed here at elaboration time from
// W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N), rounded to nearest.
package fft_pkg;

  localparam real PI = 3.14159265358979323846;

  // Phase of the control unit: filling a RAM set with new samples (while
  // the previous result may be read out of the other set), or running the
  // log2(N) butterfly stages.
  typedef enum logic {
    PH_LOAD    = 1'b0,
    PH_COMPUTE = 1'b1
  } phase_e;

  // Number of fraction bits of a CW-bit coefficient: two integer bits so that
  // W^0 = 1.0 fits.
  function automatic int tw_frac(input int cw);
    return cw - 2;
  endfunction

  // Round a real value to the nearest integer (halves away from zero).
  function automatic longint round_real(input real v);
    if (v >= 0.0) return longint'($rtoi(v + 0.5));
    else          return -longint'($rtoi(-v + 0.5));
  endfunction

  // Real and imaginary part of W_N^k quantised to `frac` fraction bits.
  function automatic longint twiddle_re(input int n, input int k, input int frac);
    return round_real($cos(2.0 * PI * real'(k) / real'(n)) * real'(longint'(1) << frac));
  endfunction

  function automatic longint twiddle_im(input int n, input int k, input int frac);
    return round_real(-$sin(2.0 * PI * real'(k) / real'(n)) * real'(longint'(1) << frac));
  endfunction

endpackage
