// fft16_pkg: constants and helper functions shared by the 16-point FFT.
//
// The FFT takes and returns 8-bit two's complement samples (the width the
// design is specified with). Inside, every value carries FRAC_W fraction
// bits and enough integer headroom that no add, subtract or twiddle product
// of a 16-point transform can overflow: a 16-point DFT of 8-bit samples grows
// by at most 16 * sqrt(2) < 2^5 in each component. The fraction bits, the
// headroom rule and the twiddle precision are this design's own choices.
//
// Twiddle factors W_N^k = exp(-j*2*pi*k/N) are stored as signed fixed-point
// numbers with TW_FRAC fraction bits (1.0 = 2^TW_FRAC). They are computed at
// elaboration time from cos/sin, so no coefficient table is kept in a file.
package fft16_pkg;

  // Sample width at the FFT ports.
  localparam int unsigned DATA_W_DEF = 8;
  // Fraction bits carried inside the datapath.
  localparam int unsigned FRAC_W_DEF = 4;
  // Integer growth bits of a 16-point transform (16 * sqrt(2) < 32).
  localparam int unsigned GROWTH_W   = 5;
  // Internal word width for the default configuration.
  localparam int unsigned INT_W_DEF  = DATA_W_DEF + GROWTH_W + FRAC_W_DEF;
  // Fraction bits of a twiddle coefficient (0.7071 -> 724/1024).
  localparam int unsigned TW_FRAC_DEF = 10;

  localparam real PI = 3.14159265358979323846;

  // Real part of W_N^k in fixed point: round(cos(2*pi*k/N) * 2^frac).
  function automatic int tw_re(input int k, input int n, input int frac);
    real a;
    a = 2.0 * PI * real'(k) / real'(n);
    return int'($floor($cos(a) * real'(1 << frac) + 0.5));
  endfunction

  // Imaginary part of W_N^k in fixed point: round(-sin(2*pi*k/N) * 2^frac).
  function automatic int tw_im(input int k, input int n, input int frac);
    real a;
    a = 2.0 * PI * real'(k) / real'(n);
    return int'($floor(-$sin(a) * real'(1 << frac) + 0.5));
  endfunction

  // Reverse the low `bits` bits of i (bit-reversed sample order).
  function automatic int bitrev(input int i, input int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) r = (r << 1) | ((i >> b) & 1);
    return r;
  endfunction

endpackage
