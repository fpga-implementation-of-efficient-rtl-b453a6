// tb_dft_pkg: reference arithmetic for the FFT testbenches, written
// independently of the RTL.
//
// dft() is a direct O(N^2) discrete Fourier transform in double precision,
// X(k) = sum_n x(n) exp(-j 2 pi n k / N). cmul_ref() is the exact result a
// constant twiddle multiplier must give: coefficients round(cos * 2^F) and
// round(-sin * 2^F), full-precision products, one round-half-up to the input
// scale.
package tb_dft_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef real rvec_t [];

  function automatic void dft(input real xr [], input real xi [],
                              output real yr [], output real yi []);
    int n;
    n  = xr.size();
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int m = 0; m < n; m++) begin
        real a;
        a = -2.0 * PI * real'(m * k) / real'(n);
        yr[k] += xr[m] * $cos(a) - xi[m] * $sin(a);
        yi[k] += xr[m] * $sin(a) + xi[m] * $cos(a);
      end
    end
  endfunction

  function automatic longint rnd_coef(input real v, input int frac);
    return longint'($floor(v * real'(longint'(1) << frac) + 0.5));
  endfunction

  // floor division by 2^f of a signed value (arithmetic shift)
  function automatic longint asr(input longint v, input int f);
    return v >>> f;
  endfunction

  function automatic void cmul_ref(input longint ar, input longint ai,
                                   input int k, input int n, input int frac,
                                   output longint yr, output longint yi);
    longint cr, ci, pr, pi;
    real a;
    a  = 2.0 * PI * real'(k) / real'(n);
    cr = rnd_coef($cos(a), frac);
    ci = rnd_coef(-$sin(a), frac);
    pr = ar * cr - ai * ci;
    pi = ar * ci + ai * cr;
    yr = asr(pr + (longint'(1) << (frac - 1)), frac);
    yi = asr(pi + (longint'(1) << (frac - 1)), frac);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
