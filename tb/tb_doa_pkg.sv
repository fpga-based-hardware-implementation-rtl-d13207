// tb_doa_pkg - reference arithmetic shared by the DOA pipeline testbenches.
//
// Complex numbers in double precision, fixed-point conversion helpers, and
// a generator of ULA snapshots following the narrowband far-field model
// x_m(t) = sum_k s_k(t) exp(-j pi m cos(theta_k)) + n_m(t), m = 0..M-1
// (half-wavelength spacing), with unit-amplitude sources of independent
// random phase and uniform noise of a given power per element.
package tb_doa_pkg;

  typedef struct {
    real re;
    real im;
  } cplx_t;

  localparam real PI = 3.14159265358979323846;

  function automatic cplx_t cx(real re, real im);
    cplx_t c;
    c.re = re; c.im = im;
    return c;
  endfunction
  function automatic cplx_t cadd(cplx_t a, cplx_t b); return cx(a.re + b.re, a.im + b.im); endfunction
  function automatic cplx_t csub(cplx_t a, cplx_t b); return cx(a.re - b.re, a.im - b.im); endfunction
  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    return cx(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction
  function automatic cplx_t cconj(cplx_t a); return cx(a.re, -a.im); endfunction
  function automatic cplx_t cscale(cplx_t a, real s); return cx(a.re * s, a.im * s); endfunction
  function automatic real cabs2(cplx_t a); return a.re * a.re + a.im * a.im; endfunction
  function automatic cplx_t cdiv(cplx_t a, cplx_t b);
    real d;
    d = cabs2(b);
    return cx((a.re * b.re + a.im * b.im) / d, (a.im * b.re - a.re * b.im) / d);
  endfunction
  // Principal square root (real part >= 0).
  function automatic cplx_t csqrt(cplx_t z);
    real m, r, i;
    m = $sqrt(cabs2(z));
    r = $sqrt((m + z.re) / 2.0);
    i = $sqrt(((m - z.re) / 2.0 > 0.0) ? (m - z.re) / 2.0 : 0.0);
    if (z.im < 0.0) i = -i;
    return cx(r, i);
  endfunction

  // Real value -> fixed point with frac fraction bits, saturated to wl bits.
  function automatic int to_fx(real v, int frac, int wl);
    real s;
    int  q, lim;
    s   = v * (2.0 ** frac);
    q   = (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
    lim = (1 << (wl - 1)) - 1;
    if (q > lim) q = lim;
    if (q < -lim - 1) q = -lim - 1;
    return q;
  endfunction
  function automatic real from_fx(longint v, int frac);
    return real'(v) / (2.0 ** frac);
  endfunction

  // Uniform random real in [-1, 1).
  function automatic real urand();
    return (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
  endfunction

  // One snapshot of element m for K sources at angles th_deg (degrees).
  // ph holds each source's phase for this snapshot; sigma is the noise rms.
  function automatic cplx_t ula_sample(int m, int nsrc, real th_deg[2], real ph[2], real sigma);
    cplx_t x;
    real   a;
    x = cx(0.0, 0.0);
    for (int k = 0; k < nsrc; k++) begin
      a = ph[k] - PI * m * $cos(th_deg[k] * PI / 180.0);
      x = cadd(x, cx($cos(a), $sin(a)));
    end
    // uniform noise on [-sqrt(3), sqrt(3)) has unit variance per component
    x = cadd(x, cx(sigma * 1.7320508 * urand() / 1.4142136, sigma * 1.7320508 * urand() / 1.4142136));
    return x;
  endfunction

endpackage
