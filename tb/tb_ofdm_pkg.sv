// tb_ofdm_pkg: stimulus and reference model shared by the IFO testbenches.
//
// gen_preamble builds a long-preamble-like symbol: random QPSK (+-a +-ja)
// on the even sub-carriers 2..100 and 156..254, zero elsewhere.
// make_rx applies a cyclic shift by eps' sub-carriers, a common phase, a
// linear phase ramp (residual timing offset) and optional uniform noise,
// then quantises to Q1.15. ref_estimate is a straight evaluation of
//   V_eps' = sum_r P4(r) * norm(conj(X(r-2-eps')) X(r-eps'))
// over the used pilots r, P4 being conj(Y(r-2))Y(r) in Q1.15 cut to Q1.F,
// followed by argmax of |Re|+|Im| with the first maximum winning. It uses
// the sub-carrier indices directly and knows nothing of the folded layout.
// pil_entry gives the value the folded PilReg layout stores at (side, e).
package tb_ofdm_pkg;

  localparam int NSC = 256;

  typedef struct {
    int re;
    int im;
  } cplx_t;

  function automatic bit is_pilot(int k);
    return (k % 2 == 0) && ((k >= 2 && k <= 100) || (k >= 156 && k <= 254));
  endfunction

  function automatic bit is_used(int k);
    return (k % 4 == 0) && ((k >= 4 && k <= 100) || (k >= 156 && k <= 252));
  endfunction

  function automatic int wrap(int k);
    return ((k % NSC) + NSC) % NSC;
  endfunction

  function automatic void gen_preamble(output cplx_t x[NSC], input int amp);
    for (int k = 0; k < NSC; k++) begin
      if (is_pilot(k)) begin
        x[k].re = ($urandom % 2) ? amp : -amp;
        x[k].im = ($urandom % 2) ? amp : -amp;
      end else begin
        x[k].re = 0;
        x[k].im = 0;
      end
    end
  endfunction

  function automatic int sgn(longint v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  // normalised conj(a)*b
  function automatic cplx_t norm_corr(cplx_t a, cplx_t b);
    longint re, im;
    cplx_t r;
    re = longint'(a.re) * b.re + longint'(a.im) * b.im;
    im = longint'(a.re) * b.im - longint'(a.im) * b.re;
    r.re = sgn(re);
    r.im = sgn(im);
    return r;
  endfunction

  function automatic cplx_t pil_entry(cplx_t x[NSC], int side, int e);
    int b;
    b = (side == 0) ? 4 * e - 24 : 4 * e + 128;
    return norm_corr(x[wrap(b - 2)], x[wrap(b)]);
  endfunction

  function automatic int clip16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic void make_rx(output cplx_t y[NSC], input cplx_t x[NSC],
                                  input int eps, input real phase,
                                  input real tau, input int noise);
    real c, s, ang;
    for (int k = 0; k < NSC; k++) begin
      cplx_t xs;
      xs = x[wrap(k - eps)];
      ang = phase - 2.0 * 3.141592653589793 * tau * k / NSC;
      c = $cos(ang);
      s = $sin(ang);
      y[k].re = clip16(longint'($rtoi(xs.re * c - xs.im * s)) +
                       ((noise > 0) ? (int'($urandom % (2 * noise + 1)) - noise) : 0));
      y[k].im = clip16(longint'($rtoi(xs.re * s + xs.im * c)) +
                       ((noise > 0) ? (int'($urandom % (2 * noise + 1)) - noise) : 0));
    end
  endfunction

  // Frequency-selective channel: taps at (fractional) sample delays d[l]
  // with mean powers p_db[l], Rayleigh gains (normalised to unit mean total
  // power). Returns H(k) for all sub-carriers as real/imag arrays.
  function automatic void rand_channel(output real hre[NSC], output real him[NSC],
                                       input real d[3], input real p_db[3]);
    real gre[3], gim[3], tot, u1, u2, r, ang;
    tot = 0.0;
    for (int l = 0; l < 3; l++) tot += $pow(10.0, p_db[l] / 10.0);
    for (int l = 0; l < 3; l++) begin
      u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
      u2 = real'($urandom % 1000000) / 1000000.0;
      r = $sqrt(-1.0 * $ln(u1) * $pow(10.0, p_db[l] / 10.0) / tot);
      gre[l] = r * $cos(6.283185307179586 * u2);
      gim[l] = r * $sin(6.283185307179586 * u2);
    end
    for (int k = 0; k < NSC; k++) begin
      hre[k] = 0.0;
      him[k] = 0.0;
      for (int l = 0; l < 3; l++) begin
        ang = -6.283185307179586 * real'(k) * d[l] / NSC;
        hre[k] += gre[l] * $cos(ang) - gim[l] * $sin(ang);
        him[k] += gre[l] * $sin(ang) + gim[l] * $cos(ang);
      end
    end
  endfunction

  // conj(a)*b in Q1.15, saturated, as the top F+1 bits (Q1.F)
  function automatic cplx_t ref_p4(cplx_t a, cplx_t b, int f);
    longint re, im;
    cplx_t r;
    re = longint'(a.re) * b.re + longint'(a.im) * b.im;
    im = longint'(a.re) * b.im - longint'(a.im) * b.re;
    re = re >>> 15;
    im = im >>> 15;
    r.re = clip16(re) >>> (15 - f);
    r.im = clip16(im) >>> (15 - f);
    return r;
  endfunction

  function automatic void ref_corr(input cplx_t y[NSC], input cplx_t x[NSC],
                                   input int f, output longint vre[8],
                                   output longint vim[8]);
    for (int j = 0; j < 8; j++) begin
      vre[j] = 0;
      vim[j] = 0;
    end
    for (int r = 0; r < NSC; r++) begin
      if (is_used(r)) begin
        cplx_t p, u;
        p = ref_p4(y[r - 2], y[r], f);
        for (int j = 0; j < 8; j++) begin
          u = norm_corr(x[wrap(r - 2 - 4 * j)], x[wrap(r - 4 * j)]);
          vre[j] += u.re * p.re + u.im * p.im;
          vim[j] += u.re * p.im - u.im * p.re;
        end
      end
    end
  endfunction

  function automatic int ref_argmax(longint vre[8], longint vim[8]);
    longint best, m;
    int idx;
    best = -1;
    idx = 0;
    for (int j = 0; j < 8; j++) begin
      m = ((vre[j] < 0) ? -vre[j] : vre[j]) + ((vim[j] < 0) ? -vim[j] : vim[j]);
      if (m > best) begin
        best = m;
        idx = j;
      end
    end
    return idx;
  endfunction

endpackage
