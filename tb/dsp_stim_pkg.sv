// dsp_stim_pkg: stimulus for the filter testbenches.
//
// sig_sample(n): a test signal standing in for audio, the sum of a slow and a
// fast sinusoid plus pseudo-random noise, in single precision and never zero.
//
// fir_coef(order, kind, k): coefficient b_k of a linear-phase FIR filter of the
// given order designed by the window method with a Hamming window,
// h(k) = w(k) * d(k - order/2), where d is the ideal impulse response of a
// low pass (kind 0), high pass (1), band pass (2) or band stop (3) filter with
// cut-off (or centre) frequency 0.2 of the Nyquist frequency; band edges of the
// band filters are 0.1 and 0.3. No gain normalisation is applied.
//
// sos_coef(section, kind): coefficients of one stable second-order section
// with poles at radius r and angle t (a1 = 2 r cos t, a2 = -r^2) and a zero
// pair on the unit circle at angle z (b0 = g, b1 = -2 g cos z, b2 = g).
package dsp_stim_pkg;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic fp32_t sig_sample(int n);
    real v;
    int unsigned h;
    h = (32'(n) * 32'd1103515245 + 32'd12345);
    v = 0.5 * $sin(2.0 * PI * 0.031 * n) + 0.3 * $sin(2.0 * PI * 0.27 * n)
      + 0.05 * ((real'(h[23:8]) / 65536.0) - 0.5);
    if (v == 0.0) v = 1.0e-3;
    return real_to_sp(v);
  endfunction

  function automatic real sinc_lp(real fc, real m);
    // Ideal low pass impulse response, cut-off fc (fraction of Nyquist).
    if (m == 0.0) return fc;
    return $sin(PI * fc * m) / (PI * m);
  endfunction

  function automatic fp32_t fir_coef(int order, int kind, int k);
    real m, w, d;
    m = real'(k) - real'(order) / 2.0;
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(order));
    case (kind)
      0:       d = sinc_lp(0.2, m);
      1:       d = ((m == 0.0) ? 1.0 : 0.0) - sinc_lp(0.2, m);
      2:       d = sinc_lp(0.3, m) - sinc_lp(0.1, m);
      default: d = ((m == 0.0) ? 1.0 : 0.0) - (sinc_lp(0.3, m) - sinc_lp(0.1, m));
    endcase
    return real_to_sp(w * d);
  endfunction

  function automatic sos_coef_t sos_coef(int section, int kind);
    sos_coef_t c;
    real r, t, z, g;
    r = 0.55 + 0.12 * real'(section);
    t = (kind == 0) ? 0.12 * PI + 0.03 * PI * real'(section)
                    : 0.80 * PI - 0.03 * PI * real'(section);
    z = (kind == 0) ? 0.75 * PI : 0.15 * PI;
    g = 0.25;
    c.b0 = real_to_sp(g);
    c.b1 = real_to_sp(-2.0 * g * $cos(z));
    c.b2 = real_to_sp(g);
    c.a1 = real_to_sp(2.0 * r * $cos(t));
    c.a2 = real_to_sp(-r * r);
    return c;
  endfunction

endpackage
