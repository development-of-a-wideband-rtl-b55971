// plc_ref_pkg - reference models for the emulator testbenches, written apart from the
// RTL: the channel transfer functions, the three noise magnitude models, the fixed-point
// rounding and the pseudo-random phase, evaluated in floating point.
package plc_ref_pkg;

  localparam real PI_R  = 3.14159265358979323846;
  localparam real FS    = 100.0e6;

  // bin frequency, negative half folded
  function automatic real fbin(input int k, input int n);
    return real'((k <= n / 2) ? k : n - k) * FS / real'(n);
  endfunction

  // real -> Q15.14 with rounding half away from zero, saturating at 29 bits
  function automatic longint q14(input real v);
    real s;
    s = v * 16384.0;
    if (s >  268435455.0) s =  268435455.0;
    if (s < -268435456.0) s = -268435456.0;
    if (s >= 0.0) return longint'($rtoi(s + 0.5));
    else          return -longint'($rtoi(-s + 0.5));
  endfunction

  // Channel path parameters: 150 m good, 150 m medium, 150 m bad, 250 m good
  function automatic void chan_params(input int ch, output real g[6], output real d[6],
                                      output real a1);
    case (ch)
      0: begin g = '{0.064, 0.038, -0.015, 0.005, 0.0, 0.0};
               d = '{150.0, 166.8, 183.6, 200.6, 0.0, 0.0}; a1 = 1.0e-9; end
      1: begin g = '{0.070, 0.035, -0.020, 0.010, -0.006, 0.0};
               d = '{150.0, 162.0, 177.0, 190.0, 205.0, 0.0}; a1 = 3.8e-9; end
      2: begin g = '{0.050, 0.060, 0.012, -0.008, 0.0, 0.0};
               d = '{150.0, 166.7, 190.0, 230.0, 0.0, 0.0}; a1 = 2.5e-9; end
      default: begin g = '{0.090, 0.040, -0.020, 0.010, 0.0, 0.0};
               d = '{250.0, 271.0, 296.0, 318.0, 0.0, 0.0}; a1 = 2.5e-9; end
    endcase
  endfunction

  // Zimmermann multipath response at bin k (a0 = 0, k exponent 1, vp = 1.5e8 m/s)
  function automatic void chan_h(input int ch, input int k, input int n,
                                 output real hr, output real hi);
    real g[6], d[6], a1, f, amp, ph;
    chan_params(ch, g, d, a1);
    f  = fbin(k, n);
    hr = 0.0;
    hi = 0.0;
    for (int p = 0; p < 6; p++) begin
      amp = g[p] * $exp(-a1 * f * d[p]);
      ph  = 2.0 * PI_R * f * d[p] / 1.5e8;
      hr  = hr + amp * $cos(ph);
      hi  = hi - amp * $sin(ph);
    end
    if (k > n / 2)  hi = -hi;
    if (k == n / 2) hi = 0.0;
  endfunction

  function automatic real bg_mag(input int k, input int n);
    return 0.02 + 0.6 * $exp(-fbin(k, n) / 2.5e6);
  endfunction

  function automatic real nb_mag(input int k, input int n);
    real f, a[3], f0[3], b[3], m;
    a  = '{0.40, 0.30, 0.25};
    f0 = '{3.9e6, 7.1e6, 9.6e6};
    b  = '{50.0e3, 60.0e3, 40.0e3};
    f  = fbin(k, n);
    m  = 0.0;
    for (int i = 0; i < 3; i++)
      m = m + a[i] * $exp(-(f - f0[i]) * (f - f0[i]) / (2.0 * b[i] * b[i]));
    return m;
  endfunction

  // Four damped-sinusoid bursts (tau 0.1 us, 2 MHz), spectrum normalised to 1 at DC
  function automatic void imp_spec(input int k, input int n, output real sr, output real si);
    real am[4], tm[4], w, wp, a, nr, ni, dr, di, den, pr, pi_, th;
    am = '{1.2, -0.8, -1.1, 0.7};
    tm = '{96.0, 1120.0, 2144.0, 3168.0};
    w  = 2.0 * PI_R * fbin(k, n);
    wp = 2.0 * PI_R * 2.0e6;
    a  = 1.0e7;
    // (a + jw)^2 + wp^2
    dr  = a * a - w * w + wp * wp;
    di  = 2.0 * a * w;
    den = dr * dr + di * di;
    nr  = a * a + wp * wp;
    ni  = 0.0;
    pr  = (nr * dr + ni * di) / den;
    pi_ = (ni * dr - nr * di) / den;
    sr = 0.0;
    si = 0.0;
    for (int m = 0; m < 4; m++) begin
      th = -w * tm[m] / FS;
      sr = sr + am[m] * (pr * $cos(th) - pi_ * $sin(th));
      si = si + am[m] * (pr * $sin(th) + pi_ * $cos(th));
    end
    if (k > n / 2)  si = -si;
    if (k == n / 2) si = 0.0;
  endfunction

endpackage
