// fe_ref_pkg: reference arithmetic for the feature-extractor testbenches.
//
// Plain behavioural re-computations of each feature from a window of
// samples, written independently of the RTL: integer formulas where the
// hardware is exact, real-valued math ($ln) where the hardware approximates
// with CORDIC. Also a test-signal generator: a sine plus noise for normal
// activity and a large, spiky square-ish wave for seizure-like activity.
//
// The formulas are those of the architecture (constant factors removed, as in
// the hardware); the test signals are this package's own.
package fe_ref_pkg;

  typedef int sample_q_t[$];

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic longint isqrt_ref(input longint v);
    longint r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic int log2i(input int n);
    int l;
    l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  // one window of test samples, 8-bit signed
  function automatic sample_q_t make_window(input int n, input int kind, input int seed);
    sample_q_t q;
    int v;
    for (int i = 0; i < n; i++) begin
      case (kind)
        0: v = int'(20.0 * $sin(6.2831853 * real'(i) / 64.0)) + int'($urandom_range(10)) - 5;
        1: v = (((i / 7) % 2) == 0 ? 90 : -90) + int'($urandom_range(60)) - 30;
        2: v = int'($urandom_range(255)) - 128;
        3: v = 3;   // flat signal
        default: v = (i % 2 == 0) ? 127 : -128;
      endcase
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      q.push_back(v);
    end
    return q;
  endfunction

  function automatic longint coastline_ref(input sample_q_t x);
    longint s;
    s = 0;
    for (int i = 1; i < x.size(); i++) s += iabs(x[i] - x[i-1]);
    return s;
  endfunction

  // L_m(k), m = 1..k, 1-based indices as in Higuchi's formula
  function automatic longint lm_ref(input sample_q_t x, input int k, input int m);
    longint s;
    int n;
    n = x.size();
    s = 0;
    for (int i = 1; i <= (n - m) / k; i++)
      s += iabs(x[m + i*k - 1] - x[m + (i-1)*k - 1]);
    return s;
  endfunction

  function automatic int mean_ref(input sample_q_t x);
    longint s;
    s = 0;
    foreach (x[i]) s += x[i];
    return int'(s >>> log2i(x.size()));
  endfunction

  function automatic int mav_ref(input sample_q_t x);
    longint s;
    s = 0;
    foreach (x[i]) s += iabs(x[i]);
    return int'(s >> log2i(x.size()));
  endfunction

  function automatic longint s_ref(input sample_q_t x);
    longint a;
    int mu;
    mu = mean_ref(x);
    a = 0;
    foreach (x[i]) a += (x[i] - mu) * (x[i] - mu);
    return isqrt_ref(a);
  endfunction

  // | |max(x-MAV)| - |min(x-MAV)| |, saturated to rmax
  function automatic int r_ref(input sample_q_t x, input int rmax);
    int mav, mx, mn, r;
    mav = mav_ref(x);
    mx = x[0] - mav;
    mn = x[0] - mav;
    foreach (x[i]) begin
      if (x[i] - mav > mx) mx = x[i] - mav;
      if (x[i] - mav < mn) mn = x[i] - mav;
    end
    r = iabs(iabs(mx) - iabs(mn));
    return (r > rmax) ? rmax : r;
  endfunction

  function automatic real atanh_r(input real v);
    return 0.5 * $ln((1.0 + v) / (1.0 - v));
  endfunction

  // optimized Hurst output, real-valued, in output LSBs (Q1.7)
  function automatic real he_opt_ref(input int r, input longint s);
    longint q;
    real y;
    q = (s == 0) ? 64'hFFFFFF : ((longint'(r) << 16) / s);
    y = real'(q) / 65536.0;
    if (y > 0.8) y = 0.8;
    return atanh_r(y) * 128.0;
  endfunction

  // optimized fractal dimension, real-valued, in output LSBs (Q8.8)
  function automatic real fd_opt_ref(input sample_q_t x);
    real s;
    longint l;
    s = 0.0;
    for (int m = 1; m <= 5; m++) begin
      l = lm_ref(x, 5, m) % 65536;
      if (l == 0) l = 1;
      s += $ln(real'(l)) / 2.0;
    end
    return s * 256.0;
  endfunction

  function automatic int fd_apx_ref(input sample_q_t x);
    int s;
    s = 0;
    for (int m = 1; m <= 5; m++) s += int'(isqrt_ref(lm_ref(x, 5, m) % 256));
    return s;
  endfunction

  function automatic int he_apx_ref(input sample_q_t x);
    return int'(isqrt_ref(r_ref(x, 1023)));
  endfunction

endpackage
