// rnn_ref_pkg: behavioural reference arithmetic for the testbenches.
//
// Written independently of the RTL: truncation is a floor division by a power
// of two, the activations are evaluated on real numbers straight from their
// segment table (thresholds, slopes and offsets as decimals), and the cell
// equations are spelled out term by term. All values involved are exact binary
// fractions well inside double precision, so the real arithmetic is exact.
package rnn_ref_pkg;

  function automatic longint pow2(int e);
    return longint'(1) << e;
  endfunction

  // Floor(a / 2^sh), then saturate to a signed w-bit word.
  function automatic longint ref_trunc(longint a, int sh, int w);
    longint q, hi, lo;
    q = a / pow2(sh);
    if (q * pow2(sh) != a && a < 0) q = q - 1;
    hi = pow2(w - 1) - 1;
    lo = -pow2(w - 1);
    if (q > hi) q = hi;
    if (q < lo) q = lo;
    return q;
  endfunction

  function automatic bit ref_trunc_ovf(longint a, int sh, int w);
    longint q;
    q = a / pow2(sh);
    if (q * pow2(sh) != a && a < 0) q = q - 1;
    return (q > pow2(w - 1) - 1) || (q < -pow2(w - 1));
  endfunction

  function automatic real sigmoid_pwl(real x);
    if (x >= 5.0)         return 1.0;
    else if (x >= 2.375)  return 0.03125 * x + 0.84375;
    else if (x >= 1.0)    return 0.125 * x + 0.625;
    else if (x >= -1.0)   return 0.25 * x + 0.5;
    else if (x >= -2.375) return 0.125 * x + 0.375;
    else if (x >= -5.0)   return 0.03125 * x + 0.15625;
    else                  return 0.0;
  endfunction

  function automatic real tanh_pwl(real x);
    if (x >= 2.375)       return 1.0;
    else if (x >= 1.5)    return 0.09375 * x + 0.765625;
    else if (x >= 1.0)    return 0.28125 * x + 0.484375;
    else if (x >= 0.5)    return 0.59375 * x + 0.171875;
    else if (x >= -0.5)   return 0.9375 * x;
    else if (x >= -1.0)   return 0.59375 * x - 0.171875;
    else if (x >= -1.5)   return 0.28125 * x - 0.484375;
    else if (x >= -2.375) return 0.09375 * x - 0.765625;
    else                  return -1.0;
  endfunction

  // Segment index counted from the top (0 = upper saturation).
  function automatic int sigmoid_seg(real x);
    if (x >= 5.0) return 0; else if (x >= 2.375) return 1; else if (x >= 1.0) return 2;
    else if (x >= -1.0) return 3; else if (x >= -2.375) return 4; else if (x >= -5.0) return 5;
    else return 6;
  endfunction

  function automatic int tanh_seg(real x);
    if (x >= 2.375) return 0; else if (x >= 1.5) return 1; else if (x >= 1.0) return 2;
    else if (x >= 0.5) return 3; else if (x >= -0.5) return 4; else if (x >= -1.0) return 5;
    else if (x >= -1.5) return 6; else if (x >= -2.375) return 7; else return 8;
  endfunction

  function automatic real sigmoid_slope(real x);
    if (x >= 5.0) return 0.0; else if (x >= 2.375) return 0.03125; else if (x >= 1.0) return 0.125;
    else if (x >= -1.0) return 0.25; else if (x >= -2.375) return 0.125; else if (x >= -5.0) return 0.03125;
    else return 0.0;
  endfunction

  function automatic real tanh_slope(real x);
    if (x >= 2.375) return 0.0; else if (x >= 1.5) return 0.09375; else if (x >= 1.0) return 0.28125;
    else if (x >= 0.5) return 0.59375; else if (x >= -0.5) return 0.9375; else if (x >= -1.0) return 0.59375;
    else if (x >= -1.5) return 0.28125; else if (x >= -2.375) return 0.09375; else return 0.0;
  endfunction

  // Integer activation: input on 2^-frac, output on 2^-(frac+5). The slope
  // term a*x is exact on the output LSB; the offset (table value minus slope
  // term) is quantized by rounding, halves away from zero; the result is
  // kept inside the function's range.
  function automatic longint ref_act(bit is_tanh, longint x, int frac);
    real xr, a, scale, yr;
    longint y, one;
    scale = (frac + 5 >= 0) ? real'(pow2(frac + 5)) : 1.0 / real'(pow2(-(frac + 5)));
    xr = (frac >= 0) ? real'(x) / real'(pow2(frac)) : real'(x) * real'(pow2(-frac));
    yr = is_tanh ? tanh_pwl(xr) : sigmoid_pwl(xr);
    a  = is_tanh ? tanh_slope(xr) : sigmoid_slope(xr);
    y  = longint'(a * xr * scale) + longint'((yr - a * xr) * scale);
    one = longint'(scale);
    if (y > one) y = one;
    if (is_tanh && y < -one) y = -one;
    if (!is_tanh && y < 0) y = 0;
    return y;
  endfunction

  // One LSTM cell step for one unit, from gate values on 2^-gf.
  // Returns c_next and h through the output arguments.
  function automatic void ref_lstm_pw(
      longint gi, longint gf, longint gc, longint go, longint c_prev,
      int in_frac, int gfr, int state_frac, int b_mul, int b_tanh,
      int in_w, int state_w,
      output longint c_next, output longint h, output bit ovf);
    int so_frac, b_state, so_w, pt_frac, pt_w;
    longint m0, m1, so, t, pt;
    so_frac = state_frac + gfr - b_mul;
    b_state = so_frac - state_frac;
    so_w    = state_w + b_state;
    pt_frac = so_frac + 5 - b_tanh;
    pt_w    = pt_frac + 2;
    m0 = ref_trunc(c_prev * gf, b_mul, so_w);
    m1 = ref_trunc(gi * gc, 2 * gfr - so_frac, so_w);
    ovf = ref_trunc_ovf(c_prev * gf, b_mul, so_w) | ref_trunc_ovf(gi * gc, 2 * gfr - so_frac, so_w)
        | ref_trunc_ovf(m0 + m1, 0, so_w);
    so = ref_trunc(m0 + m1, 0, so_w);
    c_next = ref_trunc(so, b_state, state_w);
    t  = ref_act(1'b1, so, so_frac);
    pt = ref_trunc(t, b_tanh, pt_w);
    h  = ref_trunc(pt * go, pt_frac + gfr - in_frac, in_w);
    ovf |= ref_trunc_ovf(so, b_state, state_w) | ref_trunc_ovf(pt * go, pt_frac + gfr - in_frac, in_w);
  endfunction

  // GRU phase A: truncated h for the MACs and r*h onto 2^-in_frac.
  function automatic void ref_gru_a(longint h_prev, longint gr, int in_frac, int gfr,
      int state_frac, int in_w, output longint h_in, output longint rh);
    h_in = ref_trunc(h_prev, state_frac - in_frac, in_w);
    rh   = ref_trunc(h_prev * gr, state_frac + gfr - in_frac, in_w);
  endfunction

  // GRU phase B: h_t = z*h_{t-1} + (1-z)*h'.
  function automatic longint ref_gru_b(longint h_prev, longint gz, longint gh,
      int gfr, int state_frac, int b_mul, int state_w);
    int m1_frac, m1_w;
    longint m1, m2, s;
    m1_frac = state_frac + gfr - b_mul;
    m1_w    = m1_frac + 3;
    m1 = ref_trunc(h_prev * gz, b_mul, m1_w);
    m2 = ref_trunc((pow2(gfr) - gz) * gh, 2 * gfr - m1_frac, m1_w);
    s  = ref_trunc(m1 + m2, 0, m1_w);
    return ref_trunc(s, m1_frac - state_frac, state_w);
  endfunction

endpackage
