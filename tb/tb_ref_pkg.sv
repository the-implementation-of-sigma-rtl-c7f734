// tb_ref_pkg: reference arithmetic for the testbenches, written apart from the RTL.
//
// ref_hb_coef() recomputes one half-band coefficient from its definition
// (Hamming-windowed sinc at a quarter of the input rate, DC gain 1.0, rounded to
// cw-1 fraction bits), so the filter testbenches do not take their expected values
// from the design's own table.
package tb_ref_pkg;

  function automatic real ref_tap(int n, int k);
    real m, t, s, w;
    m = real'(n - 1) / 2.0;
    t = real'(k) - m;
    w = 0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * real'(k) / real'(n - 1));
    if (t == 0.0) s = 0.5;
    else          s = $sin(1.5707963267948966 * t) / (3.141592653589793 * t);
    return s * w;
  endfunction

  function automatic longint ref_hb_coef(int n, int k, int cw);
    real tot, v;
    tot = 0.0;
    for (int i = 0; i < n; i++) tot += ref_tap(n, i);
    v = ref_tap(n, k) / tot * (2.0 ** (cw - 1));
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  // Arithmetic shift right with round-half-up, then saturate to w bits.
  function automatic longint ref_round_sat(longint acc, int sh, int w);
    longint r, mx, mn;
    r  = (acc + (64'sd1 <<< (sh - 1))) >>> sh;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    if (r > mx) return mx;
    if (r < mn) return mn;
    return r;
  endfunction

endpackage
