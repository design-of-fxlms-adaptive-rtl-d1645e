// Reference models of the FXLMS blocks, for the testbenches.
//
// Each model computes a block's result sample by sample in 64-bit integer
// arithmetic, written without the RTL's shifts: floor division and explicit
// clamping are spelled out, so a wrong shift amount, sign or saturation
// limit in the RTL shows as a mismatch.
package fxlms_ref_pkg;

  localparam longint S_MAX = 32767;
  localparam longint S_MIN = -32768;

  // floor(a / 2^n) for any sign of a
  function automatic longint floor_div_pow2(longint a, int n);
    longint d = longint'(1) << n;
    if (a >= 0) return a / d;
    return -((-a + d - 1) / d);
  endfunction

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic longint sat16(longint v);
    return clamp(v, S_MIN, S_MAX);
  endfunction

  function automatic longint ref_sub(longint a, longint b);
    return sat16(a - b);
  endfunction

  function automatic longint ref_mul(longint a, longint b);
    return sat16(floor_div_pow2(a * b, 15));
  endfunction

  // Adaptive LMS filter: y = -w.x, e = d + y, w += mu e x.
  class lms_ref;
    int     taps, coef_w, coef_frac, mu_shift;
    longint x_hist[$];
    longint w[];
    int     updates;      // samples in which some coefficient changed
    int     saturations;  // samples in which y, e or a coefficient clamped

    function new(int taps = 8, int coef_w = 24, int coef_frac = 22, int mu_shift = 4);
      this.taps = taps; this.coef_w = coef_w;
      this.coef_frac = coef_frac; this.mu_shift = mu_shift;
      w = new[taps];
      foreach (w[i]) w[i] = 0;
      x_hist = {};
      repeat (taps) x_hist.push_back(0);
      updates = 0; saturations = 0;
    endfunction

    // One sample: returns e(k) and adapts.
    function longint step(longint x, longint d);
      longint acc = 0, y, e, wmax, wmin, nw, raw_y;
      bit changed = 0, sat = 0;
      x_hist.push_front(x);
      void'(x_hist.pop_back());
      for (int i = 0; i < taps; i++) acc += w[i] * x_hist[i];
      raw_y = -floor_div_pow2(acc, coef_frac);
      y = sat16(raw_y);
      if (y != raw_y) sat = 1;
      e = sat16(d + y);
      if (e != d + y) sat = 1;
      wmax = (longint'(1) << (coef_w - 1)) - 1;
      wmin = -(longint'(1) << (coef_w - 1));
      for (int i = 0; i < taps; i++) begin
        nw = w[i] + floor_div_pow2(e * x_hist[i], 30 - coef_frac + mu_shift);
        if (nw != clamp(nw, wmin, wmax)) sat = 1;
        nw = clamp(nw, wmin, wmax);
        if (nw != w[i]) changed = 1;
        w[i] = nw;
      end
      if (changed) updates++;
      if (sat) saturations++;
      return e;
    endfunction
  endclass

  // Fixed FIR with Q1.15 coefficients.
  class fir_ref;
    longint c[];
    longint x_hist[$];

    function new(longint coefs[]);
      c = coefs;
      x_hist = {};
      repeat (c.size()) x_hist.push_back(0);
    endfunction

    function longint step(longint x);
      longint acc = 0;
      x_hist.push_front(x);
      void'(x_hist.pop_back());
      foreach (c[i]) acc += c[i] * x_hist[i];
      return sat16(floor_div_pow2(acc, 15));
    endfunction
  endclass

endpackage
