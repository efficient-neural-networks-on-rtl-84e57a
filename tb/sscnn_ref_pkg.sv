// sscnn_ref_pkg: integer reference model of the SSCNN arithmetic, used by
// the testbenches to compute expected outputs independently of the RTL.
//
// Spline: t = (x + 1) * Delta is formed as a 64-bit integer with 26 fraction
// bits; i = floor(t), frac = t - i; i is clamped to 0 .. L-2 and
// f = C[i] + floor((C[i+1] - C[i]) * frac / 2**26).
// Linear neuron: sum over p of floor(w_p * x_p / 2**26), saturated to the
// signed 32-bit range.
package sscnn_ref_pkg;

  localparam int FRAC = 26;
  localparam longint WMAX = 64'sd2147483647;
  localparam longint WMIN = -64'sd2147483648;

  function automatic longint sat32(input longint v);
    if (v > WMAX) return WMAX;
    if (v < WMIN) return WMIN;
    return v;
  endfunction

  // Segment index before clamping.
  function automatic longint spline_index(input int x, input int shift);
    longint t;
    t = (longint'(x) + (64'sd1 <<< FRAC)) * (64'sd1 <<< shift);
    return t >>> FRAC;
  endfunction

  function automatic int spline_ref(input int x, input int c [], input int seg_l, input int shift);
    longint t, i, frac, d;
    t    = (longint'(x) + (64'sd1 <<< FRAC)) * (64'sd1 <<< shift);
    i    = t >>> FRAC;
    frac = t - (i <<< FRAC);
    if (i > (longint'(seg_l) - 2)) i = (longint'(seg_l) - 2);
    if (i < 0)         i = 0;
    d = longint'(c[i+1]) - longint'(c[i]);
    return int'(longint'(c[i]) + ((d * frac) >>> FRAC));
  endfunction

  function automatic int neuron_ref(input int x [], input int w []);
    longint acc = 0;
    foreach (x[p]) acc += (longint'(x[p]) * longint'(w[p])) >>> FRAC;
    return int'(sat32(acc));
  endfunction

  function automatic int abs_ref(input int x);
    if (x == int'(WMIN)) return int'(WMAX);
    return (x < 0) ? -x : x;
  endfunction

endpackage
