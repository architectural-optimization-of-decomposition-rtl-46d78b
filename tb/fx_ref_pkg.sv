// fx_ref_pkg: golden fixed-point arithmetic for the testbenches.
//
// Written independently of the RTL units with 64-bit integer arithmetic:
// every function takes the word width w and fractional bits f and returns
// the value the hardware must produce, bit for bit.
//   sat   clamp to the signed w-bit range
//   add / sub, mul (round half up, then clamp)
//   div   (|a| << f) / |b| truncated, signed, clamped; b = 0 gives the
//         largest magnitude with the sign of a
//   sqrt  floor(sqrt(a << f)) found by bisection; a <= 0 gives 0
package fx_ref_pkg;

  function automatic longint maxv(int w);
    return (longint'(1) <<< (w - 1)) - 1;
  endfunction

  function automatic longint minv(int w);
    return -(longint'(1) <<< (w - 1));
  endfunction

  function automatic longint sat(longint v, int w);
    if (v > maxv(w)) return maxv(w);
    if (v < minv(w)) return minv(w);
    return v;
  endfunction

  function automatic longint add(longint a, longint b, int w);
    return sat(a + b, w);
  endfunction

  function automatic longint sub(longint a, longint b, int w);
    return sat(a - b, w);
  endfunction

  function automatic longint mul(longint a, longint b, int w, int f);
    longint p;
    p = a * b;
    if (f > 0) p = (p + (longint'(1) <<< (f - 1))) >>> f;
    return sat(p, w);
  endfunction

  function automatic longint div(longint a, longint b, int w, int f);
    longint na, nb, q;
    if (b == 0) return (a < 0) ? minv(w) : maxv(w);
    na = (a < 0) ? -a : a;
    nb = (b < 0) ? -b : b;
    q  = (na <<< f) / nb;
    if ((a < 0) != (b < 0)) q = -q;
    return sat(q, w);
  endfunction

  function automatic longint sqrt(longint a, int w, int f);
    longint v, lo, hi, mid;
    if (a <= 0) return 0;
    v  = a <<< f;
    lo = 0;
    hi = longint'(1) <<< 32;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (mid * mid <= v) lo = mid;
      else                hi = mid;
    end
    return sat(lo, w);
  endfunction

  // uniform random real in [lo, hi] with a resolution of 1/1000 of the span
  function automatic real rnd_real(real lo, real hi);
    int unsigned u;
    u = $urandom_range(0, 1000);
    return lo + (hi - lo) * real'(u) / 1000.0;
  endfunction

  // real <-> fixed conversions
  function automatic longint from_real(real r, int w, int f);
    return sat(longint'($rtoi(r * (2.0 ** f) + ((r >= 0.0) ? 0.5 : -0.5))), w);
  endfunction

  function automatic real to_real(longint v, int f);
    return real'(v) / (2.0 ** f);
  endfunction

  // sign-extend a w-bit pattern held in the low bits of v
  function automatic longint sx(longint v, int w);
    longint m;
    m = longint'(1) <<< (w - 1);
    v = v & ((longint'(1) <<< w) - 1);
    return (v ^ m) - m;
  endfunction

  // cycles taken to stream n independent divisions through ndiv dividers of
  // latency dl each (round-robin issue, one per cycle; phase ends one cycle
  // after the last result)
  function automatic int div_phase(int n, int ndiv, int dl);
    int p;
    if (n <= 0) return 0;
    p = (ndiv < dl) ? ndiv : dl;
    return ((n - 1) / p) * dl + (n - 1) % p + dl + 1;
  endfunction

endpackage
