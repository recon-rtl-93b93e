// recon_ref_pkg -- bit-level reference model of a RECON neuron for the
// testbenches, written from the iteration equations rather than from the
// RTL structure: plain integers, floor division for the shifts, real
// arithmetic for the hyperbolic constants.
//   linear     i = 0..iter-1: d = (z >= 0) ? +1 : -1
//                             y += d * floor(x / 2^i);  z -= d * 2^(F-i)
//   hyperbolic i = 1..iter:   x, y += d * floor(y / 2^i), d * floor(x / 2^i)
//                             z -= d * round(atanh(2^-i) * 2^F)
//   tanh = sinh / cosh, sigmoid = e / (1 + e), e = cosh + sinh,
//   quotients truncated toward zero and saturated to +-(2^(W-1) - 1).
// All words wrap to W-bit two's complement after each operation.
package recon_ref_pkg;

  function automatic int wrap(int v, int w);
    int m;
    m = 1 << w;
    v = ((v % m) + m) % m;
    return (v >= (m >> 1)) ? v - m : v;
  endfunction

  function automatic int fdiv_pow2(int v, int i);
    int d;
    d = 1 << i;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  function automatic int atanh_fx(int i, int f);
    real t;
    t = 1.0 / real'(1 << i);
    return $rtoi(0.5 * $ln((1.0 + t) / (1.0 - t)) * real'(1 << f) + 0.5);
  endfunction

  function automatic int inv_k(int f);
    return $rtoi(1.2075 * real'(1 << f) + 0.5);
  endfunction

  function automatic int sdiv(int n, int d, int w, int f);
    int q, maxq;
    maxq = (1 << (w - 1)) - 1;
    if (d == 0) return (n < 0) ? -maxq : maxq;
    q = ((n < 0 ? -n : n) * (1 << f)) / (d < 0 ? -d : d);
    if (q > maxq) q = maxq;
    return ((n < 0) != (d < 0)) ? -q : q;
  endfunction

  // y + x * z by linear CORDIC (one input).
  function automatic int mac_step(int x, int y, int z, int w, int f, int iter);
    for (int i = 0; i < iter; i++) begin
      if (z >= 0) begin y = wrap(y + fdiv_pow2(x, i), w); z = wrap(z - (1 << (f - i)), w); end
      else        begin y = wrap(y - fdiv_pow2(x, i), w); z = wrap(z + (1 << (f - i)), w); end
    end
    return y;
  endfunction

  // cosh/sinh of z by hyperbolic CORDIC.
  function automatic void hyp(int z, int w, int f, int iter, output int ch, output int sh);
    int x, y, xn, yn;
    x = inv_k(f);
    y = 0;
    for (int i = 1; i <= iter; i++) begin
      if (z >= 0) begin
        xn = wrap(x + fdiv_pow2(y, i), w); yn = wrap(y + fdiv_pow2(x, i), w);
        z  = wrap(z - atanh_fx(i, f), w);
      end else begin
        xn = wrap(x - fdiv_pow2(y, i), w); yn = wrap(y - fdiv_pow2(x, i), w);
        z  = wrap(z + atanh_fx(i, f), w);
      end
      x = xn; y = yn;
    end
    ch = x; sh = y;
  endfunction

  // Activation back end: tanh (af = 1) or sigmoid (af = 0).
  function automatic int act(int ch, int sh, bit af, int w, int f);
    int e;
    if (af) return sdiv(sh, ch, w, f);
    e = wrap(ch + sh, w);
    return sdiv(e, wrap((1 << f) + e, w), w, f);
  endfunction

  // Whole neuron.
  function automatic int neuron(int xs[], int ws[], int b, bit af, int w, int f, int iter,
                                output int mac);
    int y, ch, sh;
    y = b;
    foreach (xs[k]) y = mac_step(xs[k], y, ws[k], w, f, iter);
    mac = y;
    hyp(y, w, f, iter, ch, sh);
    return act(ch, sh, af, w, f);
  endfunction

  // Signed value of a w-bit word.
  function automatic int sx(logic [31:0] v, int w);
    return wrap(int'(v), w);
  endfunction

endpackage
