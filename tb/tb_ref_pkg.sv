// tb_ref_pkg -- reference arithmetic for the testbenches.
//
// Straightforward integer and real-number models of the networks' fixed
// point operations, written independently of the RTL: products truncated
// to W bits with F fraction bits, wrap-around sums, the table-based
// sigmoid and softmax, and whole dense and convolution layers.  Weights
// are the design's constant set (nn_pkg::nn_weight / nn_bias).
package tb_ref_pkg;
  localparam int W = 16;
  localparam int F = 8;

  function automatic longint wrap(longint v);
    longint m;
    m = v & ((longint'(1) << W) - 1);
    return (m >= (longint'(1) << (W - 1))) ? m - (longint'(1) << W) : m;
  endfunction

  // x * w with both in units of 2^-F, floor to units of 2^-F, wrapped.
  function automatic longint mulq(longint x, longint w);
    return wrap((x * w) >>> F);
  endfunction

  function automatic longint sigmoid_ref(longint x);
    longint idx;
    real v;
    idx = ((x * 64) >>> F) + 512;
    if (idx < 0) idx = 0;
    if (idx > 1023) idx = 1023;
    v = 1.0 / (1.0 + $exp(-(real'(idx) - 512.0) / 64.0));
    return longint'($floor(v * 256.0 + 0.5));
  endfunction

  function automatic longint relu_ref(longint x);
    return x < 0 ? 0 : x;
  endfunction

  // Softmax as the table method computes it.
  typedef longint vec_t [];
  function automatic vec_t softmax_ref(vec_t x);
    vec_t e, y;
    longint mx, s, idx, r;
    int n;
    n = x.size();
    e = new[n];
    y = new[n];
    mx = x[0];
    foreach (x[i]) if (x[i] > mx) mx = x[i];
    s = 0;
    foreach (x[i]) begin
      idx = ((mx - x[i]) * 128) >>> F;           // 1024 entries over 8.0
      if (idx > 1023) idx = 1023;
      e[i] = longint'($floor(32768.0 * $exp(-real'(idx) / 128.0) + 0.5));
      s += e[i];
    end
    idx = (s * 64) >>> 15;                        // 1024 entries over 16.0
    if (idx > 1023) idx = 1023;
    begin
      real sv;
      sv = real'(idx) / 64.0;
      if (sv < 1.0) sv = 1.0;
      r = longint'($floor(32768.0 / sv + 0.5));
    end
    foreach (x[i]) y[i] = wrap((e[i] * r) >>> (30 - F));
    return y;
  endfunction

  function automatic vec_t dense_ref(vec_t x, int layer, int nout);
    vec_t y;
    y = new[nout];
    for (int j = 0; j < nout; j++) begin
      longint acc;
      acc = nn_pkg::nn_bias(layer, j, F);
      foreach (x[i]) acc += mulq(x[i], nn_pkg::nn_weight(layer, i, j, F));
      y[j] = wrap(acc);
    end
    return y;
  endfunction

  // Same-padded 3x3 convolution, result index (r*w + c)*nf + f.
  function automatic vec_t conv_ref(vec_t img, int h, int w, int nf, int layer);
    vec_t y;
    y = new[h * w * nf];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        for (int f = 0; f < nf; f++) begin
          longint acc;
          acc = nn_pkg::nn_bias(layer, f, F);
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++) begin
              longint p;
              p = 0;
              if (r + dr >= 0 && r + dr < h && c + dc >= 0 && c + dc < w)
                p = img[(r + dr) * w + c + dc];
              acc += mulq(p, nn_pkg::nn_weight(layer, (dr + 1) * 3 + dc + 1, f, F));
            end
          y[(r * w + c) * nf + f] = wrap(acc);
        end
    return y;
  endfunction
endpackage
