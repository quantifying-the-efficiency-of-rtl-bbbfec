// nn_pkg -- shared constants and elaboration-time functions of the two
// fixed-point inference networks.
//
// Every number in the networks is a two's-complement fixed-point value of
// DATA_W bits of which FRAC_W are fractional; the fractional width is half
// the total width, rounded up (16 bits -> 8 fractional bits).  Weights and
// biases are constants compiled into the hardware and handed from module to
// module as parameters, so that synthesis can fold them.
//
// The package holds only constants and constant functions:
//   * frac_bits()           fractional width for a total width
//   * nn_weight()/nn_bias() the fixed weight set (see below)
//   * sa_*()                greedy signed-power-of-two decomposition used by
//                           const_mult to choose shift-add or a multiplier
//   * *_entry()             contents of the sigmoid, exponent and reciprocal
//                           lookup tables
//
// The weight set: trained weights are not part of this design, so a fixed
// deterministic set stands in for them.  Weight (layer, i, j) is
//   h = hash(layer, i, j);  w = (h mod 2^FRAC_W) - 2^(FRAC_W-1)
// i.e. a value in [-0.5, 0.5) with FRAC_W fractional bits, where hash() is
// the integer mixer below.  Biases use j = -1 and are a quarter of that
// range.  A real model is loaded by replacing nn_weight()/nn_bias().
package nn_pkg;

  // Default word width of the networks and its fractional part.
  localparam int unsigned DATA_W     = 16;
  localparam int unsigned FRAC_W     = (DATA_W + 1) / 2;
  // Shift-add search depth for 15..24-bit words.
  localparam int unsigned SA_DEPTH   = 4;
  // Pipeline stages of every constant multiplier (DSP or shift-add).
  localparam int unsigned MULT_LAT   = 3;
  // Terms summed per adder-tree pipeline stage.
  localparam int unsigned TREE_FANIN = 4;
  // Lookup-table sizes (entries) and sigmoid input range (+-SIG_RANGE).
  localparam int unsigned SIG_N      = 1024;
  localparam int unsigned SIG_RANGE  = 8;
  localparam int unsigned EXP_N      = 1024;
  localparam int unsigned EXP_RANGE  = 8;
  localparam int unsigned INV_N      = 1024;
  localparam int unsigned INV_RANGE  = 16;

  // Layer identifiers that select a weight set.
  localparam int unsigned L_ONE_DENSE1 = 1;
  localparam int unsigned L_ONE_DENSE2 = 2;
  localparam int unsigned L_CNN_CONV   = 3;
  localparam int unsigned L_CNN_DENSE  = 4;

  function automatic int unsigned frac_bits(int unsigned w);
    return (w + 1) / 2;
  endfunction

  // 32-bit integer mixer (xorshift-multiply).
  function automatic int unsigned hash3(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // Weight of input i into output j of a layer, as a signed integer in
  // units of 2^-frac.
  function automatic longint nn_weight(int unsigned layer, int unsigned i,
                                       int unsigned j, int unsigned frac);
    longint span;
    span = longint'(1) << frac;
    return longint'(hash3(layer, i + 1, j + 1)) % span - span / 2;
  endfunction

  // Bias of output j of a layer, in units of 2^-frac.
  function automatic longint nn_bias(int unsigned layer, int unsigned j,
                                     int unsigned frac);
    longint span;
    span = longint'(1) << frac;
    return (longint'(hash3(layer, 0, j + 1)) % span - span / 2) / 4;
  endfunction

  // ---- greedy signed-power-of-two decomposition --------------------------
  // Step k replaces r by r - sign(r)*2^c, where 2^c is the power of two
  // nearest to |r| (the smaller one on a tie).  sa_step_* report step k;
  // sa_terms() is the number of steps that bring the weight to zero, or
  // -1 if DEPTH steps do not.

  function automatic int nearest_pow2(longint mag);
    int c;
    c = 0;
    while ((longint'(1) << (c + 1)) <= mag) c++;
    if ((mag - (longint'(1) << c)) > ((longint'(1) << (c + 1)) - mag)) c++;
    return c;
  endfunction

  function automatic longint sa_residue(longint w, int k);
    longint r;
    r = w;
    for (int s = 0; s < k; s++) begin
      if (r > 0)      r = r - (longint'(1) << nearest_pow2(r));
      else if (r < 0) r = r + (longint'(1) << nearest_pow2(-r));
    end
    return r;
  endfunction

  function automatic int sa_terms(longint w, int depth);
    for (int k = 0; k <= depth; k++)
      if (sa_residue(w, k) == 0) return k;
    return -1;
  endfunction

  function automatic int sa_shift(longint w, int k);
    longint r;
    r = sa_residue(w, k);
    return nearest_pow2(r < 0 ? -r : r);
  endfunction

  function automatic bit sa_neg(longint w, int k);
    return sa_residue(w, k) < 0;
  endfunction

  // ---- lookup-table contents ---------------------------------------------
  // Sigmoid: entry i covers x = (i - n/2) * 2*range/n, value in units of
  // 2^-frac, rounded to nearest.
  function automatic longint sigmoid_entry(int i, int n, int range, int frac);
    real x;
    x = (real'(i) - real'(n / 2)) * 2.0 * real'(range) / real'(n);
    return longint'($floor((2.0 ** frac) / (1.0 + $exp(-x)) + 0.5));
  endfunction

  // Exponent of a non-positive argument: entry i covers d = -i*range/n,
  // value e^d in units of 2^-frac.
  function automatic longint exp_entry(int i, int n, int range, int frac);
    real d;
    d = -real'(i) * real'(range) / real'(n);
    return longint'($floor((2.0 ** frac) * $exp(d) + 0.5));
  endfunction

  // Reciprocal: entry i covers s = i*range/n (s below 1 is taken as 1),
  // value 1/s in units of 2^-frac.
  function automatic longint inv_entry(int i, int n, int range, int frac);
    real s;
    s = real'(i) * real'(range) / real'(n);
    if (s < 1.0) s = 1.0;
    return longint'($floor((2.0 ** frac) / s + 0.5));
  endfunction

endpackage
