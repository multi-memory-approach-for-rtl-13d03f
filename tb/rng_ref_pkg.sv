// rng_ref_pkg: reference models for the random number generator testbenches.
//
// These are written independently of the RTL:
//   * lfsr_next        - one LFSR step computed bit by bit.
//   * prng_model       - M LFSRs with a round-robin pointer; next() returns the
//                        number the hardware shows for the current step.
//   * exp_icdf / half_gauss_mass - the exponential inverse CDF in closed form
//                        and the half-Gaussian probability mass 2*int_0^z phi,
//                        integrated numerically (Simpson), so the Gaussian
//                        tables are checked against a forward CDF rather than
//                        the rational inverse used to build them.
//   * entry_ok         - is a stored value the correctly rounded (and
//                        saturated) x-value of its probability point?
//   * layer_start      - probability where a layer starts, from the limits.
//   * pick_layer       - the layer the sequential decision flow chooses.
//   * rule_limit       - layer boundary by the relative-difference rule.
//   * table_checker    - entry_ok with a cache, for long sample streams.
package rng_ref_pkg;

  function automatic longint unsigned lfsr_next(longint unsigned s, int w, longint unsigned taps);
    bit fb = 1'b0;
    for (int i = 0; i < w; i++)
      if (taps[i]) fb ^= s[i];
    s = (s << 1) | longint'(fb);
    if (w < 64) s &= (64'd1 << w) - 64'd1;
    return s;
  endfunction

  class prng_model;
    longint unsigned st[];
    int              sel;
    int              w;
    int              out_w;
    longint unsigned taps;

    function new(longint unsigned seeds[], int w, longint unsigned taps, int out_w);
      st = new[seeds.size()];
      foreach (seeds[i]) st[i] = (seeds[i] == 0) ? 1 : seeds[i];
      this.w = w; this.taps = taps; this.out_w = out_w; sel = 0;
    endfunction

    // Output word: register bits 0..out_w-m-1, then m..out_w-1, then the
    // rest, LSB first (plain order when no bits are shared between re-reads).
    function longint unsigned pick(longint unsigned s);
      int m = st.size();
      int w = 0;
      longint unsigned r = 0;
      if (out_w <= m || out_w > 2 * m) return s & ((64'd1 << out_w) - 64'd1);
      for (int p = 0; p < out_w - m; p++) r |= longint'(s[p]) << w++;
      for (int p = m; p < out_w; p++)     r |= longint'(s[p]) << w++;
      for (int p = out_w - m; p < m; p++) r |= longint'(s[p]) << w++;
      return r;
    endfunction

    function longint unsigned next();
      longint unsigned r;
      r = pick(st[sel]);
      foreach (st[i]) st[i] = lfsr_next(st[i], w, taps);
      sel = (sel + 1) % st.size();
      return r;
    endfunction
  endclass

  function automatic real exp_icdf(real mean, real u);
    return -mean * $ln(1.0 - u);
  endfunction

  // 2 * integral_0^z of the standard normal density.
  function automatic real half_gauss_mass(real z);
    int   n = 4000;
    real  h, s, t;
    if (z <= 0.0) return 0.0;
    h = z / n;
    s = 1.0 + $exp(-0.5 * z * z);
    for (int i = 1; i < n; i++) begin
      t = i * h;
      s += ((i % 2) ? 4.0 : 2.0) * $exp(-0.5 * t * t);
    end
    return 2.0 * (s * h / 3.0) / $sqrt(2.0 * 3.14159265358979323846);
  endfunction

  // |X| quantile of N(0,1) by bisection on half_gauss_mass.
  function automatic real half_gauss_inv(real u);
    real a = 0.0, b = 10.0, m;
    for (int i = 0; i < 60; i++) begin
      m = 0.5 * (a + b);
      if (half_gauss_mass(m) < u) a = m; else b = m;
    end
    return 0.5 * (a + b);
  endfunction

  // Relative-difference rule for a layer boundary: the first index i whose
  // step x[i+1] - x[i] reaches `frac` of the largest step in the table.
  function automatic int rule_limit(bit gauss, real lo, int depth, real frac);
    real x [], dmax;
    x = new[depth];
    foreach (x[i]) begin
      real u;
      u = lo + (1.0 - lo) * (i + 0.5) / depth;
      x[i] = gauss ? half_gauss_inv(u) : exp_icdf(1.0, u);
    end
    dmax = 0.0;
    for (int i = 0; i < depth - 1; i++) if (x[i+1] - x[i] > dmax) dmax = x[i+1] - x[i];
    for (int i = 0; i < depth - 1; i++) if (x[i+1] - x[i] >= frac * dmax) return i;
    return depth - 1;
  endfunction

  function automatic real layer_start(int unsigned limits[], int depth, int k);
    real lo = 0.0;
    for (int j = 0; j < k; j++) lo = lo + (1.0 - lo) * (limits[j] + 1) / real'(depth);
    return lo;
  endfunction

  // gauss = 0: exponential with mean `scale`; gauss = 1: |N(0, scale^2)|.
  function automatic bit entry_ok(bit gauss, real scale, real lo, int depth, int idx,
                                  int data_w, longint unsigned got);
    real u, x, vmax, g_lo, g_hi;
    u    = lo + (1.0 - lo) * (idx + 0.5) / depth;
    vmax = real'((64'd1 << data_w) - 1);
    if (!gauss) begin
      x = exp_icdf(scale, u);
      if (x >= vmax) return got == longint'(vmax);
      return (real'(got) >= x - 0.5 - 1e-6) && (real'(got) <= x + 0.5 + 1e-6);
    end
    g_lo = half_gauss_mass((real'(got) - 0.5) / scale);
    g_hi = half_gauss_mass((real'(got) + 0.5) / scale);
    if (real'(got) >= vmax) return g_lo <= u + 1e-9;
    return (g_lo <= u + 1e-9) && (u <= g_hi + 1e-9);
  endfunction

  // Layer chosen by the sequential decision flow.
  function automatic int pick_layer(longint unsigned addr[], int unsigned limits[]);
    int l = 0;
    while (l < limits.size() && addr[l] > limits[l]) l++;
    return l;
  endfunction

  // Checks table reads of a multi-layer sampler; each entry is judged with
  // entry_ok once and later reads must return the same value.
  class table_checker;
    bit              gauss;
    real             scale;
    int              depth, data_w;
    int unsigned     limits [];
    longint unsigned seen [longint unsigned];

    function new(bit gauss, real scale, int depth, int data_w, int unsigned limits[]);
      this.gauss = gauss; this.scale = scale; this.depth = depth;
      this.data_w = data_w; this.limits = limits;
    endfunction

    function bit check(int layer, longint unsigned idx, longint unsigned got);
      longint unsigned key = longint'(layer) * depth + idx;
      if (seen.exists(key)) return seen[key] == got;
      seen[key] = got;
      return entry_ok(gauss, scale, layer_start(limits, depth, layer), depth, int'(idx), data_w, got);
    endfunction
  endclass

endpackage
