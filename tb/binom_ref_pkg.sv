// binom_ref_pkg: reference model for the testbenches. It prices an American
// call on the binomial tree with the simulator's own double-precision
// arithmetic, performing the same operations in the same order as the
// hardware (leaf powers by square-and-multiply, rp = r*p, rq = r*q,
// V = max(d*S - K, rp*V_up + rq*V_dn)), so results can be compared bit for
// bit. It also builds option records from market data (spot, strike,
// volatility, rate, dividend yield, maturity) with the Cox-Ross-Rubinstein
// parameters.
package binom_ref_pkg;
  import binom_pkg::*;

  function automatic real rd(fp64_t x);
    return $bitstoreal(x);
  endfunction

  function automatic option_t make_option(real s0, real strike, real sigma,
                                          real rate, real div, real mat, int n_leaves);
    option_t o;
    real dt, u, d, p;
    dt = mat / real'(n_leaves - 1);
    u  = $exp(sigma * $sqrt(dt));
    d  = 1.0 / u;
    p  = ($exp((rate - div) * dt) - d) / (u - d);
    o.s0 = $realtobits(s0);
    o.k  = $realtobits(strike);
    o.u  = $realtobits(u);
    o.d  = $realtobits(d);
    o.r  = $realtobits($exp(-rate * dt));
    o.p  = $realtobits(p);
    o.q  = $realtobits(1.0 - p);
    return o;
  endfunction

  function automatic option_t random_option(int n_leaves);
    return make_option(50.0 + real'($urandom_range(0, 10000)) / 100.0,
                       50.0 + real'($urandom_range(0, 10000)) / 100.0,
                       0.10 + real'($urandom_range(0, 400)) / 1000.0,
                       0.01 + real'($urandom_range(0, 70)) / 1000.0,
                       real'($urandom_range(0, 120)) / 1000.0,
                       0.25 + real'($urandom_range(0, 175)) / 100.0,
                       n_leaves);
  endfunction

  function automatic real leaf_power(real base, int n, int exp_w);
    real acc, sq;
    acc = 1.0;
    sq  = base;
    for (int i = 0; i < exp_w; i++) begin
      if (n[i]) acc = acc * sq;
      sq = sq * sq;
    end
    return acc;
  endfunction

  function automatic int clog2(int x);
    int r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  // Returns the root value; n_ex counts nodes where early exercise won.
  function automatic real price(option_t o, int n_leaves, output int n_ex);
    real s[], v[];
    real rp, rq, cont, ex, pw;
    int e, exp_w;
    exp_w = (n_leaves > 2) ? clog2(n_leaves) : 1;
    s = new[n_leaves];
    v = new[n_leaves];
    n_ex = 0;
    for (int k = 0; k < n_leaves; k++) begin
      e = 2 * k - (n_leaves - 1);
      pw = (e < 0) ? leaf_power(rd(o.d), -e, exp_w) : leaf_power(rd(o.u), e, exp_w);
      s[k] = rd(o.s0) * pw;
      ex = s[k] - rd(o.k);
      v[k] = (0.0 < ex) ? ex : 0.0;
    end
    rp = rd(o.r) * rd(o.p);
    rq = rd(o.r) * rd(o.q);
    for (int t = n_leaves - 2; t >= 0; t--) begin
      for (int k = n_leaves - 1; k >= n_leaves - 1 - t; k--) begin
        s[k] = rd(o.d) * s[k];
        cont = rp * v[k] + rq * v[k-1];
        ex   = s[k] - rd(o.k);
        if (cont < ex) begin
          v[k] = ex;
          n_ex++;
        end else v[k] = cont;
      end
    end
    return v[n_leaves - 1];
  endfunction

  // Cycles from accepting an option to the first cycle of res_valid.
  function automatic longint engine_cycles(int n_leaves, int lanes);
    int words, exp_w;
    longint c;
    words = (n_leaves + lanes - 1) / lanes;
    exp_w = (n_leaves > 2) ? clog2(n_leaves) : 1;
    c = 2 + longint'(words) * (exp_w + 5) + 2;
    for (int t = n_leaves - 2; t >= 0; t--)
      c += words - (n_leaves - 2 - t) / lanes + 4;
    return c;
  endfunction

endpackage
