// rs_ref_pkg: reference Reed-Solomon arithmetic for the testbenches.
//
// Written independently of the RTL: field elements are ints, multiplication goes through
// exponent/logarithm tables built by gf_init, and the encoder, syndrome calculation and
// key-equation solver follow the textbook equations directly (no sharing, no pipelining).
// A codeword is an int array cw[0..n-1] with cw[j] the coefficient of x^j; the generator
// polynomial has the roots alpha^fcr .. alpha^(fcr+2t-1). Call gf_init(m, poly) first.
package rs_ref_pkg;

  int gm, gq, gpoly;
  int expt [0:131071];
  int logt [0:65535];

  function automatic void gf_init(input int m, input int poly);
    int a;
    gm = m; gq = (1 << m) - 1; gpoly = poly;
    a = 1;
    for (int e = 0; e < 2*gq; e++) begin
      expt[e] = a;
      if (e < gq) logt[a] = e;
      a = a << 1;
      if (a > gq) a = a ^ poly;
    end
    logt[0] = -1;
  endfunction

  function automatic int mul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return expt[logt[a] + logt[b]];
  endfunction

  function automatic int apow(input int e);
    int ee;
    ee = e % gq;
    if (ee < 0) ee += gq;
    return expt[ee];
  endfunction

  function automatic int inv(input int a);
    if (a == 0) return 0;
    return expt[(gq - logt[a]) % gq];
  endfunction

  // polynomial value p(x), p[k] = coefficient of x^k
  function automatic int peval(input int p[], input int x);
    int r;
    r = 0;
    for (int k = p.size() - 1; k >= 0; k--) r = mul(r, x) ^ p[k];
    return r;
  endfunction

  // systematic encoding: message in cw[2t..n-1], parity = remainder of msg*x^2t mod g
  function automatic void encode(input int n, input int t, input int fcr, ref int cw[]);
    int g[];
    int rem[];
    g = new[1]; g[0] = 1;
    for (int i = 0; i < 2*t; i++) begin
      int ng[];
      ng = new[g.size() + 1];
      foreach (ng[k]) ng[k] = 0;
      foreach (g[k]) begin
        ng[k+1] ^= g[k];
        ng[k]   ^= mul(g[k], apow(fcr + i));
      end
      g = ng;
    end
    rem = new[n];
    for (int j = 0; j < n; j++) rem[j] = (j < 2*t) ? 0 : cw[j];
    for (int d = n - 1; d >= 2*t; d--) begin
      int f;
      f = rem[d];
      if (f != 0) for (int k = 0; k <= 2*t; k++) rem[d - 2*t + k] ^= mul(f, g[k]);
    end
    for (int j = 0; j < 2*t; j++) cw[j] = rem[j];
  endfunction

  function automatic void syndromes(input int r[], input int t, input int fcr, ref int s[]);
    s = new[2*t];
    for (int i = 0; i < 2*t; i++) s[i] = peval(r, apow(fcr + i));
  endfunction

  // reformulated inversionless Berlekamp-Massey, one step per iteration, all 3t+1 indices
  function automatic void key_equation(input int s[], input int t, ref int lam[], ref int om[]);
    int d[], th[], nd[];
    int gam, k, d0;
    d  = new[3*t + 2];
    th = new[3*t + 2];
    nd = new[3*t + 2];
    for (int i = 0; i < 3*t + 2; i++) d[i] = (i < 2*t) ? s[i] : (i == 3*t) ? 1 : 0;
    th  = d;
    gam = 1; k = 0;
    for (int r = 0; r < 2*t; r++) begin
      d0 = d[0];
      for (int i = 0; i <= 3*t; i++) nd[i] = mul(gam, d[i+1]) ^ mul(th[i], d0);
      nd[3*t+1] = 0;
      if (d0 != 0 && k >= 0) begin
        for (int i = 0; i <= 3*t; i++) th[i] = d[i+1];
        th[3*t+1] = 0;
        gam = d0;
        k = -k - 1;
      end else k = k + 1;
      d = nd;
    end
    lam = new[t + 1];
    om  = new[t];
    for (int i = 0; i <= t; i++) lam[i] = d[t + i];
    for (int i = 0; i < t; i++)  om[i]  = d[i];
  endfunction

endpackage
