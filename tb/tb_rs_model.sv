// tb_rs_model: reference arithmetic for the Reed-Solomon testbenches.
//
// Works with exponent/logarithm tables built at run time by gf_setup(m, poly),
// a method independent of the shift-and-reduce multipliers in the RTL.
// Polynomials are int arrays indexed by degree. Codewords and received words
// are arrays in transmission order: element 0 is the highest-degree symbol
// c(N-1), element N-1 is c(0).
package tb_rs_model;

  int gm;
  int gq;
  int gexp[0:2047];
  int glog[0:1023];

  function automatic void gf_setup(int m, int poly);
    int x;
    gm = m;
    gq = (1 << m) - 1;
    x  = 1;
    for (int i = 0; i < gq; i++) begin
      gexp[i]      = x;
      gexp[i + gq] = x;
      glog[x]      = i;
      x = x << 1;
      if (((x >> m) & 1) != 0) x = x ^ poly;
    end
    glog[0] = 0;
  endfunction

  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  function automatic int pw(int e);
    return gexp[((e % gq) + gq) % gq];
  endfunction

  function automatic int inv(int a);
    return gexp[(gq - glog[a]) % gq];
  endfunction

  // g(x) = prod_{i=0}^{2t-1} (x + alpha^(start+i)); g has 2t+1 coefficients.
  function automatic void gen_poly(int t, int start, ref int g[]);
    int nx[];
    g = new[2*t + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int i = 0; i < 2*t; i++) begin
      int r;
      r  = pw(start + i);
      nx = new[2*t + 1];
      for (int j = 0; j <= 2*t; j++)
        nx[j] = mul(g[j], r) ^ ((j > 0) ? g[j-1] : 0);
      g = nx;
    end
  endfunction

  // Systematic encoding by long division of msg(x) x^2t by g(x).
  // msg[0] is the highest-degree message symbol; cw gets n = k + 2t symbols.
  function automatic void encode(int t, const ref int msg[], ref int cw[]);
    int g[];
    int rem[];
    int k;
    k = msg.size();
    gen_poly(t, 1, g);
    rem = new[k + 2*t];
    foreach (rem[i]) rem[i] = (i < k) ? msg[i] : 0;
    for (int i = 0; i < k; i++) begin
      int c;
      c = rem[i];
      if (c != 0)
        for (int j = 0; j <= 2*t; j++) rem[i + j] ^= mul(c, g[2*t - j]);
    end
    cw = new[k + 2*t];
    foreach (cw[i]) cw[i] = (i < k) ? msg[i] : rem[i];
  endfunction

  // Evaluate a word given in transmission order at x (Horner).
  function automatic int eval_word(const ref int w[], int x);
    int acc;
    acc = 0;
    foreach (w[i]) acc = mul(acc, x) ^ w[i];
    return acc;
  endfunction

  // Syndromes S_1..S_2t (s[i] = S_(i+1)).
  function automatic void syndromes(int t, const ref int w[], ref int s[]);
    s = new[2*t];
    foreach (s[i]) s[i] = eval_word(w, pw(i + 1));
  endfunction

  function automatic bit all_zero(const ref int s[]);
    foreach (s[i]) if (s[i] != 0) return 0;
    return 1;
  endfunction

  // Evaluate polynomial p (indexed by degree) at x.
  function automatic int eval_poly(const ref int p[], int x);
    int acc;
    acc = 0;
    for (int i = p.size() - 1; i >= 0; i--) acc = mul(acc, x) ^ p[i];
    return acc;
  endfunction

  // Random error pattern: nerr distinct positions (degrees 0..n-1), nonzero
  // values. e is in transmission order like the codeword.
  function automatic void make_errors(int n, int nerr, ref int e[]);
    int p;
    e = new[n];
    foreach (e[i]) e[i] = 0;
    for (int k = 0; k < nerr; k++) begin
      do p = int'($urandom_range(n - 1)); while (e[p] != 0);
      e[p] = 1 + int'($urandom_range(gq - 1));
    end
  endfunction

endpackage
