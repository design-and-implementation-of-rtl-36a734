// rs_pkg: Galois-field helper functions shared by the Reed-Solomon encoder
// and decoder.
//
// Every block is parameterised by the symbol width M and the field generator
// polynomial POLY (bit i = coefficient of x^i, bit M set). The functions here
// are evaluated at elaboration time only, to derive constants such as
// alpha^e and the inverse lookup table; the run-time arithmetic is done by
// the gf_mult and gf_add modules. The default field is GF(2^8) with
// p(x) = x^8 + x^4 + x^3 + x^2 + 1 (9'h11D), the field used by the design (RS(255,239), t = 8).
package rs_pkg;

  localparam int MAX_M = 16;
  typedef logic [MAX_M-1:0] gfw_t;
  typedef logic [MAX_M:0]   polyw_t;

  // Product of a and b in GF(2^m) modulo poly (shift-and-add, reduce on
  // every shift).
  function automatic gfw_t gf_mul(gfw_t a, gfw_t b, int m, polyw_t poly);
    gfw_t   p;
    polyw_t t;
    p = '0;
    t = {1'b0, a};
    for (int i = 0; i < MAX_M; i++) begin
      if (i < m) begin
        if (b[i]) p = p ^ t[MAX_M-1:0];
        t = t << 1;
        if (t[m]) t = t ^ poly;
      end
    end
    return p;
  endfunction

  // alpha^e, alpha = x, for any non-negative e.
  function automatic gfw_t gf_pow(int e, int m, polyw_t poly);
    gfw_t r;
    int   q;
    q = (1 << m) - 1;
    r = gfw_t'(1);
    for (int i = 0; i < (e % q); i++) r = gf_mul(r, gfw_t'(2), m, poly);
    return r;
  endfunction

  // Multiplicative inverse a^(2^m - 2); 0 maps to 0.
  function automatic gfw_t gf_inv(gfw_t a, int m, polyw_t poly);
    gfw_t r, s;
    r = gfw_t'(1);
    s = a;
    for (int i = 1; i < MAX_M; i++) begin
      if (i < m) begin
        s = gf_mul(s, s, m, poly);
        r = gf_mul(r, s, m, poly);
      end
    end
    return r;
  endfunction

  // Ceiling log2 helper for counter widths (at least 1).
  function automatic int clog2_min1(int v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
