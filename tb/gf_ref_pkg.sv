// gf_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL (schoolbook shift-and-add, polynomial long
// division).  Field elements are bit vectors of canonical-basis
// coordinates, bit i = coefficient of alpha^i; poly holds the defining
// polynomial including its x^m term.
package gf_ref_pkg;

  typedef logic [63:0] word_t;

  // a * b mod poly, degree m
  function automatic word_t gf_mul(word_t a, word_t b, word_t poly, int m);
    word_t acc = '0;
    word_t x   = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) acc ^= x;
      x = x << 1;
      if (x[m]) x ^= poly;
    end
    return acc;
  endfunction

  // a^e mod poly
  function automatic word_t gf_pow(word_t a, longint unsigned e, word_t poly, int m);
    word_t r = 64'd1;
    word_t x = a;
    while (e != 0) begin
      if (e[0]) r = gf_mul(r, x, poly, m);
      x = gf_mul(x, x, poly, m);
      e = e >> 1;
    end
    return r;
  endfunction

  // inverse by a^(2^m - 2)
  function automatic word_t gf_inv(word_t a, word_t poly, int m);
    return gf_pow(a, (64'd1 << m) - 2, poly, m);
  endfunction

  // random element of GF(2^m)
  function automatic word_t gf_rand(int m);
    word_t v = {$urandom, $urandom};
    return (m >= 64) ? v : (v & ((64'd1 << m) - 1));
  endfunction

  // generator polynomial prod_{j=1..r} (x + alpha^j), alpha = x;
  // coefficient j in g[j], g[r] = 1
  function automatic void rs_gen(output word_t g[], input int r, input word_t poly, input int m);
    word_t root;
    g = new[r + 1];
    foreach (g[j]) g[j] = '0;
    g[0] = 64'd1;
    for (int n = 1; n <= r; n++) begin
      root = gf_pow(64'd2, longint'(n), poly, m);
      for (int j = n; j >= 1; j--) g[j] = g[j-1] ^ gf_mul(g[j], root, poly, m);
      g[0] = gf_mul(g[0], root, poly, m);
    end
  endfunction

  // parity symbols p_{r-1} .. p_0 of x^r d(x) mod g(x); d[0] is the
  // highest-degree data symbol
  function automatic void rs_parity(output word_t p[], input word_t d[], input word_t g[],
                                    input int r, input word_t poly, input int m);
    word_t rem[];
    word_t fb;
    rem = new[(r > 0) ? r : 1];
    foreach (rem[j]) rem[j] = '0;
    p = new[r];
    if (r > 0) begin
      foreach (d[i]) begin
        fb = d[i] ^ rem[r-1];
        for (int j = r - 1; j >= 1; j--) rem[j] = rem[j-1] ^ gf_mul(g[j], fb, poly, m);
        rem[0] = gf_mul(g[0], fb, poly, m);
      end
      for (int j = 0; j < r; j++) p[j] = rem[r-1-j];
    end
  endfunction

endpackage
