// tb_gf_pkg: reference GF(2^8) arithmetic for the testbenches.
//
// Written independently of the design: multiplication is a carry-less
// 16-bit product reduced bit by bit with p(x) = x^8+x^4+x^3+x^2+1, and the
// inverse is found by search. Polynomials are arrays of coefficients,
// index = degree.
package tb_gf_pkg;
  typedef logic [7:0] sym_t;

  function automatic sym_t ref_mul(sym_t a, sym_t b);
    logic [15:0] prod;
    prod = '0;
    for (int i = 0; i < 8; i++) if (b[i]) prod ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (prod[i]) prod ^= (16'h011D << (i - 8));
    return prod[7:0];
  endfunction

  function automatic sym_t ref_pow(sym_t a, int e);
    sym_t r = 8'h01;
    for (int i = 0; i < e; i++) r = ref_mul(r, a);
    return r;
  endfunction

  function automatic sym_t ref_inv(sym_t a);
    for (int c = 1; c < 256; c++) if (ref_mul(a, sym_t'(c)) == 8'h01) return sym_t'(c);
    return 8'h00;
  endfunction

  // alpha^e
  function automatic sym_t ref_alpha(int e);
    return ref_pow(8'h02, ((e % 255) + 255) % 255);
  endfunction

  // Polynomials of degree < 256, index = degree.
  typedef sym_t poly_t [256];

  function automatic sym_t ref_eval(poly_t p, sym_t x);
    sym_t acc = 8'h00;
    for (int d = 255; d >= 0; d--) acc = ref_mul(acc, x) ^ p[d];
    return acc;
  endfunction

  // g(x) = prod_{i<nroots} (x + alpha^i)
  function automatic poly_t ref_genpoly(int nroots);
    poly_t g;
    foreach (g[d]) g[d] = 8'h00;
    g[0] = 8'h01;
    for (int i = 0; i < nroots; i++) begin
      poly_t h;
      foreach (h[d]) h[d] = ref_mul(g[d], ref_alpha(i)) ^ ((d > 0) ? g[d-1] : 8'h00);
      g = h;
    end
    return g;
  endfunction

  // v(x) mod g(x), by long division
  function automatic poly_t ref_mod(poly_t v, int nroots);
    poly_t g, r;
    g = ref_genpoly(nroots);
    r = v;
    for (int d = 255; d >= nroots; d--)
      if (r[d] != 8'h00) begin
        sym_t q = r[d];
        for (int i = 0; i <= nroots; i++) r[d - nroots + i] ^= ref_mul(q, g[i]);
      end
    return r;
  endfunction

  // formal derivative
  function automatic poly_t ref_deriv(poly_t p);
    poly_t q;
    foreach (q[d]) q[d] = (d < 255 && (d % 2 == 0)) ? p[d+1] : 8'h00;
    return q;
  endfunction

  // error-evaluation constant C = 1 / ( prod_{i<P-1} alpha^i * prod_{0<j<P} (1 + alpha^j) )
  function automatic sym_t ref_c(int nroots);
    sym_t c = 8'h01;
    for (int i = 0; i < nroots - 1; i++) c = ref_mul(c, ref_alpha(i));
    for (int j = 1; j < nroots; j++) c = ref_mul(c, 8'h01 ^ ref_alpha(j));
    return ref_inv(c);
  endfunction
endpackage
