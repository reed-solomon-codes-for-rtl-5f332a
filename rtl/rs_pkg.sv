// rs_pkg: shared types, constants and constant-table functions for the
// Reed-Solomon RS(255,239) codec over GF(2^8).
//
// The field is GF(2^8) built on the primitive polynomial
// p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D), alpha = 0x02 is a root of p(x).
// Symbols are 8-bit vectors in the polynomial basis, bit i is the
// coefficient of alpha^i. The generator polynomial has its first root at
// alpha^0 (b = 0): g(x) = prod_{i=0}^{2t-1} (x - alpha^i).
//
// The functions here are used at elaboration time to build constant tables
// (generator coefficients, the check-value scale factors G_i and the
// error-evaluation polynomial f(x)); the datapath modules use them as well
// for single field operations, which synthesise to XOR networks.
//
// Constant tables of the Welch-Berlekamp decoder:
//   C   = [ (alpha^0 alpha^1 ... alpha^(2t-2)) (alpha^0-alpha^1)...(alpha^0-alpha^(2t-1)) ]^-1
//   G_i = C * prod_{j != i, 0<=j<2t} (alpha^i - alpha^j)      (check value scale, R_i = r_i G_i)
//   f(x)= C * g(x)                                             (error evaluation)
// With this choice the error value at a data position i is exactly
// e_i = N(alpha^i) / ( f(alpha^i) Q'(alpha^i) ).
package rs_pkg;

  localparam int unsigned M        = 8;          // bits per symbol
  localparam int unsigned NFIELD   = 255;        // 2^m - 1, full code length
  localparam int unsigned T_DEF    = 8;          // error correcting capability
  localparam logic [M:0]  PRIM_POLY = 9'h11D;    // x^8+x^4+x^3+x^2+1

  typedef logic [M-1:0] gf_t;

  // Branch taken by one step of the modified Welch-Berlekamp algorithm.
  typedef enum logic [1:0] {
    WB_BR_A = 2'd0,   // D1 = 0: (W,V) *= (x - alpha_k), J += 1
    WB_BR_B = 2'd1,   // D1 != 0, J != 0: Q,N <- tmp of Q,N; W,V <- tmp of W,V
    WB_BR_C = 2'd2    // D1 != 0, J == 0: pairs swap, J = 1
  } wb_branch_e;

  // General multiplication, shift-and-add with reduction by p(x).
  function automatic gf_t gf_mul_f(gf_t a, gf_t b);
    logic [M-1:0] acc;
    logic [M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = sh[M-1] ? ((sh << 1) ^ PRIM_POLY[M-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  // Squaring as the fixed linear map of section "finite field
  // exponentiation": each output bit is an XOR of input bits.
  function automatic gf_t gf_sq_f(gf_t x);
    gf_t y;
    y[0] = x[0] ^ x[4] ^ x[6] ^ x[7];
    y[1] = x[7];
    y[2] = x[1] ^ x[4] ^ x[5] ^ x[6];
    y[3] = x[4] ^ x[6];
    y[4] = x[2] ^ x[4] ^ x[5] ^ x[7];
    y[5] = x[5];
    y[6] = x[3] ^ x[5] ^ x[6];
    y[7] = x[6];
    return y;
  endfunction

  // Fourth power as one linear map.
  function automatic gf_t gf_pow4_f(gf_t x);
    gf_t y;
    y[0] = x[0] ^ x[2] ^ x[3] ^ x[6];
    y[1] = x[6];
    y[2] = x[2] ^ x[3] ^ x[4] ^ x[5] ^ x[6];
    y[3] = x[2] ^ x[3] ^ x[4] ^ x[6] ^ x[7];
    y[4] = x[1] ^ x[2] ^ x[5] ^ x[7];
    y[5] = x[5];
    y[6] = x[3] ^ x[4];
    y[7] = x[3] ^ x[5] ^ x[6];
    return y;
  endfunction

  // Eighth power as one linear map.
  function automatic gf_t gf_pow8_f(gf_t x);
    gf_t y;
    y[0] = x[0] ^ x[1] ^ x[3] ^ x[4] ^ x[7];
    y[1] = x[3] ^ x[5] ^ x[6];
    y[2] = x[1] ^ x[2] ^ x[3] ^ x[4] ^ x[6] ^ x[7];
    y[3] = x[1] ^ x[2] ^ x[3] ^ x[4] ^ x[5] ^ x[7];
    y[4] = x[1] ^ x[4] ^ x[7];
    y[5] = x[5];
    y[6] = x[2] ^ x[5] ^ x[6] ^ x[7];
    y[7] = x[3] ^ x[4];
    return y;
  endfunction

  // Inverse as a^254 (Itoh-Tsujii style chain: 7 squarings, 6 products).
  // The inverse of 0 is returned as 0.
  function automatic gf_t gf_inv_f(gf_t a);
    gf_t p;   // a^(2^j - 1)
    p = a;                                  // a^1
    for (int j = 0; j < 6; j++)
      p = gf_mul_f(gf_sq_f(p), a);          // a^(2^(j+2)-1): 3,7,...,127
    return gf_sq_f(p);                      // a^254
  endfunction

  // Multiplication by alpha (x): one shift and a conditional reduction.
  function automatic gf_t gf_xtime(gf_t a);
    return a[M-1] ? ((a << 1) ^ PRIM_POLY[M-1:0]) : (a << 1);
  endfunction

  // alpha^e for any non-negative e (square and multiply over the bits of e).
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    logic [M-1:0] eb;
    eb = M'(e % NFIELD);
    r  = 8'h01;
    for (int b = M - 1; b >= 0; b--) begin
      r = gf_sq_f(r);
      if (eb[b]) r = gf_xtime(r);
    end
    return r;
  endfunction

  localparam int unsigned MAX_ROOTS = 64;   // largest 2T the tables support

  // Coefficient i of g(x) = prod_{j=0}^{nroots-1} (x - alpha^j).
  function automatic gf_t gen_poly_coef(int unsigned nroots, int unsigned i);
    gf_t g [MAX_ROOTS+1];
    gf_t a;
    for (int unsigned j = 0; j <= MAX_ROOTS; j++) g[j] = '0;
    g[0] = 8'h01;
    a    = 8'h01;                 // alpha^r
    for (int unsigned r = 0; r < nroots; r++) begin
      // multiply by (x + alpha^r)
      for (int unsigned j = r + 1; j > 0; j--)
        g[j] = g[j-1] ^ gf_mul_f(g[j], a);
      g[0] = gf_mul_f(g[0], a);
      a = gf_xtime(a);
    end
    return (i <= MAX_ROOTS) ? g[i] : '0;
  endfunction

  // Scale constant C of the error evaluator.
  function automatic gf_t wb_scale_c(int unsigned nroots);
    gf_t c;
    c = 8'h01;
    for (int unsigned i = 0; i + 1 < nroots; i++) c = gf_mul_f(c, gf_alpha_pow(i));
    for (int unsigned j = 1; j < nroots; j++)   c = gf_mul_f(c, 8'h01 ^ gf_alpha_pow(j));
    return gf_inv_f(c);
  endfunction

  // Check-value scale factor G_i (R_i = r_i * G_i).
  function automatic gf_t wb_g_const(int unsigned nroots, int unsigned i);
    gf_t v;
    v = wb_scale_c(nroots);
    for (int unsigned j = 0; j < nroots; j++)
      if (j != i) v = gf_mul_f(v, gf_alpha_pow(i) ^ gf_alpha_pow(j));
    return v;
  endfunction

  // Coefficient i of the error-evaluation polynomial f(x) = C g(x).
  function automatic gf_t wb_f_coef(int unsigned nroots, int unsigned i);
    return gf_mul_f(wb_scale_c(nroots), gen_poly_coef(nroots, i));
  endfunction

endpackage
