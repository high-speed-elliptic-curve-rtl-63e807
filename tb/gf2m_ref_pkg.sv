// gf2m_ref_pkg: behavioural reference arithmetic in GF(2^233) for the
// binary-field testbenches.
//
// Polynomial basis with f(x) = x^233 + x^74 + 1. Multiplication is a plain
// shift-and-XOR loop, inversion is Fermat's a^(2^233 - 2), and points on
// y^2 + xy = x^3 + a x^2 + b are added in affine coordinates by the
// textbook group law; scalar multiplication is double-and-add.
package gf2m_ref_pkg;

  localparam int M = 233;
  typedef logic [M-1:0] ge_t;
  typedef struct packed { logic inf; ge_t x; ge_t y; } gpt_t;

  localparam ge_t POLY = (ge_t'(1) << 74) | ge_t'(1);

  function automatic ge_t g_mul(ge_t a, ge_t b);
    ge_t r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = r[M-1] ? ({r[M-2:0], 1'b0} ^ POLY) : {r[M-2:0], 1'b0};
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  function automatic ge_t g_inv(ge_t a);
    ge_t r = a;
    for (int i = 0; i < M - 2; i++) r = g_mul(g_mul(r, r), a);
    return g_mul(r, r);
  endfunction

  function automatic ge_t rand_ge();
    ge_t r;
    for (int i = 0; i < (M + 31) / 32; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  function automatic gpt_t g_add(gpt_t p1, gpt_t p2, logic ca);
    gpt_t r;
    ge_t  l;
    r.inf = 1'b0;
    if (p1.inf) return p2;
    if (p2.inf) return p1;
    if (p1.x == p2.x) begin
      if (p1.y != p2.y || p1.x == '0) begin
        r.inf = 1'b1; r.x = '0; r.y = '0;
        return r;
      end
      l   = p1.x ^ g_mul(p1.y, g_inv(p1.x));
      r.x = g_mul(l, l) ^ l ^ ge_t'(ca);
      r.y = g_mul(p1.x, p1.x) ^ g_mul(l ^ ge_t'(1), r.x);
    end else begin
      l   = g_mul(p1.y ^ p2.y, g_inv(p1.x ^ p2.x));
      r.x = g_mul(l, l) ^ l ^ p1.x ^ p2.x ^ ge_t'(ca);
      r.y = g_mul(l, p1.x ^ r.x) ^ r.x ^ p1.y;
    end
    return r;
  endfunction

  function automatic gpt_t g_smul(ge_t k, gpt_t p, logic ca);
    gpt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = g_add(r, r, ca);
      if (k[i]) r = g_add(r, p, ca);
    end
    return r;
  endfunction

endpackage
