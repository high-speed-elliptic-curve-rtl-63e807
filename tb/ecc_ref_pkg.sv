// ecc_ref_pkg: behavioural reference arithmetic for the testbenches.
//
// Straightforward GF(p) and curve arithmetic written with wide integer
// operators (*, %), independent of the RTL's algorithms: modular add, sub,
// mul, inverse by Fermat's little theorem, affine point addition/doubling
// on y^2 = x^3 - 3x + b, and double-and-add scalar multiplication.
// Values are 256 bits wide; smaller fields use the low bits.
package ecc_ref_pkg;

  typedef logic [255:0] fe_t;
  typedef struct packed { logic inf; fe_t x; fe_t y; } pt_t;

  function automatic fe_t f_add(fe_t a, fe_t b, fe_t p);
    logic [256:0] s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, p}) s = s - {1'b0, p};
    return s[255:0];
  endfunction

  function automatic fe_t f_sub(fe_t a, fe_t b, fe_t p);
    return (a >= b) ? a - b : a + (p - b);
  endfunction

  function automatic fe_t f_mul(fe_t a, fe_t b, fe_t p);
    logic [511:0] t = {256'd0, a} * {256'd0, b};
    t = t % {256'd0, p};
    return t[255:0];
  endfunction

  function automatic fe_t f_pow(fe_t a, fe_t e, fe_t p);
    fe_t r = 256'd1;
    for (int i = 255; i >= 0; i--) begin
      r = f_mul(r, r, p);
      if (e[i]) r = f_mul(r, a, p);
    end
    return r;
  endfunction

  function automatic fe_t f_inv(fe_t a, fe_t p);
    return f_pow(a, p - 256'd2, p);
  endfunction

  function automatic pt_t pt_add(pt_t P1, pt_t P2, fe_t p);
    pt_t r;
    fe_t l, num, den;
    if (P1.inf) return P2;
    if (P2.inf) return P1;
    if (P1.x == P2.x) begin
      if (f_add(P1.y, P2.y, p) == 0) begin
        r.inf = 1'b1; r.x = '0; r.y = '0;
        return r;
      end
      num = f_sub(f_mul(256'd3, f_mul(P1.x, P1.x, p), p), 256'd3 % p, p);
      den = f_add(P1.y, P1.y, p);
    end else begin
      num = f_sub(P2.y, P1.y, p);
      den = f_sub(P2.x, P1.x, p);
    end
    l = f_mul(num, f_inv(den, p), p);
    r.inf = 1'b0;
    r.x = f_sub(f_sub(f_mul(l, l, p), P1.x, p), P2.x, p);
    r.y = f_sub(f_mul(l, f_sub(P1.x, r.x, p), p), P1.y, p);
    return r;
  endfunction

  function automatic pt_t pt_mul(fe_t k, pt_t P, fe_t p);
    pt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = 255; i >= 0; i--) begin
      r = pt_add(r, r, p);
      if (k[i]) r = pt_add(r, P, p);
    end
    return r;
  endfunction

  function automatic pt_t mk_pt(fe_t x, fe_t y);
    pt_t r;
    r.inf = 1'b0; r.x = x; r.y = y;
    return r;
  endfunction

  function automatic fe_t rand_fe(fe_t p);
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[32*i +: 32] = $urandom;
    r = r % {256'd0, p};
    return r[255:0];
  endfunction

  localparam fe_t P256_P  = 256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff;
  localparam fe_t P256_B  = 256'h5ac635d8aa3a93e7b3ebbd55769886bc651d06b0cc53b0f63bce3c3e27d2604b;
  localparam fe_t P256_GX = 256'h6b17d1f2e12c4247f8bce6e563a440f277037d812deb33a0f4a13945d898c296;
  localparam fe_t P256_GY = 256'h4fe342e2fe1a7f9b8ee7eb4a7c0f9e162bce33576b315ececbb6406837bf51f5;

endpackage
