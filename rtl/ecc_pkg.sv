// ecc_pkg: shared constants and types of the GF(p) elliptic-curve datapath.
//
// Holds the default field width (256 bits), the NIST P-256 domain constants
// (prime p, curve constant b, base point G; the curve is y^2 = x^3 - 3x + b),
// and the micro-operation format used by the point multiplier's control unit.
// The curve constants are the published FIPS 186-4 values; the micro-op
// encoding is this design's own.
package ecc_pkg;

  localparam int unsigned N_DEFAULT = 256;

  localparam logic [255:0] P256_P  = 256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff;
  localparam logic [255:0] P256_B  = 256'h5ac635d8aa3a93e7b3ebbd55769886bc651d06b0cc53b0f63bce3c3e27d2604b;
  localparam logic [255:0] P256_GX = 256'h6b17d1f2e12c4247f8bce6e563a440f277037d812deb33a0f4a13945d898c296;
  localparam logic [255:0] P256_GY = 256'h4fe342e2fe1a7f9b8ee7eb4a7c0f9e162bce33576b315ececbb6406837bf51f5;

  // Operand / destination names of the point multiplier. The first twelve are
  // registers of the register array (XD/ZD: the point being doubled, XO/ZO:
  // the other ladder point, mapped onto X1/Z1/X2/Z2 by the ladder swap).
  // XP, YP, CB are the base-point coordinates and curve constant b.
  typedef enum logic [3:0] {
    R_XD = 4'd0, R_ZD = 4'd1, R_XO = 4'd2, R_ZO = 4'd3,
    R_T1 = 4'd4, R_T2 = 4'd5, R_T3 = 4'd6, R_T4 = 4'd7,
    R_T5 = 4'd8, R_T6 = 4'd9, R_T7 = 4'd10, R_T8 = 4'd11,
    S_XP = 4'd12, S_YP = 4'd13, S_CB = 4'd14, S_ONE = 4'd15
  } opnd_e;

  localparam int unsigned NREG = 12;

  // Arithmetic units around the register array.
  typedef enum logic [1:0] { U_M1 = 2'd0, U_M2 = 2'd1, U_S1 = 2'd2, U_S2 = 2'd3 } unit_e;

  typedef enum logic [2:0] {
    K_LD   = 3'd0,  // load operand pair a,b into the input register of unit
    K_GO   = 3'd1,  // start all multipliers/squarers, wait for completion
    K_WR   = 3'd2,  // write result of unit into dst (output mux + demux)
    K_ADD  = 3'd3,  // dst = a + b mod p (modular adder, 1 cycle)
    K_SUB  = 3'd4,  // dst = a - b mod p
    K_STEP = 3'd5,  // end of one ladder step: next scalar bit or y-recovery
    K_END  = 3'd6   // end of point multiplication
  } kind_e;

  typedef struct packed {
    kind_e kind;
    unit_e unit;
    opnd_e dst;
    opnd_e a;
    opnd_e b;
  } uop_t;

endpackage
