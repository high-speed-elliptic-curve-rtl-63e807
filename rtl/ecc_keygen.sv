// ecc_keygen: public-key generation Q = kP from an affine point P(x, y).
//
// The three stages of the key-generation path in series:
//   1. affine-to-projective: P(x, y) -> (x : y : 1). The point multiplier's
//      register array takes the base point with Z = 1 when it starts.
//   2. ecpm: Q(X : Y : Z) = kP by the Montgomery ladder.
//   3. proj2aff: Q(x, y) = (X/Z, Y/Z) by one inversion and two multipliers.
// With P the curve's base point and k a private key, (qx, qy) is the
// public key; with any other point it is a general scalar multiplication.
//
// Interface: pulse start with k, px, py, b, p valid and hold them until
// done. done pulses once when qx, qy are valid; they hold until the next
// start. Requires 1 <= k < group order.
module ecc_keygen #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] k,
  input  logic [N-1:0] px,
  input  logic [N-1:0] py,
  input  logic [N-1:0] b,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] qx,
  output logic [N-1:0] qy
);

  logic         pm_busy, pm_done, cv_busy;
  logic [N-1:0] X, Y, Z;

  ecpm #(.N(N)) u_ecpm (
    .clk, .rst_n, .start, .k, .xp(px), .yp(py), .b, .p,
    .busy(pm_busy), .done(pm_done), .qx(X), .qy(Y), .qz(Z)
  );

  proj2aff #(.N(N)) u_p2a (
    .clk, .rst_n, .start(pm_done), .x(X), .y(Y), .z(Z), .p,
    .busy(cv_busy), .done, .qx, .qy
  );

  assign busy = pm_busy | pm_done | cv_busy;

endmodule
