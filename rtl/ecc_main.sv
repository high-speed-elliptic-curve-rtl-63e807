// ecc_main: elliptic-curve message encryption and decryption (top level).
//
// Messages are points on the curve. With base point G, receiver key pair
// (d, A = dG) and a random k from the sender:
//   encrypt (enc_dec = 0): C1 = kG  -> (kpax, kpay)
//                          C2 = M + kA -> (px, py)      with aP = A
//   decrypt (enc_dec = 1): M  = C2 - d C1 -> (px, py)   with aP = C1,
//                          random_k = d, msg = C2
// Two units do the work, selected by an internal enable: the multiplier
// module (ecc_keygen: scalar multiplication with affine input and output)
// when enable = 0, and the point adder (point_add) when enable = 1. For
// decryption the adder gets the negated point (x, p - y).
// The signal names follow the design's main module (Random_K, Enc_Dec,
// Msg_x/y, aPx/y, Px/y); the ciphertext layout C1 = kG, C2 = M + kA is
// this design's reading of how those signals are used.
//
// Beside it stands the block-level point multiplier (ecc_dpm) with its own
// ports (dpm_*): point multiplication kP or double point multiplication
// kP + lR, built from separate point-doubling and point-addition units. It
// shares only the clock, reset and curve parameters with the encryption
// path.
//
// Also beside it, with its own ports (gf_*), stands the binary-field
// accelerator (ecc_accel_gf2m): kP over GF(2^M), default M = 233, with the
// curve constant b and the reduction polynomial supplied as inputs. It
// shares only the clock and reset.
//
// Interface: pulse start with all inputs valid; they are latched. done
// pulses once with px, py (and kpax, kpay after encryption) valid, held
// until the next start. p_inf flags a point-at-infinity result.
// Latency: encryption two scalar multiplications and one point addition,
// decryption one of each.
module ecc_main #(
  parameter int unsigned N  = ecc_pkg::N_DEFAULT,
  parameter logic [N-1:0] P  = ecc_pkg::P256_P[N-1:0],
  parameter logic [N-1:0] B  = ecc_pkg::P256_B[N-1:0],
  parameter logic [N-1:0] GX = ecc_pkg::P256_GX[N-1:0],
  parameter logic [N-1:0] GY = ecc_pkg::P256_GY[N-1:0],
  parameter int unsigned M  = 233
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] random_k,
  input  logic         enc_dec,
  input  logic [N-1:0] msg_x,
  input  logic [N-1:0] msg_y,
  input  logic [N-1:0] apx,
  input  logic [N-1:0] apy,
  output logic [N-1:0] kpax,
  output logic [N-1:0] kpay,
  output logic [N-1:0] px,
  output logic [N-1:0] py,
  output logic         p_inf,
  output logic         busy,
  output logic         done,
  // block-level point multiplier: kP (dpm_mode = 0) or kP + lR (1)
  input  logic         dpm_start,
  input  logic         dpm_mode,
  input  logic [N-1:0] dpm_k,
  input  logic [N-1:0] dpm_l,
  input  logic [N-1:0] dpm_px,
  input  logic [N-1:0] dpm_py,
  input  logic [N-1:0] dpm_rx,
  input  logic [N-1:0] dpm_ry,
  output logic [N-1:0] dpm_qx,
  output logic [N-1:0] dpm_qy,
  output logic         dpm_inf,
  output logic         dpm_busy,
  output logic         dpm_done,
  // binary-field accelerator: Q = kP over GF(2^M)
  input  logic         gf_start,
  input  logic [M-1:0] gf_k,
  input  logic [M-1:0] gf_xp,
  input  logic [M-1:0] gf_yp,
  input  logic [M-1:0] gf_b,
  input  logic [M-1:0] gf_poly,
  output logic [M-1:0] gf_qx,
  output logic [M-1:0] gf_qy,
  output logic         gf_inf,
  output logic         gf_busy,
  output logic         gf_done
);

  typedef enum logic [2:0] { IDLE, MUL_G, MUL_A, ADD, FIN } state_e;

  state_e       state_q;
  logic         enable;          // 0: multiplier module, 1: point adder
  logic         dec_q;
  logic [N-1:0] k_q, mx_q, my_q, ax_q, ay_q, sx_q, sy_q;
  logic         mul_start, mul_busy, mul_done, add_start, add_busy, add_done, add_dbl;
  logic [N-1:0] mul_px, mul_py, mul_qx, mul_qy, add_x3, add_y3;
  logic         add_inf;
  logic         go_q;            // one-cycle start pulse for the selected unit

  assign enable    = (state_q == ADD);
  assign mul_start = go_q && !enable;
  assign add_start = go_q && enable;
  assign mul_px    = (state_q == MUL_G) ? GX : ax_q;
  assign mul_py    = (state_q == MUL_G) ? GY : ay_q;
  assign busy      = (state_q != IDLE);

  ecc_keygen #(.N(N)) u_mult (
    .clk, .rst_n, .start(mul_start), .k(k_q), .px(mul_px), .py(mul_py), .b(B), .p(P),
    .busy(mul_busy), .done(mul_done), .qx(mul_qx), .qy(mul_qy)
  );

  point_add #(.N(N)) u_padd (
    .clk, .rst_n, .start(add_start),
    .x1(mx_q), .y1(my_q), .x2(sx_q), .y2(sy_q), .p(P),
    .busy(add_busy), .done(add_done), .dbl(add_dbl), .x3(add_x3), .y3(add_y3), .inf(add_inf)
  );

  ecc_dpm #(.N(N)) u_dpm (
    .clk, .rst_n, .start(dpm_start), .dpm(dpm_mode), .k(dpm_k), .l(dpm_l),
    .px(dpm_px), .py(dpm_py), .rx(dpm_rx), .ry(dpm_ry), .b(B), .p(P),
    .busy(dpm_busy), .done(dpm_done), .qx(dpm_qx), .qy(dpm_qy), .q_inf(dpm_inf)
  );

  ecc_accel_gf2m #(.M(M)) u_gf (
    .clk, .rst_n, .start(gf_start), .k(gf_k), .xp(gf_xp), .yp(gf_yp), .b(gf_b), .poly(gf_poly),
    .busy(gf_busy), .done(gf_done), .qx(gf_qx), .qy(gf_qy), .q_inf(gf_inf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      dec_q   <= 1'b0;
      go_q    <= 1'b0;
      {k_q, mx_q, my_q, ax_q, ay_q, sx_q, sy_q} <= '0;
      kpax  <= '0;
      kpay  <= '0;
      px    <= '0;
      py    <= '0;
      p_inf <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      go_q <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          k_q   <= random_k;
          dec_q <= enc_dec;
          mx_q  <= msg_x;
          my_q  <= msg_y;
          ax_q  <= apx;
          ay_q  <= apy;
          go_q  <= 1'b1;
          state_q <= enc_dec ? MUL_A : MUL_G;
        end
        MUL_G: if (mul_done) begin
          kpax    <= mul_qx;
          kpay    <= mul_qy;
          go_q    <= 1'b1;
          state_q <= MUL_A;
        end
        MUL_A: if (mul_done) begin
          sx_q    <= mul_qx;
          sy_q    <= (dec_q && mul_qy != '0) ? P - mul_qy : mul_qy;
          go_q    <= 1'b1;
          state_q <= ADD;
        end
        ADD: if (add_done) begin
          px      <= add_x3;
          py      <= add_y3;
          p_inf   <= add_inf;
          state_q <= FIN;
        end
        FIN: begin
          done    <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
