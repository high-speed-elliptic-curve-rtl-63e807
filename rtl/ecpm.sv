// ecpm: elliptic curve point multiplication Q = kP over GF(p).
//
// Datapath, register array and control unit of the point multiplier for
// curves y^2 = x^3 - 3x + b (all NIST prime curves). The Montgomery ladder
// runs on projective X/Z coordinates with two modular multipliers (M1, M2)
// and two modular squarers (S1, S2) working in parallel, a modular
// adder/subtractor, and a register array (X1, X2, Z1, Z2, T1..T8).
//   - Operand multiplexers pick a register or one of the curve inputs
//     (base_point_x, base_point_y, constant b) for each unit; the picked pair
//     is held in the unit's operand register until the unit is started.
//   - The result multiplexer picks one unit output or the adder output and
//     the demultiplexer writes it to one register per cycle.
//   - The ladder's operand switch is done in the register addressing
//     (ecpm_regfile), not by moving data.
// After the ladder, a y-recovery microprogram turns (kP, (k+1)P) and P
// into the projective point (qx : qy : qz) with qx/qz, qy/qz the affine
// result. The squarers are multiplier units fed the same operand twice.
//
// Interface: pulse start with k, xp, yp, b, p valid; they are sampled
// while the operation runs, so hold them until done. done pulses once
// when qx, qy, qz are valid; they hold until the next start.
// Valid for 1 <= k < group order with P of that order (kP finite, y != 0).
// Timing: N(6N+72) cycles for the ladder plus 6N+55 for the recovery
// (413,239 cycles at N = 256), counted from the start edge to done.
module ecpm #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] k,
  input  logic [N-1:0] xp,
  input  logic [N-1:0] yp,
  input  logic [N-1:0] b,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] qx,
  output logic [N-1:0] qy,
  output logic [N-1:0] qz
);
  import ecc_pkg::*;

  uop_t                   uop;
  logic                   exec, mul_start, init, swap;
  logic [NREG-1:0][N-1:0] regs;
  logic [N-1:0]           opa, opb, as_s, wdata;
  logic [3:0][N-1:0]      u_a_q, u_b_q, u_f;
  logic [3:0]             u_done, u_busy;
  logic                   we;

  function automatic logic [N-1:0] pick(opnd_e s, logic [NREG-1:0][N-1:0] r,
                                         logic [N-1:0] x, logic [N-1:0] y,
                                         logic [N-1:0] cb);
    case (s)
      S_XP:    return x;
      S_YP:    return y;
      S_CB:    return cb;
      S_ONE:   return N'(1);
      default: return r[s];
    endcase
  endfunction

  ecpm_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .k,
    .mul_done (u_done[0]),
    .uop, .exec, .mul_start, .init, .swap, .busy, .done
  );

  // Operand multiplexers.
  assign opa = pick(uop.a, regs, xp, yp, b);
  assign opb = pick(uop.b, regs, xp, yp, b);

  // Operand registers of the four units.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_a_q <= '0;
      u_b_q <= '0;
    end else if (exec && uop.kind == K_LD) begin
      u_a_q[uop.unit] <= opa;
      u_b_q[uop.unit] <= opb;
    end
  end

  mod_mul #(.N(N)) u_mul1 (.clk, .rst_n, .start(mul_start), .d(u_a_q[0]), .e(u_b_q[0]), .p,
                           .busy(u_busy[0]), .done(u_done[0]), .f(u_f[0]));
  mod_mul #(.N(N)) u_mul2 (.clk, .rst_n, .start(mul_start), .d(u_a_q[1]), .e(u_b_q[1]), .p,
                           .busy(u_busy[1]), .done(u_done[1]), .f(u_f[1]));
  mod_mul #(.N(N)) u_sqr1 (.clk, .rst_n, .start(mul_start), .d(u_a_q[2]), .e(u_a_q[2]), .p,
                           .busy(u_busy[2]), .done(u_done[2]), .f(u_f[2]));
  mod_mul #(.N(N)) u_sqr2 (.clk, .rst_n, .start(mul_start), .d(u_a_q[3]), .e(u_a_q[3]), .p,
                           .busy(u_busy[3]), .done(u_done[3]), .f(u_f[3]));

  mod_addsub #(.N(N)) u_addsub (.a(opa), .b(opb), .p, .sel(uop.kind == K_SUB), .s(as_s));

  // Result multiplexer and write enable (demultiplexer in the array).
  assign wdata = (uop.kind == K_WR) ? u_f[uop.unit] : as_s;
  assign we    = exec && (uop.kind inside {K_WR, K_ADD, K_SUB});

  ecpm_regfile #(.N(N)) u_rf (
    .clk, .rst_n, .init, .xp, .swap, .we,
    .waddr (uop.dst),
    .wdata,
    .rdata (regs)
  );

  assign qx = regs[R_T1];
  assign qy = regs[R_T6];
  assign qz = regs[R_T3];

  // All four units are started together and have the same latency.
  a_units_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                    u_done[0] |-> (u_done == 4'hF))
    else $error("ecpm: units out of step");

endmodule
