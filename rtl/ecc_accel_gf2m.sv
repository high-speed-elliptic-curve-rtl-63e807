// ecc_accel_gf2m: binary-field elliptic curve accelerator, Q = kP on
// y^2 + xy = x^3 + a x^2 + b over GF(2^M) (default M = 233, the field of
// NIST B-233 / K-233 with f(x) = x^233 + x^74 + 1).
//
// Datapath: one bit-serial field multiplier (gf2m_mul, fed the reduction
// polynomial "poly"), one adder that is a layer of XOR gates, the four
// ladder registers X1, Z1, X2, Z2 (each behind an input multiplexer), the
// register RC for an inverse, three temporaries T1..T3, and the operand
// multiplexers, which also reach the inputs x, y and b. A finite state
// machine with start, scalar, busy and done steps a small program.
//
// Algorithm: the Montgomery ladder in x-only projective coordinates
// (Lopez-Dahab). (X1 : Z1) starts at the point at infinity (1 : 0) and
// (X2 : Z2) at P = (x : 1); for each scalar bit from the MSB one point is
// doubled and the sum is written to the other:
//   sum:    Z = (Xd Zo + Xo Zd)^2,  X = x Z + (Xd Zo)(Xo Zd)
//   double: X = Xd^4 + b Zd^4,      Z = Xd^2 Zd^2
// Which of (X1 : Z1), (X2 : Z2) is doubled follows the scalar bit; the
// swap is done in the operand and write multiplexers' addressing, so no
// register is copied for it and every bit costs the same time. The
// curve constant a does not enter these formulas.
// At the end, kP = (X1 : Z1) and (k+1)P = (X2 : Z2) are converted to the
// affine point (qx, qy): RC = (x Z1 Z2)^-1 by Fermat's theorem
// (a^(2^M - 2): M-1 squarings and M-2 multiplications on the same
// multiplier), then
//   qx = X1 x Z2 RC
//   qy = (qx + x) [(X1 + x Z1)(X2 + x Z2) + (x^2 + y) Z1 Z2] RC + y.
// The FSM, the single multiplier fed a polynomial, the XOR adder, the four
// registers plus RC, the ladder with a multiplexer operand switch, the
// inversion register and the final projective-to-affine conversion follow
// the design; the formulas, the temporaries T1..T3, the program and the
// handshake are this design's choice.
//
// Interface: pulse start with k, xp, yp, b, poly valid; hold them until
// done. done pulses once with qx, qy, q_inf valid; they hold until the
// next start. q_inf = 1 (qx = qy = 0) when kP is the point at infinity.
// P must be a point of the curve with x != 0, and (k+1)P must be finite.
// Timing: a multiplication takes M+3 cycles, an addition 1 cycle. A
// ladder bit takes 11(M+3) + 4 cycles; the conversion (2M + 9)(M+3) + 8.
module ecc_accel_gf2m #(
  parameter int unsigned M = 233
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  input  logic [M-1:0] b,
  input  logic [M-1:0] poly,     // f(x) without x^M, e.g. x^74 + 1
  output logic         busy,
  output logic         done,
  output logic [M-1:0] qx,
  output logic [M-1:0] qy,
  output logic         q_inf
);

  // Operand and register names. XD/ZD: point being doubled, XO/ZO: the
  // other point; they map to X1/Z1 and X2/Z2 by the scalar bit.
  typedef enum logic [3:0] {
    XD, ZD, XO, ZO, RC, T1, T2, T3, SX, SY, SB
  } opnd_e;
  localparam int NREG = 8;

  typedef enum logic [2:0] { O_MUL, O_ADD, O_INV, O_STEP, O_END } op_e;
  typedef struct packed { op_e op; opnd_e d; opnd_e a; opnd_e b; } inst_t;

  typedef enum logic [2:0] { IDLE, EXEC, MWAIT, ISTART, IWAIT } state_e;

  localparam logic [5:0] REC_START = 6'd15;

  state_e                 state_q;
  logic [5:0]             pc_q;
  logic [$clog2(M)-1:0]   idx_q;
  logic [$clog2(M)-1:0]   icnt_q;
  logic                   isq_q;     // inversion: next product is a squaring
  logic                   rec_q;     // ladder finished, recovery running
  logic [NREG-1:0][M-1:0] rf_q;
  logic [M-1:0]           opa, opb, m_a, m_b, m_c;
  logic                   m_start, m_busy, m_done, inv_mode, swap;
  inst_t                  ins;

  function automatic inst_t i_(op_e o, opnd_e d, opnd_e a, opnd_e bb);
    return '{op: o, d: d, a: a, b: bb};
  endfunction

  function automatic inst_t prog(logic [5:0] pc);
    case (pc)
      // ---- ladder step
      6'd0:  return i_(O_MUL, T1, XD, ZO);   // Xd Zo
      6'd1:  return i_(O_MUL, T2, XO, ZD);   // Xo Zd
      6'd2:  return i_(O_ADD, T3, T1, T2);
      6'd3:  return i_(O_MUL, ZO, T3, T3);   // Z(sum)
      6'd4:  return i_(O_MUL, T1, T1, T2);
      6'd5:  return i_(O_MUL, T2, SX, ZO);
      6'd6:  return i_(O_ADD, XO, T2, T1);   // X(sum)
      6'd7:  return i_(O_MUL, XD, XD, XD);   // Xd^2
      6'd8:  return i_(O_MUL, ZD, ZD, ZD);   // Zd^2
      6'd9:  return i_(O_MUL, T1, ZD, ZD);   // Zd^4
      6'd10: return i_(O_MUL, T1, SB, T1);   // b Zd^4
      6'd11: return i_(O_MUL, ZD, XD, ZD);   // Z(double)
      6'd12: return i_(O_MUL, XD, XD, XD);   // Xd^4
      6'd13: return i_(O_ADD, XD, XD, T1);   // X(double)
      6'd14: return i_(O_STEP, T1, T1, T1);
      // ---- conversion to affine (swap = 0: XD/ZD = X1/Z1, XO/ZO = X2/Z2)
      6'd15: return i_(O_MUL, T1, ZD, ZO);   // Z1 Z2
      6'd16: return i_(O_MUL, T2, SX, T1);   // x Z1 Z2
      6'd17: return i_(O_INV, RC, T2, T2);   // RC = (x Z1 Z2)^-1
      6'd18: return i_(O_MUL, T3, SX, SX);
      6'd19: return i_(O_ADD, T3, T3, SY);
      6'd20: return i_(O_MUL, T3, T3, T1);   // (x^2 + y) Z1 Z2
      6'd21: return i_(O_MUL, T1, SX, ZD);
      6'd22: return i_(O_ADD, T1, T1, XD);   // X1 + x Z1
      6'd23: return i_(O_MUL, T2, SX, ZO);
      6'd24: return i_(O_ADD, T2, T2, XO);   // X2 + x Z2
      6'd25: return i_(O_MUL, T1, T1, T2);
      6'd26: return i_(O_ADD, T1, T1, T3);
      6'd27: return i_(O_MUL, T2, SX, ZO);
      6'd28: return i_(O_MUL, T2, T2, XD);
      6'd29: return i_(O_MUL, T2, T2, RC);   // qx
      6'd30: return i_(O_ADD, T3, T2, SX);
      6'd31: return i_(O_MUL, T3, T3, T1);
      6'd32: return i_(O_MUL, T3, T3, RC);
      6'd33: return i_(O_ADD, T3, T3, SY);   // qy
      default: return i_(O_END, T1, T1, T1);
    endcase
  endfunction

  // Physical register of a logical ladder name under the current swap.
  function automatic logic [2:0] phys(opnd_e o, logic sw);
    logic [2:0] r = o[2:0];
    if (o inside {XD, ZD, XO, ZO} && sw) r = r ^ 3'd2;
    return r;
  endfunction

  function automatic logic [M-1:0] pick(opnd_e o, logic [NREG-1:0][M-1:0] r, logic sw,
                                        logic [M-1:0] x, logic [M-1:0] y, logic [M-1:0] cb);
    case (o)
      SX:      return x;
      SY:      return y;
      SB:      return cb;
      default: return r[phys(o, sw)];
    endcase
  endfunction

  assign ins      = prog(pc_q);
  assign swap     = !rec_q && k[idx_q];
  assign opa      = pick(ins.a, rf_q, swap, xp, yp, b);
  assign opb      = pick(ins.b, rf_q, swap, xp, yp, b);
  assign inv_mode = (state_q == ISTART) || (state_q == IWAIT);
  assign m_a      = inv_mode ? rf_q[RC] : opa;
  assign m_b      = inv_mode ? (isq_q ? rf_q[RC] : opa) : opb;
  assign m_start  = ((state_q == EXEC) && ins.op == O_MUL) || (state_q == ISTART);
  assign busy     = (state_q != IDLE);

  gf2m_mul #(.M(M)) u_mul (.clk, .rst_n, .start(m_start), .a(m_a), .b(m_b), .poly,
                           .busy(m_busy), .done(m_done), .c(m_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      pc_q    <= '0;
      idx_q   <= '0;
      icnt_q  <= '0;
      isq_q   <= 1'b0;
      rec_q   <= 1'b0;
      rf_q    <= '0;
      qx      <= '0;
      qy      <= '0;
      q_inf   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          rf_q[0] <= M'(1);   // X1 : Z1 = 1 : 0, the point at infinity
          rf_q[1] <= '0;
          rf_q[2] <= xp;      // X2 : Z2 = x : 1, the base point
          rf_q[3] <= M'(1);
          idx_q   <= ($clog2(M))'(M - 1);
          rec_q   <= 1'b0;
          pc_q    <= '0;
          state_q <= EXEC;
        end
        EXEC: begin
          case (ins.op)
            O_MUL: state_q <= MWAIT;
            O_ADD: begin
              rf_q[phys(ins.d, swap)] <= opa ^ opb;
              pc_q <= pc_q + 1'b1;
            end
            O_INV: begin
              rf_q[RC] <= opa;
              icnt_q   <= '0;
              isq_q    <= 1'b1;
              state_q  <= ISTART;
            end
            O_STEP: begin
              if (idx_q == '0) begin
                rec_q <= 1'b1;
                pc_q  <= REC_START;
              end else begin
                idx_q <= idx_q - 1'b1;
                pc_q  <= '0;
              end
            end
            default: begin  // O_END
              q_inf   <= (rf_q[1] == '0);
              qx      <= (rf_q[1] == '0) ? '0 : rf_q[T2];
              qy      <= (rf_q[1] == '0) ? '0 : rf_q[T3];
              done    <= 1'b1;
              state_q <= IDLE;
            end
          endcase
        end
        MWAIT: if (m_done) begin
          rf_q[phys(ins.d, swap)] <= m_c;
          pc_q    <= pc_q + 1'b1;
          state_q <= EXEC;
        end
        ISTART: state_q <= IWAIT;
        IWAIT: if (m_done) begin
          rf_q[RC] <= m_c;
          if (isq_q && icnt_q == ($clog2(M))'(M - 2)) begin
            pc_q    <= pc_q + 1'b1;   // last squaring: inverse complete
            state_q <= EXEC;
          end else begin
            if (!isq_q) icnt_q <= icnt_q + 1'b1;
            isq_q   <= !isq_q;
            state_q <= ISTART;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
