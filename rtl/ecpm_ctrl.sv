// ecpm_ctrl: control unit of the point multiplier.
//
// A microprogrammed state machine. The microprogram (function prog below)
// has two parts: one Montgomery-ladder step, run once per scalar bit from
// the most significant bit down, and the y-coordinate recovery, run once
// at the end. Each micro-op either loads an operand pair into one of the
// four arithmetic units (multipliers M1, M2 and squarers S1, S2), starts
// all units and waits for them (N+1 cycles), writes one unit's result into
// the register array, or performs one modular addition/subtraction. The
// datapath decodes the current micro-op into its multiplexer selects and
// write enable.
//
// The ladder swap output is the current scalar bit during the ladder and 0
// during recovery; the register array uses it to exchange the roles of the
// two ladder points, so the microprogram is the same for both bit values
// and every bit costs the same number of cycles.
//
// Ladder step (a = -3; D = point doubled, O = other point, difference = P):
//   X(D+O) = (XdXo + 3ZdZo)^2 - 4b ZdZo (XdZo + XoZd)
//   Z(D+O) = xP (XdZo - XoZd)^2
//   X(2D)  = (Xd^2 + 3Zd^2)^2 - 8b Xd Zd^3
//   Z(2D)  = 4 Zd (Xd^3 - 3 Xd Zd^2 + b Zd^3)
// Recovery from (X1:Z1) = kP, (X2:Z2) = (k+1)P and P = (x, y):
//   X = 2y Z1 Z2 X1,  Z = 2y Z1^2 Z2,
//   Y = 2b Z1^2 Z2 + Z2 (X1 x - 3 Z1)(X1 + x Z1) - X2 (X1 - x Z1)^2
// The result is left in T1 (X), T6 (Y) and T3 (Z).
// The ladder and the use of two multipliers and two squarers in parallel
// follow the design; these formulas and the schedule are this design's
// own choice.
//
// Timing: start is accepted when idle; done pulses once at the end. A
// ladder step takes 6 multiplier rounds (N+3 cycles each) plus 17 operand
// loads, 17 register writes, 19 additions and 1 loop cycle: 6N+72 cycles.
// The y-recovery takes 6N+55 cycles.
module ecpm_ctrl #(
  parameter int unsigned N = 256
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   k,
  input  logic           mul_done,
  output ecc_pkg::uop_t  uop,
  output logic           exec,      // uop is a one-cycle action this cycle
  output logic           mul_start, // start all multipliers and squarers
  output logic           init,      // load ladder start values
  output logic           swap,
  output logic           busy,
  output logic           done
);
  import ecc_pkg::*;

  localparam int unsigned PCW = 7;
  localparam logic [PCW-1:0] REC_START = 7'd74;

  function automatic uop_t mk(kind_e kd, unit_e un, opnd_e d, opnd_e a, opnd_e bo);
    uop_t u;
    u.kind = kd; u.unit = un; u.dst = d; u.a = a; u.b = bo;
    return u;
  endfunction
  function automatic uop_t ld(unit_e un, opnd_e a, opnd_e bo);
    return mk(K_LD, un, R_XD, a, bo);
  endfunction
  function automatic uop_t wr(unit_e un, opnd_e d);
    return mk(K_WR, un, d, R_XD, R_XD);
  endfunction
  function automatic uop_t ad(opnd_e d, opnd_e a, opnd_e bo);
    return mk(K_ADD, U_M1, d, a, bo);
  endfunction
  function automatic uop_t sb(opnd_e d, opnd_e a, opnd_e bo);
    return mk(K_SUB, U_M1, d, a, bo);
  endfunction
  function automatic uop_t ctl(kind_e kd);
    return mk(kd, U_M1, R_XD, R_XD, R_XD);
  endfunction

  function automatic uop_t prog(logic [PCW-1:0] pc);
    case (pc)
      // ---- ladder step, round 1: XdZo, XoZd, Xd^2, Zd^2
      7'd0:  return ld(U_M1, R_XD, R_ZO);
      7'd1:  return ld(U_M2, R_XO, R_ZD);
      7'd2:  return ld(U_S1, R_XD, R_XD);
      7'd3:  return ld(U_S2, R_ZD, R_ZD);
      7'd4:  return ctl(K_GO);
      7'd5:  return wr(U_M1, R_T1);
      7'd6:  return wr(U_M2, R_T2);
      7'd7:  return wr(U_S1, R_T3);
      7'd8:  return wr(U_S2, R_T4);
      7'd9:  return sb(R_T7, R_T1, R_T2);   // XdZo - XoZd
      7'd10: return ad(R_T1, R_T1, R_T2);   // XdZo + XoZd
      7'd11: return ad(R_T2, R_T4, R_T4);
      7'd12: return ad(R_T2, R_T2, R_T4);   // 3Zd^2
      7'd13: return ad(R_T8, R_T3, R_T2);   // Xd^2 + 3Zd^2
      7'd14: return sb(R_T2, R_T3, R_T2);   // Xd^2 - 3Zd^2
      // ---- round 2: XdXo, ZdZo, (XdZo-XoZd)^2, (Xd^2+3Zd^2)^2
      7'd15: return ld(U_M1, R_XD, R_XO);
      7'd16: return ld(U_M2, R_ZD, R_ZO);
      7'd17: return ld(U_S1, R_T7, R_T7);
      7'd18: return ld(U_S2, R_T8, R_T8);
      7'd19: return ctl(K_GO);
      7'd20: return wr(U_M1, R_T5);
      7'd21: return wr(U_M2, R_T6);
      7'd22: return wr(U_S1, R_T7);
      7'd23: return wr(U_S2, R_T8);
      7'd24: return ad(R_T3, R_T6, R_T6);
      7'd25: return ad(R_T3, R_T3, R_T6);   // 3ZdZo
      7'd26: return ad(R_T5, R_T5, R_T3);   // XdXo + 3ZdZo
      // ---- round 3: Zd^3, Xd(Xd^2-3Zd^2), (XdXo+3ZdZo)^2
      7'd27: return ld(U_M1, R_ZD, R_T4);
      7'd28: return ld(U_M2, R_XD, R_T2);
      7'd29: return ld(U_S1, R_T5, R_T5);
      7'd30: return ctl(K_GO);
      7'd31: return wr(U_M1, R_T4);
      7'd32: return wr(U_M2, R_T2);
      7'd33: return wr(U_S1, R_T5);
      // ---- round 4: b Zd^3, ZdZo (XdZo+XoZd)
      7'd34: return ld(U_M1, S_CB, R_T4);
      7'd35: return ld(U_M2, R_T1, R_T6);
      7'd36: return ctl(K_GO);
      7'd37: return wr(U_M1, R_T4);
      7'd38: return wr(U_M2, R_T1);
      7'd39: return ad(R_T2, R_T2, R_T4);   // Xd^3 - 3XdZd^2 + bZd^3
      // ---- round 5: b Xd Zd^3, b ZdZo (XdZo+XoZd)
      7'd40: return ld(U_M1, R_XD, R_T4);
      7'd41: return ld(U_M2, S_CB, R_T1);
      7'd42: return ctl(K_GO);
      7'd43: return wr(U_M1, R_T4);
      7'd44: return wr(U_M2, R_T1);
      7'd45: return ad(R_T4, R_T4, R_T4);
      7'd46: return ad(R_T4, R_T4, R_T4);
      7'd47: return ad(R_T4, R_T4, R_T4);   // 8b Xd Zd^3
      7'd48: return ad(R_T1, R_T1, R_T1);
      7'd49: return ad(R_T1, R_T1, R_T1);   // 4b ZdZo (..)
      7'd50: return sb(R_XO, R_T5, R_T1);   // X(D+O)
      7'd51: return sb(R_XD, R_T8, R_T4);   // X(2D)
      // ---- round 6: xP (XdZo-XoZd)^2, Zd (..)
      7'd52: return ld(U_M1, S_XP, R_T7);
      7'd53: return ld(U_M2, R_ZD, R_T2);
      7'd54: return ctl(K_GO);
      7'd55: return wr(U_M1, R_ZO);         // Z(D+O)
      7'd56: return wr(U_M2, R_ZD);
      7'd57: return ad(R_ZD, R_ZD, R_ZD);
      7'd58: return ad(R_ZD, R_ZD, R_ZD);   // Z(2D)
      7'd59: return ctl(K_STEP);
      // ---- y recovery (swap = 0: XD/ZD = X1/Z1 = kP, XO/ZO = X2/Z2)
      7'd74: return ld(U_M1, S_XP, R_ZD);   // x Z1
      7'd75: return ld(U_M2, S_XP, R_XD);   // x X1
      7'd76: return ld(U_S1, R_ZD, R_ZD);   // Z1^2
      7'd77: return ctl(K_GO);
      7'd78: return wr(U_M1, R_T1);
      7'd79: return wr(U_M2, R_T2);
      7'd80: return wr(U_S1, R_T3);
      7'd81: return ad(R_T5, R_ZD, R_ZD);
      7'd82: return ad(R_T5, R_T5, R_ZD);
      7'd83: return sb(R_T5, R_T2, R_T5);   // x X1 - 3 Z1
      7'd84: return ad(R_T6, R_XD, R_T1);   // X1 + x Z1
      7'd85: return sb(R_T7, R_XD, R_T1);   // X1 - x Z1
      7'd86: return ld(U_M1, R_T5, R_T6);
      7'd87: return ld(U_M2, R_T3, R_ZO);   // Z1^2 Z2
      7'd88: return ld(U_S1, R_T7, R_T7);
      7'd89: return ctl(K_GO);
      7'd90: return wr(U_M1, R_T5);
      7'd91: return wr(U_M2, R_T3);
      7'd92: return wr(U_S1, R_T7);
      7'd93: return ld(U_M1, R_T5, R_ZO);
      7'd94: return ld(U_M2, R_XO, R_T7);
      7'd95: return ctl(K_GO);
      7'd96: return wr(U_M1, R_T5);
      7'd97: return wr(U_M2, R_T7);
      7'd98: return ld(U_M1, S_CB, R_T3);
      7'd99: return ld(U_M2, S_YP, R_T3);
      7'd100: return ctl(K_GO);
      7'd101: return wr(U_M1, R_T6);
      7'd102: return wr(U_M2, R_T3);
      7'd103: return ad(R_T6, R_T6, R_T6);
      7'd104: return ad(R_T6, R_T6, R_T5);
      7'd105: return sb(R_T6, R_T6, R_T7);  // Y
      7'd106: return ad(R_T3, R_T3, R_T3);  // Z
      7'd107: return ld(U_M1, R_ZD, R_ZO);
      7'd108: return ld(U_M2, S_YP, R_XD);
      7'd109: return ctl(K_GO);
      7'd110: return wr(U_M1, R_T1);
      7'd111: return wr(U_M2, R_T2);
      7'd112: return ld(U_M1, R_T1, R_T2);
      7'd113: return ctl(K_GO);
      7'd114: return wr(U_M1, R_T1);
      7'd115: return ad(R_T1, R_T1, R_T1);  // X
      default: return ctl(K_END);
    endcase
  endfunction

  typedef enum logic [1:0] { IDLE, RUN, WAIT } state_e;

  state_e                 state_q;
  logic [PCW-1:0]         pc_q;
  logic [N-1:0]           k_q;
  logic [$clog2(N)-1:0]   idx_q;
  logic                   rec_q;

  assign uop       = prog(pc_q);
  assign busy      = (state_q != IDLE);
  assign swap      = rec_q ? 1'b0 : k_q[idx_q];
  assign exec      = (state_q == RUN) &&
                     (uop.kind inside {K_LD, K_WR, K_ADD, K_SUB});
  assign mul_start = (state_q == RUN) && (uop.kind == K_GO);
  assign init      = (state_q == IDLE) && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      pc_q    <= '0;
      k_q     <= '0;
      idx_q   <= '0;
      rec_q   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          k_q     <= k;
          idx_q   <= ($clog2(N))'(N - 1);
          pc_q    <= '0;
          rec_q   <= 1'b0;
          state_q <= RUN;
        end
        RUN: begin
          case (uop.kind)
            K_GO:   state_q <= WAIT;
            K_STEP: begin
              if (idx_q == '0) begin
                pc_q  <= REC_START;
                rec_q <= 1'b1;
              end else begin
                idx_q <= idx_q - 1'b1;
                pc_q  <= '0;
              end
            end
            K_END: begin
              done    <= 1'b1;
              state_q <= IDLE;
            end
            default: pc_q <= pc_q + 1'b1;
          endcase
        end
        WAIT: if (mul_done) begin
          pc_q    <= pc_q + 1'b1;
          state_q <= RUN;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
