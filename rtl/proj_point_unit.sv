// proj_point_unit: point addition or point doubling in standard projective
// coordinates on y^2 = x^3 - 3x + b, without inversion.
//
// One unit of the block-level point multiplier. Parameter ADD selects the
// operation, and the multiplier instantiates one unit of each kind:
//   ADD = 1: (X3 : Y3 : Z3) = (X1 : Y1 : Z1) + (X2 : Y2 : Z2)
//   ADD = 0: (X3 : Y3 : Z3) = 2 (X1 : Y1 : Z1)            (X2..Z2 unused)
// A point (X : Y : Z) stands for the affine point (X/Z, Y/Z); the point at
// infinity is (0 : 1 : 0). The complete formulas for a = -3 (Renes,
// Costello and Batina, 2016) are used, so every input pair, including
// equal points, opposite points and infinity, goes through the same
// program with no special cases. Addition takes 14 multiplications and
// 29 additions/subtractions, doubling 13 and 21.
//
// Structure: an operand multiplexer reads two entries of a register bank
// (inputs X1..Z2, the constant b, temporaries t0..t4 and the results
// X3..Z3) and feeds one modular adder/subtractor and one modular
// multiplier; their results are written back into the bank. A program
// counter steps through the formula, one operation at a time.
// The mux / adder-subtractor / multiplier / register-bank structure of
// each unit follows the design; the formulas and the program are this
// design's choice.
//
// Interface: pulse start with the points, b and p valid; they are latched.
// done pulses once when (x3, y3, z3) are valid; they hold until the next
// start. Timing: an addition or subtraction takes 1 cycle, a
// multiplication N+3 cycles (start, N+1 cycles of the multiplier, write),
// plus one final cycle: 14(N+3) + 30 cycles for addition (3656 at N =
// 256), 13(N+3) + 22 for doubling (3389).
module proj_point_unit #(
  parameter int unsigned N   = 256,
  parameter bit          ADD = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x1,
  input  logic [N-1:0] y1,
  input  logic [N-1:0] z1,
  input  logic [N-1:0] x2,
  input  logic [N-1:0] y2,
  input  logic [N-1:0] z2,
  input  logic [N-1:0] b,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] x3,
  output logic [N-1:0] y3,
  output logic [N-1:0] z3
);

  // Register bank entries.
  typedef enum logic [3:0] {
    RX1, RY1, RZ1, RX2, RY2, RZ2, RB, T0, T1, T2, T3, T4, RX3, RY3, RZ3
  } reg_e;
  localparam int NR = 15;

  typedef enum logic [1:0] { O_MUL, O_ADD, O_SUB, O_END } op_e;
  typedef struct packed { op_e op; reg_e d; reg_e a; reg_e b; } inst_t;

  typedef enum logic [1:0] { IDLE, EXEC, MWAIT } state_e;

  state_e              state_q;
  logic [5:0]          pc_q;
  logic [NR-1:0][N-1:0] bank_q;
  logic [N-1:0]        p_q, opa, opb, as_s, m_f;
  logic                m_start, m_busy, m_done;
  inst_t               ins;

  function automatic inst_t i_(op_e o, reg_e d, reg_e a, reg_e bb);
    return '{op: o, d: d, a: a, b: bb};
  endfunction

  // Complete addition, a = -3.
  function automatic inst_t prog_add(logic [5:0] pc);
    case (pc)
      6'd0:  return i_(O_MUL, T0,  RX1, RX2);
      6'd1:  return i_(O_MUL, T1,  RY1, RY2);
      6'd2:  return i_(O_MUL, T2,  RZ1, RZ2);
      6'd3:  return i_(O_ADD, T3,  RX1, RY1);
      6'd4:  return i_(O_ADD, T4,  RX2, RY2);
      6'd5:  return i_(O_MUL, T3,  T3,  T4);
      6'd6:  return i_(O_ADD, T4,  T0,  T1);
      6'd7:  return i_(O_SUB, T3,  T3,  T4);
      6'd8:  return i_(O_ADD, T4,  RY1, RZ1);
      6'd9:  return i_(O_ADD, RX3, RY2, RZ2);
      6'd10: return i_(O_MUL, T4,  T4,  RX3);
      6'd11: return i_(O_ADD, RX3, T1,  T2);
      6'd12: return i_(O_SUB, T4,  T4,  RX3);
      6'd13: return i_(O_ADD, RX3, RX1, RZ1);
      6'd14: return i_(O_ADD, RY3, RX2, RZ2);
      6'd15: return i_(O_MUL, RX3, RX3, RY3);
      6'd16: return i_(O_ADD, RY3, T0,  T2);
      6'd17: return i_(O_SUB, RY3, RX3, RY3);
      6'd18: return i_(O_MUL, RZ3, RB,  T2);
      6'd19: return i_(O_SUB, RX3, RY3, RZ3);
      6'd20: return i_(O_ADD, RZ3, RX3, RX3);
      6'd21: return i_(O_ADD, RX3, RX3, RZ3);
      6'd22: return i_(O_SUB, RZ3, T1,  RX3);
      6'd23: return i_(O_ADD, RX3, T1,  RX3);
      6'd24: return i_(O_MUL, RY3, RB,  RY3);
      6'd25: return i_(O_ADD, T1,  T2,  T2);
      6'd26: return i_(O_ADD, T2,  T1,  T2);
      6'd27: return i_(O_SUB, RY3, RY3, T2);
      6'd28: return i_(O_SUB, RY3, RY3, T0);
      6'd29: return i_(O_ADD, T1,  RY3, RY3);
      6'd30: return i_(O_ADD, RY3, T1,  RY3);
      6'd31: return i_(O_ADD, T1,  T0,  T0);
      6'd32: return i_(O_ADD, T0,  T1,  T0);
      6'd33: return i_(O_SUB, T0,  T0,  T2);
      6'd34: return i_(O_MUL, T1,  T4,  RY3);
      6'd35: return i_(O_MUL, T2,  T0,  RY3);
      6'd36: return i_(O_MUL, RY3, RX3, RZ3);
      6'd37: return i_(O_ADD, RY3, RY3, T2);
      6'd38: return i_(O_MUL, RX3, T3,  RX3);
      6'd39: return i_(O_SUB, RX3, RX3, T1);
      6'd40: return i_(O_MUL, RZ3, T4,  RZ3);
      6'd41: return i_(O_MUL, T1,  T3,  T0);
      6'd42: return i_(O_ADD, RZ3, RZ3, T1);
      default: return i_(O_END, T0, T0, T0);
    endcase
  endfunction

  // Doubling, a = -3.
  function automatic inst_t prog_dbl(logic [5:0] pc);
    case (pc)
      6'd0:  return i_(O_MUL, T0,  RX1, RX1);
      6'd1:  return i_(O_MUL, T1,  RY1, RY1);
      6'd2:  return i_(O_MUL, T2,  RZ1, RZ1);
      6'd3:  return i_(O_MUL, T3,  RX1, RY1);
      6'd4:  return i_(O_ADD, T3,  T3,  T3);
      6'd5:  return i_(O_MUL, RZ3, RX1, RZ1);
      6'd6:  return i_(O_ADD, RZ3, RZ3, RZ3);
      6'd7:  return i_(O_MUL, RY3, RB,  T2);
      6'd8:  return i_(O_SUB, RY3, RY3, RZ3);
      6'd9:  return i_(O_ADD, RX3, RY3, RY3);
      6'd10: return i_(O_ADD, RY3, RX3, RY3);
      6'd11: return i_(O_SUB, RX3, T1,  RY3);
      6'd12: return i_(O_ADD, RY3, T1,  RY3);
      6'd13: return i_(O_MUL, RY3, RX3, RY3);
      6'd14: return i_(O_MUL, RX3, RX3, T3);
      6'd15: return i_(O_ADD, T3,  T2,  T2);
      6'd16: return i_(O_ADD, T2,  T2,  T3);
      6'd17: return i_(O_MUL, RZ3, RB,  RZ3);
      6'd18: return i_(O_SUB, RZ3, RZ3, T2);
      6'd19: return i_(O_SUB, RZ3, RZ3, T0);
      6'd20: return i_(O_ADD, T3,  RZ3, RZ3);
      6'd21: return i_(O_ADD, RZ3, RZ3, T3);
      6'd22: return i_(O_ADD, T3,  T0,  T0);
      6'd23: return i_(O_ADD, T0,  T3,  T0);
      6'd24: return i_(O_SUB, T0,  T0,  T2);
      6'd25: return i_(O_MUL, T0,  T0,  RZ3);
      6'd26: return i_(O_ADD, RY3, RY3, T0);
      6'd27: return i_(O_MUL, T0,  RY1, RZ1);
      6'd28: return i_(O_ADD, T0,  T0,  T0);
      6'd29: return i_(O_MUL, RZ3, T0,  RZ3);
      6'd30: return i_(O_SUB, RX3, RX3, RZ3);
      6'd31: return i_(O_MUL, RZ3, T0,  T1);
      6'd32: return i_(O_ADD, RZ3, RZ3, RZ3);
      6'd33: return i_(O_ADD, RZ3, RZ3, RZ3);
      default: return i_(O_END, T0, T0, T0);
    endcase
  endfunction

  assign ins = ADD ? prog_add(pc_q) : prog_dbl(pc_q);

  // Operand multiplexer.
  assign opa = bank_q[ins.a];
  assign opb = bank_q[ins.b];

  assign m_start = (state_q == EXEC) && (ins.op == O_MUL);
  assign busy    = (state_q != IDLE);
  assign x3      = bank_q[RX3];
  assign y3      = bank_q[RY3];
  assign z3      = bank_q[RZ3];

  mod_addsub #(.N(N)) u_as  (.a(opa), .b(opb), .p(p_q), .sel(ins.op == O_SUB), .s(as_s));
  mod_mul    #(.N(N)) u_mul (.clk, .rst_n, .start(m_start), .d(opa), .e(opb), .p(p_q),
                             .busy(m_busy), .done(m_done), .f(m_f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      pc_q    <= '0;
      bank_q  <= '0;
      p_q     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          bank_q[RX1] <= x1; bank_q[RY1] <= y1; bank_q[RZ1] <= z1;
          bank_q[RX2] <= x2; bank_q[RY2] <= y2; bank_q[RZ2] <= z2;
          bank_q[RB]  <= b;
          p_q     <= p;
          pc_q    <= '0;
          state_q <= EXEC;
        end
        EXEC: begin
          case (ins.op)
            O_MUL: state_q <= MWAIT;
            O_END: begin
              done    <= 1'b1;
              state_q <= IDLE;
            end
            default: begin  // O_ADD, O_SUB
              bank_q[ins.d] <= as_s;
              pc_q          <= pc_q + 1'b1;
            end
          endcase
        end
        MWAIT: if (m_done) begin
          bank_q[ins.d] <= m_f;
          pc_q          <= pc_q + 1'b1;
          state_q       <= EXEC;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
