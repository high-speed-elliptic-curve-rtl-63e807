// point_add: affine point addition R = P1 + P2 on y^2 = x^3 - 3x + b.
//
// Follows the group law in affine coordinates:
//   P1 != +-P2:  l = (y2 - y1) / (x2 - x1)
//   P1 == P2:    l = (3 x1^2 - 3) / (2 y1)          (doubling, a = -3)
//   x3 = l^2 - x1 - x2,   y3 = l (x1 - x3) - y1
//   P1 == -P2:   R is the point at infinity (inf = 1, x3 = y3 = 0).
// A small state machine drives one modular adder/subtractor (one step per
// cycle), one modular multiplier and one modular inverter; the operand
// multiplexers are selected by the state. The inputs must be finite
// points on the curve.
//
// Interface: pulse start with x1, y1, x2, y2, p valid; they are latched.
// done pulses once when x3, y3, inf are valid; they hold until the next
// start. Latency: one inversion plus three multiplications (four when
// doubling) plus a few adder cycles.
module point_add #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x1,
  input  logic [N-1:0] y1,
  input  logic [N-1:0] x2,
  input  logic [N-1:0] y2,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic         dbl,   // last operation was a doubling
  output logic [N-1:0] x3,
  output logic [N-1:0] y3,
  output logic         inf
);

  typedef enum logic [4:0] {
    IDLE, CHK, A_NUM, A_DEN, D_SQ, D_SQW, D_M1, D_N1, D_N2, D_DEN,
    INV, INVW, LAM, LAMW, SQ, SQW, X3A, X3B, YD, YM, YMW, Y3, FIN
  } state_e;

  state_e       state_q;
  logic [N-1:0] x1_q, y1_q, x2_q, y2_q, p_q;
  logic [N-1:0] num_q, den_q, lam_q, t_q;
  logic [N-1:0] as_a, as_b, as_s, m_d, m_e, m_f, inv_r;
  logic         as_sel, m_start, m_busy, m_done, i_start, i_busy, i_done;

  // Adder/subtractor operand selection.
  always_comb begin
    as_a = x1_q; as_b = x1_q; as_sel = 1'b0;
    case (state_q)
      A_NUM: begin as_a = y2_q;  as_b = y1_q;  as_sel = 1'b1; end
      A_DEN: begin as_a = x2_q;  as_b = x1_q;  as_sel = 1'b1; end
      D_M1:  begin as_a = t_q;   as_b = N'(1); as_sel = 1'b1; end  // x1^2 - 1
      D_N1:  begin as_a = t_q;   as_b = t_q;   as_sel = 1'b0; end
      D_N2:  begin as_a = num_q; as_b = t_q;   as_sel = 1'b0; end  // 3(x1^2 - 1)
      D_DEN: begin as_a = y1_q;  as_b = y1_q;  as_sel = 1'b0; end
      X3A:   begin as_a = t_q;   as_b = x1_q;  as_sel = 1'b1; end
      X3B:   begin as_a = x3;    as_b = x2_q;  as_sel = 1'b1; end
      YD:    begin as_a = x1_q;  as_b = x3;    as_sel = 1'b1; end
      Y3:    begin as_a = t_q;   as_b = y1_q;  as_sel = 1'b1; end
      default: ;
    endcase
  end

  // Multiplier operand selection.
  always_comb begin
    m_d = lam_q; m_e = lam_q;
    case (state_q)
      D_SQ:    begin m_d = x1_q;  m_e = x1_q;  end
      LAM:     begin m_d = num_q; m_e = inv_r; end
      YM:      begin m_d = lam_q; m_e = t_q;   end
      default: ;
    endcase
  end

  assign m_start = (state_q inside {D_SQ, LAM, SQ, YM});
  assign i_start = (state_q == INV);
  assign busy    = (state_q != IDLE);

  mod_addsub #(.N(N)) u_as  (.a(as_a), .b(as_b), .p(p_q), .sel(as_sel), .s(as_s));
  mod_mul    #(.N(N)) u_mul (.clk, .rst_n, .start(m_start), .d(m_d), .e(m_e), .p(p_q),
                             .busy(m_busy), .done(m_done), .f(m_f));
  mod_inv    #(.N(N)) u_inv (.clk, .rst_n, .start(i_start), .a(den_q), .p(p_q),
                             .busy(i_busy), .done(i_done), .r(inv_r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      {x1_q, y1_q, x2_q, y2_q, p_q} <= '0;
      {num_q, den_q, lam_q, t_q}    <= '0;
      x3   <= '0;
      y3   <= '0;
      inf  <= 1'b0;
      dbl  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          x1_q <= x1; y1_q <= y1; x2_q <= x2; y2_q <= y2; p_q <= p;
          state_q <= CHK;
        end
        CHK: begin
          inf <= 1'b0;
          dbl <= 1'b0;
          if (x1_q != x2_q) state_q <= A_NUM;
          else if (y1_q == y2_q && y1_q != '0) begin
            dbl     <= 1'b1;
            state_q <= D_SQ;
          end else begin
            inf     <= 1'b1;
            x3      <= '0;
            y3      <= '0;
            state_q <= FIN;
          end
        end
        A_NUM: begin num_q <= as_s; state_q <= A_DEN; end
        A_DEN: begin den_q <= as_s; state_q <= INV; end
        D_SQ:  state_q <= D_SQW;
        D_SQW: if (m_done) begin t_q <= m_f; state_q <= D_M1; end
        D_M1:  begin t_q <= as_s; state_q <= D_N1; end
        D_N1:  begin num_q <= as_s; state_q <= D_N2; end
        D_N2:  begin num_q <= as_s; state_q <= D_DEN; end
        D_DEN: begin den_q <= as_s; state_q <= INV; end
        INV:   state_q <= INVW;
        INVW:  if (i_done) state_q <= LAM;
        LAM:   state_q <= LAMW;
        LAMW:  if (m_done) begin lam_q <= m_f; state_q <= SQ; end
        SQ:    state_q <= SQW;
        SQW:   if (m_done) begin t_q <= m_f; state_q <= X3A; end
        X3A:   begin x3 <= as_s; state_q <= X3B; end
        X3B:   begin x3 <= as_s; state_q <= YD; end
        YD:    begin t_q <= as_s; state_q <= YM; end
        YM:    state_q <= YMW;
        YMW:   if (m_done) begin t_q <= m_f; state_q <= Y3; end
        Y3:    begin y3 <= as_s; state_q <= FIN; end
        FIN:   begin done <= 1'b1; state_q <= IDLE; end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
