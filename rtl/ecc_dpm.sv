// ecc_dpm: point multiplication kP and double point multiplication kP + lR
// with separate point-doubling and point-addition units.
//
// A control state machine scans the scalars from the most significant bit
// down (Shamir's simultaneous method). For each bit the accumulator Q is
// doubled by the point-doubling unit, then the point-addition unit adds
// one of P, R or the precomputed P + R, chosen by the bit pair (k_i, l_i);
// nothing is added for (0, 0). P + R is computed once, by the addition
// unit, before the scan. With dpm = 0 the l scalar is ignored and the
// result is kP (plain double-and-add).
// All point arithmetic is in standard projective coordinates: P and R
// enter as (x : y : 1), Q starts at the point at infinity (0 : 1 : 0), and
// the units (proj_point_unit) use complete formulas, so doubling or adding
// infinity, equal or opposite points needs no special handling and no
// inversion. At the end the state machine converts Q to affine form with
// one inversion and two multiplications (proj2aff); Z = 0 there means the
// result is the point at infinity (q_inf = 1, qx = qy = 0).
// The split into a doubling unit, an addition unit (each with a modular
// adder/subtractor, a modular multiplier and a register bank), the two
// modes, projective coordinates and the final conversion to affine follow
// the design; the simultaneous scan with one precomputed point is this
// design's reading of its "precomputed values".
//
// Interface: pulse start with all inputs valid; they are latched. done
// pulses once with (qx, qy, q_inf) valid, held until the next start.
// P and R must be points on the curve. Latency: one projective doubling
// per bit, 13(N+3)+22 cycles, plus one projective addition per nonzero
// bit pair (and one for P + R), 14(N+3)+30 cycles, plus a few control
// cycles per bit and the final conversion (one inversion and N+1).
module ecc_dpm #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         dpm,      // 1: kP + lR, 0: kP
  input  logic [N-1:0] k,
  input  logic [N-1:0] l,
  input  logic [N-1:0] px,
  input  logic [N-1:0] py,
  input  logic [N-1:0] rx,
  input  logic [N-1:0] ry,
  input  logic [N-1:0] b,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] qx,
  output logic [N-1:0] qy,
  output logic         q_inf
);

  typedef enum logic [3:0] {
    IDLE, PRE, PREW, DBL, DBLW, ADD, ADDW, NXT, CNV, CNVW
  } state_e;

  state_e               state_q;
  logic [N-1:0]         k_q, l_q, px_q, py_q, rx_q, ry_q, b_q, p_q;
  logic [N-1:0]         sx_q, sy_q, sz_q;   // precomputed P + R
  logic [N-1:0]         ax_q, ay_q, az_q;   // accumulator Q
  logic [$clog2(N)-1:0] idx_q;
  logic [N-1:0]         tx, ty, tz;         // point picked for the addition
  logic [1:0]           bits;

  logic         pd_start, pd_busy, pd_done, pa_start, pa_busy, pa_done;
  logic         cv_start, cv_busy, cv_done;
  logic [N-1:0] pd_x, pd_y, pd_z, pa_x, pa_y, pa_z, cv_x, cv_y;
  logic [N-1:0] pa_x1, pa_y1, pa_z1, pa_x2, pa_y2, pa_z2;

  assign bits = {k_q[idx_q], l_q[idx_q]};

  always_comb begin
    case (bits)
      2'b01:   begin tx = rx_q; ty = ry_q; tz = N'(1); end
      2'b11:   begin tx = sx_q; ty = sy_q; tz = sz_q;  end
      default: begin tx = px_q; ty = py_q; tz = N'(1); end
    endcase
  end

  // The addition unit computes P + R during PRE and Q + T during the scan.
  assign pa_x1 = (state_q == PRE) ? px_q  : ax_q;
  assign pa_y1 = (state_q == PRE) ? py_q  : ay_q;
  assign pa_z1 = (state_q == PRE) ? N'(1) : az_q;
  assign pa_x2 = (state_q == PRE) ? rx_q  : tx;
  assign pa_y2 = (state_q == PRE) ? ry_q  : ty;
  assign pa_z2 = (state_q == PRE) ? N'(1) : tz;

  assign pd_start = (state_q == DBL);
  assign pa_start = (state_q == PRE) || ((state_q == ADD) && bits != 2'b00);
  assign cv_start = (state_q == CNV);
  assign busy     = (state_q != IDLE);

  proj_point_unit #(.N(N), .ADD(1'b0)) u_pd (
    .clk, .rst_n, .start(pd_start),
    .x1(ax_q), .y1(ay_q), .z1(az_q), .x2(ax_q), .y2(ay_q), .z2(az_q), .b(b_q), .p(p_q),
    .busy(pd_busy), .done(pd_done), .x3(pd_x), .y3(pd_y), .z3(pd_z)
  );

  proj_point_unit #(.N(N), .ADD(1'b1)) u_pa (
    .clk, .rst_n, .start(pa_start),
    .x1(pa_x1), .y1(pa_y1), .z1(pa_z1), .x2(pa_x2), .y2(pa_y2), .z2(pa_z2), .b(b_q), .p(p_q),
    .busy(pa_busy), .done(pa_done), .x3(pa_x), .y3(pa_y), .z3(pa_z)
  );

  proj2aff #(.N(N)) u_cv (
    .clk, .rst_n, .start(cv_start), .x(ax_q), .y(ay_q), .z(az_q), .p(p_q),
    .busy(cv_busy), .done(cv_done), .qx(cv_x), .qy(cv_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      {k_q, l_q, px_q, py_q, rx_q, ry_q, b_q, p_q} <= '0;
      {sx_q, sy_q, sz_q, ax_q, ay_q, az_q}         <= '0;
      idx_q   <= '0;
      qx      <= '0;
      qy      <= '0;
      q_inf   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          k_q   <= k;
          l_q   <= dpm ? l : '0;
          px_q  <= px; py_q <= py; rx_q <= rx; ry_q <= ry;
          b_q   <= b;  p_q  <= p;
          idx_q <= ($clog2(N))'(N - 1);
          ax_q  <= '0;              // Q = (0 : 1 : 0), the point at infinity
          ay_q  <= N'(1);
          az_q  <= '0;
          state_q <= dpm ? PRE : DBL;
        end
        PRE:  state_q <= PREW;
        PREW: if (pa_done) begin
          sx_q    <= pa_x;
          sy_q    <= pa_y;
          sz_q    <= pa_z;
          state_q <= DBL;
        end
        DBL:  state_q <= DBLW;
        DBLW: if (pd_done) begin
          ax_q    <= pd_x;
          ay_q    <= pd_y;
          az_q    <= pd_z;
          state_q <= ADD;
        end
        ADD:  state_q <= (bits == 2'b00) ? NXT : ADDW;
        ADDW: if (pa_done) begin
          ax_q    <= pa_x;
          ay_q    <= pa_y;
          az_q    <= pa_z;
          state_q <= NXT;
        end
        NXT: begin
          if (idx_q == '0) state_q <= CNV;
          else begin
            idx_q   <= idx_q - 1'b1;
            state_q <= DBL;
          end
        end
        CNV:  state_q <= CNVW;
        CNVW: if (cv_done) begin
          qx      <= cv_x;
          qy      <= cv_y;
          q_inf   <= (az_q == '0);
          done    <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
