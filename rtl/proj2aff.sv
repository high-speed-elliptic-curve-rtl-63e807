// proj2aff: projective-to-affine converter, (X : Y : Z) -> (X/Z, Y/Z).
//
// One modular inversion computes Z^-1; then two modular multipliers run in
// parallel for x = X * Z^-1 and y = Y * Z^-1. This is the converter
// structure of the key-generation path (inversion followed by two
// multipliers); the inversion algorithm is in mod_inv.
//
// Interface: pulse start with x, y, z, p valid; they are latched. done
// pulses when qx, qy are valid (inversion time + N+1 + 2 cycles); the
// results hold until the next start. z = 0 gives qx = qy = 0.
module proj2aff #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] qx,
  output logic [N-1:0] qy
);

  typedef enum logic [1:0] { IDLE, INV, MUL } state_e;

  state_e       state_q;
  logic [N-1:0] x_q, y_q, p_q, zi;
  logic         inv_busy, inv_done, m1_busy, m1_done, m2_busy, m2_done;

  mod_inv #(.N(N)) u_inv (.clk, .rst_n, .start(start && state_q == IDLE), .a(z), .p,
                          .busy(inv_busy), .done(inv_done), .r(zi));
  mod_mul #(.N(N)) u_mx (.clk, .rst_n, .start(inv_done), .d(x_q), .e(zi), .p(p_q),
                         .busy(m1_busy), .done(m1_done), .f(qx));
  mod_mul #(.N(N)) u_my (.clk, .rst_n, .start(inv_done), .d(y_q), .e(zi), .p(p_q),
                         .busy(m2_busy), .done(m2_done), .f(qy));

  assign busy = (state_q != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      x_q     <= '0;
      y_q     <= '0;
      p_q     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          x_q     <= x;
          y_q     <= y;
          p_q     <= p;
          state_q <= INV;
        end
        INV: if (inv_done) state_q <= MUL;
        MUL: if (m1_done) begin
          done    <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
