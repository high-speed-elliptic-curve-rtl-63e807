// mod_mul: radix-2 interleaved modular multiplier, F = D * E mod p.
//
// The multiplier E is scanned from its most significant bit. Each
// iteration doubles the accumulator, adds D when the current bit is 1, and
// reduces by subtracting p or 2p (the sum 2F + D is below 3p, so one of the
// three candidates F', F'-p, F'-2p lies in [0, p-1]; both subtractions run
// in parallel). The scan uses an (N+1)-bit shift register X loaded with
// {E, 1}: X[N] is the current bit and the loop ends when X[N-1:0] reaches
// zero, i.e. when the marker 1 has been shifted to the top after N
// iterations. One further cycle moves the accumulator to the result
// register, so a product takes N+1 cycles.
//
// Interface: pulse start with d, e, p valid (d, e < p, p odd). done pulses
// N+1 cycles after the start cycle, and f then holds the product until
// the next start. Squaring is done by driving d = e.
module mod_mul #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] d,
  input  logic [N-1:0] e,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] f
);

  logic [N:0]   x_q;       // scan register {E, marker}
  logic [N-1:0] acc_q;     // accumulator F
  logic [N-1:0] d_q, p_q;  // latched multiplicand and prime
  logic [N+1:0] t, t_p, t_2p;
  logic         b_p, b_2p;

  // One iteration: t = 2F + X[N]*D, then t mod p.
  always_comb begin
    t    = {1'b0, acc_q, 1'b0} + (x_q[N] ? {2'b00, d_q} : '0);
    {b_p,  t_p[N+1:0]}  = {1'b0, t} - {3'b000, p_q};
    {b_2p, t_2p[N+1:0]} = {1'b0, t} - {2'b00, p_q, 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      acc_q <= '0;
      d_q   <= '0;
      p_q   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      f     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x_q   <= {e, 1'b1};
        acc_q <= '0;
        d_q   <= d;
        p_q   <= p;
        busy  <= 1'b1;
      end else if (busy) begin
        if (x_q[N-1:0] != '0) begin
          x_q <= {x_q[N-1:0], 1'b0};
          if (!b_2p)     acc_q <= t_2p[N-1:0];
          else if (!b_p) acc_q <= t_p[N-1:0];
          else           acc_q <= t[N-1:0];
        end else begin
          f    <= acc_q;
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
