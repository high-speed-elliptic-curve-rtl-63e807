// mod_inv: modular inversion r = a^-1 mod p for an odd prime p.
//
// Binary extended Euclidean algorithm, one step per clock. It keeps
// u, v (starting at a, p) and x1, x2 (starting at 1, 0) with the invariants
// x1*a = u and x2*a = v (mod p). Each cycle does exactly one of: halve an
// even u (and x1, adding p first if x1 is odd), halve an even v (and x2),
// or subtract the smaller of u, v from the larger (and the matching x's
// mod p). It stops when u or v reaches 1 and returns the matching x. The
// cycle count depends on the operand, at most about 4N.
// The algorithm is this design's choice; only the unit's function is given.
//
// Interface: pulse start with a and p valid; done pulses when r is valid
// and r holds until the next start. a = 0 (no inverse) returns r = 0 after
// one cycle.
module mod_inv #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] r
);

  logic [N-1:0] u_q, v_q, x1_q, x2_q, p_q;
  logic [N:0]   x1_h, x2_h;      // x + p before halving
  logic [N-1:0] x1_sub, x2_sub;  // x1 - x2 and x2 - x1 mod p

  always_comb begin
    x1_h = x1_q[0] ? ({1'b0, x1_q} + {1'b0, p_q}) : {1'b0, x1_q};
    x2_h = x2_q[0] ? ({1'b0, x2_q} + {1'b0, p_q}) : {1'b0, x2_q};
    x1_sub = (x1_q >= x2_q) ? (x1_q - x2_q) : (x1_q - x2_q + p_q);
    x2_sub = (x2_q >= x1_q) ? (x2_q - x1_q) : (x2_q - x1_q + p_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q  <= '0;
      v_q  <= '0;
      x1_q <= '0;
      x2_q <= '0;
      p_q  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      r    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        u_q  <= a;
        v_q  <= p;
        x1_q <= {{(N-1){1'b0}}, 1'b1};
        x2_q <= '0;
        p_q  <= p;
        busy <= 1'b1;
      end else if (busy) begin
        if (u_q == '0) begin
          r    <= '0;
          busy <= 1'b0;
          done <= 1'b1;
        end else if (u_q == {{(N-1){1'b0}}, 1'b1}) begin
          r    <= x1_q;
          busy <= 1'b0;
          done <= 1'b1;
        end else if (v_q == {{(N-1){1'b0}}, 1'b1}) begin
          r    <= x2_q;
          busy <= 1'b0;
          done <= 1'b1;
        end else if (!u_q[0]) begin
          u_q  <= u_q >> 1;
          x1_q <= x1_h[N:1];
        end else if (!v_q[0]) begin
          v_q  <= v_q >> 1;
          x2_q <= x2_h[N:1];
        end else if (u_q >= v_q) begin
          u_q  <= u_q - v_q;
          x1_q <= x1_sub;
        end else begin
          v_q  <= v_q - u_q;
          x2_q <= x2_sub;
        end
      end
    end
  end

endmodule
