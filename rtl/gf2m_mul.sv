// gf2m_mul: bit-serial multiplier in the binary field GF(2^M), polynomial
// basis, c = a * b mod f(x).
//
// The reduction polynomial is an input: poly holds f(x) without its x^M
// term (for f = x^233 + x^74 + 1, poly has bits 74 and 0 set). One bit of
// b is consumed per clock, most significant bit first:
//   c <- c * x  (shift left; if the bit shifted out is 1, XOR in poly)
//   c <- c + a  when the current bit of b is 1 (XOR)
// so the datapath is a shift register and two layers of XOR gates, with no
// carries. Squaring is the same unit with a = b.
//
// Interface: pulse start with a, b, poly valid; they are latched. done
// pulses M+1 cycles after the start cycle (M iterations and one cycle to
// move the result to c), and c holds the product until the next start.
module gf2m_mul #(
  parameter int unsigned M = 233
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] poly,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);

  logic [M-1:0]         a_q, b_q, f_q, acc_q, acc_x, acc_n;
  logic [$clog2(M+1)-1:0] cnt_q;
  logic                 run_q;

  // One iteration: multiply by x with reduction, then add a if needed.
  assign acc_x = {acc_q[M-2:0], 1'b0} ^ (acc_q[M-1] ? f_q : '0);
  assign acc_n = acc_x ^ (b_q[M-1] ? a_q : '0);
  assign busy  = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a_q, b_q, f_q, acc_q, c} <= '0;
      cnt_q <= '0;
      run_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run_q) begin
        a_q   <= a;
        b_q   <= b;
        f_q   <= poly;
        acc_q <= '0;
        cnt_q <= '0;
        run_q <= 1'b1;
      end else if (run_q) begin
        if (cnt_q == ($clog2(M+1))'(M)) begin
          c     <= acc_q;
          done  <= 1'b1;
          run_q <= 1'b0;
        end else begin
          acc_q <= acc_n;
          b_q   <= {b_q[M-2:0], 1'b0};
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
