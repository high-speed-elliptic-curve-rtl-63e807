// mod_addsub: combinational modular adder/subtractor, S = a + b mod p
// (sel = 0) or S = a - b mod p (sel = 1), for a, b in [0, p-1].
//
// Two N-bit adders in series and a final 2:1 multiplexer, as in the
// two-adder structure of the design:
//   add:  S1 = a + b (carry C1);  S2 = S1 + ~p + 1 = S1 - p (carry C2);
//         S = (C1 | C2) ? S2 : S1.
//   sub:  S1 = a + ~b + 1 = a - b;  S2 = S1 + p;
//         S = borrow ? S2 : S1, borrow being the inverted carry of S1.
// The first adder's carry-in is sel, the second's is ~sel, and the second
// adder's Y operand is ~p or p selected by sel. In the subtract case the
// correction is taken when a - b borrows (carry out 0); this is how the
// "C1" test of the subtract branch is read here.
// Purely combinational: the result is valid in the same cycle.
module mod_addsub #(
  parameter int unsigned N = 256
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] p,
  input  logic         sel,
  output logic [N-1:0] s
);

  logic [N-1:0] s1, s2, y1, y2;
  logic         c1, c2;

  always_comb begin
    y1       = sel ? ~b : b;
    {c1, s1} = {1'b0, a} + {1'b0, y1} + {{N{1'b0}}, sel};
    y2       = sel ? p : ~p;
    {c2, s2} = {1'b0, s1} + {1'b0, y2} + {{N{1'b0}}, ~sel};
    if (!sel) s = (c1 | c2) ? s2 : s1;
    else      s = c1 ? s1 : s2;
  end

endmodule
