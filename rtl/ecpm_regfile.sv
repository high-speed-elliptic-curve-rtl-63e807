// ecpm_regfile: register array of the point multiplier.
//
// Holds the two Montgomery-ladder points in projective X/Z form (X1, Z1,
// X2, Z2) and the temporaries T1..T8. It has one write port, fed by the
// result multiplexer through a demultiplexer, and exposes all registers
// for the operand multiplexers.
//
// Registers are addressed by logical name (ecc_pkg::opnd_e): XD/ZD is the
// point being doubled in the current ladder step, XO/ZO the other point.
// With swap = 0 (scalar bit 0) XD/ZD are X1/Z1; with swap = 1 they are
// X2/Z2. The swap is applied in the address decoding on both read and
// write, so the ladder's operand switch moves no data.
//
// init loads the ladder start values in one cycle: (X1:Z1) = (1:0), the
// point at infinity, and (X2:Z2) = (xp:1), the base point converted from
// affine to projective form. A write in the same cycle as init is ignored.
// The array holds eight temporaries where the drawing of the register
// array shows four (T1..T4); the extra four let the two multipliers and
// two squarers all work in the same round.
module ecpm_regfile #(
  parameter int unsigned N = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  logic [N-1:0]              xp,
  input  logic                      swap,
  input  logic                      we,
  input  ecc_pkg::opnd_e            waddr,
  input  logic [N-1:0]              wdata,
  output logic [ecc_pkg::NREG-1:0][N-1:0] rdata
);
  import ecc_pkg::*;

  logic [NREG-1:0][N-1:0] r_q;

  // Logical to physical index: physical 0..3 are X1, Z1, X2, Z2.
  function automatic logic [3:0] phys(input logic [3:0] l, input logic sw);
    return (l < 4'd4 && sw) ? (l ^ 4'd2) : l;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= '0;
    end else if (init) begin
      r_q[0] <= N'(1);
      r_q[1] <= '0;
      r_q[2] <= xp;
      r_q[3] <= N'(1);
    end else if (we && waddr < opnd_e'(NREG)) begin
      r_q[phys(waddr, swap)] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < NREG; i++) rdata[i] = r_q[phys(4'(i), swap)];
  end

endmodule
