// tb_ecc_accel_gf2m: self-checking test of the binary-field accelerator on
// GF(2^233) with f(x) = x^233 + x^74 + 1. Each case picks a random point
// (x, y) and a = 0 or 1, and takes the curve y^2 + xy = x^3 + a x^2 + b
// through it (b computed from the point), so the point is on the curve by
// construction. kP from the accelerator is compared with an affine
// double-and-add reference for k = 1, 2, 3 and random k; the cycle count
// is checked against M(11(M+3) + 4) + (2M + 9)(M+3) + 8 plus the start
// cycle.
module tb_ecc_accel_gf2m;
  import gf2m_ref_pkg::*;
  localparam int LAT = M * (11 * (M + 3) + 4) + (2 * M + 9) * (M + 3) + 8 + 1;

  logic clk, rst_n, start;
  ge_t  k, xp, yp, b, qx, qy;
  logic busy, done, q_inf;
  int checks = 0, failures = 0;

  ecc_accel_gf2m #(.M(M)) dut (.clk, .rst_n, .start, .k, .xp, .yp, .b, .poly(POLY),
                               .busy, .done, .qx, .qy, .q_inf);

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ge_t kk, logic ca);
    gpt_t p, e;
    int   cyc;
    p.inf = 1'b0;
    p.x   = rand_ge();
    p.y   = rand_ge();
    if (p.x == '0) p.x = ge_t'(1);
    // b = y^2 + xy + x^3 + a x^2
    b = g_mul(p.y, p.y) ^ g_mul(p.x, p.y) ^ g_mul(g_mul(p.x, p.x), p.x) ^
        (ca ? g_mul(p.x, p.x) : '0);
    e = g_smul(kk, p, ca);
    @(negedge clk);
    k = kk; xp = p.x; yp = p.y; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (q_inf !== e.inf || (!e.inf && (qx !== e.x || qy !== e.y))) begin
      failures++;
      $display("FAIL k=%h got (%h, %h, inf=%0d) exp (%h, %h, inf=%0d)", kk, qx, qy, q_inf,
               e.x, e.y, e.inf);
    end
    if (cyc != LAT) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, LAT);
    end
  endtask

  initial begin
    rst_n = 0; start = 0; k = '0; xp = '0; yp = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(ge_t'(1), 1'b1);
    run(ge_t'(2), 1'b0);
    run(ge_t'(3), 1'b1);
    run(rand_ge(), 1'b0);
    run(rand_ge(), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
