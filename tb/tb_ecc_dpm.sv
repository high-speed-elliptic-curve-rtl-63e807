// tb_ecc_dpm: self-checking test of the point / double point multiplier at
// 256 bits on NIST P-256 against the double-and-add reference. Cases:
// kG (single mode), kG + lR for random k, l and R, R = G (the precomputed
// P + R is a doubling), R = -G (P + R is the point at infinity) and
// kG + lR with k = l (the result can be computed but exercises bit pair 11
// on every set bit), and kG + (n - k)G with n the group order (the result
// is the point at infinity). Each mode must have been used at least once.
module tb_ecc_dpm;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0, rst_n = 0, start = 0, dpm = 0;
  logic [N-1:0] k, l, px, py, rx, ry, qx, qy;
  logic busy, done, q_inf;
  // order of the P-256 base point
  localparam fe_t P256_N = 256'hffffffff00000000ffffffffffffffffbce6faada7179e84f3b9cac2fc632551;
  int checks = 0, failures = 0, n_pm = 0, n_dpm = 0;

  ecc_dpm #(.N(N)) dut (.clk, .rst_n, .start, .dpm, .k, .l, .px, .py, .rx, .ry, .b(P256_B),
                        .p(P256_P),
                        .busy, .done, .qx, .qy, .q_inf);

  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic mode, fe_t kk, fe_t ll, pt_t pp, pt_t rr);
    pt_t e = pt_mul(kk, pp, P256_P);
    int cyc = 0;
    if (mode) e = pt_add(e, pt_mul(ll, rr, P256_P), P256_P);
    @(negedge clk);
    dpm = mode; k = kk; l = ll; px = pp.x; py = pp.y; rx = rr.x; ry = rr.y; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (q_inf !== e.inf || (!e.inf && (qx !== e.x || qy !== e.y))) begin
      failures++;
      $display("FAIL mode=%0d got (%h, %h, inf=%0d) exp (%h, %h, inf=%0d)", mode, qx, qy, q_inf,
               e.x, e.y, e.inf);
    end
    if (mode) n_dpm++; else n_pm++;
    $display("mode %0d: %0d cycles", mode, cyc);
  endtask

  initial begin
    pt_t g, r, ng;
    fe_t a;
    g  = mk_pt(P256_GX, P256_GY);
    a  = rand_fe(P256_P);
    r  = pt_mul(a, g, P256_P);
    ng = g; ng.y = P256_P - g.y;
    k = '0; l = '0; px = '0; py = '0; rx = '0; ry = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1'b0, rand_fe(P256_P), 256'd0, g, r);
    run(1'b1, rand_fe(P256_P), rand_fe(P256_P), g, r);
    run(1'b1, 256'hf0f0, 256'h0ff3, g, g);
    run(1'b1, 256'hf0f0, 256'h0ff3, g, ng);
    run(1'b1, 256'd5, 256'd3, r, g);
    a = rand_fe(P256_P);
    run(1'b1, a, P256_N - a, g, g);   // kG + (n - k)G = infinity
    checks++;
    if (n_pm == 0 || n_dpm == 0) begin failures++; $display("FAIL a mode never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
