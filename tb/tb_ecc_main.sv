// tb_ecc_main: end-to-end test of the encryption/decryption top level with
// all parameters at their defaults (256-bit NIST P-256).
// The receiver key pair (d, A = dG), the ephemeral key k and the message
// point M = mG come from the reference model. The test encrypts M, checks
// C1 = kG and C2 = M + kA, decrypts (C1, C2) with d and checks that M comes
// back, then forces the point adder's special cases: a message equal to kA
// (the addition becomes a doubling) and one equal to -kA (the result is the
// point at infinity). Counts how often each mechanism happened (encrypt,
// decrypt, ladder steps with each swap value, adder doubling, infinity
// result, point multiplication and double point multiplication on the
// block-level point multiplier, binary-field scalar multiplication) and
// fails any that never did. The binary-field accelerator runs one kP over
// GF(2^233) on a curve taken through a random point, checked against the
// binary-field reference.
module tb_ecc_main;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  localparam int unsigned M = gf2m_ref_pkg::M;
  logic clk = 0, rst_n = 0, start = 0, enc_dec = 0;
  logic [N-1:0] random_k, msg_x, msg_y, apx, apy, kpax, kpay, px, py;
  logic p_inf, busy, done;
  logic dpm_start = 0, dpm_mode = 0, dpm_inf, dpm_busy, dpm_done;
  logic [N-1:0] dpm_k, dpm_l, dpm_px, dpm_py, dpm_rx, dpm_ry, dpm_qx, dpm_qy;
  int n_pm = 0, n_dpm = 0, n_gf = 0;
  logic gf_start = 0, gf_inf, gf_busy, gf_done;
  logic [M-1:0] gf_k, gf_xp, gf_yp, gf_b, gf_qx, gf_qy;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_swap0 = 0, n_swap1 = 0, n_dbl = 0, n_inf = 0;

  ecc_main dut (.clk, .rst_n, .start, .random_k, .enc_dec, .msg_x, .msg_y, .apx, .apy,
                .kpax, .kpay, .px, .py, .p_inf, .busy, .done,
                .dpm_start, .dpm_mode, .dpm_k, .dpm_l, .dpm_px, .dpm_py, .dpm_rx, .dpm_ry,
                .dpm_qx, .dpm_qy, .dpm_inf, .dpm_busy, .dpm_done,
                .gf_start, .gf_k, .gf_xp, .gf_yp, .gf_b, .gf_poly(gf2m_ref_pkg::POLY),
                .gf_qx, .gf_qy, .gf_inf, .gf_busy, .gf_done);

  always #5 clk = ~clk;

  // Mechanism counters, observed inside the design.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mult.u_ecpm.u_ctrl.uop.kind == ecc_pkg::K_STEP &&
        dut.u_mult.u_ecpm.u_ctrl.state_q == 2'd1) begin
      if (dut.u_mult.u_ecpm.swap) n_swap1++; else n_swap0++;
    end
    if (dut.u_padd.done && dut.u_padd.dbl) n_dbl++;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic dec, fe_t kk, pt_t m, pt_t a);
    int cyc = 0;
    @(negedge clk);
    enc_dec = dec; random_k = kk; msg_x = m.x; msg_y = m.y; apx = a.x; apy = a.y;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    if (dec) n_dec++; else n_enc++;
    if (p_inf) n_inf++;
    $display("%s done in %0d cycles", dec ? "decrypt" : "encrypt", cyc);
  endtask

  task automatic dpm_op(logic mode, fe_t kk, fe_t ll, pt_t pp, pt_t rr);
    int cyc = 0;
    @(negedge clk);
    dpm_mode = mode; dpm_k = kk; dpm_l = ll;
    dpm_px = pp.x; dpm_py = pp.y; dpm_rx = rr.x; dpm_ry = rr.y;
    dpm_start = 1;
    @(negedge clk);
    dpm_start = 0;
    while (!dpm_done) begin
      @(negedge clk);
      cyc++;
    end
    if (mode) n_dpm++; else n_pm++;
    $display("%s done in %0d cycles", mode ? "kP + lR" : "kP", cyc);
  endtask

  task automatic gf_op();
    gf2m_ref_pkg::gpt_t p, e;
    gf2m_ref_pkg::ge_t  kk;
    int cyc = 0;
    p.inf = 1'b0;
    p.x   = gf2m_ref_pkg::rand_ge();
    p.y   = gf2m_ref_pkg::rand_ge();
    if (p.x == '0) p.x = M'(1);
    kk    = gf2m_ref_pkg::rand_ge();
    // curve y^2 + xy = x^3 + x^2 + b through p
    gf_b  = gf2m_ref_pkg::g_mul(p.y, p.y) ^ gf2m_ref_pkg::g_mul(p.x, p.y) ^
            gf2m_ref_pkg::g_mul(gf2m_ref_pkg::g_mul(p.x, p.x), p.x) ^
            gf2m_ref_pkg::g_mul(p.x, p.x);
    e     = gf2m_ref_pkg::g_smul(kk, p, 1'b1);
    @(negedge clk);
    gf_k = kk; gf_xp = p.x; gf_yp = p.y; gf_start = 1;
    @(negedge clk);
    gf_start = 0;
    while (!gf_done) begin
      @(negedge clk);
      cyc++;
    end
    n_gf++;
    checks++;
    if (gf_inf !== e.inf || (!e.inf && (gf_qx !== e.x || gf_qy !== e.y))) begin
      failures++;
      $display("FAIL GF(2^m) kP: got (%h, %h, inf=%0d) exp (%h, %h)", gf_qx, gf_qy, gf_inf,
               e.x, e.y);
    end
    $display("GF(2^m) kP done in %0d cycles", cyc);
  endtask

  task automatic expect_pt(string what, logic [N-1:0] x, logic [N-1:0] y, logic inf, pt_t e);
    checks++;
    if (inf !== e.inf || (!e.inf && (x !== e.x || y !== e.y))) begin
      failures++;
      $display("FAIL %s: got (%h, %h, inf=%0d) exp (%h, %h, inf=%0d)", what, x, y, inf,
               e.x, e.y, e.inf);
    end
  endtask

  initial begin
    pt_t g, a, m, kg, ka, c2, neg;
    fe_t d, k;
    g  = mk_pt(P256_GX, P256_GY);
    d  = rand_fe(P256_P);
    k  = rand_fe(P256_P);
    a  = pt_mul(d, g, P256_P);
    m  = pt_mul(rand_fe(P256_P), g, P256_P);
    kg = pt_mul(k, g, P256_P);
    ka = pt_mul(k, a, P256_P);
    c2 = pt_add(m, ka, P256_P);
    dpm_k = '0; dpm_l = '0; dpm_px = '0; dpm_py = '0; dpm_rx = '0; dpm_ry = '0;
    gf_k = '0; gf_xp = '0; gf_yp = '0; gf_b = '0;
    random_k = '0; msg_x = '0; msg_y = '0; apx = '0; apy = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. encrypt M for receiver A
    op(1'b0, k, m, a);
    expect_pt("C1 = kG", kpax, kpay, 1'b0, kg);
    expect_pt("C2 = M + kA", px, py, p_inf, c2);

    // 2. decrypt (C1, C2) with d
    op(1'b1, d, c2, kg);
    expect_pt("decrypted M", px, py, p_inf, m);

    // 3. message equal to kA: the point adder doubles
    op(1'b0, k, ka, a);
    expect_pt("C2 = 2kA", px, py, p_inf, pt_add(ka, ka, P256_P));

    // 4. message equal to -kA: the result is the point at infinity
    neg = ka; neg.y = P256_P - ka.y;
    op(1'b0, k, neg, a);
    expect_pt("C2 = infinity", px, py, p_inf, pt_add(neg, ka, P256_P));

    // 5. block-level point multiplier: kG, then dG + kA
    dpm_op(1'b0, k, 256'd0, g, a);
    expect_pt("kG (point multiplier)", dpm_qx, dpm_qy, dpm_inf, kg);
    dpm_op(1'b1, d, k, g, a);
    expect_pt("dG + kA", dpm_qx, dpm_qy, dpm_inf,
              pt_add(pt_mul(d, g, P256_P), ka, P256_P));

    // 6. binary-field accelerator
    gf_op();

    $display("mechanisms: encrypt=%0d decrypt=%0d swap0=%0d swap1=%0d double=%0d infinity=%0d pm=%0d dpm=%0d gf2m=%0d",
             n_enc, n_dec, n_swap0, n_swap1, n_dbl, n_inf, n_pm, n_dpm, n_gf);
    checks++;
    if (n_enc == 0 || n_dec == 0 || n_swap0 == 0 || n_swap1 == 0 || n_dbl == 0 || n_inf == 0 ||
        n_pm == 0 || n_dpm == 0 || n_gf == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
