// tb_point_add: self-checking test of the affine point adder at 256 bits
// on NIST P-256. Points are multiples of the base point computed by the
// reference model. Covers general addition, doubling (P1 == P2, dbl flag)
// and P + (-P) = infinity, each compared with the reference group law.
module tb_point_add;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] x1, y1, x2, y2, x3, y3;
  logic busy, done, dbl, inf;
  int checks = 0, failures = 0, n_add = 0, n_dbl = 0, n_inf = 0;

  point_add #(.N(N)) dut (.clk, .rst_n, .start, .x1, .y1, .x2, .y2, .p(P256_P),
                          .busy, .done, .dbl, .x3, .y3, .inf);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(pt_t a, pt_t b);
    pt_t e = pt_add(a, b, P256_P);
    @(negedge clk);
    x1 = a.x; y1 = a.y; x2 = b.x; y2 = b.y; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 2;
    if (inf !== e.inf || (!e.inf && (x3 !== e.x || y3 !== e.y))) begin
      failures++;
      $display("FAIL got (%h, %h, inf=%0d) exp (%h, %h, inf=%0d)", x3, y3, inf, e.x, e.y, e.inf);
    end
    if (dbl !== (!e.inf && a == b)) begin
      failures++;
      $display("FAIL dbl flag");
    end
    if (inf) n_inf++; else if (dbl) n_dbl++; else n_add++;
  endtask

  initial begin
    pt_t g, p2, p3, q;
    g  = mk_pt(P256_GX, P256_GY);
    p2 = pt_mul(256'd2, g, P256_P);
    p3 = pt_mul(256'd3, g, P256_P);
    x1 = '0; y1 = '0; x2 = '0; y2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(g, p2);       // G + 2G = 3G
    run(g, g);        // doubling
    run(p3, p2);
    q = g; q.y = P256_P - g.y;
    run(g, q);        // G + (-G)
    repeat (3) begin
      pt_t a, b;
      a = pt_mul(rand_fe(P256_P), g, P256_P);
      b = pt_mul(rand_fe(P256_P), g, P256_P);
      run(a, b);
      run(a, a);
    end
    $display("cases: add=%0d double=%0d infinity=%0d", n_add, n_dbl, n_inf);
    checks++;
    if (n_add == 0 || n_dbl == 0 || n_inf == 0) begin
      failures++;
      $display("FAIL case not covered: add=%0d dbl=%0d inf=%0d", n_add, n_dbl, n_inf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
