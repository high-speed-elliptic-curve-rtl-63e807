// tb_proj_point_unit: self-checking test of the projective point-addition
// and point-doubling units at 256 bits on NIST P-256. Inputs are affine
// points from the reference, scaled to random projective representatives
// (X, Y, Z) = (xz, yz, z). The result is compared after conversion:
// X3 = x Z3 and Y3 = y Z3 (mod p) for a finite result, Z3 = 0 for the
// point at infinity. Addition cases: distinct points, equal points,
// opposite points, one or both inputs at infinity; doubling cases: random
// points and infinity. The cycle count from start to done is checked
// against 14(N+3)+30 (addition) and 13(N+3)+22 (doubling).
module tb_proj_point_unit;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  localparam int LAT_ADD = 14 * (N + 3) + 30;
  localparam int LAT_DBL = 13 * (N + 3) + 22;

  typedef struct packed { fe_t x; fe_t y; fe_t z; } pp_t;

  logic clk, rst_n, start_a, start_d;
  logic [N-1:0] x1, y1, z1, x2, y2, z2;
  logic [N-1:0] ax3, ay3, az3, dx3, dy3, dz3;
  logic a_busy, a_done, d_busy, d_done;
  int checks = 0, failures = 0;

  proj_point_unit #(.N(N), .ADD(1'b1)) dut_add (
    .clk, .rst_n, .start(start_a), .x1, .y1, .z1, .x2, .y2, .z2, .b(P256_B), .p(P256_P),
    .busy(a_busy), .done(a_done), .x3(ax3), .y3(ay3), .z3(az3));
  proj_point_unit #(.N(N), .ADD(1'b0)) dut_dbl (
    .clk, .rst_n, .start(start_d), .x1, .y1, .z1, .x2, .y2, .z2, .b(P256_B), .p(P256_P),
    .busy(d_busy), .done(d_done), .x3(dx3), .y3(dy3), .z3(dz3));

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pp_t to_proj(pt_t a);
    pp_t r;
    fe_t z;
    if (a.inf) begin
      r.x = '0; r.y = fe_t'(1); r.z = '0;
      return r;
    end
    z = rand_fe(P256_P);
    if (z == '0) z = fe_t'(1);
    r.x = f_mul(a.x, z, P256_P);
    r.y = f_mul(a.y, z, P256_P);
    r.z = z;
    return r;
  endfunction

  task automatic check(string what, fe_t rx, fe_t ry, fe_t rz, pt_t e, int cyc, int lat);
    logic ok;
    if (e.inf) ok = (rz == '0) && (rx == '0) && (ry != '0);
    else       ok = (rz != '0) && rx == f_mul(e.x, rz, P256_P) && ry == f_mul(e.y, rz, P256_P);
    checks += 2;
    if (!ok) begin
      failures++;
      $display("FAIL %s: got (%h : %h : %h) exp inf=%0d (%h, %h)", what, rx, ry, rz,
               e.inf, e.x, e.y);
    end
    if (cyc != lat) begin
      failures++;
      $display("FAIL %s: latency %0d expected %0d", what, cyc, lat);
    end
  endtask

  task automatic do_add(string what, pt_t a, pt_t b);
    pp_t pa = to_proj(a), pb = to_proj(b);
    pt_t e = pt_add(a, b, P256_P);
    int cyc;
    @(negedge clk);
    x1 = pa.x; y1 = pa.y; z1 = pa.z; x2 = pb.x; y2 = pb.y; z2 = pb.z; start_a = 1;
    @(negedge clk);
    start_a = 0;
    x1 = '0; y1 = '0; z1 = '0; x2 = '0; y2 = '0; z2 = '0;
    cyc = 1;
    while (!a_done) begin
      @(negedge clk);
      cyc++;
    end
    check(what, ax3, ay3, az3, e, cyc - 1, LAT_ADD);
  endtask

  task automatic do_dbl(string what, pt_t a);
    pp_t pa = to_proj(a);
    pt_t e = pt_add(a, a, P256_P);
    int cyc;
    @(negedge clk);
    x1 = pa.x; y1 = pa.y; z1 = pa.z; start_d = 1;
    @(negedge clk);
    start_d = 0;
    x1 = '0; y1 = '0; z1 = '0;
    cyc = 1;
    while (!d_done) begin
      @(negedge clk);
      cyc++;
    end
    check(what, dx3, dy3, dz3, e, cyc - 1, LAT_DBL);
  endtask

  initial begin
    pt_t g, a, b, neg, inf;
    rst_n = 0; start_a = 0; start_d = 0;
    x1 = '0; y1 = '0; z1 = '0; x2 = '0; y2 = '0; z2 = '0;
    g = mk_pt(P256_GX, P256_GY);
    inf.inf = 1'b1; inf.x = '0; inf.y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      a = pt_mul(rand_fe(P256_P), g, P256_P);
      b = pt_mul(rand_fe(P256_P), g, P256_P);
      neg = a;
      neg.y = P256_P - a.y;
      do_add("add distinct", a, b);
      do_add("add equal", a, a);
      do_add("add opposite", a, neg);
      do_dbl("double", a);
    end
    do_add("add inf + P", inf, g);
    do_add("add P + inf", g, inf);
    do_add("add inf + inf", inf, inf);
    do_dbl("double inf", inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
