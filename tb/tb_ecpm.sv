// tb_ecpm: self-checking test of the point multiplier at 256 bits on NIST
// P-256. For several scalars the projective result (X : Y : Z) is checked
// against a double-and-add affine reference: X = x*Z and Y = y*Z (mod p).
// The cycle count from start to done is checked against the schedule,
// N(6N+72) for the ladder plus 6N+55 for the y-recovery.
module tb_ecpm;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  localparam int LAT = N * (6 * N + 72) + 6 * N + 55;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] k, qx, qy, qz;
  logic         busy, done;
  int checks = 0, failures = 0;

  ecpm #(.N(N)) dut (.clk, .rst_n, .start, .k, .xp(P256_GX), .yp(P256_GY), .b(P256_B),
                     .p(P256_P), .busy, .done, .qx, .qy, .qz);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t kk);
    int cyc = 0;
    pt_t ref_q = pt_mul(kk, mk_pt(P256_GX, P256_GY), P256_P);
    @(negedge clk);
    k = kk; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 3;
    if (qz == 0 || f_mul(ref_q.x, qz, P256_P) != qx || f_mul(ref_q.y, qz, P256_P) != qy) begin
      failures++;
      $display("FAIL k=%h: (%h : %h : %h), expected affine (%h, %h)", kk, qx, qy, qz, ref_q.x, ref_q.y);
    end
    if (cyc != LAT) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d", cyc, LAT);
    end
    if (busy) begin
      failures++;
      $display("FAIL busy after done");
    end
    $display("k=%h done in %0d cycles", kk, cyc);
  endtask

  initial begin
    k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(256'd1);
    run(256'd2);
    run(256'h1234567);
    run(rand_fe(P256_P));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
