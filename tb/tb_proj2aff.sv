// tb_proj2aff: self-checking test of the projective-to-affine converter at
// 256 bits on the P-256 prime: random (X : Y : Z) must give x, y with
// x = X / Z and y = Y / Z, checked as x*Z = X and y*Z = Y (mod p).
module tb_proj2aff;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] x, y, z, qx, qy;
  logic busy, done;
  int checks = 0, failures = 0;

  proj2aff #(.N(N)) dut (.clk, .rst_n, .start, .x, .y, .z, .p(P256_P), .busy, .done, .qx, .qy);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t xx, fe_t yy, fe_t zz);
    @(negedge clk);
    x = xx; y = yy; z = zz; start = 1;
    @(negedge clk);
    start = 0; x = '0; y = '0; z = '0;
    while (!done) @(negedge clk);
    checks += 2;
    if (f_mul(qx, zz, P256_P) != xx) begin failures++; $display("FAIL x: %h", qx); end
    if (f_mul(qy, zz, P256_P) != yy) begin failures++; $display("FAIL y: %h", qy); end
  endtask

  initial begin
    x = '0; y = '0; z = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(P256_GX, P256_GY, 256'd1);
    run(256'd5, 256'd7, P256_P - 1);
    repeat (20) run(rand_fe(P256_P), rand_fe(P256_P), rand_fe(P256_P) | 256'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
