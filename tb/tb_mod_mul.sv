// tb_mod_mul: self-checking test of the radix-2 interleaved modular
// multiplier at 256 bits on the P-256 prime. Random and corner operands and
// squarings are compared with a wide-integer reference, and the latency
// from start to done is checked to be N+1 cycles.
module tb_mod_mul;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] d, e, p, f;
  logic         busy, done;
  int checks = 0, failures = 0;

  mod_mul #(.N(N)) dut (.clk, .rst_n, .start, .d, .e, .p, .busy, .done, .f);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x, fe_t y);
    int cyc = 0;
    fe_t exp = f_mul(x, y, p);
    @(negedge clk);
    d = x; e = y; start = 1;
    @(negedge clk);
    start = 0;
    d = '0; e = '0;
    cyc = 1;  // clock edges since the start edge, counted at negedges
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (f !== exp) begin
      failures++;
      $display("FAIL %h * %h got %h exp %h", x, y, f, exp);
    end
    if (cyc - 1 != N + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc - 1, N + 1);
    end
  endtask

  initial begin
    fe_t x;
    p = P256_P; d = '0; e = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 0); run(1, 1); run(P256_P - 1, P256_P - 1); run(P256_P - 1, 2);
    run(256'd1, P256_P - 1); run(256'd2, 256'd3);
    repeat (60) run(rand_fe(p), rand_fe(p));
    repeat (20) begin x = rand_fe(p); run(x, x); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
