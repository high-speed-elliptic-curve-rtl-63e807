// tb_mod_inv: self-checking test of the modular inverter at 256 bits on the
// P-256 prime. For random and corner operands the result r must satisfy
// a * r = 1 (mod p) and equal the Fermat inverse a^(p-2); a = 0 gives 0.
// The cycle count is checked against the 4N+2 bound of the algorithm.
module tb_mod_inv;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] a, p, r;
  logic         busy, done;
  int checks = 0, failures = 0, maxcyc = 0;

  mod_inv #(.N(N)) dut (.clk, .rst_n, .start, .a, .p, .busy, .done, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x);
    int cyc = 0;
    fe_t exp = (x == 0) ? 256'd0 : f_inv(x, p);
    @(negedge clk);
    a = x; start = 1;
    @(negedge clk);
    start = 0; a = '0; cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    if (cyc > maxcyc) maxcyc = cyc;
    checks += 2;
    if (r !== exp || (x != 0 && f_mul(x, r, p) != 1)) begin
      failures++;
      $display("FAIL inv(%h) got %h exp %h", x, r, exp);
    end
    if (cyc > 4 * N + 2) begin
      failures++;
      $display("FAIL cycles %0d", cyc);
    end
  endtask

  initial begin
    p = P256_P; a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(P256_P - 1); run(P256_GX);
    repeat (40) run(rand_fe(p));
    $display("inverse: at most %0d cycles", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
