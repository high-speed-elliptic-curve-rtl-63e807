// tb_gf2m_mul: self-checking test of the bit-serial GF(2^233) multiplier
// with f(x) = x^233 + x^74 + 1. Random products, squarings and corner
// operands (0, 1, x^232, all ones) are compared with a shift-and-XOR
// reference, and the latency from start to done is checked to be M+1.
module tb_gf2m_mul;
  import gf2m_ref_pkg::*;
  logic   clk, rst_n, start;
  ge_t    a, b, c;
  logic   busy, done;
  int checks = 0, failures = 0;

  gf2m_mul #(.M(M)) dut (.clk, .rst_n, .start, .a, .b, .poly(POLY), .busy, .done, .c);

  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ge_t x, ge_t y);
    int  cyc;
    ge_t exp = g_mul(x, y);
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (c !== exp) begin
      failures++;
      $display("FAIL %h * %h got %h exp %h", x, y, c, exp);
    end
    if (cyc - 1 != M + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc - 1, M + 1);
    end
  endtask

  initial begin
    ge_t x;
    rst_n = 0; start = 0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, rand_ge()); run(ge_t'(1), ge_t'(1)); run('1, '1);
    run(ge_t'(1) << (M - 1), ge_t'(1) << (M - 1)); run(ge_t'(1) << (M - 1), ge_t'(2));
    repeat (60) run(rand_ge(), rand_ge());
    repeat (20) begin x = rand_ge(); run(x, x); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
