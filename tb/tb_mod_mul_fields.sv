// tb_mod_mul_fields: the radix-2 interleaved modular multiplier at the six
// field sizes of its evaluation: 192, 256, 384, 409, 521 and 571 bits.
// One multiplier instance per size (parameter N overridden) runs random
// products, squarings and corner operands, all compared with a wide-integer
// reference (product % p), and each latency is checked to be N+1 cycles.
// Moduli: the NIST primes P-192, P-256, P-384 and P-521; for 409 and 571
// bits, where NIST defines only binary fields, the primes 2^409 - 103 and
// 2^571 - 369 stand in.
module tb_mod_mul_fields;
  localparam int NF = 6;
  localparam int W  = 576;                 // widest operand, rounded up
  typedef logic [W-1:0] wv_t;
  localparam int unsigned SIZES [NF] = '{192, 256, 384, 409, 521, 571};

  function automatic wv_t prime_of(int idx);
    wv_t one = W'(1);
    case (idx)
      0: return (one << 192) - (one << 64) - one;
      1: return (one << 256) - (one << 224) + (one << 192) + (one << 96) - one;
      2: return (one << 384) - (one << 128) - (one << 96) + (one << 32) - one;
      3: return (one << 409) - W'(103);
      4: return (one << 521) - one;
      default: return (one << 571) - W'(369);
    endcase
  endfunction

  function automatic wv_t ref_mul(wv_t a, wv_t b, wv_t p);
    logic [2*W-1:0] t = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    t = t % {{W{1'b0}}, p};
    return t[W-1:0];
  endfunction

  function automatic wv_t rand_below(wv_t p);
    logic [2*W-1:0] r;
    for (int i = 0; i < 2*W/32; i++) r[32*i +: 32] = $urandom;
    r = r % {{W{1'b0}}, p};
    return r[W-1:0];
  endfunction

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  logic [NF-1:0] fin = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NF; g++) begin : g_size
    localparam int unsigned N = SIZES[g];
    logic         start = 0, busy, done;
    logic [N-1:0] d = '0, e = '0, p, f;

    assign p = prime_of(g)[N-1:0];

    mod_mul #(.N(N)) dut (.clk, .rst_n, .start, .d, .e, .p, .busy, .done, .f);

    task automatic run(wv_t x, wv_t y);
      int  cyc;
      wv_t exp = ref_mul(x, y, prime_of(g));
      @(negedge clk);
      d = x[N-1:0]; e = y[N-1:0]; start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (W'(f) !== exp) begin
        failures++;
        $display("FAIL N=%0d %h * %h got %h exp %h", N, x, y, f, exp);
      end
      if (cyc - 1 != N + 1) begin
        failures++;
        $display("FAIL N=%0d latency %0d expected %0d", N, cyc - 1, N + 1);
      end
    endtask

    initial begin
      wv_t pp, x;
      pp = prime_of(g);
      wait (rst_n);
      run(0, 0); run(1, 1); run(pp - 1, pp - 1); run(pp - 1, 2);
      repeat (20) run(rand_below(pp), rand_below(pp));
      repeat (5) begin x = rand_below(pp); run(x, x); end
      fin[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
