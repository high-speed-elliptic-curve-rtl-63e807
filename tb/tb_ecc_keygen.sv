// tb_ecc_keygen: self-checking test of public-key generation Q = kG at
// 256 bits on NIST P-256, compared with the double-and-add reference for
// k = 1, 2, a small key and two random keys, and for one multiplication of
// a point other than G.
module tb_ecc_keygen;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] k, px, py, qx, qy;
  logic busy, done;
  int checks = 0, failures = 0;

  ecc_keygen #(.N(N)) dut (.clk, .rst_n, .start, .k, .px, .py, .b(P256_B), .p(P256_P),
                           .busy, .done, .qx, .qy);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t kk, pt_t pt);
    pt_t e = pt_mul(kk, pt, P256_P);
    int cyc = 0;
    bit gap = 0;
    @(negedge clk);
    k = kk; px = pt.x; py = pt.y; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (!busy) gap = 1;
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (gap) begin failures++; $display("FAIL busy low while running"); end
    if (qx !== e.x || qy !== e.y) begin
      failures++;
      $display("FAIL k=%h got (%h, %h) exp (%h, %h)", kk, qx, qy, e.x, e.y);
    end
    $display("k=%h: %0d cycles", kk, cyc);
  endtask

  initial begin
    pt_t g = mk_pt(P256_GX, P256_GY);
    k = '0; px = '0; py = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(256'd1, g);
    run(256'd2, g);
    run(256'hc0ffee, g);
    run(rand_fe(P256_P), g);
    run(rand_fe(P256_P), pt_mul(256'd7, g, P256_P));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
