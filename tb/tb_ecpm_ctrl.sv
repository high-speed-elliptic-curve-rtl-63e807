// tb_ecpm_ctrl: self-checking test of the point multiplier's control unit
// with N = 8 and a stand-in for the arithmetic units that answers each
// start after N+1 cycles. Checks: six unit rounds per scalar bit plus six
// for the y-recovery, the swap output equal to the scalar bits from the
// most significant down during the ladder and 0 during recovery, the
// number of register writes, one init and one done per operation, and the
// total cycle count N(6N+72) + 6N+55.
module tb_ecpm_ctrl;
  import ecc_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, start = 0, mul_done = 0;
  logic [N-1:0] k;
  uop_t uop;
  logic exec, mul_start, init, swap, busy, done;
  int checks = 0, failures = 0;
  int gos, wrs, inits, steps, cyc, pend;
  logic [N-1:0] seen_bits;

  ecpm_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .k, .mul_done, .uop, .exec, .mul_start,
                          .init, .swap, .busy, .done);

  always #5 clk = ~clk;

  // Stand-in for the multipliers: done N+1 edges after the start edge.
  always @(posedge clk) begin
    mul_done <= 1'b0;
    if (mul_start) pend <= N + 1;
    else if (pend > 0) begin
      pend <= pend - 1;
      if (pend == 1) mul_done <= 1'b1;
    end
  end

  // Event counters.
  always @(posedge clk) if (rst_n && busy) begin
    if (mul_start) gos++;
    if (exec && uop.kind inside {K_WR, K_ADD, K_SUB}) wrs++;
    if (uop.kind == K_STEP) begin
      seen_bits = {seen_bits[N-2:0], swap};
      steps++;
    end
    if (uop.kind inside {K_LD, K_WR, K_ADD, K_SUB} && !exec) begin
      failures++;
      $display("FAIL one-cycle micro-op not executed");
    end
  end
  always @(posedge clk) if (init) inits++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [N-1:0] kk);
    int recovery_swaps = 0;
    gos = 0; wrs = 0; inits = 0; steps = 0; cyc = 0; seen_bits = '0;
    @(negedge clk);
    k = kk; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (steps == N && swap) recovery_swaps++;
      @(negedge clk);
      cyc++;
    end
    checks += 7;
    if (gos != 6 * N + 6)  begin failures++; $display("FAIL rounds %0d", gos); end
    if (wrs != N * (17 + 19) + 13 + 10) begin failures++; $display("FAIL writes %0d", wrs); end
    if (steps != N)        begin failures++; $display("FAIL steps %0d", steps); end
    if (seen_bits != kk)   begin failures++; $display("FAIL swap bits %b exp %b", seen_bits, kk); end
    if (inits != 1)        begin failures++; $display("FAIL inits %0d", inits); end
    if (recovery_swaps != 0) begin failures++; $display("FAIL swap during recovery"); end
    if (cyc != N * (6 * N + 72) + 6 * N + 55) begin failures++; $display("FAIL cycles %0d", cyc); end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after done"); end
  endtask

  initial begin
    k = '0; pend = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(8'b1011_0010);
    run(8'hff);
    run(8'h01);
    run(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
