// tb_mod_addsub: self-checking test of the modular adder/subtractor on the
// P-256 prime: random operands plus the corner cases 0, 1, p-1, compared
// with a reference computed with wide integer arithmetic.
module tb_mod_addsub;
  import ecc_ref_pkg::*;
  localparam int unsigned N = 256;
  logic [N-1:0] a, b, p, s;
  logic         sel;
  int checks = 0, failures = 0;

  mod_addsub #(.N(N)) dut (.a, .b, .p, .sel, .s);

  task automatic check(fe_t x, fe_t y, logic sb);
    fe_t exp;
    a = x; b = y; sel = sb;
    #1;
    exp = sb ? f_sub(x, y, p) : f_add(x, y, p);
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL sel=%0d a=%h b=%h got %h exp %h", sb, x, y, s, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t edges [4];
    p = P256_P;
    edges = '{256'd0, 256'd1, P256_P - 1, P256_P - 2};
    foreach (edges[i]) foreach (edges[j]) begin
      check(edges[i], edges[j], 1'b0);
      check(edges[i], edges[j], 1'b1);
    end
    repeat (500) begin
      check(rand_fe(p), rand_fe(p), 1'b0);
      check(rand_fe(p), rand_fe(p), 1'b1);
    end
    // small prime
    p = 256'd13;
    for (int i = 0; i < 13; i++) for (int j = 0; j < 13; j++) begin
      check(i, j, 1'b0);
      check(i, j, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
