// tb_ecpm_regfile: self-checking test of the point multiplier's register
// array. Checks the ladder start values after init, then random writes and
// reads by logical name under both swap settings against a model that
// keeps the physical registers X1, Z1, X2, Z2, T1..T8.
module tb_ecpm_regfile;
  import ecc_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, init = 0, swap = 0, we = 0;
  logic [N-1:0] xp, wdata;
  opnd_e waddr;
  logic [NREG-1:0][N-1:0] rdata;
  logic [N-1:0] model [NREG];
  int checks = 0, failures = 0;

  ecpm_regfile #(.N(N)) dut (.clk, .rst_n, .init, .xp, .swap, .we, .waddr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ph(int l, logic sw);
    return (l < 4 && sw) ? (l ^ 2) : l;
  endfunction

  task automatic compare();
    for (int l = 0; l < NREG; l++) begin
      checks++;
      if (rdata[l] !== model[ph(l, swap)]) begin
        failures++;
        $display("FAIL swap=%0d reg %0d got %h exp %h", swap, l, rdata[l], model[ph(l, swap)]);
      end
    end
  endtask

  initial begin
    xp = 16'hbeef; wdata = '0; waddr = R_XD;
    for (int i = 0; i < NREG; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // init: X1=1, Z1=0, X2=xp, Z2=1
    init = 1; @(negedge clk); init = 0;
    model[0] = 1; model[1] = 0; model[2] = 16'hbeef; model[3] = 1;
    swap = 0; #1 compare();
    swap = 1; #1 compare();
    repeat (300) begin
      swap  = $urandom_range(0, 1);
      waddr = opnd_e'($urandom_range(0, NREG - 1));
      wdata = N'($urandom);
      we    = $urandom_range(0, 3) != 0;
      @(negedge clk);
      if (we) model[ph(int'(waddr), swap)] = wdata;
      we = 0;
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
