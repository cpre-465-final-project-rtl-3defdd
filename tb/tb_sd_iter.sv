// tb_sd_iter: the estimate and partial-product registers.
// Checks the reset values (estimate 1024), that each load enable captures
// only its own registers, that a quotient above 16 bits saturates the
// estimate and raises sat_hit, and that nothing changes without an enable.
`timescale 1ns/1ps
module tb_sd_iter;
  import noaa_pkg::*;
  logic clk = 0, rst = 1, ld1 = 0, ld2 = 0, ld3 = 0;
  logic [PROD_W-1:0] p1 = '0, p2 = '0, sdnsq, sumsqn;
  logic [NUM_W-1:0] quot = '0;
  logic [SQ_W-1:0] sum2, sdn;
  logic [SIG_W-1:0] sigma;
  logic sat_hit;
  int checks = 0, failures = 0;

  sd_iter dut (.clk, .rst, .ld1, .ld2, .ld3, .p1, .p2, .quot,
               .sum2, .sdn, .sdnsq, .sumsqn, .sigma, .sat_hit);

  always #5 clk = ~clk;

  task automatic expect_regs(input longint e_s2, e_sdn, e_sq, e_sn, e_sig, input string what);
    checks++;
    if (longint'(sum2) != e_s2 || longint'(sdn) != e_sdn || longint'(sdnsq) != e_sq ||
        longint'(sumsqn) != e_sn || longint'(sigma) != e_sig) begin
      failures++;
      $display("FAIL %s: %0d %0d %0d %0d %0d", what, sum2, sdn, sdnsq, sumsqn, sigma);
    end
  endtask

  initial begin
    longint s2, sd, sq, sn, sg;
    @(negedge clk);
    expect_regs(0, 0, 0, 0, 1024, "reset");
    rst = 0;
    s2 = 0; sd = 0; sq = 0; sn = 0; sg = 1024;
    for (int i = 0; i < 300; i++) begin
      ld1 = 1'($urandom); ld2 = 1'($urandom); ld3 = 1'($urandom);
      p1 = {8'($urandom), 32'($urandom)};
      p2 = {8'($urandom), 32'($urandom)};
      quot = (i % 5 == 0) ? NUM_W'($urandom_range(65536, 3000000)) : NUM_W'($urandom_range(0, 65535));
      #1;
      checks++;
      if (sat_hit != (quot > 65535)) begin failures++; $display("FAIL sat_hit"); end
      @(posedge clk);
      if (ld1) begin s2 = longint'(p1[31:0]); sd = longint'(p2[31:0]); end
      if (ld2) begin sq = longint'(p1); sn = longint'(p2); end
      if (ld3) sg = (quot > 65535) ? 65535 : longint'(quot);
      @(negedge clk);
      expect_regs(s2, sd, sq, sn, sg, "load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
