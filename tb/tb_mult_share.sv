// tb_mult_share: random operands under each select code; the products are
// compared with the scheduled products computed in the testbench.
`timescale 1ns/1ps
module tb_mult_share;
  import noaa_pkg::*;
  mult_sel_e sel;
  logic [TW-1:0] tn, oldest;
  logic [SUM_W-1:0] sum;
  logic [SIG_W-1:0] sigma;
  logic [NW-1:0] n;
  logic [SQ_W-1:0] sdn, sum_sq;
  logic [PROD_W-1:0] p1, p2;
  logic [2*NW-1:0] nsq;
  int checks = 0, failures = 0;
  logic clk = 0;

  mult_share dut (.sel, .tn, .oldest, .sum, .sigma, .n, .sdn, .sum_sq, .p1, .p2, .nsq);

  always #5 clk = ~clk;

  initial begin
    longint e1, e2;
    for (int i = 0; i < 600; i++) begin
      sel    = mult_sel_e'(i % 3);
      tn     = TW'($urandom);
      oldest = TW'($urandom);
      sum    = SUM_W'($urandom_range(0, 57330));
      sigma  = SIG_W'($urandom);
      n      = NW'($urandom_range(1, 14));
      sdn    = SQ_W'(longint'(sigma) * n * n);
      sum_sq = SQ_W'($urandom_range(0, 234772350));
      #1;
      case (i % 3)
        0: begin e1 = longint'(tn) * tn;       e2 = longint'(oldest) * oldest; end
        1: begin e1 = longint'(sum) * sum;     e2 = longint'(sigma) * n * n;   end
        default: begin e1 = longint'(sigma) * sdn; e2 = longint'(n) * sum_sq; end
      endcase
      checks++;
      if (longint'(p1) != e1 || longint'(p2) != e2 || int'(nsq) != int'(n) * int'(n)) begin
        failures++;
        $display("FAIL sel=%0d p1=%0d exp=%0d p2=%0d exp=%0d", i % 3, p1, e1, p2, e2);
      end
      @(posedge clk);
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
