// tb_running_sums: drives the two-step sum update with a model window.
// The testbench computes the squares itself (as the shared multipliers
// would), applies en1 then en2 for each reading, with the reading leaving a
// 14-deep model window as `oldest`, and compares sum and sum_sq with sums
// recomputed over the whole model window. Between the steps the inputs carry
// junk, which must not disturb the result; a reset in the middle must clear
// both sums.
`timescale 1ns/1ps
module tb_running_sums;
  logic clk = 0, rst = 1, en1 = 0, en2 = 0;
  logic [11:0] tn = '0, oldest = '0;
  logic [39:0] tn_sq_in, old_sq_in;
  logic [15:0] sum;
  logic [31:0] sum_sq;
  int checks = 0, failures = 0;
  int unsigned q[$];

  running_sums dut (.clk, .rst, .en1, .en2, .tn, .oldest, .tn_sq_in, .old_sq_in, .sum, .sum_sq);

  assign tn_sq_in  = 40'(tn) * 40'(tn);
  assign old_sq_in = 40'(oldest) * 40'(oldest);

  always #5 clk = ~clk;

  initial begin
    longint s, ss;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 100; i++) begin
      if (i == 60) begin rst = 1; @(negedge clk); rst = 0; q.delete(); end
      tn = 12'($urandom);
      oldest = (q.size() == 14) ? 12'(q[13]) : 12'd0;
      q.push_front(tn);
      if (q.size() > 14) void'(q.pop_back());
      en1 = 1;
      @(negedge clk);
      en1 = 0; en2 = 1; tn = 12'($urandom); oldest = 12'($urandom);
      @(negedge clk);
      en2 = 0;
      s = 0; ss = 0;
      foreach (q[k]) begin s += q[k]; ss += longint'(q[k]) * q[k]; end
      checks++;
      if (longint'(sum) != s || longint'(sum_sq) != ss) begin
        failures++;
        $display("FAIL sum=%0d exp=%0d sum_sq=%0d exp=%0d", sum, s, sum_sq, ss);
      end
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
