// tb_window_fifo: checks the sliding window against a queue model.
// Random pushes (with idle clocks between) past the depth: `oldest` must be
// the reading that the next push discards (zero until the window is full),
// and `count` must track the fill and saturate at the depth. A reset in the
// middle must clear both.
`timescale 1ns/1ps
module tb_window_fifo;
  localparam int unsigned DEPTH = 14, W = 12, NW = 4;
  logic clk = 0, rst = 1, push = 0;
  logic [W-1:0] din = '0, oldest;
  logic [NW-1:0] count;
  int checks = 0, failures = 0;
  int unsigned q[$];

  window_fifo dut (.clk, .rst, .push, .din, .oldest, .count);

  always #5 clk = ~clk;

  task automatic check_state();
    int unsigned exp_old;
    exp_old = (q.size() == DEPTH) ? q[DEPTH-1] : 0;
    checks++;
    if (oldest != W'(exp_old) || count != NW'(q.size())) begin
      failures++;
      $display("FAIL oldest=%0d exp=%0d count=%0d exp=%0d", oldest, exp_old, count, q.size());
    end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    for (int i = 0; i < 200; i++) begin
      if (i == 120) begin rst = 1; @(negedge clk); rst = 0; q.delete(); end
      check_state();
      push = 1'($urandom_range(0, 3) != 0);
      din = W'($urandom);
      @(posedge clk);
      if (push) begin
        q.push_front(din);
        if (q.size() > DEPTH) void'(q.pop_back());
      end
      @(negedge clk);
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
