// tb_noaa_ctrl: the sequencer's schedule.
// For readings in random modes (and SAMPLE offered at random times, also
// while busy), the testbench follows the control outputs clock by clock and
// compares them with the expected sequence: mean mode IDLE->C2 with the
// result loaded at the 2nd edge; SD mode IDLE->C2->C3->C4 with the loads of
// the step in order and the result at the 4th edge. DONE must follow each
// result load by one clock, and READY must be high only in IDLE.
`timescale 1ns/1ps
module tb_noaa_ctrl;
  import noaa_pkg::*;
  logic clk = 0, rst = 1, sample = 0, mode = 0;
  logic accept, sum2_en, div_sd, ld1, ld2, ld3, out_ld, done, ready, mode_r;
  mult_sel_e mult_sel;
  int checks = 0, failures = 0;
  int n_mean = 0, n_sd = 0, n_busy = 0;

  noaa_ctrl dut (.clk, .rst, .sample, .mode, .accept, .sum2_en, .mult_sel, .div_sd,
                 .ld1, .ld2, .ld3, .out_ld, .done, .ready, .mode_r);

  always #5 clk = ~clk;

  // expected step: 0 idle, 2..4 the clock of the computation
  int  step = 0;
  logic m_exp = 0, out_prev = 0;

  task automatic expect_ctrl(input logic e_acc, e_s2, e_dsd, e_l1, e_l2, e_l3, e_out,
                             input mult_sel_e e_sel, input logic e_rdy);
    checks++;
    if (accept != e_acc || sum2_en != e_s2 || div_sd != e_dsd || ld1 != e_l1 ||
        ld2 != e_l2 || ld3 != e_l3 || out_ld != e_out || mult_sel != e_sel ||
        ready != e_rdy || done != out_prev) begin
      failures++;
      $display("FAIL step=%0d mode=%0d acc=%0d s2=%0d dsd=%0d l=%0d%0d%0d out=%0d sel=%0d rdy=%0d done=%0d",
               step, m_exp, accept, sum2_en, div_sd, ld1, ld2, ld3, out_ld, mult_sel, ready, done);
    end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    for (int i = 0; i < 600; i++) begin
      sample = 1'($urandom_range(0, 2) != 0);
      mode = 1'($urandom);
      #1;
      case (step)
        0: expect_ctrl(sample, 0, 0, 0, 0, 0, 0, MS_SQUARES, 1);
        2: expect_ctrl(0, 1, 0, m_exp, 0, 0, !m_exp, MS_STEP1, 0);
        3: expect_ctrl(0, 0, 0, 0, 1, 0, 0, MS_STEP2, 0);
        default: expect_ctrl(0, 0, 1, 0, 0, 1, 1, MS_SQUARES, 0);
      endcase
      if (step != 0 && sample) n_busy++;
      out_prev = out_ld;
      @(posedge clk);
      case (step)
        0: if (sample) begin step = 2; m_exp = mode; end
        2: if (m_exp) step = 3; else begin step = 0; n_mean++; end
        3: step = 4;
        default: begin step = 0; n_sd++; end
      endcase
      @(negedge clk);
      checks++;
      if (mode_r != m_exp) begin failures++; $display("FAIL mode_r"); end
    end
    checks++;
    if (n_mean == 0 || n_sd == 0 || n_busy == 0) begin failures++; $display("FAIL coverage"); end
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
