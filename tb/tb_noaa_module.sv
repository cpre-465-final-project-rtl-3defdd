// tb_noaa_module: end-to-end test of the moving-statistics engine at its
// default sizes (window 14, 12-bit readings).
//
// A reference model in the testbench keeps its own queue of the last 14
// readings and recomputes the sums from scratch on every reading, then
// forms the rounded mean and the rounded Babylonian step with 64-bit
// integers. Every result is compared with the model, and the number of
// edges from the reading to DONE is checked (2 for the mean, 4 for the SD).
// Phases: a 100-reading and a 30-reading random run with random modes, a
// window that fills and then evicts, mode switches, readings offered while
// busy (must be ignored), a jump in spread that saturates the estimate and
// the output, a reset in the middle of a run, and a periodic input whose
// spread is constant, for which the estimate must settle within 1 of the
// true standard deviation (computed with real arithmetic). Each mechanism
// is counted and one that never happened is a failure.
`timescale 1ns/1ps
module tb_noaa_module;
  import noaa_pkg::*;

  logic          clk = 1'b0, rst = 1'b1, sample = 1'b0, mode = 1'b0;
  logic [TW-1:0] tn = '0;
  logic          done, ready;
  logic [TW-1:0] avg_sd;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_fill = 0, n_evict = 0, n_modesw = 0, n_ignored = 0, n_sigsat = 0,
      n_outsat = 0, n_reset = 0, n_avg = 0, n_sd = 0;

  noaa_module dut (
    .CLK(clk), .RESET(rst), .SAMPLE(sample), .MODE(mode), .TN(tn),
    .DONE(done), .READY(ready), .AVG_SD(avg_sd)
  );

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  int unsigned win[$];
  longint      sig = 1024;
  logic        last_mode = 1'b0;

  function automatic longint model_step(input int unsigned t, input logic m);
    longint n, s, ss, q;
    if (win.size() == DEPTH) n_evict++; else n_fill++;
    win.push_front(t);
    if (win.size() > DEPTH) void'(win.pop_back());
    n = win.size(); s = 0; ss = 0;
    foreach (win[i]) begin s += win[i]; ss += longint'(win[i]) * win[i]; end
    if (!m) begin
      n_avg++;
      return (s + n / 2) / n;
    end
    n_sd++;
    q = (sig * sig * n * n + n * ss - s * s + sig * n * n) / (2 * sig * n * n);
    if (q > 65535) begin q = 65535; n_sigsat++; end
    sig = q;
    if (q > 4095) begin n_outsat++; return 4095; end
    return q;
  endfunction

  function automatic real true_sd();
    real n, s, ss;
    n = win.size(); s = 0; ss = 0;
    foreach (win[i]) begin s += win[i]; ss += real'(win[i]) * win[i]; end
    return $sqrt(ss / n - (s / n) * (s / n));
  endfunction

  // Offer one reading, wait for DONE, check value and latency.
  task automatic feed(input int unsigned t, input logic m, input bit poke_busy = 1'b0);
    longint exp;
    int     edges;
    @(negedge clk);
    while (!ready) @(negedge clk);
    sample = 1'b1; tn = TW'(t); mode = m;
    @(posedge clk);
    if (m != last_mode) n_modesw++;
    last_mode = m;
    exp = model_step(t, m);
    edges = 1;
    @(negedge clk);
    // the inputs need not be held after the taking edge
    sample = poke_busy; tn = TW'($urandom); mode = ~m;
    while (1) begin
      @(posedge clk);
      edges++;
      #1;
      if (done || edges > 10) break;
      if (poke_busy && !ready) n_ignored++;
    end
    sample = 1'b0;
    checks++;
    if (!done || edges != (m ? 4 : 2)) begin
      failures++;
      $display("FAIL latency: mode=%0d edges=%0d done=%0d", m, edges, done);
    end
    checks++;
    if (longint'(avg_sd) != exp) begin
      failures++;
      $display("FAIL value: t=%0d mode=%0d got=%0d exp=%0d n=%0d", t, m, avg_sd, exp, win.size());
    end
  endtask

  task automatic do_reset();
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    win.delete(); sig = 1024; n_reset++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (avg_sd != 0 || done) begin failures++; $display("FAIL reset state"); end

    // 100-reading run, random readings and modes
    for (int i = 0; i < 100; i++) feed($urandom_range(0, 4095), 1'($urandom), (i % 7) == 3);
    do_reset();
    // 30-reading run, temperatures in a narrower band
    for (int i = 0; i < 30; i++) feed($urandom_range(1200, 1800), 1'($urandom));
    // constant readings drive the estimate to 1, then a jump saturates it
    for (int i = 0; i < 20; i++) feed(100, 1'b1);
    feed(4095, 1'b1);
    feed(4095, 1'b1);
    for (int i = 0; i < 5; i++) feed(0, 1'b0);
    // reset in the middle of a run
    do_reset();
    for (int i = 0; i < 10; i++) feed($urandom_range(0, 4095), 1'($urandom));
    // periodic input of period 14: constant spread, estimate must settle
    do_reset();
    for (int i = 0; i < 60; i++) feed(1000 + 37 * (i % 14), 1'b1);
    checks++;
    if ((real'(avg_sd) - true_sd()) > 1.0 || (true_sd() - real'(avg_sd)) > 1.0) begin
      failures++;
      $display("FAIL convergence: got=%0d true=%f", avg_sd, true_sd());
    end

    $display("mechanisms: fill=%0d evict=%0d mode_switch=%0d ignored=%0d sigma_sat=%0d out_sat=%0d reset=%0d mean=%0d sd=%0d",
             n_fill, n_evict, n_modesw, n_ignored, n_sigsat, n_outsat, n_reset, n_avg, n_sd);
    if (n_fill == 0)    begin failures++; $display("FAIL never: fill"); end
    if (n_evict == 0)   begin failures++; $display("FAIL never: evict"); end
    if (n_modesw == 0)  begin failures++; $display("FAIL never: mode switch"); end
    if (n_ignored == 0) begin failures++; $display("FAIL never: busy sample ignored"); end
    if (n_sigsat == 0)  begin failures++; $display("FAIL never: estimate saturation"); end
    if (n_outsat == 0)  begin failures++; $display("FAIL never: output saturation"); end
    if (n_reset == 0)   begin failures++; $display("FAIL never: reset"); end
    if (n_avg == 0)     begin failures++; $display("FAIL never: mean"); end
    if (n_sd == 0)      begin failures++; $display("FAIL never: sd"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
