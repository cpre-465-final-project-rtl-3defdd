// tb_div_unit: the shared divider in both uses.
// Mean: for random windows the quotient must be the sum divided by n and
// rounded half up, checked with real arithmetic. SD step: for random
// windows and estimates the quotient must equal the Babylonian update
// (sigma + var/sigma)/2 rounded to nearest, again checked in real
// arithmetic (ties of the real value are skipped). A zero count gives zero.
`timescale 1ns/1ps
module tb_div_unit;
  import noaa_pkg::*;
  logic sel_sd;
  logic [SUM_W-1:0] sum;
  logic [NW-1:0] n;
  logic [SQ_W-1:0] sum2, sdn;
  logic [PROD_W-1:0] sdnsq, sumsqn;
  logic [NUM_W-1:0] quot;
  int checks = 0, failures = 0;
  logic clk = 0;

  div_unit dut (.sel_sd, .sum, .n, .sum2, .sdn, .sdnsq, .sumsqn, .quot);

  always #5 clk = ~clk;

  initial begin
    longint s, ss, sg, nn;
    real    exact, var_r;
    sel_sd = 0; n = 0; sum = 0; sum2 = 0; sdn = 0; sdnsq = 0; sumsqn = 0;
    #1;
    checks++;
    if (quot != 0) begin failures++; $display("FAIL zero count"); end
    for (int i = 0; i < 1000; i++) begin
      nn = $urandom_range(1, 14);
      s = 0; ss = 0;
      for (int k = 0; k < nn; k++) begin
        longint t;
        t = (i % 5 == 0) ? $urandom_range(0, 4095) : $urandom_range(1000, 1100);
        s += t; ss += t * t;
      end
      sg = (i % 4 == 0) ? 1024 : $urandom_range(1, 65535);
      n = NW'(nn); sum = SUM_W'(s);
      sum2 = SQ_W'(s * s); sdn = SQ_W'(sg * nn * nn);
      sdnsq = PROD_W'(sg * sg * nn * nn); sumsqn = PROD_W'(nn * ss);
      // mean
      sel_sd = 0; #1;
      exact = real'(s) / real'(nn);
      checks++;
      if (real'(quot) > exact + 0.5 || real'(quot) <= exact - 0.5) begin
        failures++; $display("FAIL mean got=%0d exact=%f", quot, exact);
      end
      // SD step
      sel_sd = 1; #1;
      var_r = (real'(ss) * nn - real'(s) * s) / (real'(nn) * nn);
      exact = (real'(sg) + var_r / real'(sg)) / 2.0;
      if (exact - $floor(exact) != 0.5) begin
        checks++;
        if (real'(quot) > exact + 0.5 || real'(quot) < exact - 0.5) begin
          failures++; $display("FAIL step got=%0d exact=%f", quot, exact);
        end
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
