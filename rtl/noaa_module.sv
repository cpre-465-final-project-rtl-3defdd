// noaa_module: moving average / moving standard deviation of the last 14
// temperature readings.
//
// Readings TN (12-bit unsigned) arrive one at a time, each marked by SAMPLE.
// For every reading the engine reports, according to the MODE taken with it,
// either the rounded mean of the last n <= 14 readings (MODE=0) or their
// standard deviation (MODE=1) on AVG_SD, marked by a one-clock DONE pulse.
// RESET forgets all readings.
//
// How it works:
//  * window_fifo keeps the readings; the one leaving the window is subtracted
//    from incrementally kept sums (running_sums): sum and sum of squares.
//  * mean = (sum + n/2) / n, rounded half up.
//  * sigma = sqrt(sum_sq/n - (sum/n)^2) is approximated by one Babylonian
//    step per SD-mode reading, continuing from the previous estimate
//    (sd_iter). The step is arranged so that only one division is needed.
//    The value reported is the new estimate, which converges to the standard
//    deviation as readings arrive; it is not exact right after the spread of
//    the window changes.
//  * Two shared multipliers (mult_share) and one shared divider (div_unit)
//    are stepped through the schedule by the sequencer (noaa_ctrl).
//
// Timing: SAMPLE is taken at a rising CLK edge while READY is high. DONE is
// high in the clock after the 2nd edge (mean) or the 4th edge (SD), counting
// the edge that took the reading; AVG_SD holds its value until the next
// result. SAMPLE while READY is low is ignored. RESET is asynchronous and
// active high.
//
// Follows the specification and reference design: window of 14, 12-bit
// readings, the formulas, the multiplier sharing, the 4-clock SD latency,
// the first estimate of 1024. This design's own choices: SAMPLE is an input
// strobe (with READY added), clock enables instead of gated clocks, a
// saturating 16-bit estimate, and AVG_SD saturating at 4095.
module noaa_module
  import noaa_pkg::*;
(
  input  logic          CLK,
  input  logic          RESET,
  input  logic          SAMPLE,
  input  logic          MODE,
  input  logic [TW-1:0] TN,
  output logic          DONE,
  output logic          READY,
  output logic [TW-1:0] AVG_SD
);

  logic              accept, sum2_en, div_sd, ld1, ld2, ld3, out_ld, mode_r;
  mult_sel_e         mult_sel;
  logic [TW-1:0]     oldest;
  logic [NW-1:0]     n;
  logic [SUM_W-1:0]  sum;
  logic [SQ_W-1:0]   sum_sq, sum2, sdn;
  logic [PROD_W-1:0] p1, p2, sdnsq, sumsqn;
  logic [2*NW-1:0]   nsq;
  logic [SIG_W-1:0]  sigma;
  logic [NUM_W-1:0]  quot;
  logic              sat_hit;

  noaa_ctrl u_ctrl (
    .clk(CLK), .rst(RESET), .sample(SAMPLE), .mode(MODE),
    .accept, .sum2_en, .mult_sel, .div_sd, .ld1, .ld2, .ld3, .out_ld,
    .done(DONE), .ready(READY), .mode_r
  );

  window_fifo u_window (
    .clk(CLK), .rst(RESET), .push(accept), .din(TN),
    .oldest, .count(n)
  );

  mult_share u_mult (
    .sel(mult_sel), .tn(TN), .oldest, .sum, .sigma, .n, .sdn, .sum_sq,
    .p1, .p2, .nsq
  );

  running_sums u_sums (
    .clk(CLK), .rst(RESET), .en1(accept), .en2(sum2_en),
    .tn(TN), .oldest, .tn_sq_in(p1), .old_sq_in(p2),
    .sum, .sum_sq
  );

  sd_iter u_sd (
    .clk(CLK), .rst(RESET), .ld1, .ld2, .ld3, .p1, .p2, .quot,
    .sum2, .sdn, .sdnsq, .sumsqn, .sigma, .sat_hit
  );

  div_unit u_div (
    .sel_sd(div_sd), .sum, .n, .sum2, .sdn, .sdnsq, .sumsqn, .quot
  );

  // Result register, saturated to the output width.
  localparam logic [TW-1:0] OUT_MAX = '1;

  always_ff @(posedge CLK or posedge RESET) begin
    if (RESET)       AVG_SD <= '0;
    else if (out_ld) AVG_SD <= (quot > NUM_W'(OUT_MAX)) ? OUT_MAX : TW'(quot);
  end

endmodule
