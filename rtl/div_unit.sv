// div_unit: the single divider shared by the mean and the square-root step.
//
// Both results are quotients, and they are never needed in the same clock,
// so one divider serves both; `sel_sd` picks the operand pair:
//   mean      (sel_sd=0): (sum + n/2) / n
//             adding half the divisor rounds a fraction of .5 or more up
//   SD step   (sel_sd=1): (sdnsq + sumsqn - sum2 + sdn) / (2*sdn)
//             with sdn = sigma*n^2, sdnsq = sigma^2*n^2, sumsqn = n*sum_sq,
//             sum2 = sum^2. This is one Babylonian step
//               sigma' = (sigma + (n*sum_sq - sum^2)/(n^2*sigma)) / 2
//             brought over a common denominator; the extra +sdn is half the
//             divisor and again rounds to nearest.
// Both operand formulas are those of the reference design. A zero divisor
// (no reading yet) gives a zero quotient, this design's choice.
// Purely combinational; the quotient is NUM_W bits wide and not saturated.
module div_unit
  import noaa_pkg::*;
(
  input  logic              sel_sd,
  input  logic [SUM_W-1:0]  sum,
  input  logic [NW-1:0]     n,
  input  logic [SQ_W-1:0]   sum2,
  input  logic [SQ_W-1:0]   sdn,
  input  logic [PROD_W-1:0] sdnsq,
  input  logic [PROD_W-1:0] sumsqn,
  output logic [NUM_W-1:0]  quot
);

  logic [NUM_W-1:0] num;
  logic [SQ_W:0]    den;

  always_comb begin
    if (sel_sd) begin
      num = NUM_W'(sdnsq) + NUM_W'(sumsqn) - NUM_W'(sum2) + NUM_W'(sdn);
      den = {sdn, 1'b0};
    end else begin
      num = NUM_W'(sum) + NUM_W'(n >> 1);
      den = (SQ_W+1)'(n);
    end
    quot = (den == '0) ? '0 : num / NUM_W'(den);
  end

endmodule
