// sd_iter: state of the Babylonian square-root iteration.
//
// The standard deviation is not recomputed from scratch: the engine keeps an
// estimate `sigma` and improves it by one Babylonian (Newton) step for every
// reading taken in SD mode, so the estimate tracks the window as it moves.
// This block holds the estimate and the partial products of the step, which
// the shared multipliers deliver over two clocks:
//   `ld1`: sum2  <= p1 (sum^2)        sdn    <= p2 (sigma*n^2)
//   `ld2`: sdnsq <= p1 (sigma*sdn)    sumsqn <= p2 (n*sum_sq)
//   `ld3`: sigma <= quotient of the divider (the new estimate)
// The estimate resets to 1024, the reference design's first guess. The new
// estimate saturates at 2^SIG_W-1 (this design's addition: when the spread of
// the window jumps while the estimate is small, one step can overshoot past
// 16 bits; saturating keeps the step convergent). Because a rounded
// Babylonian step never returns less than (sigma+1)/2, the estimate never
// reaches zero and the divisor of the next step stays non-zero.
// Reset is asynchronous and active high.
module sd_iter
  import noaa_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ld1,
  input  logic              ld2,
  input  logic              ld3,
  input  logic [PROD_W-1:0] p1,
  input  logic [PROD_W-1:0] p2,
  input  logic [NUM_W-1:0]  quot,
  output logic [SQ_W-1:0]   sum2,
  output logic [SQ_W-1:0]   sdn,
  output logic [PROD_W-1:0] sdnsq,
  output logic [PROD_W-1:0] sumsqn,
  output logic [SIG_W-1:0]  sigma,
  output logic              sat_hit
);

  localparam logic [SIG_W-1:0] SIG_MAX = '1;

  // Saturated new estimate.
  assign sat_hit = (quot > NUM_W'(SIG_MAX));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sum2   <= '0;
      sdn    <= '0;
      sdnsq  <= '0;
      sumsqn <= '0;
      sigma  <= SIGMA_INIT;
    end else begin
      if (ld1) begin
        sum2 <= SQ_W'(p1);
        sdn  <= SQ_W'(p2);
      end
      if (ld2) begin
        sdnsq  <= p1;
        sumsqn <= p2;
      end
      if (ld3) sigma <= sat_hit ? SIG_MAX : SIG_W'(quot);
    end
  end

endmodule
