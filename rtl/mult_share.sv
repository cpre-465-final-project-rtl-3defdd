// mult_share: the engine's three multipliers, two of them time-shared.
//
// Instead of one multiplier per product, two general multipliers are fed
// through operand multiplexers that step through the schedule of a sample,
// plus one small multiplier that forms n*n. The select code comes from the
// sequencer:
//   MS_SQUARES  p1 = tn*tn            p2 = oldest*oldest
//   MS_STEP1    p1 = sum*sum          p2 = sigma*(n*n)
//   MS_STEP2    p1 = sigma*sdn        p2 = n*sum_sq
// where sigma is the current square-root estimate and sdn the registered
// sigma*n*n. The operand pairing follows the reference design's multiplier
// select logic. Purely combinational.
module mult_share
  import noaa_pkg::*;
(
  input  mult_sel_e        sel,
  input  logic [TW-1:0]    tn,
  input  logic [TW-1:0]    oldest,
  input  logic [SUM_W-1:0] sum,
  input  logic [SIG_W-1:0] sigma,
  input  logic [NW-1:0]    n,
  input  logic [SQ_W-1:0]  sdn,
  input  logic [SQ_W-1:0]  sum_sq,
  output logic [PROD_W-1:0]    p1,
  output logic [PROD_W-1:0]    p2,
  output logic [2*NW-1:0]  nsq
);

  logic [SQ_W-1:0] a1, b1, a2, b2;

  assign nsq = n * n;

  always_comb begin
    unique case (sel)
      MS_SQUARES: begin
        a1 = SQ_W'(tn);     b1 = SQ_W'(tn);
        a2 = SQ_W'(oldest); b2 = SQ_W'(oldest);
      end
      MS_STEP1: begin
        a1 = SQ_W'(sum);    b1 = SQ_W'(sum);
        a2 = SQ_W'(sigma);  b2 = SQ_W'(nsq);
      end
      MS_STEP2: begin
        a1 = SQ_W'(sigma);  b1 = sdn;
        a2 = SQ_W'(n);      b2 = sum_sq;
      end
      default: begin
        a1 = '0; b1 = '0; a2 = '0; b2 = '0;
      end
    endcase
  end

  // Full 64-bit products, cut to PW bits; every scheduled product fits.
  logic [2*SQ_W-1:0] full1, full2;
  assign full1 = a1 * b1;
  assign full2 = a2 * b2;
  assign p1 = full1[PROD_W-1:0];
  assign p2 = full2[PROD_W-1:0];

endmodule
