// running_sums: sum and sum of squares of the readings in the window.
//
// Both sums are kept incrementally instead of being re-added over the
// window: each new reading is added and the reading leaving the window is
// subtracted. The update is spread over two clocks so that only squares
// computed by the shared multipliers are needed:
//   clock 1 (`en1`): sum    <= sum + tn - oldest;
//                    tn_sq  <= tn*tn;  old_sq <= oldest*oldest  (from the
//                    multipliers, presented on `tn_sq_in`/`old_sq_in`)
//   clock 2 (`en2`): sum_sq <= sum_sq + tn_sq - old_sq
// This two-step schedule follows the reference design. Reset is
// asynchronous, active high, and clears everything.
module running_sums #(
  parameter int unsigned TW    = noaa_pkg::TW,
  parameter int unsigned SUM_W = noaa_pkg::SUM_W,
  parameter int unsigned SQ_W  = noaa_pkg::SQ_W,
  parameter int unsigned PW    = noaa_pkg::PROD_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en1,
  input  logic             en2,
  input  logic [TW-1:0]    tn,
  input  logic [TW-1:0]    oldest,
  input  logic [PW-1:0]    tn_sq_in,
  input  logic [PW-1:0]    old_sq_in,
  output logic [SUM_W-1:0] sum,
  output logic [SQ_W-1:0]  sum_sq
);

  logic [SQ_W-1:0] tn_sq, old_sq;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sum    <= '0;
      tn_sq  <= '0;
      old_sq <= '0;
    end else if (en1) begin
      sum    <= sum + SUM_W'(tn) - SUM_W'(oldest);
      tn_sq  <= SQ_W'(tn_sq_in);
      old_sq <= SQ_W'(old_sq_in);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      sum_sq <= '0;
    else if (en2) sum_sq <= sum_sq + tn_sq - old_sq;
  end

endmodule
