// noaa_pkg: sizes and shared types of the moving-statistics engine.
//
// The engine keeps the last DEPTH temperature readings of TW bits and
// reports either their rounded mean or their standard deviation. The
// window depth (14) and reading width (12 bits) follow the specification;
// the other widths are derived from them so that no intermediate value can
// overflow. SIG_W is the width of the square-root estimate (16 bits, as in
// the reference design); the estimate saturates at its maximum.
package noaa_pkg;

  localparam int unsigned DEPTH  = 14;               // readings in the window
  localparam int unsigned TW     = 12;               // reading / result width
  localparam int unsigned NW     = $clog2(DEPTH + 1); // sample count width
  localparam int unsigned SUM_W  = 16;               // sum of readings
  localparam int unsigned SQ_W   = 32;               // sum of squares, sum^2
  localparam int unsigned SIG_W  = 16;               // square-root estimate
  localparam int unsigned PROD_W = 40;               // shared multiplier output
  localparam int unsigned NUM_W  = 42;               // Babylonian numerator

  // Reset value of the square-root estimate (first guess).
  localparam logic [SIG_W-1:0] SIGMA_INIT = SIG_W'(1024);

  // Operand selection of the two shared multipliers, one code per step.
  typedef enum logic [1:0] {
    MS_SQUARES = 2'd0,  // TN*TN, oldest*oldest
    MS_STEP1   = 2'd1,  // sum*sum, sigma*n^2
    MS_STEP2   = 2'd2   // sigma*(sigma*n^2), n*sum_sq
  } mult_sel_e;

  // Sequencer states: one state per clock of the computation.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,     // waiting for SAMPLE; accepts the reading
    ST_C2   = 2'd1,     // update sum_sq; mean result, or SD step 1
    ST_C3   = 2'd2,     // SD step 2
    ST_C4   = 2'd3      // SD divide, new estimate, result
  } state_e;

endpackage
