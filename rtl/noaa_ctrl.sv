// noaa_ctrl: sequencer of the moving-statistics engine.
//
// A reading is taken when SAMPLE is high at a rising clock edge while the
// engine is idle; MODE is captured with it. From there a fixed schedule runs,
// one state per clock, and drives the enables of the datapath and the select
// of the shared multipliers and divider:
//   IDLE (edge 1): push reading, sum update, squares of new and oldest
//   C2   (edge 2): sum_sq update; mean mode: divide and finish
//                  SD mode: sum^2 and sigma*n^2
//   C3   (edge 3): sigma^2*n^2 and n*sum_sq             (SD mode only)
//   C4   (edge 4): Babylonian divide, new estimate, finish (SD mode only)
// DONE is a registered one-clock pulse that follows the finishing edge, so a
// mean is ready 2 edges and a standard deviation 4 edges after the reading
// is taken (latency 4 in SD mode, as specified). DONE coincides with the
// return to IDLE, so the next reading may be offered in the DONE clock: one
// reading per 2 clocks in mean mode, per 4 clocks in SD mode. A SAMPLE that
// arrives while the engine is busy is ignored; `ready` tells when a reading
// will be taken. The reference design generated these steps as gated clocks
// from a chain of delayed new-data flags; here they are clock enables of a
// single-clock state machine, which is this design's choice.
// Reset is asynchronous and active high.
module noaa_ctrl
  import noaa_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      sample,
  input  logic      mode,
  output logic      accept,    // reading taken at this edge
  output logic      sum2_en,   // sum_sq update
  output mult_sel_e mult_sel,
  output logic      div_sd,    // divider computes the SD step
  output logic      ld1,
  output logic      ld2,
  output logic      ld3,
  output logic      out_ld,    // result register loads at this edge
  output logic      done,
  output logic      ready,
  output logic      mode_r
);

  state_e state, state_nx;

  always_comb begin
    accept   = 1'b0;
    sum2_en  = 1'b0;
    mult_sel = MS_SQUARES;
    div_sd   = 1'b0;
    ld1      = 1'b0;
    ld2      = 1'b0;
    ld3      = 1'b0;
    out_ld   = 1'b0;
    state_nx = state;
    unique case (state)
      ST_IDLE: begin
        accept = sample;
        if (sample) state_nx = ST_C2;
      end
      ST_C2: begin
        sum2_en  = 1'b1;
        mult_sel = MS_STEP1;
        if (mode_r) begin
          ld1      = 1'b1;
          state_nx = ST_C3;
        end else begin
          out_ld   = 1'b1;
          state_nx = ST_IDLE;
        end
      end
      ST_C3: begin
        mult_sel = MS_STEP2;
        ld2      = 1'b1;
        state_nx = ST_C4;
      end
      ST_C4: begin
        div_sd   = 1'b1;
        ld3      = 1'b1;
        out_ld   = 1'b1;
        state_nx = ST_IDLE;
      end
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= ST_IDLE;
      mode_r <= 1'b0;
      done   <= 1'b0;
    end else begin
      state <= state_nx;
      done  <= out_ld;
      if (accept) mode_r <= mode;
    end
  end

  assign ready = (state == ST_IDLE);

  // DONE is a single-clock pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (rst) done |=> !done);
  // The SD-only states are never entered in mean mode.
  a_sd_states: assert property (@(posedge clk) disable iff (rst)
                                (state == ST_C3 || state == ST_C4) |-> mode_r);

endmodule
