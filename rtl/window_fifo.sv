// window_fifo: the sliding window of the last DEPTH temperature readings.
//
// A linear shift register: on every push the new reading enters slot 0, all
// others move up by one, and the reading in the last slot falls out. That
// last slot is always visible on `oldest`, so the caller can subtract it from
// its running sums in the same clock as it adds the new reading. All slots
// reset to zero, so while fewer than DEPTH readings have arrived `oldest` is
// zero and the sums stay exact without a special case. `count` is the number
// of readings held (n in the formulas); it saturates at DEPTH.
//
// Interface: `push` with `din` is taken at the rising clock edge; `oldest`
// is the value that this push discards (read before the edge); `count`
// changes on the same edge. Reset is asynchronous and active high and
// forgets every reading.
//
// Depth 14 and width 12 follow the specification; the shift direction and
// the zero fill are this design's reading of the reference shift register.
module window_fifo #(
  parameter int unsigned DEPTH = noaa_pkg::DEPTH,
  parameter int unsigned W     = noaa_pkg::TW,
  parameter int unsigned NW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  oldest,
  output logic [NW-1:0] count
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      count <= '0;
    end else if (push) begin
      mem[0] <= din;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
      if (count < NW'(DEPTH)) count <= count + 1'b1;
    end
  end

  assign oldest = mem[DEPTH-1];

endmodule
