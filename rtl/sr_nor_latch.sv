// sr_nor_latch: the start circuit and the stop circuit of the SET
// measurement row. Each is a set/reset latch built from two cross-coupled
// NOR2 gates; it is written here as a level-sensitive latch, which is what
// that pair of gates is, so the latch that lint and synthesis report is
// intended.
//
// set (the arriving SET: d<0> for the start circuit, the tap after stage 90
// for the stop circuit) drives q high and it stays high after the pulse has
// gone. rst_n, active low, clears q and wins over set. qn is the
// complement; the stop circuit uses it as stopn. No clock; q follows the
// inputs without delay.
//
// Following the design description: the NOR2 latch, the active-low reset
// and the two set sources. This design's choice: reset has priority when
// both inputs are active (a cross-coupled NOR pair would drive both
// outputs low in that case).
module sr_nor_latch (
  input  logic set,
  input  logic rst_n,
  output logic q,
  output logic qn
);
  timeunit 1ps;
  timeprecision 1fs;

  always_latch begin
    if (!rst_n)   q = 1'b0;
    else if (set) q = 1'b1;
  end

  assign qn = ~q;
endmodule
