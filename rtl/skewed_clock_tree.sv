// skewed_clock_tree: behavioural model of the capture clock distribution of
// the SET measurement row. This is a behavioural model: in silicon the skew
// comes from the clock routing itself.
//
// clk[0] is clk_in; clk[n] is clk_in delayed by n * SKEW_PS, built as a
// chain of SKEW_PS transport delays so that a clock wavefront travels along
// the row at one stage per SKEW_PS. The data path moves faster (9.337 ps
// per stage), so a pulse catches up with a clock wavefront and every stage
// samples it T_EFF = SKEW_PS - 9.337 ps later in the pulse than its
// predecessor: that difference is the resolution of the measurement.
// The 20 ps skew follows the design description. Outputs start low.
module skewed_clock_tree
  import set_pkg::*;
#(
  parameter int unsigned N       = N_STAGES,
  parameter real         SKEW_PS = CLK_SKEW_PS
) (
  input  logic         clk_in,
  output logic [N-1:0] clk
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N-1:0] tap = '0;

  always @(clk_in) tap[0] <= clk_in;

  for (genvar n = 1; n < N; n++) begin : g_tap
    always @(tap[n-1]) tap[n] <= #(SKEW_PS) tap[n-1];
  end

  assign clk = tap;
endmodule
