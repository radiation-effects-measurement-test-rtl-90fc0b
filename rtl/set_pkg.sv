// set_pkg: sizes and timing constants shared by the SET (single event
// transient) pulse-width test structure.
//
// The measurement row has 100 stages, its stop circuit taps the data path
// after stage 90, the data path delay per stage is 9.337 ps and the capture
// clock reaches each stage 20 ps after the previous one. The capture
// structure has 100 unit cells of 6 stages, each stage driving 4 parallel
// inverters. All of these numbers follow the design description. The delay
// of one capture stage is not given there; CAP_STAGE_DELAY_PS is this
// design's own estimate.
package set_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // SET DFF measurement row
  localparam int unsigned N_STAGES       = 100;
  localparam int unsigned STOP_TAP       = 90;
  localparam real         STAGE_DELAY_PS = 9.337;
  localparam real         CLK_SKEW_PS    = 20.0;

  // SET capture structure
  localparam int unsigned CAP_UNITS          = 100;
  localparam int unsigned CAP_STAGES_PER_UNIT = 6;
  localparam int unsigned CAP_INVS           = 4;
  localparam real         CAP_STAGE_DELAY_PS = 10.0;

  // Pulse-width study chains: inverter, NOR2 and NOR3 pairs
  localparam int unsigned N_PW_CHAINS = 3;

  // Effective capture window of one stage: clock skew less data path delay.
  localparam real         T_EFF_PS = CLK_SKEW_PS - STAGE_DELAY_PS;
endpackage
