// inv_pair_stage: behavioural timing model of one balanced inverter-pair
// stage (two series inverters plus a load buffer that equalises the
// capacitance each stage sees). This is a behavioural model, not logic to
// synthesise: it stands for a custom transistor-level cell.
//
// Logically the stage is a buffer, y = a. Its timing is what matters: a
// rising input edge reaches y after T_RISE_PS, a falling one after
// T_FALL_PS, so a high pulse leaves the stage wider by T_FALL_PS - T_RISE_PS.
// Both edges are transport-delayed copies of the input, combined with AND
// (rise slower) or OR (fall slower); a pulse narrower than the delay
// difference vanishes, as it would in a real stage. The model is meant for
// pulses wider than the stage delay itself (SETs of tens to hundreds of ps);
// how a narrower pulse is treated depends on the simulator's handling of
// delayed assignments.
//
// Default delays are the 9.337 ps stage delay of the measurement row, equal
// for both edges, as the balanced stage is meant to be. A chain of
// unbalanced stages is modelled by giving the two edges different delays.
// The output starts low, the quiescent level of every chain in this design.
module inv_pair_stage
  import set_pkg::*;
#(
  parameter real T_RISE_PS = STAGE_DELAY_PS,
  parameter real T_FALL_PS = STAGE_DELAY_PS
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1fs;

  logic a_n;      // output of the first inverter
  logic rise_d = 1'b0;
  logic fall_d = 1'b0;

  assign a_n = ~a;

  always @(a_n) rise_d <= #(T_RISE_PS) ~a_n;
  always @(a_n) fall_d <= #(T_FALL_PS) ~a_n;

  assign y = (T_RISE_PS >= T_FALL_PS) ? (rise_d & fall_d) : (rise_d | fall_d);
endmodule
