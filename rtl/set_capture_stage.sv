// set_capture_stage: behavioural model of one stage of the SET capture
// (target) structure, the part exposed to the ion beam. This is a
// behavioural model of a custom transistor-level cell.
//
// The stage is a high-drive NOR2 with one input grounded (an inverter)
// followed by four minimum-size inverters in parallel whose outputs are
// tied together. The stage is therefore a buffer, y = a.
//
// Strikes: nor_strike high flips the NOR2 output for as long as it is high.
// That is how an ion hit on the NOR creates an SET, which then propagates.
// inv_strike[i] high flips inverter i. On the shared output the three
// unstruck inverters overpower the struck one, so a single inverter strike
// is masked. The tied node is resolved by count: three or four inverters
// driving 1 give 1, three or four driving 0 give 0. In a two-against-two
// fight the node keeps its previous level (the latch that lint reports on
// node is that intended hold); the parallel inverters are
// placed apart to make that case unlikely.
//
// Timing: T_RISE_PS / T_FALL_PS from the stage input or a strike to y.
// Following the design description: NOR2 with grounded input, four
// parallel inverters, the masking of one struck inverter. This design's
// choices: the stage delay (not given) and the 2-2 behaviour.
module set_capture_stage
  import set_pkg::*;
#(
  parameter real T_RISE_PS = CAP_STAGE_DELAY_PS,
  parameter real T_FALL_PS = CAP_STAGE_DELAY_PS
) (
  input  logic                a,
  input  logic                nor_strike,
  input  logic [CAP_INVS-1:0] inv_strike,
  output logic                y
);
  timeunit 1ps;
  timeprecision 1fs;

  logic                nor_y;
  logic [CAP_INVS-1:0] inv_y;
  logic                node;          // tied inverter outputs, zero delay
  logic                rise_d = 1'b0;
  logic                fall_d = 1'b0;

  assign nor_y = ~(a | 1'b0) ^ nor_strike;

  for (genvar i = 0; i < CAP_INVS; i++) begin : g_inv
    assign inv_y[i] = ~nor_y ^ inv_strike[i];
  end

  always_latch begin
    if ($countones(inv_y) >= 3)      node = 1'b1;
    else if ($countones(inv_y) <= 1) node = 1'b0;
  end

  always @(node) rise_d <= #(T_RISE_PS) node;
  always @(node) fall_d <= #(T_FALL_PS) node;

  assign y = (T_RISE_PS >= T_FALL_PS) ? (rise_d & fall_d) : (rise_d | fall_d);
endmodule
