// set_dff_stage: one stage of the SET DFF measurement row.
//
// The data path is a balanced inverter pair (inv_pair_stage, a behavioural
// timing model) from d to d_fwd. A scan flip-flop samples d_fwd. Its scan
// enable is the NAND of start and stopn:
//   start=0            -> scan mode (idle / initialisation)
//   start=1, stopn=1   -> functional mode: the flip-flop samples d_fwd on
//                         the stage's own skewed capture clock clk
//   stopn=0            -> scan mode again (read-out)
// In scan mode the flip-flop takes si on shift_clk, and q_buf feeds si of
// the next stage, so the row becomes a shift register.
//
// Timing: in functional mode q takes d_fwd on the rising edge of clk; in
// scan mode it takes si on the rising edge of shift_clk. The flip-flop has
// no reset; it is cleared by shifting zeros in.
//
// Following the design description: inverter pair on the data path, the
// flip-flop sampling after the pair, the NAND2 scan enable, the buffered
// q feeding the next stage's scan input. This design's choice: the
// flip-flop clock is selected by the scan enable (the stage is clock gated
// so it sees only one of the two clocks). Because the select is a plain
// multiplexer, shift_clk must be low while the mode changes; the row's user
// keeps it low except while initialising or reading out.
module set_dff_stage
  import set_pkg::*;
#(
  parameter real T_RISE_PS = STAGE_DELAY_PS,
  parameter real T_FALL_PS = STAGE_DELAY_PS
) (
  input  logic d,          // SET from the previous stage
  output logic d_fwd,      // SET to the next stage
  input  logic clk,        // this stage's skewed capture clock
  input  logic shift_clk,  // scan clock
  input  logic si,         // scan input (q_buf of the previous stage)
  input  logic start,
  input  logic stopn,
  output logic q_buf       // captured / shifted bit
);
  timeunit 1ps;
  timeprecision 1fs;

  logic se;
  logic ff_clk;
  logic q;

  inv_pair_stage #(
    .T_RISE_PS(T_RISE_PS),
    .T_FALL_PS(T_FALL_PS)
  ) u_inv_pair (
    .a(d),
    .y(d_fwd)
  );

  assign se     = ~(start & stopn);
  assign ff_clk = se ? shift_clk : clk;

  always_ff @(posedge ff_clk) begin
    q <= se ? si : d_fwd;
  end

  assign q_buf = q;
endmodule
