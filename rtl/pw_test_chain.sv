// pw_test_chain: behavioural model of a pulse-width test chain of
// N identical non-inverting stages (inverter pairs, or NOR2 / NOR3
// pairs whose spare inputs are grounded, which are logically the same
// buffer). This is a behavioural model of a transistor-level structure.
//
// An SET pulse applied at d[0] comes out of every stage; taps d[1..N]
// expose each stage output, as the measurement flip-flops see them. A
// per-stage mismatch between rise and fall delay (T_FALL_PS - T_RISE_PS)
// widens or narrows the pulse linearly with depth, which is the effect the
// chains were built to study: e.g. about +0.37 ps per stage for an
// unbalanced inverter chain in its worst corner, and close to zero once the
// stages are balanced by skewed transistor sizes.
//
// The 100-stage depth follows the design description; the stage delays are
// parameters, defaulting to the balanced 9.337 ps inverter-pair stage.
module pw_test_chain
  import set_pkg::*;
#(
  parameter int unsigned N         = 100,
  parameter real         T_RISE_PS = STAGE_DELAY_PS,
  parameter real         T_FALL_PS = STAGE_DELAY_PS
) (
  input  logic                din,
  output logic [N:0]          d      // d[0] = din, d[n] = output of stage n-1
);
  timeunit 1ps;
  timeprecision 1fs;

  assign d[0] = din;

  for (genvar n = 0; n < N; n++) begin : g_stage
    inv_pair_stage #(
      .T_RISE_PS(T_RISE_PS),
      .T_FALL_PS(T_FALL_PS)
    ) u_stage (
      .a(d[n]),
      .y(d[n+1])
    );
  end
endmodule
