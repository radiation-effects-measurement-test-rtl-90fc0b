// set_test_structure: the complete single-event-transient pulse-width test
// structure. An SET struck into the capture (target) chain travels to the
// measurement row, which freezes it as a run of ones and then shifts it out.
//
//   set_in --> set_capture_chain --> set_dff_chain --> scan_out
//                                       ^  ^
//   clk_in --> skewed_clock_tree -------'  shift_clk, si, rst_n
//
// Use: pulse rst_n low (both mode latches clear: scan mode), shift at least
// N_STAGES zeros in through si on shift_clk, then keep shift_clk low and let
// clk_in run. A strike in the capture chain produces a pulse at the row's
// input; the row switches itself to functional mode, captures, and switches
// back to scan mode when the pulse reaches the stop tap (scan_mode rises).
// Then N_STAGES shift_clk pulses read the row out through scan_out, last
// stage first. The pulse width is about (number of ones) x 10.7 ps. Pulse
// rst_n again to re-arm.
//
// Beside this path stand the three 100-stage pulse-width study chains
// (inverter, NOR2 and NOR3 pairs), each with its own input pw_in[g] and
// output pw_out[g]; they share nothing with the rest.
//
// set_in is the capture chain's own input, held low in normal use.
// d_fwd_out is the SET after the last measurement stage. start and stopn
// show the two mode latches.
//
// The row, stop tap, capture chain and clock skew follow the design
// description; connecting the capture chain output directly to d<0> of the
// row is how the description says they meet.
module set_test_structure
  import set_pkg::*;
#(
  parameter int unsigned N_UNITS = CAP_UNITS,
  parameter int unsigned N       = N_STAGES,
  parameter int unsigned STOP_AT = STOP_TAP,
  parameter int unsigned PW_N    = 100
) (
  input  logic                                               set_in,
  input  logic [N_UNITS*CAP_STAGES_PER_UNIT-1:0]             nor_strike,
  input  logic [N_UNITS*CAP_STAGES_PER_UNIT-1:0][CAP_INVS-1:0] inv_strike,
  input  logic                                               clk_in,
  input  logic                                               shift_clk,
  input  logic                                               si,
  input  logic                                               rst_n,
  output logic                                               scan_out,
  output logic                                               d_fwd_out,
  output logic                                               start,
  output logic                                               stopn,
  input  logic [N_PW_CHAINS-1:0]                             pw_in,
  output logic [N_PW_CHAINS-1:0]                             pw_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic         set_d0;
  logic [N-1:0] clk;

  set_capture_chain #(.N_UNITS(N_UNITS)) u_capture (
    .set_in    (set_in),
    .nor_strike(nor_strike),
    .inv_strike(inv_strike),
    .set_out   (set_d0)
  );

  skewed_clock_tree #(.N(N)) u_clk_tree (
    .clk_in(clk_in),
    .clk   (clk)
  );

  set_dff_chain #(.N(N), .STOP_AT(STOP_AT)) u_row (
    .d0       (set_d0),
    .clk      (clk),
    .shift_clk(shift_clk),
    .si       (si),
    .rst_n    (rst_n),
    .scan_out (scan_out),
    .d_fwd_out(d_fwd_out),
    .start    (start),
    .stopn    (stopn)
  );

  for (genvar g = 0; g < N_PW_CHAINS; g++) begin : g_pw
    logic [PW_N:0] taps;
    pw_test_chain #(.N(PW_N)) u_chain (
      .din(pw_in[g]),
      .d  (taps)
    );
    assign pw_out[g] = taps[PW_N];
  end
endmodule
