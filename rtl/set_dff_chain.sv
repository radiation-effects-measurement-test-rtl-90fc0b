// set_dff_chain: one row of the SET duration measurement structure, an
// on-die oscilloscope for a single transient pulse.
//
// An SET enters at d0 and runs through N_STAGES inverter-pair stages, each
// 9.337 ps long. Every stage has a scan flip-flop clocked by its own copy of
// the capture clock, clk[n], which arrives 20 ps after clk[n-1]. Because the
// pulse moves faster than the clock wavefront, consecutive flip-flops sample
// the pulse about 10.7 ps apart, and a pulse of width W leaves a run of
// roughly W / 10.7 ones in the row.
//
// Mode control (all of it self-timed):
//   * after rst_n the start latch is clear, so the row is in scan mode and
//     zeros can be shifted in on shift_clk to clear it;
//   * the SET at d0 sets the start latch: functional mode, every stage
//     samples on its capture clock;
//   * when the SET reaches the tap after stage STOP_TAP the stop latch is
//     set, stopn falls and the row is back in scan mode, holding what it
//     caught; shift_clk then moves the row out through scan_out, stage
//     N_STAGES-1 first.
// rst_n re-arms both latches for the next pulse. Capture clock edges that
// arrive after the stop are ignored, so a stage whose wavefront comes too
// late keeps its cleared value.
//
// Ports: d0 (SET input), clk[N_STAGES] (skewed capture clocks), shift_clk,
// si (scan input, held low), rst_n, scan_out (q of the last stage), d_fwd_out
// (the SET after the last stage), start / stopn (mode latches, for
// observation).
//
// Following the design description: 100 stages, stop tap 90, the NOR2 latch
// start and stop circuits, scan chain order. This design's choices are those
// of set_dff_stage and sr_nor_latch.
module set_dff_chain
  import set_pkg::*;
#(
  parameter int unsigned N       = N_STAGES,
  parameter int unsigned STOP_AT = STOP_TAP
) (
  input  logic         d0,
  input  logic [N-1:0] clk,
  input  logic         shift_clk,
  input  logic         si,
  input  logic         rst_n,
  output logic         scan_out,
  output logic         d_fwd_out,
  output logic         start,
  output logic         stopn
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N:0] d;        // d[0] = d0, d[n+1] = d_fwd of stage n
  logic [N:0] scan;     // scan[0] = si, scan[n+1] = q_buf of stage n
  logic       start_n;  // complement outputs of the latches, unused
  logic       stop;

  assign d[0]    = d0;
  assign scan[0] = si;

  sr_nor_latch u_start (
    .set  (d0),
    .rst_n(rst_n),
    .q    (start),
    .qn   (start_n)
  );

  sr_nor_latch u_stop (
    .set  (d[STOP_AT+1]),
    .rst_n(rst_n),
    .q    (stop),
    .qn   (stopn)
  );

  for (genvar n = 0; n < N; n++) begin : g_stage
    set_dff_stage u_stage (
      .d        (d[n]),
      .d_fwd    (d[n+1]),
      .clk      (clk[n]),
      .shift_clk(shift_clk),
      .si       (scan[n]),
      .start    (start),
      .stopn    (stopn),
      .q_buf    (scan[n+1])
    );
  end

  assign scan_out  = scan[N];
  assign d_fwd_out = d[N];
endmodule
