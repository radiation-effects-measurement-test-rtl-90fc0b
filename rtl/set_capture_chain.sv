// set_capture_chain: the SET capture (target) structure, N_UNITS unit cells
// in series, each the output of one driving the input of the next (a
// behavioural model, since its stages are). With the input held low the
// chain is quiet; an ion hit on any NOR2 starts an SET that travels to
// set_out, the input of the measurement row. A hit on a single parallel
// inverter is masked where it lands.
//
// Strike vectors are flattened unit-major: nor_strike[u*6 + s] hits the
// NOR2 of stage s in unit u, inv_strike[u*6 + s][i] its inverter i.
// Latency is N_UNITS * 6 stage delays. 100 unit cells follow the design
// description.
module set_capture_chain
  import set_pkg::*;
#(
  parameter int unsigned N_UNITS = CAP_UNITS
) (
  input  logic                                               set_in,
  input  logic [N_UNITS*CAP_STAGES_PER_UNIT-1:0]             nor_strike,
  input  logic [N_UNITS*CAP_STAGES_PER_UNIT-1:0][CAP_INVS-1:0] inv_strike,
  output logic                                               set_out
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned S = CAP_STAGES_PER_UNIT;

  logic [N_UNITS:0] u_io;

  assign u_io[0] = set_in;

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    set_capture_unit u_unit (
      .a         (u_io[u]),
      .nor_strike(nor_strike[u*S +: S]),
      .inv_strike(inv_strike[u*S +: S]),
      .y         (u_io[u+1])
    );
  end

  assign set_out = u_io[N_UNITS];
endmodule
