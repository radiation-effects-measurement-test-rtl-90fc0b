// set_capture_unit: unit cell of the SET capture structure, six
// set_capture_stage instances in series (a behavioural model, since its
// stages are). The unit is a buffer from a to y with six stage delays.
//
// nor_strike[s] and inv_strike[s] reach stage s (stage 0 at the input).
// In the layout the four inverters of one stage are spread over the cell
// so that one ion cannot hit two of them; the model takes the strikes as
// independent inputs. Six stages per unit follow the design description.
module set_capture_unit
  import set_pkg::*;
#(
  parameter int unsigned N_STG = CAP_STAGES_PER_UNIT
) (
  input  logic                             a,
  input  logic [N_STG-1:0]                 nor_strike,
  input  logic [N_STG-1:0][CAP_INVS-1:0]   inv_strike,
  output logic                             y
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_STG:0] s;

  assign s[0] = a;

  for (genvar k = 0; k < N_STG; k++) begin : g_stg
    set_capture_stage u_stage (
      .a         (s[k]),
      .nor_strike(nor_strike[k]),
      .inv_strike(inv_strike[k]),
      .y         (s[k+1])
    );
  end

  assign y = s[N_STG];
endmodule
