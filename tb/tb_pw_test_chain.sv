// tb_pw_test_chain: runs a 205 ps pulse through 100-stage chains whose
// per-stage rise/fall mismatch reproduces the end-of-chain pulse-width
// changes reported for the studied chains, and checks the width at taps
// 1, 11, 41, 71 and 100 and the arrival time at each tap. Per-stage
// mismatches used (fall delay minus rise delay):
//   balanced (skewed gates)          0 fs      -> 205.0 ps
//   inverter chain, FS corner     +370 fs      -> 242.0 ps (+18.05 %)
//   NOR2 chain, SF corner         +828 fs      -> 287.8 ps (+40.39 %)
//   NOR3 chain, FS corner         -554 fs      -> 149.6 ps (-27.02 %)
module tb_pw_test_chain;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N   = 100;
  localparam int  NC  = 4;
  localparam real TR  = 9.337;
  localparam real W   = 205.0;
  localparam real DELTA [NC] = '{0.0, 0.370, 0.828, -0.554};
  localparam real PCT   [NC] = '{0.0, 18.05, 40.39, -27.02};

  int checks = 0;
  int failures = 0;

  logic din = 1'b0;
  logic [N:0] d [NC];

  pw_test_chain #(.N(N), .T_RISE_PS(TR), .T_FALL_PS(TR + 0.0))   u_bal  (.din(din), .d(d[0]));
  pw_test_chain #(.N(N), .T_RISE_PS(TR), .T_FALL_PS(TR + 0.370)) u_inv  (.din(din), .d(d[1]));
  pw_test_chain #(.N(N), .T_RISE_PS(TR), .T_FALL_PS(TR + 0.828)) u_nor2 (.din(din), .d(d[2]));
  pw_test_chain #(.N(N), .T_RISE_PS(TR), .T_FALL_PS(TR - 0.554)) u_nor3 (.din(din), .d(d[3]));

  localparam int NT = 5;
  localparam int TAPS [NT] = '{1, 11, 41, 71, 100};

  realtime t_r [NC][NT];
  realtime t_f [NC][NT];

  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar k = 0; k < NT; k++) begin : g_k
      always @(posedge d[c][TAPS[k]]) t_r[c][k] = $realtime;
      always @(negedge d[c][TAPS[k]]) t_f[c][k] = $realtime;
    end
  end

  task automatic check_close(string what, realtime got, realtime exp, realtime tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0.3f, expected %0.3f", what, got, exp);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    #100;
    t0 = $realtime;
    din = 1'b1; #(W); din = 1'b0;
    #2000;
    for (int c = 0; c < NC; c++) begin
      for (int k = 0; k < NT; k++) begin
        check_close($sformatf("chain %0d tap %0d arrival", c, TAPS[k]),
                    t_r[c][k] - t0, TAPS[k] * TR, 0.01);
        check_close($sformatf("chain %0d tap %0d width", c, TAPS[k]),
                    t_f[c][k] - t_r[c][k], W + TAPS[k] * DELTA[c], 0.01);
      end
      // end-of-chain change as a percentage, against the reported figure
      check_close($sformatf("chain %0d percent change", c),
                  100.0 * (t_f[c][NT-1] - t_r[c][NT-1] - W) / W, PCT[c], 0.05);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
