// tb_inv_pair_stage: checks the inverter-pair timing model. Three
// instances: balanced (default 9.337 ps both edges), fall slower than rise
// (pulse widens) and rise much slower than fall (pulse narrows; a pulse
// narrower than the difference disappears). Edge times are measured and
// compared with delays computed here from the parameters. Pulses are kept
// wider than the stage delay itself, the range the model is meant for.
module tb_inv_pair_stage;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0;
  int failures = 0;

  logic a = 1'b0;
  logic y_bal, y_wide, y_narrow;

  inv_pair_stage u_bal (.a(a), .y(y_bal));
  inv_pair_stage #(.T_RISE_PS(9.0),  .T_FALL_PS(11.5)) u_wide   (.a(a), .y(y_wide));
  inv_pair_stage #(.T_RISE_PS(15.0), .T_FALL_PS(9.0))  u_narrow (.a(a), .y(y_narrow));

  realtime t_r[3], t_f[3];
  int      n_r[3], n_f[3];

  always @(posedge y_bal)    begin t_r[0] = $realtime; n_r[0]++; end
  always @(negedge y_bal)    begin t_f[0] = $realtime; n_f[0]++; end
  always @(posedge y_wide)   begin t_r[1] = $realtime; n_r[1]++; end
  always @(negedge y_wide)   begin t_f[1] = $realtime; n_f[1]++; end
  always @(posedge y_narrow) begin t_r[2] = $realtime; n_r[2]++; end
  always @(negedge y_narrow) begin t_f[2] = $realtime; n_f[2]++; end

  task automatic check_close(string what, realtime got, realtime exp);
    checks++;
    if (got < exp - 0.002 || got > exp + 0.002) begin
      failures++;
      $display("FAIL %s: got %0.3f ps, expected %0.3f ps", what, got, exp);
    end
  endtask

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_r[i]) begin n_r[i] = 0; n_f[i] = 0; end
    #100;
    // 50 ps pulse
    a = 1'b1; #50; a = 1'b0;
    #100;
    check_int("balanced: one rise", n_r[0], 1);
    check_close("balanced rise time", t_r[0], 100.0 + 9.337);
    check_close("balanced fall time", t_f[0], 150.0 + 9.337);
    check_close("balanced width",     t_f[0] - t_r[0], 50.0);
    check_close("wide rise time",     t_r[1], 109.0);
    check_close("wide width",         t_f[1] - t_r[1], 52.5);
    check_close("narrow rise time",   t_r[2], 115.0);
    check_close("narrow width",       t_f[2] - t_r[2], 44.0);
    check_int("level after pulse", int'(y_bal), 0);
    // 20 ps pulse: passes unchanged through the balanced stage, loses 6 ps
    // in the narrowing one
    #100;
    a = 1'b1; #20; a = 1'b0;
    #100;
    check_int("balanced passes 20 ps pulse", n_r[0], 2);
    check_close("balanced 20 ps width", t_f[0] - t_r[0], 20.0);
    check_close("narrowing 20 ps width", t_f[2] - t_r[2], 14.0);
    // 5 ps pulse: narrower than the rise/fall difference of the narrowing
    // stage, so it disappears there
    #100;
    a = 1'b1; #5; a = 1'b0;
    #100;
    check_int("narrowing stage swallows 5 ps pulse", n_r[2], 2);
    // long high level
    a = 1'b1; #200;
    check_int("steady high propagates", int'(y_bal & y_wide & y_narrow), 1);
    a = 1'b0; #200;
    check_int("steady low propagates", int'(y_bal | y_wide | y_narrow), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
