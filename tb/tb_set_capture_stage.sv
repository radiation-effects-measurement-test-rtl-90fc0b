// tb_set_capture_stage: one capture stage (NOR2 + four tied inverters).
// Checks that a pulse at a passes with the 10 ps stage delay and unchanged
// width, that a NOR2 strike creates a pulse of the strike's length, that a
// strike on any one inverter (or one inverter per level, in either logic
// state) is masked, that three struck inverters flip the output, and that
// two against two keeps the previous level.
module tb_set_capture_stage;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TD = 10.0;

  int checks = 0;
  int failures = 0;

  logic       a = 1'b0, nor_strike = 1'b0;
  logic [3:0] inv_strike = '0;
  logic       y;

  set_capture_stage u_dut (.a(a), .nor_strike(nor_strike), .inv_strike(inv_strike), .y(y));

  realtime t_r, t_f;
  int      n_r = 0;
  always @(posedge y) begin t_r = $realtime; n_r++; end
  always @(negedge y) t_f = $realtime;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (y=%0b n_r=%0d)", what, y, n_r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    #100;
    check("quiet output low", y == 1'b0);
    // pulse through
    t0 = $realtime;
    a = 1'b1; #80; a = 1'b0; #50;
    check("input pulse delay", t_r > t0 + TD - 0.01 && t_r < t0 + TD + 0.01);
    check("input pulse width", t_f - t_r > 79.99 && t_f - t_r < 80.01);
    // NOR strike generates an SET
    t0 = $realtime;
    nor_strike = 1'b1; #45; nor_strike = 1'b0; #50;
    check("NOR strike makes one pulse", n_r == 2);
    check("NOR strike pulse delay", t_r > t0 + TD - 0.01 && t_r < t0 + TD + 0.01);
    check("NOR strike pulse width", t_f - t_r > 44.99 && t_f - t_r < 45.01);
    // each single inverter strike masked, output low
    for (int i = 0; i < 4; i++) begin
      inv_strike = 4'b0001 << i; #50; inv_strike = '0; #30;
    end
    check("single inverter strikes masked (low)", n_r == 2 && y == 1'b0);
    // the same with the output high
    a = 1'b1; #30;
    for (int i = 0; i < 4; i++) begin
      inv_strike = 4'b0001 << i; #50;
      check("single inverter strike masked (high)", y == 1'b1);
      inv_strike = '0; #30;
    end
    a = 1'b0; #30;
    check("back low", y == 1'b0 && n_r == 3);
    // three struck inverters win
    inv_strike = 4'b0111; #30;
    check("three struck inverters flip the node", y == 1'b1);
    inv_strike = '0; #30;
    check("recovers after triple strike", y == 1'b0);
    // two against two: previous level held
    inv_strike = 4'b0011; #30;
    check("2-2 holds low", y == 1'b0);
    inv_strike = '0; a = 1'b1; #30;
    inv_strike = 4'b1100; #30;
    check("2-2 holds high", y == 1'b1);
    inv_strike = '0; a = 1'b0; #30;
    check("final low", y == 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
