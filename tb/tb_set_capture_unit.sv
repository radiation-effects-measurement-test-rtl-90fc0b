// tb_set_capture_unit: a six-stage unit cell. Checks the six-stage delay
// (60 ps) and width of a 205 ps pulse, that a NOR2 strike in stage s gives
// a pulse after (6 - s) stage delays, and that one struck inverter in every
// stage at once, while a pulse is passing, leaves the pulse untouched.
module tb_set_capture_unit;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TD = 10.0;
  localparam int  S  = 6;

  int checks = 0;
  int failures = 0;

  logic                a = 1'b0;
  logic [S-1:0]        nor_strike = '0;
  logic [S-1:0][3:0]   inv_strike = '0;
  logic                y;

  set_capture_unit u_dut (.a(a), .nor_strike(nor_strike), .inv_strike(inv_strike), .y(y));

  realtime t_r, t_f;
  int      n_r = 0;
  always @(posedge y) begin t_r = $realtime; n_r++; end
  always @(negedge y) t_f = $realtime;

  task automatic check_close(string what, realtime got, realtime exp);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: got %0.3f, expected %0.3f", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    #100;
    t0 = $realtime;
    a = 1'b1; #205; a = 1'b0; #200;
    check_close("unit delay", t_r - t0, S * TD);
    check_close("unit width", t_f - t_r, 205.0);
    for (int s = 0; s < S; s++) begin
      t0 = $realtime;
      nor_strike[s] = 1'b1; #40; nor_strike[s] = 1'b0; #200;
      check_close($sformatf("strike in stage %0d: latency", s), t_r - t0, (S - s) * TD);
      check_close($sformatf("strike in stage %0d: width", s), t_f - t_r, 40.0);
    end
    // pulse with one inverter struck in every stage in the middle of it
    t0 = $realtime;
    a = 1'b1;
    #50;
    for (int s = 0; s < S; s++) inv_strike[s] = 4'b0001 << (s % 4);
    #50;
    inv_strike = '0;
    #105;
    a = 1'b0;
    #200;
    check_close("struck pulse delay", t_r - t0, S * TD);
    check_close("struck pulse width", t_f - t_r, 205.0);
    checks++;
    if (n_r != S + 2) begin
      failures++;
      $display("FAIL %0d pulses seen, expected %0d", n_r, S + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
