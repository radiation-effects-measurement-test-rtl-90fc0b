// tb_set_dff_stage: one measurement stage with start/stopn driven directly.
// Checks the data path delay (9.337 ps), shifting in scan mode, that the
// capture clock is ignored in scan mode and the scan clock in functional
// mode, that the flip-flop samples the SET after the stage's inverter pair
// (an edge 5 ps after the SET enters still sees 0, one 20 ps after sees 1),
// and that stopn low returns the stage to scan mode.
module tb_set_dff_stage;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0;
  int failures = 0;

  logic d = 1'b0, clk = 1'b0, shift_clk = 1'b0, si = 1'b0;
  logic start = 1'b0, stopn = 1'b1;
  logic d_fwd, q_buf;

  set_dff_stage u_dut (
    .d(d), .d_fwd(d_fwd), .clk(clk), .shift_clk(shift_clk), .si(si),
    .start(start), .stopn(stopn), .q_buf(q_buf)
  );

  realtime t_fwd;
  always @(posedge d_fwd) t_fwd = $realtime;

  task automatic expect_q(string what, logic exp);
    checks++;
    if (q_buf !== exp) begin
      failures++;
      $display("FAIL %s: q_buf=%0b, expected %0b", what, q_buf, exp);
    end
  endtask

  task automatic pulse_shift();
    shift_clk = 1'b1; #10000; shift_clk = 1'b0; #10000;   // 50 MHz
  endtask

  task automatic pulse_clk();
    clk = 1'b1; #50; clk = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    #100;
    // scan mode: start low
    si = 1'b1; pulse_shift(); expect_q("scan shift 1", 1'b1);
    si = 1'b0; pulse_shift(); expect_q("scan shift 0", 1'b0);
    si = 1'b1; d = 1'b1; #100; pulse_clk(); #10;
    expect_q("capture clock ignored in scan mode", 1'b0);
    d = 1'b0; si = 1'b0; #100;

    // functional mode
    start = 1'b1; #100;
    t0 = $realtime;
    d = 1'b1;
    #5; pulse_clk(); #1;
    expect_q("edge 5 ps after SET entry samples before the pair", 1'b0);
    checks++;
    if (t_fwd < t0 + 9.336 || t_fwd > t0 + 9.338) begin
      failures++;
      $display("FAIL d_fwd delay %0.3f ps", t_fwd - t0);
    end
    #100;
    d = 1'b0; #100;
    d = 1'b1; #20; pulse_clk(); #1;
    expect_q("edge 20 ps after SET entry captures 1", 1'b1);
    d = 1'b0; #100;
    si = 1'b0; pulse_shift();
    expect_q("scan clock ignored in functional mode", 1'b1);
    d = 1'b1; #30; d = 1'b0; #5; pulse_clk(); #1;
    expect_q("edge inside the 30 ps pulse after the pair", 1'b1);
    #100; pulse_clk(); #1;
    expect_q("later edge with d low captures 0", 1'b0);
    d = 1'b1; #40; pulse_clk(); #1; d = 1'b0;
    expect_q("captures 1 again", 1'b1);

    // stop: back to scan mode
    #100; stopn = 1'b0; #100;
    d = 1'b0; #100; pulse_clk(); #1;
    expect_q("capture clock ignored after stop", 1'b1);
    si = 1'b0; pulse_shift();
    expect_q("shift after stop", 1'b0);
    si = 1'b1; pulse_shift();
    expect_q("shift 1 after stop", 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
