// tb_sr_nor_latch: walks the start/stop latch through set, hold after the
// set pulse, reset, reset winning over set, and a set pulse of 5 ps, and
// checks q and qn against the expected latch state after every step.
module tb_sr_nor_latch;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0;
  int failures = 0;

  logic set = 1'b0;
  logic rst_n = 1'b0;
  logic q, qn;

  sr_nor_latch u_dut (.set(set), .rst_n(rst_n), .q(q), .qn(qn));

  task automatic expect_q(string what, logic exp);
    #1;
    checks++;
    if (q !== exp || qn !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%0b qn=%0b, expected q=%0b", what, q, qn, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;  expect_q("in reset", 1'b0);
    rst_n = 1'b1; #10; expect_q("released, no set", 1'b0);
    set = 1'b1; expect_q("set", 1'b1);
    #20; set = 1'b0; expect_q("held after set pulse", 1'b1);
    #100; expect_q("still held", 1'b1);
    set = 1'b1; #10; set = 1'b0; expect_q("set again while set", 1'b1);
    rst_n = 1'b0; expect_q("reset clears", 1'b0);
    set = 1'b1; expect_q("reset wins over set", 1'b0);
    rst_n = 1'b1; expect_q("set while released", 1'b1);
    set = 1'b0; rst_n = 1'b0; #5; rst_n = 1'b1; expect_q("cleared again", 1'b0);
    #10; set = 1'b1; #5; set = 1'b0; expect_q("5 ps set pulse latched", 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
