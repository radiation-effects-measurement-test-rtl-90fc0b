// tb_set_capture_chain: the full 100-unit capture chain (600 stages).
// Checks the 6000 ps latency and unchanged width of a 205 ps pulse at the
// input, the latency and width of SETs struck into NOR2 gates at several
// places along the chain, and that a burst of single-inverter strikes at
// random places produces nothing at the output.
module tb_set_capture_chain;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  U  = 100;
  localparam int  S  = 6;
  localparam int  NS = U * S;
  localparam real TD = 10.0;

  int checks = 0;
  int failures = 0;

  logic                 set_in = 1'b0;
  logic [NS-1:0]        nor_strike = '0;
  logic [NS-1:0][3:0]   inv_strike = '0;
  logic                 set_out;

  set_capture_chain u_dut (.set_in(set_in), .nor_strike(nor_strike), .inv_strike(inv_strike), .set_out(set_out));

  realtime t_r, t_f;
  int      n_r = 0;
  always @(posedge set_out) begin t_r = $realtime; n_r++; end
  always @(negedge set_out) t_f = $realtime;

  task automatic check_close(string what, realtime got, realtime exp);
    checks++;
    if (got < exp - 0.05 || got > exp + 0.05) begin
      failures++;
      $display("FAIL %s: got %0.3f, expected %0.3f", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    int idx [4] = '{0, 302, 455, 599};
    #100;
    t0 = $realtime;
    set_in = 1'b1; #205; set_in = 1'b0;
    #(NS * TD + 500);
    check_close("chain latency", t_r - t0, NS * TD);
    check_close("chain width", t_f - t_r, 205.0);
    foreach (idx[k]) begin
      t0 = $realtime;
      nor_strike[idx[k]] = 1'b1; #120; nor_strike[idx[k]] = 1'b0;
      #(NS * TD + 500);
      check_close($sformatf("strike at stage %0d latency", idx[k]), t_r - t0, (NS - idx[k]) * TD);
      check_close($sformatf("strike at stage %0d width", idx[k]), t_f - t_r, 120.0);
    end
    // single-inverter strikes only
    repeat (50) begin
      automatic int st = $urandom_range(NS - 1);
      automatic int iv = $urandom_range(3);
      inv_strike[st][iv] = 1'b1; #50; inv_strike[st][iv] = 1'b0; #20;
    end
    #(NS * TD + 500);
    checks++;
    if (n_r != 5) begin
      failures++;
      $display("FAIL %0d pulses at the output, expected 5", n_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
