// tb_set_dff_chain: the 100-stage measurement row with its start and stop
// circuits. For each case the row is reset and cleared by shifting in
// zeros at 50 MHz, a single capture clock wavefront is launched along the
// row (clk[n] rises at T0 + 20 n ps), the SET enters d0 at T0 + delta, and
// the row is then read out through scan_out.
//
// The expected content of every stage is worked out here from the timing
// alone: stage n holds 1 when its clock edge falls inside the pulse as it
// passes the stage (entry + 9.337 (n+1) ps, lasting W) and inside the
// functional window, which runs from the SET reaching d0 until it reaches
// the stop tap after stage 90. The test also checks the mode latches, the
// SET delay to d_fwd_out and, for pulses the row can hold, that the width
// estimated from the ones (count x 10.663 ps) is within one stage of W.
// Pulse widths swept: 50 to 440 ps, the longest that fits with the stop at
// stage 90; 790 ps, which the on-chip stop truncates; and a clock wavefront
// launched 30 ps after the SET, which catches only the tail of the pulse
// (a pulse truncated at the front of the row).
module tb_set_dff_chain;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N     = 100;
  localparam int  STOP  = 90;
  localparam real TD    = 9.337;
  localparam real SKEW  = 20.0;
  localparam real TEFF  = SKEW - TD;

  int checks = 0;
  int failures = 0;

  logic         d0 = 1'b0, shift_clk = 1'b0, si = 1'b0, rst_n = 1'b0;
  logic [N-1:0] clk = '0;
  logic         scan_out, d_fwd_out, start, stopn;

  set_dff_chain u_dut (
    .d0(d0), .clk(clk), .shift_clk(shift_clk), .si(si), .rst_n(rst_n),
    .scan_out(scan_out), .d_fwd_out(d_fwd_out), .start(start), .stopn(stopn)
  );

  realtime t_out;
  always @(posedge d_fwd_out) t_out = $realtime;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic shift_once();
    shift_clk = 1'b1; #10000; shift_clk = 1'b0; #10000;
  endtask

  // launch one clock wavefront: clk[n] high from t0 + 20n for 100 ps
  task automatic launch_wave(realtime t0);
    for (int n = 0; n < N; n++) begin
      fork
        automatic int k = n;
        begin
          #(t0 - $realtime + k * SKEW);
          clk[k] = 1'b1;
          #100;
          clk[k] = 1'b0;
        end
      join_none
    end
  endtask

  task automatic run_case(real delta, real w, bit fits);
    realtime      t0, t_in, t_stop, te, lo;
    logic [N-1:0] exp_bits;
    logic [N-1:0] got_bits;
    int           ones;
    // re-arm and clear
    rst_n = 1'b0;
    si    = 1'b0;
    #1000;
    repeat (N) shift_once();
    rst_n = 1'b1;
    #1000;
    checks++;
    if (start !== 1'b0 || stopn !== 1'b1) fail("latches not clear after reset");
    // capture
    t0   = $realtime + 500.0;
    t_in = t0 + delta;
    launch_wave(t0);
    #(t_in - $realtime);
    d0 = 1'b1;
    #(w);
    d0 = 1'b0;
    #(N * SKEW + 500);
    checks++;
    if (start !== 1'b1) fail($sformatf("W=%0.0f: start not set", w));
    checks++;
    if (stopn !== 1'b0) fail($sformatf("W=%0.0f: stop not set", w));
    checks++;
    if (t_out < t_in + N * TD - 0.01 || t_out > t_in + N * TD + 0.01)
      fail($sformatf("W=%0.0f: d_fwd_out at %0.3f after entry", w, t_out - t_in));
    // expected content
    t_stop = t_in + (STOP + 1) * TD;
    for (int n = 0; n < N; n++) begin
      te = t0 + n * SKEW;
      lo = t_in + (n + 1) * TD;
      exp_bits[n] = (te >= t_in) && (te < t_stop) && (te >= lo) && (te < lo + w);
    end
    // read out, last stage first
    for (int k = N - 1; k >= 0; k--) begin
      got_bits[k] = scan_out;
      shift_once();
    end
    checks++;
    if (got_bits !== exp_bits)
      fail($sformatf("W=%0.0f delta=%0.1f: row %h, expected %h", w, delta, got_bits, exp_bits));
    ones = $countones(got_bits);
    if (fits) begin
      checks++;
      if (ones * TEFF < w - TEFF || ones * TEFF > w + TEFF)
        fail($sformatf("W=%0.0f: %0d ones, estimate %0.1f ps", w, ones, ones * TEFF));
    end
    $display("W=%0.0f ps delta=%0.1f ps: %0d ones, estimate %0.1f ps", w, delta, ones, ones * TEFF);
  endtask

  initial begin
    #50ms;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_case(25.3, 50.0,  1'b1);
    run_case(40.7, 100.0, 1'b1);
    run_case(13.1, 200.0, 1'b1);
    run_case(55.9, 300.0, 1'b1);
    run_case(7.7,  400.0, 1'b1);
    run_case(3.3,  440.0, 1'b1);
    run_case(5.1,  790.0, 1'b0);
    run_case(-30.0, 200.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
