// tb_pw_sweep: the pulse-width sweep of the measurement row, 75 widths
// from 50 ps to 790 ps in 10 ps steps, as in the row's characterisation,
// where start and stopn were driven from the bench rather than by the
// self-timed latches. A row of 100 set_dff_stage instances is built here
// with start/stopn under testbench control: cleared in scan mode, switched
// to functional mode, one capture wavefront (clk[n] at T0 + 20 n ps), the
// SET a few ps after it, back to scan mode once the wavefront has passed
// every stage, then read out. For every width the row content is compared
// bit for bit with the timing model, and the estimate (ones x 10.663 ps)
// must be within one stage of the true width. The worst relative errors
// are printed.
module tb_pw_sweep;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N    = 100;
  localparam real TD   = 9.337;
  localparam real SKEW = 20.0;
  localparam real TEFF = SKEW - TD;

  int checks = 0;
  int failures = 0;

  logic         d0 = 1'b0, shift_clk = 1'b0, start = 1'b0, stopn = 1'b1;
  logic [N-1:0] clk = '0;
  logic [N:0]   d;
  logic [N:0]   scan;

  assign d[0]    = d0;
  assign scan[0] = 1'b0;

  for (genvar n = 0; n < N; n++) begin : g_stage
    set_dff_stage u_stage (
      .d(d[n]), .d_fwd(d[n+1]), .clk(clk[n]), .shift_clk(shift_clk),
      .si(scan[n]), .start(start), .stopn(stopn), .q_buf(scan[n+1])
    );
  end

  task automatic shift_once();
    shift_clk = 1'b1; #10000; shift_clk = 1'b0; #10000;
  endtask

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

  initial begin
    #100ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real          worst_lo = 0.0, worst_hi = 0.0;
    for (int i = 0; i < 75; i++) begin
      real          w, x, est, err;
      realtime      t0, t_in, te, lo;
      logic [N-1:0] exp_bits, got_bits;
      w = 50.0 + 10.0 * i;
      x = 3.0 + ((i * 7.31) - 10.0 * $floor(i * 7.31 / 10.0));
      // clear in scan mode
      start = 1'b0; stopn = 1'b1;
      repeat (N) shift_once();
      // capture
      start = 1'b1;
      #1000;
      t0   = $realtime + 500.0;
      t_in = t0 + x;
      launch_wave(t0);
      #(t_in - $realtime);
      d0 = 1'b1;
      #(w);
      d0 = 1'b0;
      #(t0 + N * SKEW + 200 - $realtime);
      stopn = 1'b0;
      #1000;
      for (int n = 0; n < N; n++) begin
        te = t0 + n * SKEW;
        lo = t_in + (n + 1) * TD;
        exp_bits[n] = (te >= lo) && (te < lo + w);
      end
      for (int k = N - 1; k >= 0; k--) begin
        got_bits[k] = scan[N];
        shift_once();
      end
      checks++;
      if (got_bits !== exp_bits) begin
        failures++;
        $display("FAIL W=%0.0f: row %h, expected %h", w, got_bits, exp_bits);
      end
      est = $countones(got_bits) * TEFF;
      err = 100.0 * (est - w) / w;
      if (err < worst_lo) worst_lo = err;
      if (err > worst_hi) worst_hi = err;
      checks++;
      if (est < w - TEFF || est > w + TEFF) begin
        failures++;
        $display("FAIL W=%0.0f: estimate %0.1f ps", w, est);
      end
    end
    $display("75 widths 50-790 ps: estimate error %0.1f %% to +%0.1f %%", worst_lo, worst_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
