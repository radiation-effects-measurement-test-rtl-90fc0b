// tb_set_test_structure: end-to-end run of the full structure at its
// default sizes (100 capture unit cells, 100-stage measurement row).
//
// The capture clock runs free at 500 MHz (2000 ps period, longer than the
// functional window, so each stage sees at most one capture edge). For each
// case the row is reset and cleared by shifting zeros at 50 MHz, then an
// ion strike is applied to one NOR2 (or to one inverter) of the capture
// chain. The strike time is chosen so that the SET reaches the row a given
// offset after a clock wavefront has left stage 0. The row content is read
// out and compared bit for bit with a model computed here from the stage
// delays: the SET reaches the row (600 - s) x 10 ps after a strike at
// capture stage s, then 9.337 ps per row stage, the clock reaches row stage
// n 20 ps after stage n-1, and the functional window lasts until the SET
// reaches the stop tap after stage 90.
//
// Mechanisms counted, each of which must occur at least once: scan
// clearing, SET generated by a NOR2 strike, inverter strike masked, start
// (functional mode), stop (back to scan mode), scan read-out matching the
// model, a width estimate within one stage, and a long pulse truncated by
// the stop. The three pulse-width study chains beside the main path are
// checked too: a 205 ps pulse into each must come out 100 x 9.337 ps
// later with its width kept.
module tb_set_test_structure;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  U     = 100;
  localparam int  NS    = U * 6;
  localparam int  N     = 100;
  localparam int  STOP  = 90;
  localparam real TCAP  = 10.0;
  localparam real TD    = 9.337;
  localparam real SKEW  = 20.0;
  localparam real TEFF  = SKEW - TD;
  localparam real PER   = 2000.0;
  localparam real T_CLK0 = 1000.0;   // first rising edge of clk_in

  int checks = 0;
  int failures = 0;

  int n_clear = 0, n_set_gen = 0, n_masked = 0, n_start = 0, n_stop = 0;
  int n_readout = 0, n_estimate = 0, n_truncated = 0, n_pw_chain = 0;

  logic                set_in = 1'b0;
  logic [NS-1:0]       nor_strike = '0;
  logic [NS-1:0][3:0]  inv_strike = '0;
  logic                clk_in = 1'b0, shift_clk = 1'b0, si = 1'b0, rst_n = 1'b0;
  logic                scan_out, d_fwd_out, start, stopn;
  logic [2:0]          pw_in = '0;
  logic [2:0]          pw_out;

  set_test_structure u_dut (
    .set_in(set_in), .nor_strike(nor_strike), .inv_strike(inv_strike),
    .clk_in(clk_in), .shift_clk(shift_clk), .si(si), .rst_n(rst_n),
    .scan_out(scan_out), .d_fwd_out(d_fwd_out), .start(start), .stopn(stopn),
    .pw_in(pw_in), .pw_out(pw_out)
  );

  realtime pw_r [3], pw_f [3];
  for (genvar g = 0; g < 3; g++) begin : g_pw
    always @(posedge pw_out[g]) pw_r[g] = $realtime;
    always @(negedge pw_out[g]) pw_f[g] = $realtime;
  end

  initial begin
    #(T_CLK0);
    forever begin
      clk_in = 1'b1; #(PER / 2);
      clk_in = 1'b0; #(PER / 2);
    end
  end

  always @(posedge start) n_start++;
  always @(negedge stopn) n_stop++;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic shift_once();
    shift_clk = 1'b1; #10000; shift_clk = 1'b0; #10000;
  endtask

  task automatic rearm();
    rst_n = 1'b0;
    si    = 1'b0;
    #1000;
    repeat (N) shift_once();
    n_clear++;
    rst_n = 1'b1;
    #1000;
    checks++;
    if (start !== 1'b0 || stopn !== 1'b1) fail("latches not clear after re-arm");
  endtask

  task automatic read_row(output logic [N-1:0] bits);
    for (int k = N - 1; k >= 0; k--) begin
      bits[k] = scan_out;
      shift_once();
    end
  endtask

  // Strike NOR2 number s for w ps so that the SET reaches the row x ps after
  // a clock wavefront leaves row stage 0.
  task automatic nor_case(int s, real w, real x, bit fits);
    realtime      t_wave, t_in, t_strike, t_stop, te, lo;
    logic [N-1:0] exp_bits, got_bits;
    int           ones;
    real          kk;
    rearm();
    kk       = $ceil(($realtime + (NS - s) * TCAP + 500.0 - T_CLK0) / PER);
    t_wave   = T_CLK0 + kk * PER;
    t_in     = t_wave + x;
    t_strike = t_in - (NS - s) * TCAP;
    #(t_strike - $realtime);
    nor_strike[s] = 1'b1;
    #(w);
    nor_strike[s] = 1'b0;
    #(t_in + N * SKEW + 1000 - $realtime);
    checks++;
    if (start !== 1'b1) fail($sformatf("strike at %0d: no start", s));
    else n_set_gen++;
    checks++;
    if (stopn !== 1'b0) fail($sformatf("strike at %0d: no stop", s));
    t_stop = t_in + (STOP + 1) * TD;
    for (int n = 0; n < N; n++) begin
      exp_bits[n] = 1'b0;
      // the one capture edge of stage n that can fall in the window
      for (int k = -1; k <= 1; k++) begin
        te = t_wave + k * PER + n * SKEW;
        lo = t_in + (n + 1) * TD;
        if (te >= t_in && te < t_stop) exp_bits[n] = (te >= lo) && (te < lo + w);
      end
    end
    read_row(got_bits);
    ones = $countones(got_bits);
    checks++;
    if (got_bits !== exp_bits)
      fail($sformatf("strike at %0d W=%0.0f: row %h, expected %h", s, w, got_bits, exp_bits));
    else n_readout++;
    if (fits) begin
      checks++;
      if (ones * TEFF < w - TEFF || ones * TEFF > w + TEFF)
        fail($sformatf("W=%0.0f: %0d ones, estimate %0.1f ps", w, ones, ones * TEFF));
      else n_estimate++;
    end else begin
      checks++;
      if (ones * TEFF >= w - TEFF) fail($sformatf("W=%0.0f: expected truncation", w));
      else n_truncated++;
    end
    $display("strike at capture stage %0d, W=%0.0f ps: %0d ones, estimate %0.1f ps",
             s, w, ones, ones * TEFF);
  endtask

  task automatic inv_case(int s, int i);
    logic [N-1:0] got_bits;
    rearm();
    inv_strike[s][i] = 1'b1;
    #60;
    inv_strike[s][i] = 1'b0;
    #((NS + 10) * TCAP + N * SKEW + 2000);
    checks++;
    if (start !== 1'b0) fail($sformatf("inverter strike %0d/%0d reached the row", s, i));
    else n_masked++;
    read_row(got_bits);
    checks++;
    if (got_bits !== '0) fail("row not empty after masked strike");
  endtask

  task automatic pw_case(int g);
    realtime t0;
    t0 = $realtime;
    pw_in[g] = 1'b1;
    #205;
    pw_in[g] = 1'b0;
    #(100 * TD + 500);
    checks++;
    if (pw_r[g] < t0 + 100 * TD - 0.01 || pw_r[g] > t0 + 100 * TD + 0.01 ||
        pw_f[g] - pw_r[g] < 204.99 || pw_f[g] - pw_r[g] > 205.01)
      fail($sformatf("study chain %0d: delay %0.3f width %0.3f", g, pw_r[g] - t0, pw_f[g] - pw_r[g]));
    else n_pw_chain++;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
    $display("%-28s %0d", what, n);
  endtask

  initial begin
    #100ms;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 3; g++) pw_case(g);
    nor_case(0,   205.0, 21.3, 1'b1);
    nor_case(333, 50.0,  12.9, 1'b1);
    nor_case(598, 120.0, 44.1, 1'b1);
    inv_case(200, 2);
    nor_case(57,  300.0, 8.7,  1'b1);
    nor_case(411, 400.0, 2.9,  1'b1);
    inv_case(599, 0);
    nor_case(150, 790.0, 5.3,  1'b0);
    need("scan clear", n_clear);
    need("SET from NOR2 strike", n_set_gen);
    need("inverter strike masked", n_masked);
    need("start (functional mode)", n_start);
    need("stop (scan mode)", n_stop);
    need("read-out matches model", n_readout);
    need("width estimate in range", n_estimate);
    need("long pulse truncated", n_truncated);
    need("study chain pulse kept", n_pw_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
