// tb_skewed_clock_tree: applies a clock of 400 ps period to the 100-tap
// clock tree and checks that every tap's rising and falling edges come
// exactly n x 20 ps after those of clk_in, for three cycles.
module tb_skewed_clock_tree;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N    = 100;
  localparam real SKEW = 20.0;
  localparam real HALF = 200.0;

  int checks = 0;
  int failures = 0;

  logic         clk_in = 1'b0;
  logic [N-1:0] clk;

  skewed_clock_tree u_dut (.clk_in(clk_in), .clk(clk));

  realtime t_in_r [3];
  int      n_in = 0;
  int      n_tap [N];

  always @(posedge clk_in) begin
    if (n_in < 3) t_in_r[n_in] = $realtime;
    n_in++;
  end

  for (genvar n = 0; n < N; n++) begin : g_tap
    always @(posedge clk[n]) begin
      automatic realtime exp = t_in_r[n_tap[n]] + n * SKEW;
      checks++;
      if ($realtime < exp - 0.001 || $realtime > exp + 0.001) begin
        failures++;
        $display("FAIL tap %0d rise %0d at %0.3f, expected %0.3f", n, n_tap[n], $realtime, exp);
      end
      n_tap[n]++;
    end
    always @(negedge clk[n]) begin
      automatic realtime exp = t_in_r[n_tap[n] - 1] + HALF + n * SKEW;
      checks++;
      if ($realtime < exp - 0.001 || $realtime > exp + 0.001) begin
        failures++;
        $display("FAIL tap %0d fall at %0.3f, expected %0.3f", n, $realtime, exp);
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_tap[i]) n_tap[i] = 0;
    #1000;
    repeat (3) begin
      clk_in = 1'b1; #(HALF);
      clk_in = 1'b0; #(HALF);
    end
    #(N * SKEW + 100);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (n_tap[n] != 3) begin
        failures++;
        $display("FAIL tap %0d saw %0d rising edges", n, n_tap[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
