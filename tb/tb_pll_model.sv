// tb_pll_model: checks the step response of the PLL model.
//
// The period follows a second-order response with omega = 4e6 rad/s and
// xi = 0.6, so for a set-point step from 1 GHz to 100 MHz (period 1 ns to
// 10 ns) the worked values are: after 0.2 us the period is only about 3 ns
// (the change is not immediate), the period overshoots 10 ns by about 9 %
// (between 2 % and 15 % accepted, the integration method damps a little),
// and it is in_range 2 % of 10 ns 3 us after the step. The opposite step
// settles at 1 GHz. Each measured clock period must agree with the reported
// frequency, and a set point outside 100 MHz - 1 GHz is clamped.
module tb_pll_model;
  import dfs_pkg::*;

  logic  rst_n = 1'b0;
  freq_t f_set = 10'd1000;
  logic  clk_out;
  freq_t f_now;
  int    checks = 0, failures = 0;
  realtime last_edge = 0, per_ns = 0;
  int    n_per_bad = 0;

  pll_model #(.F_INIT(1000)) dut (.rst_n, .f_set, .clk_out, .f_now);

  initial begin
    #40us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every period measured on clk_out must match the reported frequency
  always @(posedge clk_out) begin
    if (last_edge > 0) per_ns = ($realtime - last_edge) / 1ns;
    last_edge = $realtime;
  end

  task automatic in_range(string what, real got, real lo, real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: %f not in [%f, %f]", what, got, lo, hi);
    end
  endtask

  initial begin
    real t0, pmax, fmin_seen;
    #50ns;
    in_range("held at F_INIT in reset", real'(f_now), 1000, 1000);
    rst_n = 1'b1;
    #100ns;
    in_range("steady at 1 GHz", real'(f_now), 995, 1005);
    // step 1 GHz -> 100 MHz
    f_set = 10'd100;
    t0 = $realtime;
    #200ns;
    in_range("partial response at 0.2 us (MHz)", real'(f_now), 200, 500);
    pmax = 0;
    while ($realtime - t0 < 3us) begin
      @(posedge clk_out);
      if (per_ns > pmax) pmax = per_ns;
    end
    in_range("overshoot of the period (ns)", pmax, 10.2, 11.5);
    in_range("settled in_range 2 % (MHz)", real'(f_now), 98, 102);
    in_range("clock period matches f_now (ns)", per_ns, 1000.0 / (f_now + 1.0), 1000.0 / (f_now - 1.0));
    // step 100 MHz -> 1 GHz
    f_set = 10'd1000;
    t0 = $realtime;
    fmin_seen = 2000;
    while ($realtime - t0 < 3us) begin
      @(posedge clk_out);
    end
    in_range("settled at 1 GHz (MHz)", real'(f_now), 980, 1020);
    // mid-range step with measured period check
    f_set = 10'd500;
    #4us;
    in_range("settled at 500 MHz (MHz)", real'(f_now), 490, 510);
    @(posedge clk_out); @(posedge clk_out);
    in_range("clock period at 500 MHz (ns)", per_ns, 1.96, 2.04);
    // set point below the range is clamped to 100 MHz
    f_set = 10'd20;
    #5us;
    in_range("clamped to 100 MHz", real'(f_now), 98, 102);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
