// tb_freq_divider: checks the divider actuator.
//
// For requested frequencies across 100 MHz - 1 GHz the output clock period,
// measured in base-clock cycles between rising edges of clk_out, must be the
// divide ratio nearest to 1000 / f (clamped to 1..10). When the
// request changes, no output period may be shorter than the smaller of the
// old and new ratios (no glitch), and the new period must be in force within
// one old period plus two base cycles.
module tb_freq_divider;
  import dfs_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  freq_t f_set = 10'd100;
  logic  clk_out, clk_en;
  logic [3:0] ratio;
  int    checks = 0, failures = 0;
  longint cyc = 0, last_rise = -1, period = 0;
  int    nrise = 0;

  freq_divider dut (.clk, .rst_n, .f_set, .clk_out, .clk_en, .ratio);

  always #0.5ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk_out) begin
    if (last_rise >= 0) period = cyc - last_rise;
    last_rise = cyc;
    nrise++;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nearest(int f);
    int best = 1;
    for (int n = 1; n <= 10; n++)
      if ((n - 1000.0 / f) ** 2 < (best - 1000.0 / f) ** 2) best = n;
    return best;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (f=%0d)", what, got, exp, f_set);
    end
  endtask

  initial begin
    int fl[$] = '{100, 1000, 500, 650, 333, 250, 140, 900, 760, 180, 120, 105, 400};
    int n_old, n_new, lo;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (40) @(posedge clk_out);
    check("reset ratio 10", period, 10);
    n_old = 10;
    foreach (fl[i]) begin
      @(posedge clk); #0.1ns;
      f_set = freq_t'(fl[i]);
      n_new = nearest(fl[i]);
      lo = (n_old < n_new) ? n_old : n_new;
      // transition: all periods >= min(old, new), and new one reached quickly
      for (int e = 0; e < 3; e++) begin
        @(posedge clk_out); #0.1ns;
        checks++;
        if (period < lo) begin failures++; $display("FAIL glitch: period %0d < %0d", period, lo); end
      end
      for (int e = 0; e < 6; e++) begin
        @(posedge clk_out); #0.1ns;
        check("settled period", period, n_new);
      end
      check("ratio output", ratio, n_new);
      n_old = n_new;
    end
    // random requests
    for (int t = 0; t < 100; t++) begin
      f_set = freq_t'($urandom_range(1000, 100));
      n_new = nearest(f_set);
      repeat (4) @(posedge clk_out);
      #0.1ns;
      check("random settled period", period, n_new);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
