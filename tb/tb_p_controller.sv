// tb_p_controller: checks the proportional frequency law.
//
// Hand-worked points of f = min(100 + k * C, 1000) MHz for the four gains of
// the evaluated policies (10, 40, 75 and 150 MHz per flit), then random
// filtered contentions and gains against the same law computed in floating
// point and truncated to whole MHz. Also checks the saturation flag and that
// f_set changes only in the cycle after a sample strobe.
module tb_p_controller;
  import dfs_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  cfilt_t c_filt = '0;
  k_t     k = K_0_01;
  freq_t  f_set;
  logic   saturated;
  int     checks = 0, failures = 0, n_sat = 0;

  p_controller dut (.clk, .rst_n, .sample, .c_filt, .k, .f_set, .saturated);

  always #0.5ns clk = ~clk;

  initial begin
    #50us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(real c_flits, real k_mhz);
    c_filt = cfilt_t'($rtoi(c_flits * 65536.0));
    k      = k_t'($rtoi(k_mhz * 256.0));
    sample = 1'b1;
    @(posedge clk); #0.1ns;
    sample = 1'b0;
  endtask

  function automatic int law(cfilt_t c, k_t kk);
    real f;
    f = 100.0 + (real'(c) / 65536.0) * (real'(kk) / 256.0);
    if (f > 1000.0) return 1000;
    return $rtoi(f + 1.0e-9);
  endfunction

  initial begin
    int exp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #0.1ns;
    check("reset f_min", f_set, 100);
    apply(0.0, 10.0);    check("no contention -> f_min", f_set, 100);
    apply(10.0, 40.0);   check("k=0.04, C=10", f_set, 500);
    apply(40.0, 10.0);   check("k=0.01, C=40", f_set, 500);
    apply(12.0, 75.0);   check("k=0.075, C=12", f_set, 1000);
    check("exactly f_max is not saturated", saturated, 0);
    apply(13.0, 75.0);   check("k=0.075, C=13", f_set, 1000);
    check("saturated flag", saturated, 1);
    apply(6.0, 150.0);   check("k=0.15, C=6", f_set, 1000);
    apply(5.5, 150.0);   check("k=0.15, C=5.5", f_set, 925);
    check("not saturated", saturated, 0);
    apply(144.0, 10.0);  check("k=0.01, C=144", f_set, 1000);
    apply(2.5, 40.0);    check("k=0.04, C=2.5", f_set, 200);
    // hold without strobe
    c_filt = cfilt_t'(100 << 16);
    repeat (5) @(posedge clk);
    #0.1ns;
    check("hold", f_set, 200);
    for (int t = 0; t < 2000; t++) begin
      c_filt = cfilt_t'($urandom_range(144 * 65536, 0));
      k      = k_t'($urandom_range(160 * 256, 0));
      exp    = law(c_filt, k);
      if (exp == 1000) n_sat++;
      sample = 1'b1;
      @(posedge clk); #0.1ns;
      sample = 1'b0;
      check("random", f_set, exp);
      check("random sat flag", saturated,
            (100.0 + (real'(c_filt) / 65536.0) * (real'(k) / 256.0) >= 1001.0) ? 1 :
            ((100.0 + (real'(c_filt) / 65536.0) * (real'(k) / 256.0) < 1000.999) ? 0 : saturated));
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
