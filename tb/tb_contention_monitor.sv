// tb_contention_monitor: checks the contention sum of the control volume.
//
// Drives random per-source occupancies, including values whose sum exceeds
// the control-volume capacity, and checks on every sample that the registered
// contention is the clamped sum, that it is valid one cycle after the strobe
// and that it holds between strobes.
module tb_contention_monitor;
  import dfs_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  occ_t  occ [NUM_SRC];
  cont_t contention;
  int    checks = 0, failures = 0, n_sat = 0;

  contention_monitor dut (.clk, .rst_n, .sample, .occ, .contention);

  always #0.5ns clk = ~clk;

  initial begin
    #20us;
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

  initial begin
    int exp, held;
    foreach (occ[i]) occ[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check("reset value", contention, 0);
    for (int t = 0; t < 400; t++) begin
      exp = 0;
      foreach (occ[i]) begin
        // mostly within one port's 24 flits; sometimes the full 5-bit range
        occ[i] = (t % 7 == 0) ? occ_t'($urandom_range(31, 20)) : occ_t'($urandom_range(24, 0));
        exp += occ[i];
      end
      if (exp > 144) begin exp = 144; n_sat++; end
      sample = 1'b1;
      @(posedge clk); #0.1ns;
      sample = 1'b0;
      check("sum", contention, exp);
      held = contention;
      foreach (occ[i]) occ[i] = occ_t'($urandom_range(24, 0));
      repeat (3) @(posedge clk);
      #0.1ns;
      check("hold between samples", contention, held);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
