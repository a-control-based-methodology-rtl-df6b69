// tb_contention_filter: checks the first-order contention filter.
//
// A floating-point model y' = 0.99 y + 0.01 c runs beside the fixed-point
// filter on a random contention trace and the two must agree within 0.02
// flits (0.05 after a long step, where the 16-bit rounding of p shows). A step test checks the known response: after 100 samples of a
// constant input C from zero, y = C (1 - 0.99^100) = 0.634 C, and the output
// settles to C. The output must change only in the cycle after a strobe.
module tb_contention_filter;
  import dfs_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  cont_t  c_in = '0;
  cfilt_t y;
  int     checks = 0, failures = 0;
  real    yr;

  contention_filter dut (.clk, .rst_n, .sample, .c_in, .y);

  always #0.5ns clk = ~clk;

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real yf();
    return real'(y) / 65536.0;
  endfunction

  task automatic near(string what, real got, real exp, real tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic strobe();
    @(negedge clk);
    sample = 1'b1;
    @(posedge clk); #0.1ns;
    sample = 1'b0;
  endtask

  initial begin
    cfilt_t prev_val;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #0.1ns;
    near("reset", yf(), 0.0, 0.0);
    // step response
    c_in = 8'd100;
    yr   = 0.0;
    for (int s = 0; s < 100; s++) begin
      strobe();
      yr = 0.99 * yr + 0.01 * 100.0;
    end
    near("step after 100 samples", yf(), 100.0 * (1.0 - 0.366032), 0.05);
    near("step vs model", yf(), yr, 0.05);
    for (int s = 0; s < 1500; s++) strobe();
    near("step settled", yf(), 100.0, 0.01);
    // no change without a strobe
    prev_val = y;
    c_in = 8'd0;
    repeat (20) @(posedge clk);
    #0.1ns;
    checks++;
    if (y !== prev_val) begin failures++; $display("FAIL: output moved without sample"); end
    // random trace against the floating-point model
    yr = yf();
    for (int s = 0; s < 3000; s++) begin
      c_in = cont_t'($urandom_range(144, 0));
      strobe();
      yr = 0.99 * yr + 0.01 * real'(c_in);
      if (s % 10 == 9) near("random trace", yf(), yr, 0.02);
      repeat ($urandom_range(3, 0)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
