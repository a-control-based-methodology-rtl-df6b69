// tb_k_selector: checks run-time gain switching with a dwell time.
//
// With DWELL = 5 samples: a first request is applied at the next sample; a
// second request made right after must wait until 5 samples have passed
// since the first switch; a request overwritten while pending applies only
// the newest value; between samples k_active never changes.
module tb_k_selector;
  import dfs_pkg::*;

  localparam int DW = 5;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0, req_valid = 1'b0;
  k_t   req_k = '0, k_active;
  logic pending, switched;
  int   checks = 0, failures = 0, nsamp = 0;

  k_selector #(.DWELL(DW)) dut (.clk, .rst_n, .sample, .req_valid, .req_k,
                                .k_active, .pending, .switched);

  always #0.5ns clk = ~clk;

  initial begin
    #100us;
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

  // one sample every 10 cycles
  task automatic strobe();
    k_t prev_val;
    repeat (9) begin
      prev_val = k_active;
      @(posedge clk); #0.1ns;
      if (k_active !== prev_val) begin
        checks++; failures++; $display("FAIL: k changed without a sample");
      end
    end
    sample = 1'b1;
    @(posedge clk); #0.1ns;
    sample = 1'b0;
    nsamp++;
  endtask

  task automatic request(k_t k);
    req_k = k; req_valid = 1'b1;
    @(posedge clk); #0.1ns;
    req_valid = 1'b0;
  endtask

  initial begin
    int start, waited;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #0.1ns;
    check("reset k = 0.01", k_active, int'(K_0_01));
    check("nothing pending", pending, 0);
    strobe(); strobe();
    check("no spontaneous switch", k_active, int'(K_0_01));
    request(K_0_04);
    check("pending after request", pending, 1);
    strobe();
    check("first switch applied at next sample", k_active, int'(K_0_04));
    check("switched pulse", switched, 1);
    check("pending cleared", pending, 0);
    // second request right away: must wait DWELL samples after the switch
    request(K_0_075);
    start = nsamp;
    while (k_active != K_0_075 && nsamp < start + 50) strobe();
    waited = nsamp - start;
    check("dwell: samples waited", waited, DW + 1);
    // overwrite while pending: only the newest request is applied
    request(K_0_15);
    request(K_0_01);
    start = nsamp;
    while (pending && nsamp < start + 50) begin
      strobe();
      checks++;
      if (k_active == K_0_15) begin failures++; $display("FAIL: overwritten request applied"); end
    end
    check("newest request applied", k_active, int'(K_0_01));
    check("after dwell", nsamp - start, DW + 1);
    // long after the last switch a request applies at once
    repeat (10) strobe();
    request(K_0_04);
    strobe();
    check("no wait once dwell elapsed", k_active, int'(K_0_04));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
