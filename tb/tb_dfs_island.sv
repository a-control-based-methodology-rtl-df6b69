// tb_dfs_island: end-to-end test of one DFS frequency island at its default
// parameters (PLL actuator, 10 MHz control, 6 ports, dwell of 20 samples).
// The stimulus and its checks are described below. With
// the PLL the router clock lags f_set by about 2 us, so it is compared with
// f_set within 5 % once the set point has been steady for a long time.
module tb_dfs_island;
  import dfs_pkg::*;

  localparam int unsigned NPORT  = NUM_SRC;
  localparam int unsigned FLIT_W = 64;
  localparam int unsigned DWELL  = 20;
  localparam int          WATCHDOG_US = 200;
  localparam real FNOW_LO = 980.0, FNOW_HI = 1020.0;
  localparam real FNOW_TOL_LO = 0.95, FNOW_TOL_HI = 1.05;

  logic              clk_ref = 1'b0, rst_n = 1'b1;
  occ_t              occ [NPORT];
  logic              k_req_valid = 1'b0;
  k_t                k_req = '0;
  cont_t             contention;
  cfilt_t            c_filt;
  k_t                k_active;
  logic              k_pending, k_switched, f_saturated, sample;
  freq_t             f_set, f_now;
  logic              clk_router, div_clk_en;
  logic              nbr_clk [NPORT];
  logic              in_valid [NPORT], in_credit [NPORT], in_ready [NPORT];
  logic [FLIT_W-1:0] in_data [NPORT];
  logic              rtr_in_valid [NPORT];
  logic [FLIT_W-1:0] rtr_in_data [NPORT];
  logic              rtr_out_valid [NPORT], rtr_out_credit [NPORT], rtr_out_ready [NPORT];
  logic [FLIT_W-1:0] rtr_out_data [NPORT];
  logic              out_valid [NPORT];
  logic [FLIT_W-1:0] out_data [NPORT];

  dfs_island dut (.*);

  //
  // The run goes through the phases of a DFS episode:
  //   idle       no contention: f_set stays at F_MIN
  //   congestion every control-volume source reports 20 flits (C = 120): the
  //              filtered contention rises, f_set climbs and saturates at F_MAX
  //              and the router clock follows it through the actuator
  //   k switch   the OS asks for k = 0.04 and right after for k = 0.075: the
  //              first request is applied at once, the second only after the
  //              dwell time
  //   relief     the sources drop to 1 flit (C = 6): f_set falls back below
  //              F_MAX
  // while every one of the NPORT links carries random traffic in both
  // directions across the moving clock boundary. Checked at every sample:
  // contention = clamped sum of occ[], the filtered contention against a
  // floating-point model of y' = 0.99 y + 0.01 C, and f_set against the law
  // min(100 + k y, 1000). Checked at the end: every flit delivered exactly once
  // and in order, the router clock at the frequency requested, and that each
  // mechanism (saturation, k switch, dwell deferral, actuator slewing, link
  // busy stalls, credit stalls, traffic in and out) happened at least once.

  int checks = 0, failures = 0;
  int n_samples = 0, n_sat = 0, n_kswitch = 0, n_defer = 0, n_slew = 0;
  int n_busy = 0, n_credit = 0, n_in = 0, n_out = 0;
  real yr = 0.0;

  always #0.5ns clk_ref = ~clk_ref;

  // neighbour clocks: unrelated periods between 1 and 10 ns
  localparam real NBR_HALF_NS [6] = '{0.5, 0.65, 1.05, 1.85, 2.65, 4.95};
  for (genvar i = 0; i < NPORT; i++) begin : g_nclk
    initial begin
      nbr_clk[i] = 1'b0;
      forever #(NBR_HALF_NS[i % 6] * 1ns) nbr_clk[i] = ~nbr_clk[i];
    end
  end

  initial begin
    #(WATCHDOG_US * 1us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %t", what, got, exp, $realtime);
    end
  endtask

  task automatic in_range(string what, real got, real lo, real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: %f not in [%f, %f] at %t", what, got, lo, hi, $realtime);
    end
  endtask

  // ------------------------------------------------------------ link traffic
  logic [FLIT_W-1:0] q_in  [NPORT][$];
  logic [FLIT_W-1:0] q_out [NPORT][$];
  logic traffic_on = 1'b0;
  logic armed = 1'b0;      // set once the first reset has been released

  for (genvar i = 0; i < NPORT; i++) begin : g_links
    // inbound: neighbour side drives, router side receives
    // Drive at the falling edge; 1 ps later tx_ready has settled to the value
    // the coming rising edge will use, so the send is recorded then.
    always @(negedge nbr_clk[i]) begin
      in_valid[i]  = traffic_on && ($urandom_range(2, 0) != 0);
      in_data[i]   = {$urandom, $urandom};
      in_credit[i] = ($urandom_range(7, 0) != 0);
      #1ps;
      if (rst_n) begin
        if (in_valid[i] && in_ready[i]) begin q_in[i].push_back(in_data[i]); n_in++; end
        if (in_valid[i] && !in_ready[i] && in_credit[i]) n_busy++;
        if (in_valid[i] && !in_credit[i]) n_credit++;
      end
    end
    always @(posedge clk_router) if (armed && rtr_in_valid[i]) begin
      checks++;
      if (q_in[i].size() == 0) begin
        failures++; $display("FAIL inbound %0d: unexpected flit at %t", i, $realtime);
      end else if (rtr_in_data[i] !== q_in[i].pop_front()) begin
        failures++; $display("FAIL inbound %0d: wrong flit at %t", i, $realtime);
      end
    end
    // outbound: router side drives, neighbour side receives
    always @(negedge clk_router) begin
      rtr_out_valid[i]  = traffic_on && ($urandom_range(2, 0) != 0);
      rtr_out_data[i]   = {$urandom, $urandom};
      rtr_out_credit[i] = ($urandom_range(7, 0) != 0);
      #1ps;
      if (rst_n) begin
        if (rtr_out_valid[i] && rtr_out_ready[i]) begin q_out[i].push_back(rtr_out_data[i]); n_out++; end
        if (rtr_out_valid[i] && !rtr_out_ready[i] && rtr_out_credit[i]) n_busy++;
        if (rtr_out_valid[i] && !rtr_out_credit[i]) n_credit++;
      end
    end
    always @(posedge nbr_clk[i]) if (armed && out_valid[i]) begin
      checks++;
      if (q_out[i].size() == 0) begin
        failures++; $display("FAIL outbound %0d: unexpected flit at %t", i, $realtime);
      end else if (out_data[i] !== q_out[i].pop_front()) begin
        failures++; $display("FAIL outbound %0d: wrong flit at %t", i, $realtime);
      end
    end
  end

  // ------------------------------------------------------- control checking
  int occ_sum_at_sample;
  always @(posedge clk_ref) if (rst_n && sample) begin
    int s;
    s = 0;
    for (int i = 0; i < NPORT; i++) s += occ[i];
    occ_sum_at_sample = (s > NPORT * 24) ? NPORT * 24 : s;
    n_samples++;
    fork begin
      longint exp_f;
      real    f_model;
      repeat (3) @(posedge clk_ref);
      #0.1ns;
      check("contention", contention, occ_sum_at_sample);
      yr = 0.99 * yr + 0.01 * real'(occ_sum_at_sample);
      in_range("filtered contention vs model", real'(c_filt) / 65536.0, yr - 0.1, yr + 0.1);
      exp_f = 100 + ((longint'(c_filt) * longint'(k_active)) >> 24);
      if (exp_f > 1000) exp_f = 1000;
      check("f_set law", f_set, exp_f);
      f_model = 100.0 + (real'(k_active) / 256.0) * yr;
      if (f_model > 1000.0) f_model = 1000.0;
      in_range("f_set vs model", real'(f_set), f_model - 2.0, f_model + 2.0);
      if (f_saturated) n_sat++;
      if (k_pending && !k_switched) n_defer++;
      if (f_now > f_set + 5 || f_now + 5 < f_set) n_slew++;
    end join_none
  end

  always @(posedge clk_ref) if (k_switched) n_kswitch++;

  task automatic set_occ(int v);
    @(negedge clk_ref);
    for (int i = 0; i < NPORT; i++) occ[i] = occ_t'(v);
  endtask

  task automatic request_k(k_t k);
    @(negedge clk_ref);
    k_req = k; k_req_valid = 1'b1;
    @(negedge clk_ref);
    k_req_valid = 1'b0;
  endtask

  task automatic wait_samples(int n);
    repeat (n) @(posedge sample);
  endtask

  // measured router clock period
  realtime rlast = 0, rper_ns = 0;
  always @(posedge clk_router) begin
    if (rlast > 0) rper_ns = ($realtime - rlast) / 1ns;
    rlast = $realtime;
  end

  initial begin
    k_t k_before;
    int sw_before;
    for (int i = 0; i < NPORT; i++) begin
      occ[i] = '0;
      in_valid[i] = 1'b0; in_data[i] = '0; in_credit[i] = 1'b1;
      rtr_out_valid[i] = 1'b0; rtr_out_data[i] = '0; rtr_out_credit[i] = 1'b1;
    end
    // assert the asynchronous reset with an edge, long enough for the
    // slowest clock (100 MHz) to see it as well
    #1ns rst_n = 1'b0;
    repeat (40) @(posedge clk_ref);
    rst_n = 1'b1;
    armed = 1'b1;
    traffic_on = 1'b1;
    // idle
    wait_samples(20);
    check("idle f_set = f_min", f_set, 100);
    in_range("idle router clock (MHz)", real'(f_now), 90, 110);
    // congestion
    set_occ(20);
    wait_samples(250);
    check("congested f_set = f_max", f_set, 1000);
    in_range("router clock follows (MHz)", real'(f_now), FNOW_LO, FNOW_HI);
    @(posedge clk_router); @(posedge clk_router);
    in_range("router clock period (ns)", rper_ns, 0.95, 1.05);
    // relief, then the k switches with little contention left
    set_occ(1);
    wait_samples(300);
    in_range("relieved f_set, k=0.01 (MHz)", real'(f_set), 100 + 10 * (yr - 0.2), 100 + 10 * (yr + 0.2));
    sw_before = n_kswitch;
    request_k(K_0_04);
    wait_samples(2);
    check("first switch applied", k_active, K_0_04);
    request_k(K_0_075);
    wait_samples(2);
    check("second switch deferred by dwell", k_active, K_0_04);
    check("second switch pending", k_pending, 1);
    wait_samples(DWELL + 2);
    check("second switch applied after dwell", k_active, K_0_075);
    check("two switches", n_kswitch - sw_before, 2);
    wait_samples(100);
    in_range("f_set with k=0.075 (MHz)", real'(f_set), 100 + 75 * (yr - 0.2), 100 + 75 * (yr + 0.2));
    checks++;
    if (f_set >= 1000) begin failures++; $display("FAIL: expected f_set below f_max"); end
    in_range("router clock follows (MHz)", real'(f_now), real'(f_set) * FNOW_TOL_LO, real'(f_set) * FNOW_TOL_HI);
    // drain the links
    traffic_on = 1'b0;
    repeat (300) @(posedge clk_ref);
    for (int i = 0; i < NPORT; i++) begin
      check("inbound queue drained", q_in[i].size(), 0);
      check("outbound queue drained", q_out[i].size(), 0);
    end
    $display("samples %0d sat %0d kswitch %0d defer %0d slew %0d busy %0d credit %0d in %0d out %0d",
             n_samples, n_sat, n_kswitch, n_defer, n_slew, n_busy, n_credit, n_in, n_out);
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL: f_max saturation never happened"); end
    checks++; if (n_kswitch == 0) begin failures++; $display("FAIL: k switch never happened"); end
    checks++; if (n_defer == 0)   begin failures++; $display("FAIL: dwell deferral never happened"); end
    checks++; if (n_slew == 0)    begin failures++; $display("FAIL: actuator slewing never seen"); end
    checks++; if (n_busy == 0)    begin failures++; $display("FAIL: link busy stall never happened"); end
    checks++; if (n_credit == 0)  begin failures++; $display("FAIL: credit stall never happened"); end
    checks++; if (n_in == 0 || n_out == 0) begin failures++; $display("FAIL: no link traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
