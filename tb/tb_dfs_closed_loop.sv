// tb_dfs_closed_loop: the DFS loop of one router closed around a model of
// the router's contention, running the four control policies k = 0.01,
// 0.04, 0.075 and 0.15 and a run-time switch from k = 0.04 to k = 0.075.
//
// The router is replaced by the flow-balance model used to design the loop,
//     C[t] = C[t-1] + d[t] - alpha * f[t-1]        (flits per 100 ns sample)
// with alpha = 1.88 (the value fitted over a mix of benchmarks; f in GHz) and
// C clamped to 0 .. 144 flits. f is the frequency the actuator actually
// produces (f_now of the PLL), so the PLL dynamics are inside the loop. The
// model's C is spread over the six occ[] inputs. The net load d steps
// through 0.6, 1.4 and 0.8 flits per sample.
//
// Worked values: in equilibrium the router must drain exactly the net load,
// alpha * f = d, so f = d / alpha = 319, 745 and 426 MHz whatever k is, and
// the contention settles where the control law gives that frequency,
// C = (f - 100 MHz) / k, which shrinks as k grows. Checked for every policy:
// f_set stays in 100 .. 1000 MHz; the PLL output stays within 80 .. 1100 MHz;
// at the end of each load phase the mean frequency is within 5 % of d / alpha
// (for the policies inside the stability bound alpha * k < 0.19, i.e.
// k = 0.01 and 0.04) and the mean filtered contention is within 10 % of
// (d / alpha - 0.1) / k; and the mean contention falls as k rises. For the
// switch: contention after the switch falls towards the k = 0.075 value.
module tb_dfs_closed_loop;
  import dfs_pkg::*;

  localparam int unsigned NPORT  = NUM_SRC;
  localparam int unsigned FLIT_W = 64;
  localparam real ALPHA = 1.88;
  localparam int  PHASE = 1500;             // samples per load phase
  localparam real LOAD [3] = '{0.6, 1.4, 0.8};

  logic              clk_ref = 1'b0, rst_n = 1'b0;
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

  int  checks = 0, failures = 0;
  real c_model = 0.0;
  real d_now = 0.0;

  always #0.5ns clk_ref = ~clk_ref;

  // links idle: neighbour clocks still run so the link logic is clocked
  for (genvar i = 0; i < NPORT; i++) begin : g_idle
    initial begin
      nbr_clk[i] = 1'b0;
      in_valid[i] = 1'b0; in_data[i] = '0; in_credit[i] = 1'b1;
      rtr_out_valid[i] = 1'b0; rtr_out_data[i] = '0; rtr_out_credit[i] = 1'b1;
      forever #(1.3ns + i * 0.4ns) nbr_clk[i] = ~nbr_clk[i];
    end
  end

  initial begin
    #8ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic in_range(string what, real got, real lo, real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: %f not in [%f, %f]", what, got, lo, hi);
    end
  endtask

  // process model, advanced once per controller sample
  int bound_errors = 0;
  always @(posedge clk_ref) if (rst_n && sample) begin
    c_model = c_model + d_now - ALPHA * real'(f_now) / 1000.0;
    if (c_model < 0.0)   c_model = 0.0;
    if (c_model > 144.0) c_model = 144.0;
    if (f_set < 100 || f_set > 1000 || f_now < 80 || f_now > 1100) bound_errors++;
  end
  always @(negedge clk_ref) begin
    int c;
    c = $rtoi(c_model + 0.5);
    for (int j = 0; j < NPORT; j++) occ[j] = occ_t'((c + j) / NPORT);
  end

  // run one policy; report per-phase means over the last third of each phase
  real mean_f [3], mean_c [3];
  task automatic run_policy(k_t k, int switch_at, k_t k2);
    real sf, sc;
    int  n;
    rst_n = 1'b0;
    c_model = 0.0;
    d_now = 0.0;
    repeat (50) @(posedge clk_ref);
    rst_n = 1'b1;
    @(negedge clk_ref);
    k_req = k; k_req_valid = 1'b1;
    @(negedge clk_ref);
    k_req_valid = 1'b0;
    for (int ph = 0; ph < 3; ph++) begin
      d_now = LOAD[ph];
      sf = 0.0; sc = 0.0; n = 0;
      for (int s = 0; s < PHASE; s++) begin
        @(posedge sample);
        if (ph * PHASE + s == switch_at) begin
          @(negedge clk_ref);
          k_req = k2; k_req_valid = 1'b1;
          @(negedge clk_ref);
          k_req_valid = 1'b0;
        end
        if (s >= 2 * PHASE / 3) begin
          sf += real'(f_now);
          sc += real'(c_filt) / 65536.0;
          n++;
        end
      end
      mean_f[ph] = sf / n;
      mean_c[ph] = sc / n;
    end
  endtask

  initial begin
    k_t  ks [4] = '{K_0_01, K_0_04, K_0_075, K_0_15};
    real kg [4] = '{10.0, 40.0, 75.0, 150.0};   // MHz per flit
    real cavg [4];
    foreach (occ[j]) occ[j] = '0;
    for (int p = 0; p < 4; p++) begin
      bound_errors = 0;
      run_policy(ks[p], -1, ks[p]);
      checks++;
      if (bound_errors != 0) begin
        failures++; $display("FAIL k=%0.3f: %0d samples outside the frequency bounds", kg[p] / 1000.0, bound_errors);
      end
      cavg[p] = 0.0;
      for (int ph = 0; ph < 3; ph++) begin
        real f_eq;
        f_eq = 1000.0 * LOAD[ph] / ALPHA;
        $display("k=%0.3f load %0.1f: mean f %0.1f MHz (equilibrium %0.1f), mean filtered C %0.2f flits",
                 kg[p] / 1000.0, LOAD[ph], mean_f[ph], f_eq, mean_c[ph]);
        if (p < 2) begin
          in_range("mean frequency vs d/alpha", mean_f[ph], 0.95 * f_eq, 1.05 * f_eq);
          in_range("mean contention vs (f-100)/k", mean_c[ph], 0.9 * (f_eq - 100.0) / kg[p], 1.1 * (f_eq - 100.0) / kg[p]);
        end
        cavg[p] += mean_c[ph] / 3.0;
      end
      if (p > 0) begin
        checks++;
        if (!(cavg[p] < cavg[p - 1])) begin
          failures++; $display("FAIL: contention did not fall from k=%0.3f to k=%0.3f", kg[p-1] / 1000.0, kg[p] / 1000.0);
        end
      end
    end
    // run-time switch k = 0.04 -> 0.075 in the middle of the heavy phase
    bound_errors = 0;
    run_policy(K_0_04, PHASE + PHASE / 3, K_0_075);
    checks++;
    if (bound_errors != 0) begin failures++; $display("FAIL switch: frequency left its bounds"); end
    $display("switched run: mean f %0.1f / %0.1f MHz, mean C %0.2f / %0.2f flits (heavy / last phase)",
             mean_f[1], mean_f[2], mean_c[1], mean_c[2]);
    checks++;
    if (k_active != K_0_075) begin failures++; $display("FAIL: switch not applied"); end
    in_range("contention after switch (last phase) vs k=0.075 law", mean_c[2],
             0.8 * (1000.0 * LOAD[2] / ALPHA - 100.0) / 75.0, 1.25 * (1000.0 * LOAD[2] / ALPHA - 100.0) / 75.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
