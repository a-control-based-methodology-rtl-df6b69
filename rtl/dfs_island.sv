// dfs_island: one router's frequency island with its closed-loop DFS control.
//
// Every router of the mesh sits in a clock domain of its own whose frequency
// is set at run time from the router's contention. This module holds all the
// per-router hardware of that scheme; the router itself, the core and the L2
// bank attach through its ports.
//
// Control loop (clk_ref, sampled every CTRL_DIV cycles, 10 MHz at 1 GHz):
//   contention_monitor  sums the flits of the control volume bound for this
//                       router (occ[], one count per neighbour / L1 / L2)
//   contention_filter   low-pass (1 - p) / (z - p), p = 0.99
//   p_controller        f = min(F_MIN + k * filtered contention, F_MAX)
//   k_selector          k from the OS / user, switched no faster than a dwell
//   actuator            pll_model (two-pole PLL) or freq_divider (F_REF / N)
// The three loop stages are strobed on consecutive clk_ref cycles of the
// same sample (sample, sample+1, sample+2), so a contention reading reaches
// f_set three clk_ref cycles after it is taken; the PLL then needs about 2 us
// to settle, the divider one output period.
//
// Links: each of the NPORT router ports has an inbound resync (neighbour
// clock nbr_clk[i] -> router clock) and an outbound resync (router clock ->
// nbr_clk[i]). The credit inputs tell a sender whether the buffer at the far
// end has room; the *_ready outputs are busy-AND-credit, the signal that
// gates the switch allocator of the sending router.
//
// ACTUATOR selects which actuator clocks the router. Both are present; the
// PLL (the document's main configuration) is the default. The PLL model is
// behavioural, so only the ACT_DIVIDER configuration is synthesizable as a
// whole. All resets are the single asynchronous rst_n.
module dfs_island
  import dfs_pkg::*;
#(
  parameter actuator_e   ACTUATOR = ACT_PLL,
  parameter int unsigned NPORT    = NUM_SRC,       // N, E, S, W, L1, L2
  parameter int unsigned FLIT_W   = 64,
  parameter int unsigned SAMPLE_DIV = CTRL_DIV,    // clk_ref cycles per sample
  parameter int unsigned DWELL    = 20,            // samples between k switches
  parameter k_t          K_RESET  = K_0_01
) (
  input  logic              clk_ref,
  input  logic              rst_n,

  // contention sensing: flits bound for this router in each neighbour's buffers
  input  occ_t              occ [NPORT],

  // OS / user gain selection
  input  logic              k_req_valid,
  input  k_t                k_req,

  // control state
  output cont_t             contention,
  output cfilt_t            c_filt,
  output k_t                k_active,
  output logic              k_pending,
  output logic              k_switched,
  output freq_t             f_set,
  output logic              f_saturated,
  output logic              sample,

  // router clock
  output logic              clk_router,
  output freq_t             f_now,
  output logic              div_clk_en,   // divider's enable (one base cycle in N)

  // inbound links: neighbour domain side
  input  logic              nbr_clk        [NPORT],
  input  logic              in_valid       [NPORT],
  input  logic [FLIT_W-1:0] in_data        [NPORT],
  input  logic              in_credit      [NPORT],  // router input buffer has room
  output logic              in_ready       [NPORT],
  // inbound links: router domain side
  output logic              rtr_in_valid   [NPORT],
  output logic [FLIT_W-1:0] rtr_in_data    [NPORT],

  // outbound links: router domain side
  input  logic              rtr_out_valid  [NPORT],
  input  logic [FLIT_W-1:0] rtr_out_data   [NPORT],
  input  logic              rtr_out_credit [NPORT],  // neighbour buffer has room
  output logic              rtr_out_ready  [NPORT],  // to the switch allocator
  // outbound links: neighbour domain side
  output logic              out_valid      [NPORT],
  output logic [FLIT_W-1:0] out_data       [NPORT]
);

  localparam int unsigned TW     = $clog2(SAMPLE_DIV);
  localparam int unsigned MAXDIV = F_REF_MHZ / F_MIN_MHZ;

  // ---------------------------------------------------------------- tick
  logic [TW-1:0] tick_cnt;
  logic          sample_d1, sample_d2;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      tick_cnt  <= '0;
      sample    <= 1'b0;
      sample_d1 <= 1'b0;
      sample_d2 <= 1'b0;
    end else begin
      sample    <= (tick_cnt == TW'(SAMPLE_DIV - 1));
      tick_cnt  <= (tick_cnt == TW'(SAMPLE_DIV - 1)) ? '0 : tick_cnt + 1'b1;
      sample_d1 <= sample;
      sample_d2 <= sample_d1;
    end
  end

  // ---------------------------------------------------------- control loop
  contention_monitor #(.N_SRC(NPORT)) u_mon (
    .clk(clk_ref), .rst_n, .sample(sample), .occ, .contention
  );

  contention_filter u_filt (
    .clk(clk_ref), .rst_n, .sample(sample_d1), .c_in(contention), .y(c_filt)
  );

  k_selector #(.DWELL(DWELL), .K_RESET(K_RESET)) u_ksel (
    .clk(clk_ref), .rst_n, .sample(sample), .req_valid(k_req_valid), .req_k(k_req),
    .k_active, .pending(k_pending), .switched(k_switched)
  );

  p_controller u_ctl (
    .clk(clk_ref), .rst_n, .sample(sample_d2), .c_filt, .k(k_active),
    .f_set, .saturated(f_saturated)
  );

  // ------------------------------------------------------------ actuators
  logic                      clk_pll, clk_div;
  freq_t                     pll_f_now;
  logic [$clog2(MAXDIV+1)-1:0] div_ratio;

  pll_model u_pll (
    .rst_n, .f_set, .clk_out(clk_pll), .f_now(pll_f_now)
  );

  freq_divider u_div (
    .clk(clk_ref), .rst_n, .f_set, .clk_out(clk_div), .clk_en(div_clk_en), .ratio(div_ratio)
  );

  always_comb begin
    if (ACTUATOR == ACT_PLL) begin
      clk_router = clk_pll;
      f_now      = pll_f_now;
    end else begin
      clk_router = clk_div;
      f_now      = freq_t'(F_REF_MHZ / ((div_ratio == '0) ? 1 : 32'(div_ratio)));
    end
  end

  // ----------------------------------------------------------------- links
  for (genvar i = 0; i < NPORT; i++) begin : g_port
    resync #(.W(FLIT_W)) u_rs_in (
      .clk_tx(nbr_clk[i]), .rst_tx_n(rst_n),
      .tx_valid(in_valid[i]), .tx_data(in_data[i]), .tx_credit(in_credit[i]),
      .tx_busy(), .tx_ready(in_ready[i]),
      .clk_rx(clk_router), .rst_rx_n(rst_n),
      .rx_valid(rtr_in_valid[i]), .rx_data(rtr_in_data[i])
    );
    resync #(.W(FLIT_W)) u_rs_out (
      .clk_tx(clk_router), .rst_tx_n(rst_n),
      .tx_valid(rtr_out_valid[i]), .tx_data(rtr_out_data[i]), .tx_credit(rtr_out_credit[i]),
      .tx_busy(), .tx_ready(rtr_out_ready[i]),
      .clk_rx(nbr_clk[i]), .rst_rx_n(rst_n),
      .rx_valid(out_valid[i]), .rx_data(out_data[i])
    );
  end

endmodule
