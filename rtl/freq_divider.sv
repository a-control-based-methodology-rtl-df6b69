// freq_divider: frequency-divider actuator for a router's clock.
//
// The simpler of the two DFS actuators: the router is clocked at a
// submultiple F_REF / N of a base clock, N = 1 .. MAX_DIV. The requested
// frequency f_set (MHz) is mapped to the divide ratio nearest to F_REF / f_set
// (the nearest output period),
//     N = 1 + #{ n in 1 .. MAX_DIV-1 : 2 * F_REF > f_set * (2n + 1) }
// i.e. N = round(F_REF / f_set) clamped to 1 .. MAX_DIV, using comparisons
// only. The ratio is registered one base-clock cycle after f_set changes and
// is adopted only at the end of the current output period, so an output
// period is never cut short and no glitch reaches the router.
//
// The output clock is the base clock gated by an enable that is high on one
// base cycle out of N; the enable is captured by a latch that is transparent
// while the base clock is low (an integrated clock gate), so clk_out is high
// for the first half of every N-th base cycle. This latch is intended and is
// the only one in the design. clk_en is the same enable for logic that
// prefers a clock enable to a derived clock.
//
// The actuator, its fast switching over a small set of frequencies and the
// one-cycle change delay follow the document; nearest-ratio rounding,
// the gated-clock form and MAX_DIV = F_REF / F_MIN = 10 are this design's.
//
// Interface: clk is the base clock; ratio is the divide ratio in force.
// Reset selects N = MAX_DIV (the lowest frequency).
module freq_divider
  import dfs_pkg::*;
#(
  parameter int unsigned FREF    = F_REF_MHZ,
  parameter int unsigned MAX_DIV = F_REF_MHZ / F_MIN_MHZ
) (
  input  logic  clk,
  input  logic  rst_n,
  input  freq_t f_set,
  output logic  clk_out,
  output logic  clk_en,
  output logic [$clog2(MAX_DIV+1)-1:0] ratio
);

  localparam int unsigned RW = $clog2(MAX_DIV + 1);

  logic [RW-1:0] ratio_next, ratio_req, cnt;
  logic          en_l;

  always_comb begin
    ratio_next = RW'(1);
    for (int unsigned n = 1; n < MAX_DIV; n++)
      if (2 * FREF > 32'(f_set) * (2 * n + 1)) ratio_next = RW'(n + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ratio_req <= RW'(MAX_DIV);
      ratio     <= RW'(MAX_DIV);
      cnt       <= '0;
    end else begin
      ratio_req <= ratio_next;
      if (cnt >= ratio - 1'b1) begin
        cnt   <= '0;
        ratio <= ratio_req;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign clk_en = (cnt == '0);

  // Clock gate: the enable passes only while the base clock is low.
  always_latch begin
    if (!clk) en_l = clk_en;
  end

  assign clk_out = clk & en_l;

endmodule
