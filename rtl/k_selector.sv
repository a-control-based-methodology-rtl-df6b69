// k_selector: run-time switching of the proportional gain k.
//
// The operating system or the user may move the DFS loop towards a more
// power-saving (small k) or more performance-oriented (large k) behaviour by
// writing a new gain. A switched system whose controllers are each stable
// stays stable if a minimum dwell time separates two switches, so a request
// is not applied at once: it is held as pending and becomes the active gain
// on the first controller sample at which at least DWELL samples have passed
// since the previous switch. A newer request overwrites a pending one.
//
// Switching k with a dwell time follows the document; it gives no dwell
// value, so DWELL defaults to 20 samples (2 us at 10 MHz, the PLL settling
// time) as this design's choice, as do the request handshake and K_RESET
// (the k = 0.01 policy, the document's best power-performance setting).
//
// Interface: req_valid is a one-cycle strobe carrying req_k. k_active changes
// only in the cycle after a sample strobe, and switched pulses then for one
// cycle. After reset k_active = K_RESET and the first request may be applied
// at the next sample.
module k_selector
  import dfs_pkg::*;
#(
  parameter int unsigned DWELL   = 20,
  parameter k_t          K_RESET = K_0_01
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,
  input  logic req_valid,
  input  k_t   req_k,
  output k_t   k_active,
  output logic pending,
  output logic switched
);

  localparam int unsigned DW = $clog2(DWELL + 1);

  k_t            pend_k;
  logic [DW-1:0] since;       // samples since the last switch, saturating
  logic          dwell_ok;

  assign dwell_ok = (since >= DW'(DWELL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_active <= K_RESET;
      pend_k   <= K_RESET;
      pending  <= 1'b0;
      since    <= DW'(DWELL);
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (sample) begin
        if (pending && dwell_ok) begin
          k_active <= pend_k;
          pending  <= 1'b0;
          since    <= '0;
          switched <= 1'b1;
        end else if (!dwell_ok) begin
          since <= since + 1'b1;
        end
      end
      // A request arriving in the same cycle is kept for a later sample.
      if (req_valid) begin
        pend_k  <= req_k;
        pending <= 1'b1;
      end
    end
  end

endmodule
