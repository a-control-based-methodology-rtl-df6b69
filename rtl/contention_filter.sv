// contention_filter: first-order low-pass filter of the measured contention.
//
// The control loop smooths the contention before using it, because the raw
// measure carries fast traffic fluctuations. The filter is the discrete
// transfer function (1 - p) / (z - p) with p = 0.99, i.e. on every sample
//     y[t+1] = p * y[t] + (1 - p) * c[t]
// so the output lags the input by one sample, and a constant input is
// reached with a time constant of about 1 / (1 - p) = 100 samples (10 us at
// the 10 MHz controller rate).
//
// The filter form and p follow the document. The arithmetic is this design's
// own: y is kept in fixed point with FILT_FRAC fraction bits, p is
// round(0.99 * 2^16), and each update rounds to nearest so that a constant
// input c settles exactly at c (no truncation drift).
//
// Interface: clk, rst_n, one-cycle sample strobe; c_in is the contention
// (flits); y is the filtered value in flits with FILT_FRAC fraction bits,
// updated the cycle after sample. Reset clears y to 0.
module contention_filter
  import dfs_pkg::*;
#(
  parameter int unsigned P_Q = FILT_P     // pole in Q0.FILT_FRAC
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sample,
  input  cont_t  c_in,
  output cfilt_t y
);

  localparam int unsigned PW = FILT_FRAC + 1;
  localparam int unsigned AW = YW + PW + 1;

  logic [AW-1:0] acc;
  logic [AW-1:0] x_fx;

  always_comb begin
    x_fx = AW'(c_in) << FILT_FRAC;
    acc  = AW'(y) * AW'(P_Q) + x_fx * AW'(FILT_ONE - P_Q)
         + AW'(FILT_ONE >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y <= '0;
    else if (sample) y <= cfilt_t'(acc >> FILT_FRAC);
  end

endmodule
