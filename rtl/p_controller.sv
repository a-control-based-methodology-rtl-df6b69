// p_controller: proportional frequency law of the DFS control loop.
//
// The set point is zero contention. Because raising the frequency lowers the
// contention (a process with negative gain), the error is taken as the
// filtered contention minus the set point, so it is positive when there is
// contention. The frequency request is then
//     f = min(F_MIN + k * error, F_MAX)
// F_MIN keeps the router clocked when there is no contention and F_MAX caps
// the request at the top of the actuator range. Since error and k are never
// negative, f never falls below F_MIN.
//
// The law, the set point of zero and the 100 MHz / 1 GHz bounds follow the
// document. The number formats are this design's own: k is in MHz per flit
// with K_FRAC fraction bits (k = 0.04 GHz/flit is 40 MHz/flit), the filtered
// contention has FILT_FRAC fraction bits, and the product is truncated to
// whole MHz.
//
// Interface: the request f_set is registered on the one-cycle sample strobe
// and valid the cycle after; saturated flags that the F_MAX clamp was used.
// Reset sets f_set to F_MIN.
module p_controller
  import dfs_pkg::*;
#(
  parameter int unsigned FMIN = F_MIN_MHZ,
  parameter int unsigned FMAX = F_MAX_MHZ
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sample,
  input  cfilt_t c_filt,     // filtered contention, Q.FILT_FRAC flits
  input  k_t     k,          // gain, Q.K_FRAC MHz per flit
  output freq_t  f_set,      // requested router frequency, MHz
  output logic   saturated
);

  localparam int unsigned PW = YW + KW;
  localparam int unsigned SH = FILT_FRAC + K_FRAC;

  logic [YW-1:0] err;
  logic [PW-1:0] prod;
  logic [PW-1:0] f_raw;
  logic          over;

  always_comb begin
    err   = c_filt - cfilt_t'(0);          // set point is zero contention
    prod  = PW'(err) * PW'(k);
    f_raw = PW'(FMIN) + (prod >> SH);
    over  = f_raw > PW'(FMAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_set     <= freq_t'(FMIN);
      saturated <= 1'b0;
    end else if (sample) begin
      f_set     <= over ? freq_t'(FMAX) : freq_t'(f_raw);
      saturated <= over;
    end
  end

endmodule
