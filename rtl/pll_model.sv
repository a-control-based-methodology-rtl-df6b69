// pll_model: behavioural model of the PLL actuator (not synthesizable).
//
// A real charge-pump PLL (phase detector, charge pump with loop filter, ring
// oscillator) is an analog block; what the DFS loop needs from it is how its
// output clock follows a change of the frequency set point. This model gives
// the output clock period T a second-order response to the set-point period
// T_set = 1 / f_set:
//     G(s) = 1 / (1 + 2 (xi / omega) s + s^2 / omega^2)
// with omega = 4e6 rad/s and xi = 0.6, a settling time of about 2 us and an
// overshoot of about 9 %. The equivalent state-space system
//     dT/dt = V,   dV/dt = omega^2 (T_set - T) - 2 xi omega V
// is integrated with backward Euler, taking as step the period just produced,
// so the clock period changes cycle by cycle as it would at the PLL output.
//
// From the document: the transfer function, omega, xi, the backward Euler
// integration with a step equal to the current period, and the 100 MHz to
// 1 GHz bound on the set point. That the filtered quantity is the period is
// read from the document's plot of the model, whose vertical axis is the
// output period. Own choices: the reset value (F_INIT), the port set and the
// 0.1 ns floor that keeps the period positive.
//
// Interface: f_set in MHz is clamped to FLO .. FHI. clk_out is a 50 % duty
// clock; f_now is its present frequency rounded to MHz (saturated to the port
// width). While rst_n is low the model is held at F_INIT with no slew.
module pll_model
  import dfs_pkg::*;
#(
  parameter int unsigned OMEGA_RAD_S = 4_000_000,  // natural frequency omega
  parameter int unsigned XI_MILLI    = 600,        // damping xi, thousandths
  parameter int unsigned F_INIT = F_MIN_MHZ,
  parameter int unsigned FLO    = F_MIN_MHZ,
  parameter int unsigned FHI    = F_MAX_MHZ
) (
  input  logic  rst_n,
  input  freq_t f_set,
  output logic  clk_out,
  output freq_t f_now
);
  localparam real OMEGA = real'(OMEGA_RAD_S);
  localparam real XI    = real'(XI_MILLI) / 1000.0;

  real t_per;    // present period, s
  real v_per;    // its rate of change
  real t_set;    // set-point period, s
  real den;
  real fm;
  int unsigned fs;

  function automatic freq_t to_mhz(real per);
    real m;
    m = 1.0e-6 / per;
    if (m > real'((1 << FW) - 1)) return freq_t'((1 << FW) - 1);
    return freq_t'($rtoi(m + 0.5));
  endfunction

  initial begin
    clk_out = 1'b0;
    t_per   = 1.0e-6 / real'(F_INIT);
    v_per   = 0.0;
    f_now   = freq_t'(F_INIT);
    forever begin
      if (!rst_n) begin
        t_per = 1.0e-6 / real'(F_INIT);
        v_per = 0.0;
      end else begin
        fs = 32'(f_set);
        if (fs < FLO) fs = FLO;
        if (fs > FHI) fs = FHI;
        t_set = 1.0e-6 / real'(fs);
        den   = 1.0 + 2.0 * XI * OMEGA * t_per + t_per * t_per * OMEGA * OMEGA;
        v_per = (v_per + t_per * OMEGA * OMEGA * (t_set - t_per)) / den;
        t_per = t_per + t_per * v_per;
        if (t_per < 1.0e-10) t_per = 1.0e-10;
      end
      f_now   = to_mhz(t_per);
      fm      = t_per * 0.5e9;          // half period in ns
      clk_out = 1'b1;
      #(fm * 1ns);
      clk_out = 1'b0;
      #(fm * 1ns);
    end
  end

endmodule
