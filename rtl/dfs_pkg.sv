// dfs_pkg: constants and types shared by the per-router dynamic frequency
// scaling (DFS) control loop.
//
// Frequencies are carried as unsigned integers in MHz. The contention is a
// flit count. The filtered contention is fixed point with FILT_FRAC fraction
// bits, and the proportional gain k is in MHz per flit with K_FRAC fraction
// bits, so the gains 0.01, 0.04, 0.075 and 0.15 (GHz per flit) of the
// evaluated control policies are exactly 10, 40, 75 and 150 MHz per flit.
//
// Following the document: the 100 MHz - 1 GHz actuator range, the 10 MHz
// controller rate, the filter pole p = 0.99, the router buffer organisation
// (3 virtual networks x 2 VCs x 4 flits per input port) and the control
// volume made of the four mesh neighbours plus the L1 and L2 links.
// Own choices: the fixed-point formats, the widths and the 1 GHz reference
// clock from which the 10 MHz controller tick and the divider are derived.
package dfs_pkg;

  // Actuator range and clocking
  localparam int unsigned F_MIN_MHZ   = 100;   // lowest router frequency
  localparam int unsigned F_MAX_MHZ   = 1000;  // highest router frequency
  localparam int unsigned F_REF_MHZ   = 1000;  // reference / base clock
  localparam int unsigned F_CTRL_MHZ  = 10;    // controller sample rate
  localparam int unsigned CTRL_DIV    = F_REF_MHZ / F_CTRL_MHZ;
  localparam int unsigned FW          = 10;    // bits of a frequency in MHz

  // Router buffering seen by the contention sensor
  localparam int unsigned NUM_VNETS     = 3;
  localparam int unsigned VCS_PER_VNET  = 2;
  localparam int unsigned FLITS_PER_VC  = 4;
  localparam int unsigned BUF_PER_PORT  = NUM_VNETS * VCS_PER_VNET * FLITS_PER_VC; // 24
  localparam int unsigned OCC_W         = $clog2(BUF_PER_PORT + 1);              // 5

  // Control volume: N, E, S, W neighbours plus L1 (core) and L2 links
  localparam int unsigned NUM_SRC     = 6;
  localparam int unsigned C_MAX       = NUM_SRC * BUF_PER_PORT;  // 144 flits
  localparam int unsigned CW          = $clog2(C_MAX + 1);       // 8

  // Contention filter: pole p = 0.99 in Q0.FILT_FRAC
  localparam int unsigned FILT_FRAC   = 16;
  localparam int unsigned FILT_ONE    = 1 << FILT_FRAC;
  localparam int unsigned FILT_P      = 64881;                   // round(0.99 * 2^16)
  localparam int unsigned YW          = CW + FILT_FRAC;          // filtered value width

  // Proportional gain k in MHz/flit, Q8.K_FRAC
  localparam int unsigned K_FRAC      = 8;
  localparam int unsigned KW          = 16;
  typedef logic [KW-1:0] k_t;
  localparam k_t K_0_01   = k_t'(10  << K_FRAC);
  localparam k_t K_0_04   = k_t'(40  << K_FRAC);
  localparam k_t K_0_075  = k_t'(75  << K_FRAC);
  localparam k_t K_0_15   = k_t'(150 << K_FRAC);

  typedef logic [FW-1:0]    freq_t;     // MHz
  typedef logic [CW-1:0]    cont_t;     // flits
  typedef logic [OCC_W-1:0] occ_t;      // flits in one input port
  typedef logic [YW-1:0]    cfilt_t;    // flits, Q8.16

  // Which actuator clocks the router
  typedef enum logic {ACT_PLL = 1'b0, ACT_DIVIDER = 1'b1} actuator_e;

endpackage
