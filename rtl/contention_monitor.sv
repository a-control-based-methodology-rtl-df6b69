// contention_monitor: measures the contention of one router.
//
// The contention C of a router is the number of flits waiting in the input
// buffers of its control volume (the routers, cores and caches one hop away)
// whose next hop is this router. Each source of the control volume reports
// that count for its own buffers on occ[i]; on every controller sample
// strobe the monitor adds the NUM_SRC counts and registers the sum, clamped
// to the total buffer capacity of the control volume (NUM_SRC * BUF_PER_PORT),
// which is the upper saturation of the contention in the document's model.
//
// Interface: clk and the one-cycle sample strobe belong to the controller's
// clock domain. occ[] must be stable in that domain (the document says the
// routers exchange buffer status but not how; here the counts are assumed
// to arrive already synchronised). Timing: contention is valid the cycle after
// sample and is held until the next strobe. Reset clears it to 0.
module contention_monitor
  import dfs_pkg::*;
#(
  parameter int unsigned N_SRC   = NUM_SRC,
  parameter int unsigned PORT_CAP = BUF_PER_PORT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample,
  input  occ_t             occ [N_SRC],
  output cont_t            contention
);

  localparam int unsigned CAP = N_SRC * PORT_CAP;
  localparam int unsigned SW  = $clog2(N_SRC * ((1 << OCC_W) - 1) + 1);

  logic [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_SRC; i++) sum += SW'(occ[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      contention <= '0;
    else if (sample) contention <= (sum > SW'(CAP)) ? cont_t'(CAP) : cont_t'(sum);
  end

endmodule
