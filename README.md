# Closed-loop frequency scaling for Network-on-Chip routers

A Network-on-Chip router's dynamic power grows with its clock frequency.
Running every router at the top frequency wastes power when traffic is light;
running it slow makes flits pile up in buffers. This design gives each router
its own clock domain (a *frequency island*) and sets that clock at run time
from a measured congestion figure, the router's **contention**, through a
small proportional feedback loop:

```
            +-------------------- controller (10 MHz) --------------------+
 occ[0..5] -> contention_monitor -> contention_filter -> p_controller -> f_set
  (flits)        C (flits)           y, low-pass p=0.99    f = min(100 + k*y, 1000) MHz
                                                    ^
                                       k_selector --+  (k from OS / user, dwell time)
            +-------------------------------------------------------------+
 f_set -> actuator: pll_model (two-pole PLL, ~2 us) or freq_divider (1000/N MHz)
       -> clk_router
 every router link crossing the island border -> resync (toggle handshake)
```

The loop has only one knob, the gain `k`. A small `k` keeps the router near
100 MHz and saves power; a large `k` reacts strongly to contention and buys
latency with power. The gain can be changed while the system runs (for
example by the operating system when a laptop is plugged in), and the
hardware enforces a minimum *dwell time* between two changes so that switching
between individually stable controllers cannot destabilise the loop.

The top module, `dfs_island`, is all the per-router hardware of this scheme
for one router. The router itself, the processor core with its L1 cache and
the L2 bank are not part of this RTL; they attach to its ports.

## The control loop and why it looks the way it does

**Contention.** For router *i*, the control volume is the set of blocks one
hop away: the four mesh neighbours plus the core (L1) and L2 links. The
contention C is the number of flits sitting in those blocks' input buffers
whose next hop is router *i*. Each source reports its own count on `occ[j]`
(5 bits each); `contention_monitor` adds them on each controller sample and
clamps the sum to the total buffer space of the control volume
(6 sources x 3 virtual networks x 2 VCs x 4 flits = 144 flits).

**Process model.** The loop was designed against a flow-balance model of the
router,

    C[t] = C[t-1] + InFlits[t] - OutFlits[t] - alpha * f[t-1]

an integrator: flits accumulate unless the router drains them, and it drains
them at a rate proportional to its frequency (alpha is fitted to traffic;
about 1.9 over a mix of MiBench programs on a 4x4 mesh). Raising f lowers C,
so the process has negative gain. That is why the controller's error is
*contention minus set point* rather than the usual set point minus
measurement. The set point is zero contention.

**Filter.** Raw contention is noisy at the 10 MHz sample rate.
`contention_filter` applies `(1-p)/(z-p)` with p = 0.99:
`y[t+1] = 0.99 y[t] + 0.01 C[t]`, a time constant of 100 samples (10 us).
`y` is kept with 16 fraction bits and rounded, so a constant input is
reproduced exactly; the pole is stored as 64881/65536.

**Control law.** `p_controller` computes `f = F_MIN + k * y`, clamps it at
F_MAX, and registers it as `f_set` (MHz). Adding F_MIN (100 MHz) keeps the
router clocked when there is no contention; the clamp keeps the request
inside the actuator's range (1 GHz).

**Units of k.** The gains used are 0.01, 0.04, 0.075 and 0.15. This design
reads them as GHz per flit of filtered contention, so in RTL they are 10, 40,
75 and 150 MHz per flit (`K_0_01` ... `K_0_15` in `dfs_pkg`), stored with 8
fraction bits. Root-locus analysis of the loop with the PLL and filter gives
alpha * k_max of about 0.19, so with alpha = 1.9 the loop is provably stable
for k below about 0.1; k = 0.15 lies outside that bound and was found stable
only in simulation. The reading of the units is an interpretation: one
worked example in the method's original description (k = 0.04 giving roughly
650 MHz at 40 flits for an unfiltered law f = k*C) does not match it.

**Rate.** The PLL needs about 2 us to settle, and the loop must run 10 to 20
times faster than the slowest element it has to model, hence 10 MHz: one
sample every `SAMPLE_DIV` = 100 cycles of the 1 GHz reference clock. The
three loop stages are strobed on consecutive reference cycles of one sample
(monitor, then filter, then controller), so `f_set` reflects a contention
reading three reference cycles after it was taken.

**Switching k.** `k_selector` holds the gain in force. A request
(`k_req_valid`, `k_req`) becomes pending and is applied at the first sample at
which `DWELL` samples have passed since the previous switch; a newer request
replaces a pending one. No dwell value is known from the method's analysis,
so `DWELL` = 20 samples (2 us, one PLL settling time) is a choice of this
design; change it to suit.

## Actuators

Two actuators turn `f_set` into the router clock; parameter `ACTUATOR`
(`ACT_PLL` default, or `ACT_DIVIDER`) chooses which one drives `clk_router`.

**PLL model (`pll_model`, behavioural, not synthesizable).** The real PLL is
an analog charge-pump PLL (phase detector, charge pump, ring oscillator). What
matters to the loop is its slow response, modelled as

    G(s) = 1 / (1 + 2 (xi/omega) s + s^2 / omega^2),  omega = 4e6 rad/s, xi = 0.6

applied to the output *period*. The state-space form is integrated with
backward Euler with a step equal to the period just produced, so the clock
period changes cycle by cycle; a step settles in about 2 us with about 9 %
overshoot. The set point is clamped to 100 MHz - 1 GHz; the output may
briefly overshoot the bounds. `f_now` reports the present frequency in MHz.
For silicon this module is replaced by a real PLL with the same ports.

**Frequency divider (`freq_divider`, synthesizable).** Clocks the router at
1000/N MHz, N = 1..10, choosing the N nearest to 1000 / f_set. The output is
the base clock gated by a latch-based clock gate (the one intended latch in
the design), high for half a base cycle once every N cycles. A new ratio is
registered one cycle after `f_set` changes and adopted only at the end of the
current output period, so no period is ever cut short. Changes are fast but
the frequency set is coarse (1000, 500, 333, 250, 200 ... 100 MHz).

## Crossing the island border: `resync`

Every link between two islands carries its flits through a two-way toggle
handshake that adds only a request and an acknowledge wire to the data link:

* sender: a flit toggles `req` and loads the data flops that drive the link;
  `ack` comes back through two flops; `busy = req XOR ack_sync`.
* receiver: `req` goes through two synchronising flops (`req'`,
  `req stable`) and a third delay flop; `data valid = req stable XOR delayed`.
  The data flops load on the edge at which `req stable` toggles, and
  `req stable` itself is the acknowledge.
* `tx_ready = !busy AND credit` is what gates the sending router's switch
  allocator for that output port.

A flit is seen at the receiver two to three receiver edges after it is sent,
and the sender may send again two to three of its own edges after that. One
flit crosses per round trip, so throughput is well below one flit per cycle;
that cost is part of what the scheme has to pay for per-router clocks.

`dfs_island` places one `resync` per direction on each of its `NPORT` = 6
ports. Credits are a plain input per port (`in_credit`, `rtr_out_credit`);
the credit return path is the router's business.

## Using `dfs_island`

| parameter | default | meaning |
|---|---|---|
| `ACTUATOR` | `ACT_PLL` | which actuator clocks the router |
| `NPORT` | 6 | ports / control-volume sources (N, E, S, W, L1, L2) |
| `FLIT_W` | 64 | link width |
| `SAMPLE_DIV` | 100 | reference cycles per controller sample (10 MHz at 1 GHz) |
| `DWELL` | 20 | minimum samples between two gain switches |
| `K_RESET` | `K_0_01` | gain after reset (10 MHz per flit) |

Global sizes (buffer organisation, widths, bounds, fixed-point formats) are in
`rtl/dfs_pkg.sv`; the contention and occupancy widths are derived from the
buffer organisation. `clk_ref` is the 1 GHz reference for the controller and
the divider. `rst_n` is one asynchronous active-low reset for all domains;
hold it long enough for the slowest clock (100 MHz) to see an edge.

Outputs expose the loop state (`contention`, `c_filt`, `k_active`,
`k_pending`, `k_switched`, `f_set`, `f_saturated`, `sample`) and the router
clock (`clk_router`, `f_now`). In a mesh, one `dfs_island` serves each
router, and each router's `occ[j]` is fed the count of flits in neighbour
*j*'s input buffers that are routed to it next. A link between two islands
needs only one `resync` per direction, while each `dfs_island` owns both
directions of all its ports: feed island A's `out_*` (already in B's clock)
straight into router B and tie B's matching `in_valid` low, so that B's
inbound resync on that port stays idle; or build the mesh from the
lower-level modules.

## Files

`rtl/`: `dfs_pkg` (constants and types), `contention_monitor`,
`contention_filter`, `p_controller`, `k_selector`, `freq_divider`,
`pll_model`, `resync`, `dfs_island` (top).

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_dfs_island_div.sv` (the top with the divider actuator) and
`tb_dfs_closed_loop.sv` (the loop closed around a process model). Each prints
`TB_RESULT checks=N failures=M`. `tb_dfs_island` runs the top at its default
parameters through an idle phase, congestion up to saturation at 1 GHz,
relief, and a k = 0.04 -> 0.075 switch deferred by the dwell time, with
random traffic on all twelve links in both directions; it checks every
sample against a floating-point model of the loop and counts each mechanism
(saturation, switch, dwell deferral, actuator slewing, busy and credit
stalls, traffic) so a mechanism that never happens is a failure.

`tb_dfs_closed_loop` closes the loop around the flow-balance model above
(alpha = 1.88, C clamped to 0..144) with the PLL in the loop, steps the net
load through 0.6, 1.4 and 0.8 flits per sample, and runs each gain and a
switch from k = 0.04 to 0.075 under load. In equilibrium the router must
drain the load, so f = d / alpha whatever k is, and the contention settles at
(f - 100 MHz) / k. Means over the end of each load phase:

| k (GHz/flit) | f at d = 0.6 / 1.4 / 0.8 (MHz) | filtered C (flits) |
|---|---|---|
| equilibrium | 319 / 745 / 426 | (f - 100) / k |
| 0.01  | 319 / 744 / 426 | 22.0 / 64.5 / 32.7 |
| 0.04  | 319 / 745 / 425 | 5.5 / 16.1 / 8.1 |
| 0.075 | 319 / 744 / 426 | 2.9 / 8.6 / 4.4 |
| 0.15  | 322 / 747 / 428 | 1.5 / 4.3 / 2.2 |

Higher gains buy lower contention (shorter queues, lower latency) at the same
average frequency once settled; they differ in how hard the frequency is
pushed up during load transients, which is where the power difference lies.

Simulation with Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal rtl/dfs_pkg.sv rtl/*.sv \
          tb/tb_dfs_island.sv --top-module tb_dfs_island -Mdir obj
./obj/Vtb_dfs_island
```

(`rtl/dfs_pkg.sv` must come first; it appears twice in that list, which
Verilator accepts with a warning.) Replace the testbench name to run another.
The full-size top test simulates 70 us in about a second.

## Where this RTL departs from, or adds to, the method

* **Own choices where nothing was specified:** the 1 GHz reference clock, all
  widths and fixed-point formats, reset values, the dwell time, the gain
  request interface, the divider's nearest-ratio mapping and clock-gate
  form, the receiver's data-capture edge in `resync`, the 0.1 ns period floor
  of the PLL model.
* **Units of k** are an interpretation (see above).
* **Divider timing:** a new ratio takes effect at the end of the current
  output period (up to 10 base cycles), not within a single cycle, in
  exchange for never producing a short clock pulse.
* **Busy AND credit** is implemented as *not busy* AND credit.
* **Contention transport:** neighbours' buffer counts are assumed to arrive
  synchronised to the controller clock; the exchange of buffer status between
  routers is not designed here.
* **Islands of several routers** (one actuator for a group of routers) are
  not covered; `dfs_island` serves one router.
* **Not included:** the router (a 3-stage wormhole virtual-channel router
  with 64-bit links, 4 flits per VC, 2 VCs per virtual network, 3 virtual
  networks, XY routing), cores, caches, the transistor-level PLL and its
  power, the threshold-based and static policies that the method is
  compared with, and the software framework used to evaluate it.
* At the default widths the control volume must have 2 VCs per virtual
  network; with 4, set `VCS_PER_VNET = 4` in `dfs_pkg` and the widths follow.
* The PLL model uses `real` arithmetic and delays; only the `ACT_DIVIDER`
  configuration of `dfs_island` is synthesizable, and synthesis tools that
  do not accept the behavioural model need it replaced by a PLL macro.
