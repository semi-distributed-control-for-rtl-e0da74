# Semi-distributed reconfiguration control for partially reconfigurable FPGAs

An FPGA with several partially reconfigurable regions can run each region in
one of a few versions (modes). Each mode trades performance against power.
Letting every region choose its own mode is cheap and scales well. The
combinations, though, must stay inside a set of allowed system
configurations, and a purely local choice cannot guarantee that. A single
central controller can guarantee it, but it becomes large and slow as regions
are added.

This design splits the work:

* **One controller per region.** It watches its own inputs and decides on its
  own when its region *should* change mode.
* **One coordinator.** It is asked before any change takes effect. It checks
  the request against a table of allowed global configurations. If other
  regions would have to move as well, it asks their controllers. It then
  authorizes or refuses the change.

The RTL implements the control part: the controllers, the coordinator, the
allowed-configuration table and a register interface for the processor. That
processor moves the partial bitstreams through the configuration port, one
region after another.

The default build is a four-region video downscaler:
* two regions run a horizontal filter and two run a vertical filter;
* each filter has three versions;
* the battery level and a user performance level drive the decisions.

## Structure

```
                 battery_level                 processor register bus
                      |                                   |
        +-------------+-------------+               +-----+-----+
        |             |             |               | proc_regs |--- perf_level (to all)
   +----v-----+  +----v-----+  +----v-----+         +-----+-----+
   |controller|  |controller|  |controller|  ...         | loaded strobes / register reads
   | monitor  |  | monitor  |  | monitor  |              |
   | decision |  | decision |  | decision |<-------------+
   | reconfig |  | reconfig |  | reconfig |
   +----+-----+  +----+-----+  +----+-----+
        |  requests / responses     |      (point-to-point, one pair per region)
        |  suggestions / decisions  |
   +----v---------------------------v----+
   |            coordinator              |-- coord_inprogress (to all)
   |   (gc_lookup: allowed-config table) |
   +-------------------------------------+
```

| Module | Role |
|---|---|
| `semi_distributed_control` | Top. Builds `N_REGIONS` controllers: the first `N_HFILTER` get the horizontal-filter power figures, the rest get the vertical ones. Also builds the coordinator and the processor registers. |
| `controller` | Joins one region's monitoring, decision and reconfiguration modules. |
| `monitoring_module` | Registers the user level and computes the battery-threshold flags of every mode. |
| `decision_module` | The controller's mode automaton: requests, responses, load commands, refusal memory. |
| `reconfig_module` | The region's reconfiguration register (mode to load, pending) and the "loaded" path back. |
| `coordinator` | Idle / TreatRequests / TreatResponses automaton. |
| `gc_lookup` | The allowed-configuration (GC) table and the search over it. |
| `proc_regs` | Register bus decoder for the processor commands. |
| `sdc_pkg` | Mode type, link structs, threshold function. |

## Modes and the battery rules

Modes are numbered from 1, and mode 1 draws the most power. A region's modes
have powers P_1 > P_2 > P_3. By default these are 60/40/20 for the horizontal
filter and 70/50/30 for the vertical filter, in mW; only their ratios matter.
AB is the battery energy now and FB is the energy of a full battery.

* **Leave mode j** (eq. 1) when `AB < a_j · FB · P_j / P_1`.
* **Mode j is reachable from a lower-power mode** (eq. 2) when
  `AB ≥ (a_j + b) · FB · P_j / P_1`.

Values:
* a_1 = 75 % and a_2 = 75 % · 75 % = 56.25 %;
* b = 5 % is the hysteresis. It stops a region from bouncing between two modes
  around one threshold.

All fractions are parameters in units of 1/10000: `A_FRAC = '{7500, 5625}`,
`B_FRAC = 500`. The thresholds are constants and are rounded up, so the
integer comparison gives the same result as the exact one. With
`FULL_BATTERY = 1_000_000` they are:

| | leave 1 | enter 1 | leave 2 | enter 2 |
|---|---|---|---|---|
| horizontal (60/40/20) | < 750000 | ≥ 800000 | < 375000 | ≥ 408334 |
| vertical (70/50/30)   | < 750000 | ≥ 800000 | < 401786 | ≥ 437500 |

The lowest mode can always be entered and never has to be left.

## The controller automaton

Let c be the current mode and p the user performance level. Three rules can
produce a request, checked in this order:

1. `p > c`: the user wants less performance. Request p.
2. Eq. 1 holds for c: the energy is too low to stay. Request c + 1.
3. `p < c` and eq. 2 holds for p: the user wants more and there is energy for
   it. Request p.

The first rule whose target has not been refused before is sent. No request is
sent while:
* a coordination is in progress (`coord_inprogress`);
* the controller is waiting for a decision;
* an authorized load has not yet been reported as loaded.

Answers to a suggestion:
* A suggestion to an equal or lower-power mode is accepted.
* A suggestion to a higher-power mode is accepted only if eq. 2 holds for it.

Decisions:
* An authorization for mode t gives `load(t)`.
* A refusal for t sets `refused[t]`. The controller then no longer asks for t,
  but it can still reach t when the coordinator suggests it.
* The refused flags are cleared whenever the region changes mode.

The current mode changes only when the processor reports that the new mode
is loaded.

## Coordination

The coordinator is idle until at least one request arrives. Then it works as
follows:

1. Every request present in that cycle is taken, and `coord_inprogress` is
   raised. Controllers send no new requests while it is high.
2. **TreatRequests.** `gc_lookup` lists the configurations that contain every
   request. It ranks them by the number of regions that would have to be
   reconfigured, fewest first, with the lower configuration number on a tie.
   This keeps the reconfiguration time down, since regions are loaded one
   after another.
   * If nothing holds the requests, they are refused.
   * If the best configuration needs no other region to change, the request
     is authorized at once.
   * Otherwise each region that would have to change is sent a suggestion for
     its mode in that configuration.
3. **TreatResponses.** The coordinator waits until *every* suggested controller
   has answered.
   * If all accept, the requesters and the suggested controllers are all
     authorized, each for its mode in that configuration.
   * If any refuses, the next configuration in the ranking is tried.
   * When no configuration is left, the requesters get a refusal.
4. Every decision ends the coordination and drops `coord_inprogress`.

The coordinator keeps its own copy of the current global configuration
(`config_modes`). It starts at configuration `INIT_CONFIG` and is updated
with every authorization.

### Link timing

Each controller has its own pair of links to the coordinator, of types
`ctrl2coord_t` and `coord2ctrl_t`. All signals are one-cycle valid pulses.

| Event | When |
|---|---|
| request raised by a controller | seen by the coordinator in the same cycle |
| decision or first suggestions | 2 cycles after the request |
| response to a suggestion | 1 cycle after the suggestion |
| decision after the last response | 1 cycle later |
| `load` to the reconfiguration register | 1 cycle after an authorization |
| current mode updated | 2 cycles after the processor's "loaded" write |

A request that is authorized directly takes 2 cycles to its decision. A
request with one round of suggestions takes 2 + (response time + 1) cycles.

### The GC table

`GC` is a packed parameter: `GC[i][k]` is the mode of region i in global
configuration k, numbered from 0. The default is three configurations, with
configuration k placing every region in mode k + 1:

| configuration | every region in mode |
|---|---|
| 0 | 1 |
| 1 | 2 |
| 2 | 3 |

So a single region that wants to change forces all the others to follow,
which is what makes suggestions necessary. Any other table of the same shape
can be given, for example one that allows mixed modes.

## Processor register bus

A simple synchronous bus: `proc_valid`, `proc_we`, `proc_addr`,
`proc_wdata[7:0]`. Reads return `proc_rdata` one cycle later, together with
`proc_rvalid`.

| address | read | write |
|---|---|---|
| 0 | user performance level (reset 1) | new level; writes of 0 or above `N_MODES` are ignored |
| 1 + i | `{pending, 4'b0, mode}`: region i's reconfiguration register | "mode `wdata[2:0]` has been loaded into region i" |

The expected processor loop:
1. Read every region register.
2. For each pending register, load the bitstream for that mode.
3. Write the mode back to the region's address.

A "loaded" report clears `pending` only if it names the mode the register
holds. A new load command overrides a report that arrives in the same cycle.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `N_REGIONS` | 4 | regions / controllers |
| `N_HFILTER` | `N_REGIONS/2` | how many of them use `H_POWER` |
| `N_MODES` | 3 | modes per region (up to 7) |
| `K_CONFIGS`, `GC` | 3, all-equal columns | allowed global configurations |
| `INIT_CONFIG` | 0 | configuration after reset |
| `H_POWER`, `V_POWER` | 60/40/20, 70/50/30 | power per mode (ratios only) |
| `A_FRAC`, `B_FRAC` | 7500/5625, 500 | thresholds a_j and hysteresis b, in 1/10000 |
| `BATT_W`, `FULL_BATTERY` | 32, 1 000 000 | battery level width and full value |
| `ADDR_W` | 8 | processor address width |

At the defaults, yosys maps the top to about 750 cells, of which about 220 are
flip-flops.

## Simulation

Each block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. The testbench for the whole design is
`tb_semi_distributed_control`. It drives the top at its default parameters
together with three behavioural models:

* `tb/processor_model.sv` reads the registers every 64 cycles and spends 16
  cycles on each load.
* `tb/battery_model.sv` drains energy in proportion to the modes being run,
  then recharges once empty.
* `tb/scenario_bench.sv` contains the scenario.

The scenario has four coordinations in about 11,000 cycles. The battery
starts full with every region in mode 1.

1. The battery falls below 75 %. Every controller asks for mode 2 in the same
   cycle, and the coordinator authorizes them directly, without suggestions.
2. The battery falls below the vertical filters' mode-2 threshold (401786).
   The vertical controllers ask for mode 3. The horizontal controllers receive
   suggestions for mode 3 and accept them, since mode 3 draws less power.
3. The battery empties and starts to recharge, and the user selects level 2.
   At 408334 the horizontal controllers may enter mode 2 and ask for it. The
   vertical controllers are still below their own threshold (437500), so they
   refuse the suggestion, and the request is refused.
4. At 437500 the vertical controllers ask for mode 2. The horizontal
   controllers accept the suggestion, and every region returns to mode 2.

The testbench checks the following:
* the requesters, the modes and the battery level of each coordination;
* that the system ends with every region in mode 2;
* that every mechanism happened at least once: requests, suggestions,
  acceptances, refusals, authorizations, loads and refused flags.

`tb_scaling` runs the same scenario with 2, 6, 8 and 10 regions.

With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/sdc_pkg.sv tb/tb_semi_distributed_control.sv \
  --top-module tb_semi_distributed_control
./obj_dir/Vtb_semi_distributed_control
```

For another testbench, change the testbench file and the top module name.
`-y` lets Verilator find the other modules by their file names. The testbenches use no x/z checks, so a two-state simulator is
enough. All state is reset by `rst_n`, which is active low and asynchronous.

## How far it can be trusted, and where it departs from the reference

**Reproduced:**
* the control structure: per-region monitoring, decision and reconfiguration
  modules, plus a coordinator;
* the coordinator's three modes and the ordering of possibilities by number
  of reconfigurations;
* the controller's request and response rules for the filter example;
* the threshold constants and the hysteresis;
* the four-region scenario: four coordinations, ending with every region in
  mode 2.

**Own choices, not given by the reference:**
* The link protocol and its timing.
* The processor bus, its address map and its data layout.
* The coordinator keeps its own copy of the global configuration.
* A coordination step waits for all responses, so a late answer can never be
  mistaken for one to the next possibility.
* A request that no configuration holds is refused without suggestions.
* Refused flags are cleared when the region's mode changes.
* No request is sent while a load is outstanding.
* When rules conflict, the user level comes first, then the battery, then an
  upward move.
* One user level is shared by all regions.
* Thresholds are rounded up.
* In the filter automaton, a condition of the form "guard and level or
  battery" is read as "guard and (level or battery)". Without this, a
  battery-driven request could be sent during a coordination.

**Not included:**
* the filter accelerators themselves;
* the processor software;
* the FPGA configuration port;
* the battery sensor.

Their places are the bus ports and `battery_level`. The area and power figures
of a real FPGA implementation are not reproduced.

**Verification:**
* Every module's testbench compares against values computed independently in
  the testbench, for example the thresholds by exact cross-multiplication.
* Each testbench has been shown to fail on a deliberately broken copy of its
  module.
* Assertions in `decision_module` and `coordinator` check the link rules in
  every simulation:
  * no suggestion to a controller that is waiting for a decision;
  * no request during a coordination;
  * responses only to outstanding suggestions;
  * decisions only for valid modes.
