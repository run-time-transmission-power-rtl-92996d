# Run-time transmit power calibration and energy-aware packet relocation for a wireless NoC

In a wireless network-on-chip (WiNoC), clusters of cores share millimetre-wave
radio hubs. Each hub can reach every other hub in one hop over the air. The radio
transmitter uses most of the communication energy. Usually every hub transmits at
one fixed, worst-case power. That power is chosen so the farthest, most
attenuated receiver still meets the bit-error-rate (BER) target, which wastes
power on every nearer receiver. A fixed power also makes the busiest hubs
run much hotter than the rest.

This RTL is the digital control plane that fixes both problems for the radio
hubs of a 64-core WiNoC:

* **Closed-loop transmit power calibration.** A central power manager keeps a
  power level for every directed hub pair. At run time it checks each link by
  having the source send a known training burst at a trial level. The
  receiving hub counts the bit errors, and its pass/fail verdict moves the
  link's level up or down. Each link ends up at the lowest level that still
  meets the error requirement. When conditions change, the next calibration
  passes follow the change. No offline characterisation of the on-chip
  channel is needed.
* **Energy-aware packet relocation.** Each hub measures the energy its
  transmitter spent in the current window. While that energy is over a
  threshold, the hub hands its outgoing wireless packets over the wired link to
  an adjacent hub that is under the threshold. That hub then sends them to the
  destination, which spreads the radio energy across the chip.

Both mechanisms run together, which gives the joint scheme. A relocated packet
is sent at the level calibrated for the neighbour's own link to the destination.
The inputs `pc_en` and `reloc_en` switch each mechanism off on its own. With
both off, the design behaves like a fixed-maximum-power WiNoC. All four
configurations can therefore be compared on the same hardware.

The RF front ends, the antennas, the wireless channel, the wired mesh routers
and the wireless medium-access protocol are outside this RTL. They connect
through plain ports (see *Top-level interface*).

## Structure

```
winoc_radio_ctrl                       top: 16 hubs on a 4x4 grid + 1 power manager
 ├─ tx_power_manager                   level table [src][dst], calibration FSM, lookup ports
 └─ radio_hub  x N_HUBS                one per hub (4 cores each)
     ├─ packet_relocator               local transmitter or an adjacent one?
     ├─ radio_tx                       5-way round-robin arbiter, flit sender, probe handling
     │   └─ training_tx                PRBS-9 training burst generator
     ├─ energy_monitor                 windowed energy meter + threshold flag
     └─ ber_estimator                  receive-side error counter + verdict
winoc_pkg                              shared constants, direction enum, PRBS and energy functions
```

Each hub has four relocation links, one to each adjacent hub (N, E, S, W). On a
link, the sending side's `nb_out_*` connects to the receiving side's `nb_in_*`
for the opposite direction. Edge hubs have their missing links tied off.

## Power calibration loop

This is the heart of the design. Its state is small: one level code
(`$clog2(LEVELS)` bits) per ordered hub pair, held in flip-flops inside
`tx_power_manager`. After reset every entry is the maximum level, so an
uncalibrated system behaves like a fixed worst-case WiNoC.

**When a pass runs.** The manager is idle for `RP_CYCLES` cycles (the
reconfiguration period), or until `cal_req` is pulsed. It then enters its
reconfiguration state (`reconfig` = 1) and walks over all `N_HUBS*(N_HUBS-1)`
ordered pairs, source-major: (0,1), (0,2) … (15,14). The period counter only
counts while the manager is idle, so `RP_CYCLES` is the gap between the end of
one pass and the start of the next.

**One pair, at most two probes.** Let `L` be the pair's current level.

| step | probe level | verdict | action |
|------|-------------|---------|--------|
| 1 | `L`   | fail | `L := L+1` (saturates at the top); pair done |
| 1 | `L`   | pass, `L = 0` | pair done |
| 1 | `L`   | pass, `L > 0` | go to step 2 |
| 2 | `L-1` | pass | `L := L-1`; pair done |
| 2 | `L-1` | fail | keep `L`; pair done |

Two properties follow, and the tests check both:

* a link moves by at most one level per pass. From reset, a link whose
  requirement is `r` sits at `max(LEVELS-1-k, r)` after `k` passes, so full
  convergence takes up to `LEVELS-1` passes;
* a link that gets worse is pushed up one level per pass until it meets its
  requirement again, so a drop of `n` levels is repaired within `n` passes.

**A probe.** The manager raises `probe_valid` with `probe_src`, `probe_dst` and
`probe_level`, and holds them until the source hub's transmitter takes the
probe (`probe_ready`). The transmitter takes it only between packets, but ahead
of any waiting packet. It then sends `BURST_BITS` bits of a PRBS-9 sequence
(x⁹ + x⁵ + 1, seed `9'h1FF`), one per cycle, at the probe level on
`rf_train_en` / `rf_train_bit`. The destination hub's `ber_estimator`
regenerates the same sequence and counts mismatches. It needs the channel to
deliver the bits in order but not in consecutive cycles. After the last bit it
pulses `verdict_valid` with `pass = (errors <= MAX_ERR)`. The top routes the
verdict of hub `probe_dst` back to the manager. If no verdict arrives within
`TIMEOUT` cycles of the handshake, the probe counts as failed. A link whose
bits never arrive therefore climbs back to maximum power instead of
locking up the calibration.

**Cost.** At the defaults, one probe takes about 260 cycles: 256 bits, plus the
handshake, the done cycle and one cycle of channel latency in the test. A full
pass therefore takes about 240 × 2 × 262 ≈ 126 000 cycles when the hubs are
otherwise idle. The end-to-end test measures about that: 15 back-to-back passes
end at cycle 1.9 M while traffic is running. Data traffic is never stopped
during a pass. A link keeps using its committed level until the pass updates it.

**What the error requirement means.** `MAX_ERR = 0` over 256 bits is a crude
stand-in for a BER target such as 10⁻¹². A real target of that size cannot be
measured in a burst. The verdict is a go/no-go check that the link has margin
at the probed level. Raise `BURST_BITS` and `MAX_ERR` together to make it a
statistical estimate.

## Energy metering and relocation

`energy_monitor` adds `level + 1` energy units for every flit its hub sends
(`winoc_pkg::flit_energy`). This is a linear model of the PA's energy against
the level code. The meter restarts every `WINDOW` cycles, and `over` is high
while the window's sum exceeds `THRESH`. Training bursts are not metered.

`packet_relocator` is a one-entry registered stage between the cluster and
the transmitter. It decides when it accepts a packet:

1. if this hub is not `over`, the packet stays local;
2. otherwise it goes to the adjacent hub with the lowest energy among those
   that exist on the grid, are not `over`, and are not the packet's own
   destination. Ties go N, E, S, W;
3. if there is no such neighbour, the packet stays local.

The decision is fixed at acceptance and held until the target takes it. A
relocated packet goes one hop at most: the receiving hub's `radio_tx` treats it
like its own traffic and never relocates it again.

`radio_tx` serves five sources: its own relocator (index 0) and the four
neighbours (1–4 = from N, E, S, W). It uses round-robin, restarting after the
last granted source. A packet of `F` flits takes `F` cycles starting the cycle
after its grant (`F = 0` is sent as one flit), and there is one idle cycle
before the next grant. Each flit strobes `rf_data` with `rf_dst` and
`rf_level`. `rf_level` is read live from the manager's table for
(this hub, `rf_dst`).

## Top-level interface (`winoc_radio_ctrl`)

All per-hub ports are packed arrays indexed by hub number. Hub `h` sits at
(x, y) = (`h % GRID_X`, `h / GRID_X`).

| port | dir | meaning |
|------|-----|---------|
| `pc_en` | in | run-time power control on; off: no passes, every flit at maximum level (the table is kept) |
| `reloc_en` | in | packet relocation on; off: every packet leaves through its own hub |
| `cal_req` | in | start a calibration pass now (ignored during a pass or while `pc_en` is low) |
| `pkt_valid/pkt_ready/pkt_dst/pkt_flits` | in/out | wireless packets from each cluster (destination hub, length in flits) |
| `rf_data, rf_dst, rf_level` | out | per hub: a data flit is on air this cycle, to this hub, at this level code |
| `rf_train_en, rf_train_bit` | out | per hub: training bit on air (its `rf_dst`/`rf_level` apply too) |
| `rf_rx_en, rf_rx_bit` | in | per hub: training bit received by this hub |
| `energy, over` | out | per hub energy in the current window and threshold flag |
| `n_reloc, vd_errs` | out | per hub: packets relocated away; error count of the last burst received |
| `reconfig, n_passes, n_up, n_down, n_timeout` | out | manager state and event counters |

Reset is active-low and asynchronous (`rst_n`). There is one clock.

## Parameters

All defaults live in `winoc_pkg`. The 64-core system size comes from the
source design. Every other value is this design's own choice.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_HUBS`, `GRID_X` | 16, 4 | radio hubs (4 cores each) and grid width |
| `LEVELS` | 16 | transmit power levels; code 0 is the lowest |
| `BURST_BITS`, `MAX_ERR` | 256, 0 | training burst length; allowed bit errors per burst |
| `RP_CYCLES` | 200 000 | idle cycles between calibration passes |
| `TIMEOUT` | 1024 | cycles to wait for a verdict |
| `E_W`, `THRESH`, `WINDOW` | 24, 20 000, 10 000 | energy accumulator width, threshold, window length |

## How far to trust it, and where it is its own design

The source design specifies only the behaviour of the two mechanisms:

* the transmit power of each source/destination hub pair is tuned at run time
  from a BER estimate made at the receiver, to meet a maximum error rate with
  minimum energy;
* the power manager is a separate unit that can cover all hubs;
* based on transmission energy and a predefined threshold, packets are routed
  to an adjacent transmitter;
* the two mechanisms can work jointly;
* the system is 64 cores.

Everything below that level is this design's own choice:

* a central manager rather than one per hub;
* training bursts and PRBS-9;
* the two-probe step rule, the timeout and the pair order;
* the linear energy model and the windowed threshold;
* neighbour selection by lowest energy, and the rule that skips the
  destination;
* the arbitration;
* the `pc_en` / `reloc_en` switches;
* the hub count and grid;
* every width and size.

The original work was evaluated in a network simulator and reported energy
savings there. This RTL has not been calibrated against those numbers and does
not reproduce them.

Known simplifications:

* The wired network is reduced to direct valid/ready links between adjacent
  hubs. Packets are descriptors (destination and length), with no payload.
* Only one calibration probe is in flight at a time, so the wireless channel
  never carries two training bursts to the same receiver.
* The wireless MAC is not modelled. Several hubs may strobe `rf_data` in the
  same cycle, and the external radio side must handle that.
* A hub sending to itself is not excluded in hardware; the clusters are
  expected not to do it.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks against an independent reference |
|-----------|-------------------------------------------------|
| `tb_training_tx` | every burst bit against its own PRBS-9, burst length, `done` timing, `start` ignored while busy |
| `tb_ber_estimator` | error counts (0–5 flips, including the last bit), verdict, one-cycle verdict latency, gaps in `rx_en` |
| `tb_tx_power_manager` | table after each pass = `max(LEVELS-1-k, req)`, step-up on degradation, timeouts, timer-started passes (4 hubs, 4 levels) |
| `tb_energy_monitor` | energy and `over` every cycle, window restart, saturation |
| `tb_packet_relocator` | decision for random energy states on an inner and a corner hub, hold under back-pressure, counter |
| `tb_radio_tx` | round-robin order, contiguous flits, level lookup, probe priority, burst content |
| `tb_radio_hub` | light traffic stays local with the right energy; over threshold: lowest-energy neighbour, skip over-threshold and destination neighbours, fallback to local; incoming relocated packets sent; looped-back probes give the right error count |
| `tb_winoc_radio_ctrl` | whole design at default sizes (see below) |
| `tb_winoc_configs` | one fixed workload in all four configurations, at default sizes (see below) |

`tb_winoc_radio_ctrl` runs the top unchanged. A behavioural channel
(`tb/rf_channel_model.sv`) gives each pair a required level
`min(15, 2·manhattan(s,d) + (s+d) mod 3)`. Below that level it flips each
training bit with probability 1/4. All hubs send light random traffic, and hub
5 sends back-to-back. The test:

* checks the table after passes 1–3 and at convergence;
* checks that every data flit after convergence leaves at exactly the required
  level of its link;
* checks that flits are conserved for every destination;
* degrades one link by two levels and silences another;
* counts the mechanisms, each of which must occur: power-down steps, power-up
  steps, probe timeouts, relocations, threshold crossings, passes started by
  the period timer, and failed verdicts.

A run covers about 4.3 M cycles, 32 passes and about 500 k relocated packets.
It takes about 13 s in Verilator. In that synthetic scenario, data flits sent
at the calibrated levels cost 51 % of the energy they would have cost at
maximum power, under the linear energy model.

The test also switches relocation off and checks that nothing more is
relocated. It then switches power control off and checks that every flit
leaves at the maximum level.

`tb_winoc_configs` runs one fixed synthetic workload four times, once per
configuration. Hub 5 offers 2000 back-to-back packets and every other hub
offers 100. The links are calibrated before the traffic starts. The table
shows data energy in level units (training excluded). This is one seed and one
channel map, so read it as an illustration of the mechanisms, not as a
benchmark:

| configuration | total energy | hub 5 | largest hub | relocated packets |
|---------------|-------------:|------:|------------:|------------------:|
| fixed maximum power | 252 512 | 144 176 | 144 176 | 0 |
| power control | 107 961 | 56 832 | 56 832 | 0 |
| relocation | 252 512 | 76 704 | 76 704 | 1128 |
| joint | 109 213 | 40 134 | 40 134 | 589 |

Power control cuts the total energy. Relocation moves energy away from the
overloaded hub: its share drops by about half. Relocation costs a little in
total energy under power control, because the neighbour's link to the
destination may need a higher level than the hub's own link. The test checks
these relations, not the exact numbers.

Running a test with plain Verilator, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_winoc_radio_ctrl \
    -y rtl -y tb +libext+.sv -Irtl rtl/winoc_pkg.sv tb/tb_winoc_radio_ctrl.sv
./obj_dir/Vtb_winoc_radio_ctrl
```

Replace the top-module and file name to run any other testbench. The package
must come first on the command line, and the other modules are found through
`-y`. Lint with `verilator --lint-only -Wall -y rtl rtl/winoc_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are benign:

* unused package constants, because each module imports the whole package;
* `SYNCASYNCNET` on `rst_n`, because the asynchronous reset is also the
  assertions' `disable iff` condition.
