# Attack/Decay frequency and voltage control for a multiple-clock-domain processor

A multiple-clock-domain (MCD) processor splits the core into regions that each
run on their own clock and supply voltage. Here there are four domains:

| Domain      | Contents                                    | Queue at its input            | Controlled |
|-------------|---------------------------------------------|-------------------------------|------------|
| front end   | I-cache, fetch, branch prediction, rename, dispatch, ROB | none           | no, fixed at 1.0 GHz / 1.2 V |
| integer     | integer issue queue, ALUs, register file    | integer issue queue, 20 entries | yes |
| floating point | FP issue queue, FP ALUs, register file   | FP issue queue, 15 entries    | yes |
| load/store  | load/store queue, L1 D-cache, L2 cache      | load/store queue, 64 entries  | yes |

A domain that is not on the critical path can run slower, and at a lower
voltage, with little loss of performance. This RTL decides, on line and
separately for each back-end domain, how fast that domain should run. The
measure it uses is the occupancy of the queue in front of the domain: the
front end fills the queue and the domain drains it. If the queue holds
noticeably more entries than in the previous interval, the domain is not
keeping up. If it holds noticeably fewer, the domain has slack.

The control law is an envelope follower called *Attack/Decay*. It reacts
quickly, by a fixed large step, to a significant change in queue utilization
(the *attack*). When nothing significant changes it lets the frequency sink
slowly (the *decay*). The step size is fixed rather than proportional to the
error. That gives a rougher envelope, but the loop cannot oscillate badly,
even though frequency and utilization are only correlated and not linearly
related.

The hardware is small: one interval counter, one cycle counter, and per
domain an accumulator, a subtractor, two comparisons, a serial multiplier
and two 4-bit counters.

## The algorithm, one interval at a time

The processor's run is cut into intervals of 10,000 retired instructions.
During an interval each controlled domain adds its queue occupancy to an
accumulator on every one of its own clock cycles; call the total `U`. The
front end counts how many of its cycles the interval took; call that `C`.
Intervals hold a fixed number of instructions, so `C` is proportional to
1/IPC, and `C / C_prev` equals `IPC_prev / IPC`. `U_prev` and `C_prev` are
the values of the previous interval.

At the end of each interval the domain's controller picks one decision, in
this priority order:

| Decision | Condition | New frequency |
|---|---|---|
| forced down | frequency has been at 1.0 GHz for `EndstopCount` (10) intervals | f / (1 + ReactionChange) |
| forced up | frequency has been at 250 MHz for `EndstopCount` intervals | f / (1 − ReactionChange) |
| attack up | `U − U_prev > U_prev · DeviationThreshold` | f / (1 − ReactionChange) |
| attack down | `U_prev − U > U_prev · DeviationThreshold` and no IPC drop | f / (1 + ReactionChange) |
| decay | no significant change (including an unused domain, `U = 0`) and no IPC drop | f / (1 + Decay) |
| hold | a decrease was due but the IPC dropped | unchanged |

An *IPC drop* means `C − C_prev > C_prev · PerfDegThreshold`, i.e. the
interval took more than 2.5 % longer than the last one. A performance loss
that size is usually a property of the program phase and not of this
domain's clock. The controller therefore does not lower the frequency in
that interval. Frequency *increases* are never blocked.

Each change is applied to the clock **period**, so the frequency is divided
by (1 ± x). After scaling, the frequency is clamped to the 250 MHz … 1.0 GHz
range. Two endstop counters then count consecutive intervals spent at either
end of the range. After `EndstopCount` such intervals the next decision is
forced away from that end, which keeps a domain from settling at an end point
where the utilization no longer responds to its frequency. A counter clears
on the interval after it fires.

Default parameters (all module parameters, in thousandths of a percent):

| Parameter | Default | Range that fits the widths |
|---|---|---|
| `DEV_THRESH_MPCT` (DeviationThreshold) | 1750 = 1.75 % | 0 … 2.5 % and beyond |
| `REACTION_MPCT` (ReactionChange) | 6000 = 6.0 % | 0.5 … 15.5 % |
| `DECAY_MPCT` (Decay) | 175 = 0.175 % | 0 … 2 % |
| `PERF_DEG_MPCT` (PerfDegThreshold) | 2500 = 2.5 % | 0 … 12 % |
| `ENDSTOP_COUNT` | 10 intervals | 1 … 25 (counter width follows) |

Sensible settings lie roughly at DeviationThreshold 0.75–1.75 %,
ReactionChange 3–12 % and Decay 0.5–1.5 %. Smaller deviation thresholds
cause frequent attacks, which keep the clock generator and regulator busy.

## Number formats

* **Frequency** is held as MHz with 6 fraction bits in 16 bits. 1.0 GHz is
  64000 and 250 MHz is 16000.
* **Percentages** become Q16 fractions when the design is elaborated
  (`mcd_dvfs_pkg::mpct_to_q16`), rounded. For example, 1.75 % becomes 1147.
* **Scale factors** are the Q16 reciprocals of the period factors
  (`period_scale_q16`), rounded, in 17 bits:

  | Step | Constant |
  |---|---|
  | attack up, 1/0.94 | 69719 |
  | attack down, 1/1.06 | 61826 |
  | decay, 1/1.00175 | 65422 |

* **Products** are truncated: `new_f = (f · K) >> 16` and
  `threshold = (prev · T) >> 16`.
* **Queue utilization** is a 16-bit saturating sum. It saturates at 65,535,
  for instance a 15-entry queue kept full for more than 4,369 cycles. A
  saturated interval reads as the maximum. This is a deliberate economy: the
  algorithm only looks at changes and adapts, so the error is small. The
  `util_saturated` output shows when it happens.
* **Interval cycle count** is 20 bits, saturating. That covers CPI up to
  about 104.

The output is rounded to the nearest of 320 operating points, spaced
linearly from 250 MHz (point 0) to 1.0 GHz (point 319). The supply voltage
runs linearly with the point from 650 mV to 1200 mV:
`f_point = round((f − 250 MHz) · 319 / 750 MHz)` and
`v_mv = 650 + round(f_point · 550 / 319)`. The controller keeps its finer
internal frequency because a single decay step at 1 GHz (1.75 MHz) is
smaller than the 2.35 MHz point spacing: a quantised register would never
decay.

## Structure and clock domains

```
 front-end clock (1 GHz)                         domain clock k (250 MHz .. 1 GHz)
 ┌──────────────────┐ interval_end ┌───────────┐  interval_tgl   ┌──────────────────────────────────┐
 │ interval_counter ├─────────────►│ipc_counter├──────────────┬─►│ cdc_toggle_sync ─► pulse          │
 │ 10,000 instr.    │              │ cycles/int├─cycles_last──┼─►│ queue_util_counter ◄── occ        │
 └──────▲───────────┘              └───────────┘  (stable for │  │ attack_decay_ctrl                 │
   retire_cnt                                      a whole    │  │   serial_multiplier, 2 x endstop  │
                                                   interval)  │  │ freq_volt_map ─► f_point, v_mv    │
                                                              │  └──────────────────────────────────┘
                                                              └─► (same for the other two domains)
```

The interval boundary is the only thing that crosses from the front end into
each domain, together with the interval cycle count (the IPC measure). All
per-domain work happens on the domain's own clock, which is what lets each
domain be controlled locally.

The crossing uses a toggle:

* `ipc_counter` flips `interval_tgl` at each boundary and latches the cycle
  count into `cycles_last` at the same moment.
* Each domain passes the toggle through two flip-flops and turns the change
  into a one-cycle pulse.
* `cycles_last` stays unchanged for a whole interval, which is at least 910
  front-end cycles at the full retire width of 11. That is far longer than
  the 2–4 domain cycles the toggle needs, so the count is sampled on the
  pulse without a synchroniser of its own.

This only holds while intervals stay much longer than the controller latency.
An assertion in `domain_dvfs_ctrl` checks that.

Per domain, the sequence after the pulse is:

1. The utilization accumulator closes the interval, counting the pulse cycle
   in it, and restarts at zero.
2. One cycle later `attack_decay_ctrl` starts. A single shift-and-add
   multiplier (`serial_multiplier`, 17 cycles per product) is used three
   times: `U_prev · DeviationThreshold`, then `C_prev · PerfDegThreshold`,
   then, if the decision is not *hold*, `f · K`.
3. The decision is taken between the second and third products. The result
   is clamped, the endstop counters step, and `update` pulses.

`update` follows the start by 57 domain cycles (39 on a hold), and the
synchronised pulse by 58 (40). At 250 MHz that is 232 ns, against a shortest
possible interval of 910 ns.

## Files

| File | Contents |
|---|---|
| `rtl/mcd_dvfs_pkg.sv` | formats, ranges, the decision enum `ad_mode_e`, Q16 helper functions |
| `rtl/mcd_dvfs_top.sv` | top: front-end counters and the three domain controllers |
| `rtl/interval_counter.sv` | 14-bit retired-instruction counter, interval boundary |
| `rtl/ipc_counter.sv` | cycles per interval, boundary toggle |
| `rtl/cdc_toggle_sync.sv` | two-flop toggle synchroniser |
| `rtl/domain_dvfs_ctrl.sv` | everything for one domain |
| `rtl/queue_util_counter.sv` | saturating occupancy accumulator |
| `rtl/attack_decay_ctrl.sv` | decision logic, sequencing, range check |
| `rtl/serial_multiplier.sv` | shift-and-add multiplier |
| `rtl/endstop_counter.sv` | consecutive-intervals-at-an-extreme counter |
| `rtl/freq_volt_map.sv` | frequency to operating point and voltage |

### Top-level interface (`mcd_dvfs_top`)

Domain index 0 is integer, 1 is floating point and 2 is load/store.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `fe_clk`, `fe_rst_n` | in | 1 | front-end clock and active-low synchronous reset |
| `retire_cnt` | in | 4 | instructions retired this front-end cycle (0..11) |
| `dom_clk`, `dom_rst_n` | in | 3 | domain clocks from the clock generators, and their resets |
| `int_iq_occ`, `fp_iq_occ`, `lsq_occ` | in | 5, 4, 7 | valid entries in each queue this domain cycle |
| `dom_f_point` | out | 3×9 | requested operating point |
| `dom_v_mv` | out | 3×11 | requested supply voltage, mV |
| `dom_f_q` | out | 3×16 | internal frequency, MHz·64 |
| `dom_mode` | out | 3×`ad_mode_e` | decision of the last interval |
| `dom_update` | out | 3 | one-cycle pulse (domain clock) with each new setting |
| `dom_util_saturated` | out | 3 | last interval's utilization saturated |
| `interval_end`, `instr_cnt`, `interval_cycles` | out | 1, 14, 20 | front-end observation |

All domains reset to 1.0 GHz with no history. The first interval therefore
sees a rise from zero and attacks up, which the range check absorbs.

## What is not in the RTL

* **The processor.** Caches, fetch, rename, the issue queues themselves, the
  ALUs and main memory are not included. The design only needs the queues'
  occupancy counts and the retire count, which are ports.
* **Clock generators and voltage regulators.** These are analog parts.
  `tb/domain_pll_model.sv` is a behavioural model for simulation. It follows
  the requested point at 49.1 ns per MHz, keeps clocking through the change,
  and adds about 110 ps of Gaussian-like jitter per period.
* **Inter-domain data synchronisers.** The data queues between domains need
  synchronising FIFOs with an arbitration window of about 300 ps (30 % of a
  1 GHz cycle). Those circuits come from elsewhere and are not part of this
  controller. Only the controller's own crossing is built here.
* **A front-end controller.** The front end stays at 1.0 GHz. It has no input
  queue to measure, and slowing it degrades performance almost linearly.

## Where this implementation makes its own choices

* **IPC test.** A decrease is blocked when the IPC *fell* by more than
  PerfDegThreshold, measured as the relative growth of the cycle count. An
  IPC rise never blocks. This is the reading of "if the IPC change exceeds the
  threshold, leave the frequency unchanged" that matches its stated purpose,
  filtering out program-phase slowdowns.
* **Instructions past a boundary.** Those retired beyond the 10,000th in the
  boundary cycle count toward the next interval.
* **Widths.** The interval counter is 14 bits and the utilization
  accumulator 16 bits, as budgeted by the design. The cycle counter (20 bits),
  the frequency format (16 bits, 6 fraction bits) and the multiplier (20 × 17)
  are this implementation's.
* **Threshold products.** These reuse the frequency multiplier instead of
  having their own constant multipliers or masks, trading latency for area.
* **Reset.** Reset is synchronous and active-low, one per clock domain.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_mcd_dvfs_pkg` | Q16 conversions against real arithmetic over 0–15.5 % |
| `tb_interval_counter` | 60,000 cycles of random retire counts; boundary pulses and overshoot |
| `tb_ipc_counter` | interval lengths; toggle; saturation (narrow instance) |
| `tb_cdc_toggle_sync` | unrelated clocks; one pulse per toggle, 2–4 cycle latency |
| `tb_queue_util_counter` | random occupancy; saturation |
| `tb_serial_multiplier` | edge and random operands; exact latency |
| `tb_endstop_counter` | random at-extreme sequences against a model |
| `tb_freq_volt_map` | every one of the 65,536 input codes against real arithmetic |
| `tb_attack_decay_ctrl` | about 1,200 intervals against `tb/ad_ref_pkg.sv`, covering all six decisions; latency 57/39 |
| `tb_domain_dvfs_ctrl` | one domain across the clock crossing; phases that force every decision and a saturated interval |
| `tb_mcd_dvfs_top` | whole design at its default parameters (below) |

`tb_attack_decay_ctrl` runs about 1,200 intervals against the reference
model. The reference model derives its constants with real arithmetic,
independently of the RTL.

`tb_domain_dvfs_ctrl` checks every interval with `tb/ad_domain_checker.sv`,
which accumulates the occupancy it drives and runs the reference model.

`tb_mcd_dvfs_top` runs the whole design at its default parameters:

* The front end runs at 1 GHz and the three domain clocks come from the
  clock-generator model.
* The workload is about 940 intervals (9.4 M instructions), shaped like a
  media decoder whose FP unit idles between bursts.
* The FP domain decays to 250 MHz and gets forced attacks at the lower
  endstop. A burst with falling IPC drives attacks up, upper-endstop forced
  attacks and holds. A draining load/store queue drives attacks down. A full
  load/store queue saturates its accumulator. Random traffic follows.
* A scoreboard checks every interval of every domain, together with the
  cycle count of each interval and that the clock model actually slews down
  to 250 MHz.

It takes a few seconds.

`tb_epic_fp_workload` runs the whole design at its defaults on 670 intervals
in which the FP unit is unused except for two phases: light activity, then a
nearly full FP queue. It checks every interval, and that the FP frequency
decays while idle and rises when FP work appears. It also shows a property of
the 16-bit accumulator. A busy 15-entry queue sums to well over 65,535 in
10,000 instructions, so once the domain is fast enough the utilization
saturates. From then on the controller sees no change and slowly decays,
from about 985 MHz to 890 MHz over the rest of the phase. Widening
`UTIL_W` (18 bits covers a full 64-entry queue at CPI 0.4, or a 15-entry queue
at CPI 1.7) removes this if it matters.

`tb_attack_decay_sweep` builds the Attack/Decay controller at seven
parameter settings side by side: the default, and corners of the ranges used
for the sensitivity study (DeviationThreshold 0 to 2.5 %, ReactionChange 0.5
to 15.5 %, Decay 0 to 2 %, PerfDegThreshold 0 to 12 %, EndstopCount 1 to 25).
Each one runs 2,400 intervals checked against the reference model with the
same settings. The stimulus is a random walk, a flat stretch, a steady fall to
idle and a steady climb, so every setting except the slowest reaches both
endstops and takes forced attacks there.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mcd_dvfs_pkg.sv tb/ad_ref_pkg.sv tb/tb_mcd_dvfs_top.sv \
    --top-module tb_mcd_dvfs_top -o sim && ./obj_dir/sim
```

Replace the testbench file and top module name for the others. `tb/ad_ref_pkg.sv`
is only needed by the testbenches that use the reference model.

The controller was checked against the algorithm in exact integer
arithmetic. It was not checked against any energy or performance results:
those depend on the processor, which is not part of this RTL.
