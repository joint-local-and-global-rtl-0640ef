# Joint global and local energy adaptation for an out-of-order core

Real-time multimedia code processes data in frames. Each frame must be done by a deadline, and
the work per frame varies. This design is the control hardware that saves energy in two ways at
once. It implements the algorithms of *Joint Local and Global Hardware Adaptations for Energy*.

* **Global loop, once per frame.** A frame-level controller picks a processor configuration for
  each frame type: window size, number of integer ALUs and number of FPUs. It also picks a
  DVS clock frequency that lets the frame just meet its deadline. This uses up the frame's
  slack, the idle time that would otherwise be left before the deadline.
* **Local loops, every 200 cycles inside a frame.** Small hardware controllers watch how much
  the instruction window and the functional units are really used. They switch off what is idle
  and switch it back on when it would help. They try not to slow the program down at all.

The two loops are joined in a simple way. The globally chosen configuration is not applied
directly. It becomes a **ceiling** for the local loops, which then adapt freely below it. The
global loop measures the IPC that results, local adaptation included, and picks its frequency
from that. So any slowdown caused by the local loops is made up by the global loop, and
deadlines are still met.

The target processor is a MIPS R10000-like out-of-order core. It has a 128-entry unified
reorder buffer / issue queue (the *instruction window*), 192 integer and 192 FP physical
registers, 6 integer ALUs, 4 FPUs and 2 address generators. It fetches and retires 8
instructions per cycle and runs at 100 MHz to 1 GHz. The core itself is not part of this RTL.
`adapt_top` brings out, as ports, the signals the core must supply and the enables it must obey.

## Block structure

```
                    frame_start/type/deadline, frame_end/instr/cycles/energy
                                     │
                              ┌──────▼──────┐  freq_mhz, rf_*_active
                              │ global_ctrl │──────────────────────────►
                              └──────┬──────┘
                     ceilings: glob_cfg.iw_segs / .alus / .fpus
        ┌────────────────────────────┼──────────────────────────────┐
 ┌──────▼───────┐  avoid   ┌─────────▼────┐          ┌──────────────▼─┐ (x2: ALU, FPU)
 │iwtag_tracker │─────────►│ stalliw_ctrl │          │ hazardfu_ctrl  │
 │ 128 x 4-bit  │◄─────────│              │          └──────┬─────────┘
 └──────────────┘ MaxOvl   │              │                 │
 ┌──────────────┐ ysc_cnt, │              │                 │
 │ ysc_tracker  │─────────►│              │                 │
 └──────────────┘ commits  └──────┬───────┘                 │ target
                                  │ target           ┌──────▼─────┐
                           ┌──────▼─────┐            │ wake_delay │
                           │ wake_delay │            └──────┬─────┘
                           └──────┬─────┘                   │ active
                        seg_en, iw_segs_active       ┌──────▼─────┐ grants, hazards,
                                                     │ fu_select  │ last-unit use ──┐
                                                     └────────────┘   (fed back) ◄──┘
```

| module | role |
|---|---|
| `adapt_pkg` | shared constants, the 54-entry configuration table (`cfg_of_index`), the event struct |
| `adapt_top` | wires everything; the top of the design |
| `global_ctrl` | profiling, P/IPC³ choice, DVS frequency, register-file shrink |
| `stalliw_ctrl` | StallIW window-size controller, MaxOverlap computation |
| `iwtag_tracker` | per-entry IWtags and avoidable-stall measurement |
| `ysc_tracker` | counts youngest-segment issues and commits per cycle for `stalliw_ctrl` |
| `hazardfu_ctrl` | HazardFU unit-count controller (one instance per unit type) |
| `fu_select` | fixed-priority assignment of ready instructions to active units |
| `wake_delay` | 5-cycle power-up latency, immediate power-down |
| `seq_div` | one-bit-per-cycle restoring divider shared by the slow computations |

## Growing the window only when it would help: IWtags

This is the least obvious part of the design. The window is split into sixteen 8-entry
segments, and at least 2 segments always stay on. Shrinking is simple. At the end of each
200-cycle period, the window loses its youngest active segment if fewer than 40 instructions
issued from that segment during the period. The core flags each issue that comes from the
youngest active segment, and `ysc_tracker` turns the flags into a per-cycle count (`ysc_cnt`).
The tracker has a second mode (`YSC_AT_COMMIT = 1`) for the older form of this rule, which counts
only *committed* instructions that issued from the youngest segment. In that mode it keeps one
bit per window entry, written at issue and read at commit, so squashed instructions drop out.
With StallIW the tracker counts at issue: that is how StallIW's rule is stated, and it needs no
bit in the window beyond the 4-bit IWtag. With the PeriodicIW baseline (below) it uses the
per-entry bit, the one bit per entry that PeriodicIW costs.

Growing is harder. Growing the window on a fixed timer wastes energy. Instead the controller
estimates how many retirement stall cycles a fully active window would have avoided. It grows
by one segment once that estimate reaches 20 cycles within a period.

The estimate uses a 4-bit tag, the **IWtag**, on every window entry (`iwtag_tracker`):

1. **Entry.** An instruction that enters the window with all operands ready could have started
   earlier in a bigger window. How much earlier is estimated as
   `MaxOverlap = deactivated entries / IPC of the last period`. That is the number of cycles the
   m switched-off entries would have taken to fill at the current rate. The instruction is
   tagged with MaxOverlap. An instruction that enters with operands missing is tagged 0.
2. **Completion.** When an instruction completes, its tag is passed to every consumer for which
   it produced the *last* missing operand. If the producer itself stalled S cycles at the head
   of the window, it used up S cycles of the extra overlap. The consumer therefore gets
   `max(0, tag − S)`.
3. **Retirement.** An instruction that sat incomplete at the head of the window for S cycles
   stalled retirement. A bigger window could have hidden `min(tag, S)` of those cycles. That
   value goes to the controller as `avoid_cycles`.

The tracker counts S itself. It counts the cycles in which `head_stall` is high and resets the
count when the head retires. Only the head can have stalled, so one retirement report per cycle
is enough. S saturates at 15, which is enough because `min(tag, S)` never exceeds 15.

`stalliw_ctrl` adds up the reports. The window grows when the sum reaches 20, but only once at
least 40 youngest-segment issues have been seen in the period. This gives a pending shrink
priority. Growing clears the sum and starts a new period. The sum is also cleared at every
period end.

MaxOverlap is computed as `deactivated entries × 200 / commits of the last full period`,
saturated to 15. The divide is done on `seq_div`. It runs every second period, whenever the
window is resized, and whenever the global ceiling changes. Deactivated entries are counted up
to the global ceiling, since the local loop can never go beyond it.

## Functional units and issue width: HazardFU

`fu_select` gives each ready instruction the lowest-numbered unit that is active and not busy.
Busy means occupied by an unpipelined divide. Because of this fixed order, the last active unit
is only used when all the others are taken. That makes its use a good measure of whether the
pool is too big. A ready instruction that finds no unit is a **structural hazard**.

`hazardfu_ctrl`, one per unit type, works as follows:

* It **adds a unit** as soon as 80 hazards have been counted in the current period, without
  waiting for the period to end. The count then restarts.
* It **removes a unit** at the end of a period if the last active unit was used on at most 4
  cycles. No unit is removed at the end of a period that already added one.
* **ALUs:** at least one always stays on.
* **FPUs:** all of them may be switched off. The last FPU is only switched off if it was not used
  at all in the period. An FP instruction being fetched (`fp_fetch`) switches one FPU straight
  back on.

Issue width follows the active units. `adapt_top` reports it as active ALUs + active FPUs + 2.
The 2 are the address generators, which are never switched off.

Every increase passes through `wake_delay`. The new unit or segment becomes usable exactly
5 cycles after the request. Decreases take effect on the next clock edge.

## Baseline local controllers

The two local controllers that StallIW and HazardFU are measured against are also built in, as
parameters of the same modules. They are useful for comparing energy and IPC on one netlist.
Each is selected at the top with a one-bit parameter; the defaults are StallIW and HazardFU.

* **PeriodicIW** (`IW_PERIODIC = 1`, `stalliw_ctrl.PERIODIC`). It shrinks the window at a
  period end only if *no* instruction issued from the youngest segment. It grows the window by
  one segment at the end of every fifth period since the last size change. If a shrink is due
  at the same period end, the shrink wins. The IWtags are still kept but not used.
* **UtilFU** (`FU_UTIL = 1`, `hazardfu_ctrl.UTIL`). It ignores hazards. A unit is added at a
  period end if the last active unit was busy on at least 86% of the period's cycles (172 of
  200). Units are removed by the same 4-cycle rule as in HazardFU, except for the last FPU. That
  unit goes off after 3 unused cycles in a row. The count starts only once a newly requested
  unit has finished its 5-cycle power-up, and an FP fetch restarts it. Without this, an FPU woken
  by the last FP fetch of a burst would be switched off again before it ever came on.

## The global loop

`global_ctrl` keeps, for each frame type (3 by default, as for MPEG I/P/B frames):

* **Profiling phase.** The first 54 frames of a type run at 1 GHz. Each uses the next candidate
  configuration: window {128, 96, 64, 48, 32, 16} × ALUs {6, 4, 2} × FPUs {4, 2, 1}. At each
  frame end the controller computes IPC = instructions / cycles and P = energy / cycles, both in
  Q8 fixed point. It keeps the configuration with the smallest P/IPC³, compared without division
  as `P_a·IPC_b³ < P_b·IPC_a³`. For continuous DVS, this configuration run at just the frequency
  the deadline needs uses close to the least energy.
* **Adaptation phase.** Each later frame runs on the kept configuration at
  `f = I / (D × 0.96 × IPC)`, clamped to 100–1000 MHz. Here I is the previous frame's instruction
  count (the prediction), D is the deadline and IPC is the previous frame's measured IPC. The
  first adapted frame of a type is an exception. Its previous frame ran another configuration,
  so it uses the profiled IPC of the chosen configuration instead. The 0.96 is the 4 % IPC
  leeway. In units: `f[MHz] = I·3 200 000 / (D[ns]·IPC_Q8·12)`.
* **Register files.** One integer and one FP physical register are switched off for each window
  entry that the global choice switches off (`rf_*_active = 64 + 8 × segments`). The local window
  loop does not shrink the register files.

Protocol: pulse `frame_start` with `frame_type` and `deadline_ns` while `glob_ready` is high. The
configuration (`glob_cfg`) changes on the next cycle. `freq_valid` rises 1 cycle later for a
profiling frame, or about 66 cycles later when the divider has to run. Pulse `frame_end` with the
frame's instruction, cycle and energy counts. About 200 cycles of processing follow, during which
`glob_ready` is low. Assertions flag a frame event at the wrong time.

## Interface to the core

All signals are synchronous to `clk`. `rst_n` is an asynchronous active-low reset, and reset
turns everything on.

| group | signals | what the core must do |
|---|---|---|
| window entry | `disp_valid/idx/ready` ×8 | report each instruction entering an entry, and whether its operands were all ready |
| completion | `cpl_valid/idx/last_consumers` ×4 | report completing instructions, with a mask of the entries whose last missing operand they produce |
| head | `head_idx`, `head_stall`, `retire_head` | oldest entry, "head present but incomplete", "head retires now" |
| issue | `issue_valid/idx/young` ×12 | report each issued instruction, its window entry, and whether that entry is in the youngest active segment |
| commit | `commit_valid/idx` ×8 | report each committed instruction and its window entry |
| window enables | `seg_en[15:0]`, `iw_segs_active`, `max_overlap` | keep dispatch out of disabled segments; tag new entries with `max_overlap` |
| units | `alu_req`, `fpu_req`, `*_busy`, `fp_fetch` → `alu_grant`, `fpu_grant`, `alus_active`, `fpus_active`, `issue_width` | present ready-instruction counts; issue to the granted units |
| unit power | `alu_en`, `fpu_en` | gate each disabled unit together with its selection logic, its result-bus slice, its window wake-up port and its register-file ports |
| frames | see above | software frame calls and frame statistics; the energy comes from a power monitor outside this design |
| monitoring | `events` | one-cycle pulses for every adaptation decision |

## Parameters

The defaults are the published values. Widths, port counts and fixed-point formats are this
design's own.

| parameter | default | meaning |
|---|---|---|
| `IW_ENTRIES`, `SEG_ENTRIES`, `MIN_SEGS` | 128, 8, 2 | window, segment size, minimum active segments |
| `TAG_W` | 4 | IWtag bits |
| `NUM_ALU`, `NUM_FPU` | 6, 4 | unit pools |
| `PERIOD` | 200 | local decision period (cycles) |
| `IW_DEC_THR`, `IW_INC_THR` | 40, 20 | youngest-segment issues; avoidable stall cycles |
| `FU_HAZ_THR`, `FU_IDLE_MAX` | 80, 4 | hazards to add a unit; last-unit busy cycles to remove one |
| `WAKE_DELAY` | 5 | activation latency |
| `NUM_CFG`, `LEEWAY_PCT`, `F_MIN/MAX_MHZ` | 54, 4, 100/1000 | global candidates, IPC leeway, DVS range |
| `NUM_TYPES` | 3 | frame types tracked |
| `DISP`, `CPL` | 8, 4 | window-entry and completion report ports |
| `ISS`, `RET` | 12, 8 | issue and commit report ports (all units; the retire width) |
| `IW_PERIODIC`, `FU_UTIL` | 0, 0 | select the PeriodicIW / UtilFU baselines |
| `PIW_DEC_THR`, `PIW_GROW_PER` | 1, 5 | PeriodicIW: youngest-segment issues to keep the size; periods per growth |
| `UFU_UTIL_PCT`, `UFU_FP_IDLE` | 86, 3 | UtilFU: last-unit use to add a unit; idle run to drop the last FPU |
| `YSC_AT_COMMIT` | = `IW_PERIODIC` | 0: count youngest-segment issues at issue; 1: per-entry bit, counted at commit |

## Where this design makes its own choices

These points are not fixed by the published algorithms and were chosen here.

* **Instruction prediction.** The count of the last frame of the same type is used as the
  prediction. The published controller uses a history-based predictor whose details are given
  elsewhere.
* **Frequency limits.** At the frequency limits the result is simply clamped. The published
  special handling of these two cases is not reproduced.
* **Profiling frequency.** Profiling runs at 1 GHz. Candidates are profiled in index order
  `window·9 + ALU·3 + FPU`.
* **Thresholds.** The window grows when the avoidable-stall sum *reaches* 20 (≥). Units are added
  at ≥ 80 hazards.
* **No shrink after a growth.** No unit is removed at the end of a period in which one was added.
* **MaxOverlap.** It is also recomputed when the global ceiling changes. It is measured against
  the ceiling rather than the full 128 entries.
* **Youngest segment.** The core decides which segment is the youngest active one and flags
  each issue from it. In per-entry mode, an entry that issues and commits in the same cycle is
  counted with the new flag.
* **Core reporting.** The core reports the "last operand" dependence as a per-producer consumer
  mask. It reports hazards and requests as per-cycle counts.
* **Frame energy.** Frame energy is an input. Its units only need to keep energy/cycle under
  2¹² in Q8.

Not part of this RTL: the processor core, caches and memory, the voltage/frequency generator
(the voltage-per-frequency table is not given), and the power monitor.

## Simulating

Every testbench in `tb/` checks itself and ends with `TB_RESULT checks=N failures=M`. The files
are plain SystemVerilog-2017, and packages must come first:

```
verilator --binary --timing --assert -Irtl rtl/adapt_pkg.sv rtl/*.sv tb/tb_adapt_top.sv \
          --top-module tb_adapt_top -Mdir obj && ./obj/Vtb_adapt_top
```

| testbench | what it shows |
|---|---|
| `tb_adapt_top` | the whole design at its default size. A behavioural core runs integer-heavy, quiet, memory-bound and FP-heavy phases. Two frame types are profiled over all 54 configurations and then adapted at three deadlines. It checks ceilings, floors, enables, grants, issue width, register files, the 5-cycle wake-up of every growth and each frame's frequency. It requires every mechanism (window grow/shrink, ALU/FPU grow/shrink, FPU wake on fetch, ceiling cut, profiling completion, frequency clamp) to occur. It takes under a second. |
| `tb_baselines` | the same run and the same checks with the PeriodicIW and UtilFU baselines selected |
| `tb_workloads` | the nine evaluated applications (GSM, G.728, H.263 and MPEG-2 decoders/encoders, MP3 decoder) at their real frame sizes and deadlines (50 µs to 66.6 ms, up to 6·10⁷ instructions per frame, up to 3 frame types). Only the frame calls are driven. It checks profiling, the choice, the frequency, and that the predicted frame time fits the deadline. |
| `tb_global_ctrl` | the configuration sequence, the P/IPC³ choice against a real-valued reference, frequencies, clamping, latencies |
| `tb_stalliw_ctrl` | each shrink/grow rule at its exact cycle, the period restart, the floor, the ceiling, MaxOverlap values; the same for a PeriodicIW instance |
| `tb_iwtag_tracker` | a producer/consumer example, then 5000 random cycles against a reference model |
| `tb_ysc_tracker` | both counting modes, 5000 random issue/commit cycles against a reference model |
| `tb_hazardfu_ctrl` | each HazardFU rule at its exact cycle, for ALU and FPU pools; the same for UtilFU instances |
| `tb_fu_select` | every request/busy/active combination of a 6-unit pool |
| `tb_wake_delay`, `tb_seq_div` | latency and arithmetic |

To get a feel for the design, change `PHASE_LEN` in `tb_adapt_top` or the thresholds in
`adapt_pkg` and watch the event counts that the top-level testbench prints.

## How far to trust it

All modules pass lint (Verilator `-Wall`) and elaboration with a second SystemVerilog front end.
The testbenches above pass. Each testbench was also run against a copy of its module with one
deliberate fault, and each caught the fault.

The behavioural core in `tb_adapt_top` is a stimulus generator, not a processor. The energy
savings reported for these algorithms depend on a real core and power model, and they are not
reproduced here. What is verified is that the controllers take the decisions the algorithms
prescribe, at the right cycles.
