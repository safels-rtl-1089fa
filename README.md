# SafeLS: a dual-core lockstep wrapper for a NOEL-V RISC-V core

Safety standards such as ISO 26262 ask, for the highest integrity level
(ASIL-D), that a processor be protected against random hardware faults with
*diverse* redundancy. The usual answer is dual-core lockstep (DCLS): two
identical cores run the same program, one a few cycles behind the other, and
their outputs are compared. The delay (the *stagger*) keeps the two cores in
different electrical states at every instant, so a single disturbance of the
clock or the supply cannot corrupt both in the same way and slip past the
comparison.

This repository holds the RTL of SafeLS, a lockstep wrapper for Gaisler's
NOEL-V core as it sits in the SELENE SoC. The wrapper stands where a single
core would stand: the SoC sees one core, and the duplication, the staggering
and the comparison happen inside.

```
                      +------------------------------- safels -----------------------------+
 SoC inputs  ---------+--------------------------------------------> main_in_o   (main core)
 (AHB, IRQ, DBG)      +--> safels_stagger_in (N cycles) -----------> shadow_in_o (shadow core)
                      |                                 shadow_rst_n_o (released N cycles late)
 SoC outputs <--------+------------------------------------------<- main_out_i
 (AHB, IRQ, DBG, CNT) |   +--- safels_stagger_out (N cycles) --+
                      |   |                                    v
                      |   +---------------------------> safels_cmp <-- shadow_out_i
                      +-----------------------------------------+--> error_o, err_grp_o, mismatch_o
```

The two cores are **not** in this RTL. They are third-party IP, so the wrapper
brings their inputs, outputs and resets out as ports (`main_*`, `shadow_*`).
Any pair of identical, deterministic cores with this boundary can be
connected.

## Sphere of replication and signal groups

The sphere of replication is the *whole* core, L1 instruction and data
caches and MMU included. Duplicating the caches costs area but puts no logic
between a core and its L1 caches, whose latency matters on nearly every
access. Only traffic that leaves the L1 caches (misses to the shared L2,
interrupts, debug, events) crosses the wrapper.

Signals crossing the boundary, grouped as in the NOEL-V/GRLIB interface
(types in `rtl/safels_pkg.sv`):

| group | into the core | out of the core | SoC partner |
|-------|---------------|-----------------|-------------|
| AHB   | `ahb_mst_in_t`, `ahb_slv_in_t` (snooping), `ahb_slv_out_vector_t` | `ahb_mst_out_t` | AHB bus, shared L2 cache |
| IRQ   | `nv_irq_in_t` | `nv_irq_out_t` | CLINT |
| DBG   | `nv_debug_in_t` | `nv_debug_out_t` | debug support unit |
| CNT   | (none) | `nv_counter_out_t` | SafeSU statistics unit |

Trace outputs are left out: the SELENE SoC does not use them. The counter
outputs are included because they feed the SafeSU directly.

The field lists and widths inside each record are this implementation's
own choice. AHB uses a 32-bit address, 64-bit data, 16 masters and
16 slaves. The IRQ, debug and counter records are small representative
sets. The wrapper treats each record as an opaque bit vector and only uses
the grouping to report which group mismatched. To match a real NOEL-V
build, edit the records in `safels_pkg`. Nothing else changes.

## Staggering and alignment

This is the part that needs care. The comparison works only if, in the
cycle it compares, the delayed main-core word and the shadow-core word come
from the same step of the same input history.

* **Stagger N.** `stagger_i` is sampled on every clock edge while `rst_n` is
  low and is held once reset is released. A value of 0 is raised to 1, and
  values above `MAX_STAGGER` are lowered to it. `stagger_o` shows the value
  in use. Keep `rst_n` low for at least one clock edge. Changing N on the fly
  would break the alignment, so it cannot be done.
* **Inputs.** The main core gets the SoC inputs unchanged. `safels_stagger_in`
  passes the same bundle through a shift register with a selectable tap, so
  a value the main core samples at edge *e* is sampled by the shadow core at
  edge *e + N*.
* **Reset.** The main core leaves reset with the wrapper. The shadow core's
  reset (`shadow_rst_n_o`) is a valid bit that runs down the input delay
  line. The shadow core therefore makes its first active step exactly N
  edges after the main core, and it sees the same input sequence from that
  step on. `shadow_rst_n_o` comes from a flip-flop through the tap
  multiplexer. Add a reset synchroniser if the core needs one.
* **Outputs.** `safels_stagger_out` delays the main core outputs by N cycles.
  Its valid bit rises N edges after reset release. The first aligned word is
  the main core's reset-state output, which the shadow core shows at that
  moment too. From then on, `main_dly` and `shadow_out_i` describe the same
  step in every cycle.

Both delay lines are instances of `safels_delay_line`, a `MAX_STAGGER`-stage
shift register with a tap multiplexer. Only its valid bits are reset.

## Comparison and the error signal

`safels_cmp` compares the four output groups as soon as the aligned words
arrive. It does so only while the output delay line says they are aligned.

* `mismatch_o[3:0]` shows, in the same cycle, which groups differ
  (index 0 AHB, 1 IRQ, 2 DBG, 3 CNT).
* `error_o` rises on the clock edge after the first mismatch and stays high
  until reset.
* `err_grp_o` accumulates the groups that have mismatched since reset.

The wrapper only flags the error. Acting on it (an interrupt through the
CLINT, a reset, a safe state) is left to the SoC. Holding the flag until
reset, and reporting per group, are this implementation's choices.

## Output delivery: direct or compared first

The canonical lockstep scheme delays the main core's outputs by N cycles and
lets them leave the wrapper only after they have matched the shadow core. On
the SELENE AHB that is not possible. The core's bus interface does not
tolerate extra cycles between a core and the bus, and delaying its outputs
crashes the platform. The integrated SafeLS therefore works as follows:

* **`DELAY_OUTPUTS = 0` (default, the integrated design).** Main-core
  outputs go to the SoC in the same cycle, and the delayed copy is used only
  for the comparison. Bus timing is that of a plain core, so the wrapper
  costs no performance. The catch is that a wrong output has already been
  on the bus for N cycles when `error_o` flags it. Containing it is up to
  the system.
* **`DELAY_OUTPUTS = 1` (the canonical scheme).** The SoC sees
  `main_dly`, and only in cycles where the comparison is valid and clean.
  Before alignment, and in any cycle with a mismatch, the wrapper drives
  all-zero outputs instead: an idle AHB master, no interrupt acknowledge, no
  debug data and no events. All outputs arrive N cycles late, so this mode
  suits only a core whose bus interface can tolerate that latency. The
  all-zero substitute is this implementation's choice.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `MAX_STAGGER` | 3 | largest N the delay lines support; the stagger in DCLS designs is typically 2–3 cycles |
| `DELAY_OUTPUTS` | 0 | 0: direct delivery, compare in parallel; 1: delayed, compared delivery |

Record widths are package constants in `safels_pkg` (`AHB_ADDR_W`,
`AHB_DATA_W`, `AHB_NMST`, `AHB_NSLV`, `AHB_NIRQ`, `DBG_DATA_W`, `DBG_ADDR_W`,
`CNT_EVENTS`). At the defaults, the input bundle is 2,241 bits and the output
bundle is 249 bits. Most of the wrapper's flip-flops are the 3 × 2,241 input
delay stages, most of them holding the 16-entry slave output vector.

## Files

| file | contents |
|------|----------|
| `rtl/safels_pkg.sv` | records, bundles, group enumeration, constants |
| `rtl/safels_delay_line.sv` | shift register with programmable tap and valid bits |
| `rtl/safels_stagger_in.sv` | input stagger and staggered shadow reset |
| `rtl/safels_stagger_out.sv` | output stagger with alignment flag |
| `rtl/safels_cmp.sv` | per-group comparator and sticky error |
| `rtl/safels.sv` | top-level wrapper |
| `tb/tb_core_model.sv` | behavioural stand-in core for the tests (not a processor) |
| `tb/tb_safels_util_pkg.sv` | random stimulus helpers |
| `tb/tb_safels_*.sv`, `tb/tb_safels.sv` | self-checking testbenches |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. To run the end-to-end test at default
parameters:

```
verilator --binary --timing --assert --top-module tb_safels \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/safels_pkg.sv tb/tb_safels_util_pkg.sv tb/tb_safels.sv
./obj_dir/Vtb_safels
```

Swap the top module and file for `tb_safels_delayed` (wrapper with
`DELAY_OUTPUTS=1`), `tb_safels_stagger_in`, `tb_safels_stagger_out` or
`tb_safels_cmp`. All of them run in well under a second.

What the tests cover:

* **`tb_safels`** (defaults). The two stand-in cores run on random SoC
  inputs for each N from 1 to 3, plus a setting of 0 that must be raised
  to 1. It checks every cycle that:
  * the main core gets the inputs and its outputs reach the SoC unchanged;
  * the shadow core leaves reset N cycles late and sees the inputs of N
    cycles before;
  * no error appears while the cores agree.

  It then injects faults:
  * a one-cycle error in each output group of the shadow core, which must be
    seen in the same cycle, flagged on the next edge and held;
  * a one-cycle AHB error in the main core, which must reach the SoC at
    once and be detected exactly N cycles later;
  * a state upset in the shadow core.

  It counts each of these mechanisms and fails if one never occurred.
* **`tb_safels_delayed`** checks delayed delivery, idle outputs before
  alignment, and that faulty words from either core are withheld.
* The block tests check the delay-line timing for every N, and the
  comparator against a reference model with random multi-group mismatches.

`tb_core_model` folds the whole input bundle into a 64-bit state every
cycle. Its outputs depend on that state and, combinationally, on a few
inputs. It is only a deterministic machine with the core's boundary, and it
shows nothing about NOEL-V itself.

## Limits and departures

* **The NOEL-V cores and the rest of the SELENE SoC are not included.** This
  covers the AHB bus, the L2 cache, the DSU, the CLINT, the SafeSU, AXI,
  the memory controller and the accelerators. The wrapper's ports are the
  attachment points.
* **The record contents are not NOEL-V's exact records.** See above; adapt
  `safels_pkg` to the GRLIB version in use.
* **The error is not routed to an interrupt.** Wiring `error_o` into the
  CLINT as a core interrupt is a natural next step, but it is not part of
  this RTL.
* **Variants not built.** A variant that leaves the L1 caches and MMU
  outside the sphere of replication (protected by ECC instead, at the cost
  of N cycles on every L1 access) is not implemented. Nor is a core bus
  interface that tolerates staggered AHB outputs, which `DELAY_OUTPUTS = 1`
  would need on a real AHB.
* **Area and performance.** The published SafeLS logic measured
  4,714 FPGA LUTs on a Kintex UltraScale device (the core pair was about
  102,500 LUTs). It showed no measurable slowdown on the TACLe benchmarks,
  since in the default mode no core output is delayed. This RTL has not
  been measured on an FPGA.
