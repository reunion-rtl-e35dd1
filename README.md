# Reunion: redundant execution on a chip multiprocessor without lockstep

Soft errors flip bits in a running core. A classic way to catch them is to run every
thread twice, on two cores, and compare results before anything becomes visible.
That normally means the two copies must see exactly the same inputs. Keeping two
private caches perfectly coherent with each other ("input replication") is expensive.

Reunion relaxes that requirement. The two cores of a *logical processor pair* are
not equals:

- The **vocal** core is a normal member of the coherent memory system.
- The **mute** core runs the same instruction stream, but its cache is allowed to be
  *incoherent*. It reads through best-effort *phantom requests*, and nothing it
  writes ever leaves the pair.

Every retired instruction is hashed into a *fingerprint*, and the two cores swap and
compare fingerprints before anything retires. Differences are caught by the same
mechanism whatever caused them: a soft error, or the mute having read a stale value.
A rollback and a short, non-speculative re-execution then recover. If the
re-execution fails again, the mute's registers are overwritten with the vocal's.
If even that fails, the error is reported as uncorrectable.

This repository holds the RTL of the logic that Reunion adds to a chip
multiprocessor:

- the in-order *check* stage of each core, with its fingerprint hardware and result buffer;
- the architectural register files, written only by checked instructions;
- the fingerprint links between the two cores of a pair;
- the re-execution (recovery) controller and the interrupt scheduler of each pair;
- the shared L2 cache controller with vocal/mute semantics, phantom requests and
  synchronizing requests.

The out-of-order cores, their L1 caches and store buffers, and the DRAM are not
part of it. Their connections are ports of the top module, `reunion_top`. The
testbenches play the cores and model the memory.

The default configuration has four logical processors (eight cores), 4-wide
retirement, 16-bit fingerprints and a 10-cycle comparison latency. The L2 is 16 MB,
8-way, with 64-byte lines and a 35-cycle hit latency.

## Structure

```
reunion_top
├── per pair p (cores 2p = vocal, 2p+1 = mute)
│   ├── check_stage ×2
│   │   ├── fingerprint_gen  = parity_compactor (space) + crc_misr (time)
│   │   ├── fingerprint_queue ×2   (own fingerprints, partner's fingerprints)
│   │   └── result_buffer          (groups waiting for their comparison)
│   ├── arch_regfile ×2            (4 write ports + copy port)
│   ├── fingerprint_channel ×2     (vocal→mute, mute→vocal)
│   ├── reexec_ctrl                (rollback, phase 1, phase 2, DUE)
│   └── irq_sync                   (interrupt at a common interval boundary)
└── shared_cache_ctrl              (L2 data + directory, vocal/mute rules)
reunion_pkg                         types: slot_t, group_t, request/probe/phantom enums
```

## Retire groups and what is fingerprinted

A core hands its retirement to the check stage as a **retire group** (`group_t`).
A group has up to four slots. Each slot (`slot_t`) holds:

- `valid`, `we`, `rd`, `value`: the register write;
- `addr`: the store address, the branch target or an uncached load address;
- `is_store`;
- two flags the check stage obeys but does not hash: `is_load` and `serializing`.

Everything that is an update goes into the fingerprint: 134 bits per slot, 536 per
group. Invalid slots contribute zeros. A taken branch reports its target in `addr`.

The 536 bits cannot be folded into a CRC in one cycle, so the fingerprint is made in
two steps:

1. **Space compression** (`parity_compactor`). Sixteen parity trees reduce the 536
   bits to 16 in one cycle. Bit *i* feeds tree *i* mod 16.
2. **Time compression** (`crc_misr`). In the next cycle, a parallel CRC-16 folds those
   16 bits into the running signature. The polynomial is x^16+x^12+x^5+1, the seed is
   all ones, and bits are taken MSB first.

The parity step at most doubles the probability that two different streams give the
same fingerprint, so it stays below 2^-15. The signature restarts from the seed
after every fingerprint, so each fingerprint covers exactly one interval.

## The check stage

`check_stage` sits between the reorder buffer and the register file. Only
instructions that are certain to retire once their results match may enter. The
core must never offer wrong-path work.

**Intervals.** The *fingerprint interval* (`FP_INTERVAL`, default 1) is the number of
instructions each fingerprint covers. Interval boundaries fall between groups: an
interval closes with the group that brings it to `FP_INTERVAL` instructions or more.
With the default of 1, each group is its own interval. An interval is also cut when
the result buffer would otherwise fill up.

**Flow through the stage.**

- An accepted group is stored in the result buffer and enters the fingerprint generator.
- When its interval closes, the fingerprint (tagged with the number of groups it
  covers) goes into the local queue. At the same time it is sent to the partner.
- The partner's fingerprints arrive through the channel into the partner queue.
- When both queues have a head, the heads are compared.
  - **Match:** the tagged number of groups leave the result buffer, one per cycle, on
    `ret_valid`/`ret_grp`. They are written into the register file, and their
    stores may drain from the store buffer. The next interval is compared in the
    cycle its predecessor's last group leaves, so one-group intervals still retire
    one group per cycle.
  - **Mismatch:** the stage raises `halted`. It retires nothing more until the
    re-execution controller flushes it.

A group offered while there is no room is simply not accepted (`grp_ready` low).

**Serializing instructions** (traps, barriers, atomics, non-idempotent accesses) cost
a full comparison round trip:

1. When a group with a serializing slot arrives, any open interval is closed first.
2. The group then waits until everything older has been compared and retired.
3. It enters alone and forms its own interval.
4. Younger groups are held back (`ser_stall`) until it has retired.

The core must present a serializing instruction either alone or with only older
instructions in its group.

**Single step.** During re-execution (`single_step` high), an interval stays open until
a group containing a load or atomic enters. That group closes it. So one fingerprint
covers everything up to and including the first load.

### Comparison latency

The *comparison latency* (`COMPARE_LAT`, default 10 cycles) is the time to generate,
transfer and compare a fingerprint. The two cores swap fingerprints, so it equals the
one-way latency between them. It is split as follows:

| part | cycles |
|------|--------|
| parity trees, then CRC (`fingerprint_gen`) | 2 |
| `fingerprint_channel` | `COMPARE_LAT - 3` |
| compare | 1 |

With both cores in step, a group offered and accepted in cycle *t* leaves on
`ret_valid` in cycle *t* + `COMPARE_LAT` + 1. With the defaults that is 11 cycles.
If the partner is behind, the comparison simply waits for its fingerprint. The two
cores are only loosely coupled.

Because of this split, the smallest comparison latency the design can have is 4 cycles.

## Recovery: the re-execution protocol

`reexec_ctrl` runs one pair's recovery. It starts when either check stage reports a
mismatch.

1. **Drain.** Wait until neither core is in the middle of retiring an interval, and
   both have retired the same number of intervals. The core that is behind still
   retires the good intervals before the bad one, then meets the mismatch itself.
   The wait also ends if both cores have halted, or after `DRAIN_TIMEOUT` (64) cycles.
   The timeout covers a fingerprint corrupted on one side only. In the common case,
   both register files then hold the same safe state.
2. **Phase 1.**
   - Pulse `rollback` for one cycle. Both cores squash everything not yet compared,
     and the check stages, queues and channels are emptied.
   - Raise `single_step`. Both cores execute non-speculatively up to the first load.
     They issue that load as a *synchronizing request* (`REQ_SYNC`), which returns the
     same coherent value to both.
   - If both cores see a match on that interval, the pair has made progress and goes
     back to normal execution.
3. **Phase 2.** This is reached only if phase 1 fails, for example because an incoherent
   value had already been retired into the mute's registers.
   - Roll back again.
   - Copy the vocal register file into the mute one, one register per cycle. The copy
     goes through the mute file's copy port.
   - Single-step again as in phase 1.
4. **Failure.** A mismatch in phase 2 means a soft error got past the fingerprint
   earlier. The safe state itself is bad. `due_error` (detected, uncorrectable error)
   is raised and stays high until reset.

`reexec_phase` shows the state: 0 normal, 1 phase 1, 2 phase 2, 3 failed. Three
counters report recoveries started, phase-2 entries and completed recoveries.

The core must restore its program counter together with the registers. The copy
here covers the register file only.

## External interrupts

An interrupt request for a pair is given to both cores, but both must take it at the
same point in the program. `irq_sync` records the number of intervals the vocal has
closed when the request arrives. Each core then takes the interrupt (`irq_take`
pulse) once it has retired that many intervals. That is the first interval boundary
after which everything older has been compared and retired. `irq_pending` is high
from the request until both cores have taken it. A second request while one is
pending is merged into it.

## Shared L2 controller

`shared_cache_ctrl` is an inclusive, set-associative L2 with a directory entry per line.
The entry holds a valid bit, a dirty bit, the tag, a sharer bit per pair, and an
optional owner pair.

The directory describes **vocal L1s only**. The mutes never appear in it, so
coherence runs as if the mutes did not exist. Requests are served one at a time, and
the arbitration between cores is round-robin.

| request | from the vocal | from the mute |
|---------|----------------|---------------|
| `REQ_READ` | coherent read; a foreign owner is downgraded (`PROBE_DOWN`) | phantom request |
| `REQ_WRITE` | coherent write; other copies invalidated (`PROBE_INV`) | phantom request (reply grants write permission in the mute's hierarchy) |
| `REQ_WB` | line written into L2 (ignored if the vocal no longer owns it: a stale writeback that lost a race with a probe) | dropped |
| `REQ_EVICT` | sharer bit cleared | dropped |
| `REQ_SYNC` | served only when the mute of the same pair also has its `REQ_SYNC` waiting | (paired with the vocal's) |

**Phantom requests** never change the directory or the L2 contents. How hard they look
for data is set by the `strength` input:

- `PH_NULL`: answers with zeros at once.
- `PH_SHARED`: returns the L2 data on a hit and zeros on a miss.
- `PH_GLOBAL` (the default in all tests): also reads a dirty line out of the owning
  vocal L1 with a non-destructive `PROBE_PEEK`. On an L2 miss it reads memory without
  allocating the line.

**Synchronizing request.**

1. All private copies of the line are invalidated. The vocal's dirty data is written
   into L2 and the mute's is thrown away.
2. The pair's vocal becomes the exclusive owner. This is a coherent write transaction
   on the pair's behalf.
3. Both cores get the same line in the same cycle. The address used is the vocal's.

**Misses** pick a victim: the first invalid way, otherwise a round-robin way. The
victim's private copies are invalidated (its dirty data is collected), a dirty victim
is written back, and the line is filled from memory.

**Timing.** Replies come no earlier than `HIT_LAT` (35) cycles after the request was
accepted; on a miss, no earlier than 35 cycles after the fill. `WB` and `EVICT`
requests get no reply. After reset the controller clears one directory set per cycle
and raises `ready`. With the full 32768 sets this takes 32768 cycles.

Event pulses (`ev_phantom`, `ev_sync`, `ev_mute_drop`, `ev_miss`) are provided for
counting.

## Top-level interface (`reunion_top`)

Cores are numbered 0 … 2·`N_PAIRS`−1. Core 2p is the vocal and core 2p+1 the mute of
pair p. Per-core signals are packed arrays indexed by core number; per-pair signals
are indexed by pair number.

| group | signals |
|-------|---------|
| retirement, per core | `grp_valid`, `grp`, `grp_ready` (in); `ret_valid`, `ret_grp`, `ser_stall` (out) |
| register file, per core | `arf_raddr` → `arf_rdata` (combinational read) |
| interrupts | `irq` per pair in; `irq_take` per core, `irq_pending` per pair out |
| recovery, per pair | `rollback`, `single_step`, `due_error`, `reexec_phase`, `n_rollbacks`, `n_phase2`, `n_recovered` |
| L1 side of the L2, per core | `req_valid`, `req_type`, `req_addr`, `req_data`, `req_ready`, `rsp_valid` |
| L1 side of the L2, shared | `rsp_data`, `rsp_excl`; probes `prb_valid`, `prb_core`, `prb_type`, `prb_addr`, `prb_ack`, `prb_dirty`, `prb_data` |
| memory | `mem_req_valid`, `mem_req_we`, `mem_req_addr`, `mem_req_data`, `mem_req_ready`, `mem_rsp_valid`, `mem_rsp_data` |
| L2 control | `strength`, `l2_ready`, `ev_*` |

A core connected to this top is expected to:

- offer only groups that are sure to retire;
- on `rollback`, restart from its register file and program counter;
- while `single_step` is high, run non-speculatively and issue the first load as `REQ_SYNC`;
- drain stores from its store buffer only for slots leaving on `ret_valid`;
- take an interrupt on `irq_take`.

Reset is asynchronous and active low. All logic runs on the single clock `clk`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_PAIRS` | 4 | logical processors |
| `COMPARE_LAT` | 10 | comparison latency in cycles (≥ 4) |
| `FP_INTERVAL` | 1 | instructions per fingerprint |
| `RB_DEPTH` | 64 | result buffer, in groups (256 instructions, the size of the instruction window) |
| `FPQ_DEPTH` | 64 | each fingerprint queue |
| `AW` | 26 | line address bits (3 GB of 64-byte lines) |
| `LINE_W` | 512 | line width in bits |
| `L2_SETS`, `L2_WAYS` | 32768, 8 | 16 MB L2 |
| `L2_HIT_LAT` | 35 | L2 hit latency |

The package fixes 4-wide retirement, 64-bit values, 32 registers and 16-bit fingerprints.

## What follows the reference design and what is this implementation's own

**Taken from the Reunion design:**

- the vocal/mute split;
- a check stage before retirement that fingerprints state updates and compares them
  with the partner;
- the two-step parity-then-CRC fingerprint with a 16-bit CRC;
- the comparison latency of 10 cycles;
- serializing instructions closing the interval and waiting for a full comparison;
- the two-phase re-execution protocol with single step to the first load, a
  synchronizing request, a register copy in phase 2, and an uncorrectable error
  after that;
- interrupts taken at a vocal-chosen interval;
- mute writebacks ignored by the L2, and the three phantom strengths;
- the synchronizing request's flush-and-reply-to-both behaviour;
- the configuration numbers: 4 logical processors, 4-wide retirement, and the 16 MB
  8-way L2 with 64-byte lines and a 35-cycle hit.

**Choices made here where the reference is silent:**

- the slot format and widths;
- which bits feed which parity tree; the CRC polynomial and seed; restarting the CRC per interval;
- the 2 + (L−3) + 1 split of the comparison latency;
- queue and buffer depths (chosen large enough that neither limits retirement up to a
  40-cycle comparison latency);
- retiring one group per cycle after a match, with the next comparison overlapping the
  last retirement;
- the drain rule and timeout before a rollback;
- the one-register-per-cycle copy;
- when the interrupt is scheduled (the first boundary after the vocal's last closed interval);
- the MSI-style directory, the probe types and handshakes, ignoring stale writebacks,
  and the replacement and arbitration policies;
- zeros as the "arbitrary" phantom data;
- global phantom misses not allocating in L2.

The re-execution protocol is described in two slightly different ways. One version
copies the mute registers right after every rollback. The other does the copy only
when a first, copy-free re-execution fails. This RTL implements the second, two-phase
version.

**Not modelled:**

- **L2 banks and MSHRs.** The reference L2 has four banks and 64 MSHRs; this
  controller serves one transaction at a time, so its latency under load is pessimistic.
- **ECC** on the register files.
- **The L1–L2 crossbar.** Each core has its own request port instead.
- **A comparison latency below 4 cycles.**

## Verification

Each block has a self-checking testbench in `tb/` that compares against values
computed independently in the testbench. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_parity_compactor` | against a bit-by-bit reference |
| `tb_crc_misr` | the CRC-16/CCITT value of the ASCII string "12345678" (0xA12B, seed 0xFFFF) and a bit-serial reference |
| `tb_fingerprint_gen` | fingerprints and their two-cycle timing |
| `tb_fingerprint_queue`, `tb_result_buffer`, `tb_fingerprint_channel` | ordering, full/empty, flush, latency |
| `tb_arch_regfile` | write priority, copy port |
| `tb_check_stage` | a delayed, optionally corrupted copy of its own fingerprints as the partner; latency, serializing, single step, halt and flush |
| `tb_reexec_ctrl` | all protocol paths, including the drain rule and the timeout |
| `tb_irq_sync` | where each interrupt lands, plus a random run checked cycle by cycle against a reference |
| `tb_shared_cache_ctrl` | a small L2 (4 sets, 2 ways) against a reference memory image: coherence probes, phantom strengths, mute drops, synchronizing requests, miss and hit latency |
| `tb_shared_cache_random` | eight cores with random traffic over 12 lines on a 4×2 L2: every vocal and global-phantom reply against a coherent memory image, no mute data ever reaching memory |
| `tb_reunion_top` | the whole design at its default parameters |
| `tb_reunion_incoh` | input incoherence caused by each phantom strength, detected and repaired end to end |
| `tb_reunion_sweep` | comparison latencies of 4, 10, 20 and 40 cycles with fingerprint intervals of 1 and 50 instructions |

`tb_reunion_top` runs the whole design with every parameter at its default. Eight
behavioural cores run 300 generated retire groups per pair, with loads and
serializing instructions, and generate L2 traffic. Faults are injected into the
mutes so that:

- pair 0 recovers in phase 1;
- pair 1 needs phase 2;
- pair 2 ends with an uncorrectable error;
- pair 3 runs clean and takes an interrupt.

It checks:

- every retired group and the final register files;
- the 11-cycle comparison latency;
- that each mechanism happened at least once: serializing stall, synchronizing
  requests, phantom requests, dropped mute writebacks, L2 misses, and interrupt
  pending and taken.

It takes about 46,000 simulated cycles, most of them the L2 directory clear after reset.

`tb_reunion_sweep` builds eight single-pair copies of the top, one per configuration.
Only the L2 is shrunk, because this test sends it no traffic. For each copy it checks:

- the retired groups and the final register files;
- that the first group retires `COMPARE_LAT`+1 cycles after entering check, or 12
  cycles later with a 50-instruction interval, which closes only with the 13th group;
- that retirement sustains one group per cycle;
- that a serializing instruction stalls retirement for at least one full comparison
  latency.

Measured stalls per serializing instruction are 10, 20, 37 and 70 cycles at
latencies of 4, 10, 20 and 40 with single-group intervals. So the cost of
serialization grows with the comparison latency, as expected.

`tb_reunion_incoh` shows the central mechanism with real incoherence rather than
injected faults. Three single-pair copies of the top run with null, shared and
global phantom requests. Each core loads 48 times from 24 lines through the L2 and
retires the loaded value. The vocal runs a few cycles behind its mute, as loosely
coupled cores do.

- **Null.** Every load differs between the cores, so each one is retired through a
  rollback and a single-step re-execution with a synchronizing request (48 recoveries).
- **Shared.** Only the first touch of each line, before the vocal has brought it into
  the L2, differs (24 recoveries).
- **Global.** Nothing differs (0 recoveries).

In every case all loads retire with the memory's value and no recovery needs phase 2.

`tb/mem_model.sv` is a behavioural DRAM (fixed latency, contents generated from the
address) used by the L2 and top testbenches.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_reunion_top \
    rtl/reunion_pkg.sv rtl/*.sv tb/mem_model.sv tb/tb_reunion_top.sv
./obj_dir/Vtb_reunion_top
```

For a single block, list the package, the block's RTL file and the files of its
submodules, and its testbench, for example:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_check_stage \
    rtl/reunion_pkg.sv rtl/*.sv tb/tb_check_stage.sv
```

`tb_shared_cache_ctrl`, `tb_shared_cache_random`, `tb_reunion_top` and
`tb_reunion_incoh` also need `tb/mem_model.sv`. The testbenches reset everything
they read, so they also run with `+verilator+rand+reset+2`.
