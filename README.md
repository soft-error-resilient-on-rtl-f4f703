# Soft-error resilient on-chip memory structures

This repository holds synthesizable SystemVerilog for three on-chip storage
structures of an out-of-order processor. Each is hardened against soft errors,
meaning bit flips caused by particle strikes:

* **A self-adaptive reliable L1 data cache** (`sa_rdc`). It is 64 KB, 2-way,
  with 64-byte lines. It has byte parity and per-word dirty and zero flags,
  and a tag replication buffer. It has three protection levels and switches
  between them based on how many errors it is currently seeing.
* **An L1 instruction cache** (`icache_cs_cci`). Lines that sit idle are
  scrubbed (re-read from L2), and lines idle for a long time are invalidated.
* **A 128-entry integer register file** (`ird_datapath`). It protects narrow
  values by in-register duplication (IRD) plus parity.

`ser_top` instantiates all three. The L2 cache, the processor core and the
operating system's error recovery are outside the design. They connect
through the top-level ports.

## The data cache (`rdc_dcache`, `sa_rdc`)

This is the hardest part of the design. Most of the logic lives in the cache
controller state machine in `rdc_dcache.sv`.

### Storage per line

* **Tag.** 33 bits (48-bit physical address, 512 sets, 64-byte lines) with
  one parity bit.
* **Data.** Eight 64-bit words, each with 8 byte-parity bits.
* **Per-word dirty bits** (the "multiple dirty bits" scheme). A write-back
  sends only the dirty words to L2; the L2 write mask equals the dirty bits.
* **Per-word zero flags.** A word that is entirely zero is flagged. It is
  read from the flag, so a flip in its stored bits cannot corrupt it.
* **`dup`.** Set when the line is a replica of the other way's dirty line.
* **`copy`.** Set when the line's tag currently has a replica in the tag
  buffer.

Data and parity live in a plain memory array with one write port per word
lane, so synthesis can map it to RAM. Metadata lives in flops.

### Error handling on an access

* **Tag parity failure** in either way of the set:
  * If the tag buffer holds a good replica, the tag is restored from it.
  * Otherwise a clean line is simply dropped and a dirty line raises a
    detected-unrecoverable-error (DUE) on `resp_err`.
* **Data parity failure** on a read:
  * A clean word is repaired by re-fetching the line from L2. The refill does
    not overwrite dirty words.
  * A dirty word is repaired from its in-cache replica, if one exists and its
    parity checks.
  * Otherwise the error is a DUE.
* **Write-backs** are checked word by word. A bad dirty word is taken from
  the replica when possible. If it cannot be, the write-back is flagged as
  unrecoverable.

Every error seen is reported on `err_detected` to the error monitor.

### Tag replication buffer (`tag_buffer`)

The tag buffer is a 32-entry buffer of tag replicas, in the selective
variant: only tags of dirty lines are replicated.

* **Entries.** Each entry holds a tag and a (set, way) pointer, each with
  parity. The buffer is searched associatively by pointer.
* **Insertion.** The first write to a line inserts its tag.
* **Replacement (FIFO+).** The replacement policy is FIFO+:
  * A free entry is used first. Entries are freed when the replica of an
    evicted line is dropped.
  * Otherwise the entry at the FIFO head is replaced.
* **Early write-back on displacement.** When a valid replica is displaced,
  the cache writes that dirty line back early, so that no dirty line ever
  lacks a tag replica.

### In-cache replication (ICR)

When ICR is enabled, a store to a line also copies the line into the other
way of the same set, one cycle later (state `S_ICR`). The copy is skipped
when that way holds a dirty line of its own.

* The replica is marked `dup`. It never hits as a primary line, and it is the
  preferred victim on a miss.

### Early write-back and clean-line invalidation (EWB/CCI)

The `decay_timer` gives every line a 2-bit local counter, advanced by a
global tick every 256 cycles and cleared on access. When a line has been idle
for four ticks (1K cycles), the cache acts on it:

* A dirty line is written back and becomes clean (EWB).
* A clean line is invalidated (CCI).

The counters are stored as bit-planes, so one tick updates all 1024 lines
with a few vector operations.

### Self adaptation (`error_monitor`, `sa_controller`, `sa_rdc`)

Detected errors are counted in 100K-cycle windows. At each window end the
controller moves at most one step between three levels:

| level | enables | go up when | go down when |
|---|---|---|---|
| P | parity only | > 4 errors in a window | — |
| P+ICR | + in-cache replication | > 16 errors in a window | 2 error-free windows |
| P+ICR+EWB | + early write-back / clean-line invalidation | — | 3 error-free windows |

### Timing

* A hit answers one cycle after the request is accepted.
* A miss costs a write-back of the victim's dirty words, if it has any, plus
  a line fill from L2.
* Requests are accepted only in the idle state; there is one outstanding
  access.

## The instruction cache (`icache_cs_cci`)

The instruction cache has the same 512 x 2 x 64 B geometry, holding 32-bit
instructions. It is read-only and blocking. Its lines are only exposed to
errors between two reads, so idle lines are refreshed or dropped. A decay
timer ticks every 1K cycles.

* **Scrubbing.** A line idle for 4K cycles is scrubbed: it is re-read from
  L2, which removes any latent flip.
* **Invalidation.** After three scrubs without an access (16K cycles idle
  in total) the line is invalidated.
* **Access resets the count.** An access clears both the idle counter and
  the scrub count.
* **Idle work.** Scrubs and invalidations run only in cycles with no fetch
  waiting.

## The register file (`nw_detect`, `ird_regfile`, `ird_operand_check`, `ird_datapath`)

Each register holds a 64-bit value, a 2-bit narrowness flag n1n0 and two
parity bits. `nw_detect` classifies each result as one of:

* **00 regular:** a full 64-bit value.
* **01 narrow signed:** the sign extension of its low 32 bits.
* **11 34-bit address:** the upper half equals 1.

Flag 10 is never produced.

**Duplication and parity.** For a narrow value the low half is copied into
the high half at the functional-unit output. A parity-encode stage after
execution computes one parity bit over {flag, low half} and one over
{flag, high half}. These bits are written one cycle after the value. Until
then, a consumer gets the value from the bypass path, which is checked the
same way.

**Operand checking** (`ird_operand_check`):

* **Narrow value, low half good.** The operand is rebuilt from the low half
  and the flag.
* **Narrow value, low half bad, high copy good.** The operand is recovered
  from the high copy. The pipeline stalls for a cycle, the register is
  repaired, and the read is replayed.
* **Narrow value, both halves bad.** An exception is raised.
* **Regular value.** Protection is detection only: any parity failure
  raises an exception.

## Top level (`ser_top`)

`ser_top` groups the three structures behind prefixed ports: `dc_` for the
data cache, `ic_` for the instruction cache and `rf_` for the register
datapath. Each structure has fault-injection inputs for testing. The default
parameters give the full-size design:

* 512-set caches.
* A 32-entry tag buffer.
* A 1K decay interval.
* 100K-cycle error windows.
* 128 registers.
* 8 result lanes and 16 read ports.

## Choices made by this design

These points are not fixed by the original scheme descriptions:

* The even-parity convention.
* Lowest-index-first servicing of idle lines.
* The replica placement rule: the other way, and only if that way is not
  dirty.
* Tag-buffer insertion on the first write to a line.
* The register-file port counts.
* Stalling for one cycle to repair a register.

Each file's header comment lists what follows the described scheme and what
is this design's own choice.

## Verification

Every module has a self-checking testbench in `tb/`. Each one uses random
and directed stimulus, a reference model where one is practical, and a cycle
watchdog. Each ends by printing `TB_RESULT checks=<n> failures=<n>`.

`tb/l2_model.sv` is a behavioural L2 used by the cache testbenches.
`tb_ser_top` drives all three structures at reduced size. It counts every
mechanism (hits, misses, tag and data repairs, ICR copies and fixes, DUEs,
EWB, CCI, tag-buffer write-backs, level changes, scrubs, invalidations,
register recovery and exceptions) and fails if any of them never occurs.
