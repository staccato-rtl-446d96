# StAccato: a decoupled random-number generator and SMA prefetch support for an SMT core

Programs that run on random numbers (Monte Carlo pricing, stochastic gradient
descent, simulated annealing, game engines) lose time in four ways: calling a
software generator, post-processing each value (scaling, Box-Muller),
branching on it, and loading memory at addresses computed from it. Such
*stochastic memory accesses* (SMAs) have almost no locality. StAccato
removes random-number generation from the critical path. It does so with a
small per-core hardware generator that keeps values ready in a queue. That
queue also shows the values which have not been consumed yet. A helper
thread on a spare SMT context can read those future values and do the
post-processing and the SMA prefetches ahead of the main thread.

This repository holds synthesizable SystemVerilog for the hardware part:

| Module | Role |
|---|---|
| `staccato_pkg` | shared types: 32-bit value type, `rd_end_e` (TAIL/HEAD), `pf_hint_e` (T0, T1, T2, NTA, STACCATO), the Taus88 step functions |
| `stac_taus_gen` | three 32-bit state registers with Taus88 next-state logic, reseed select, three-input XOR output |
| `stac_seed_queue` | 2-entry FIFO of seeds waiting to replace S1 |
| `stac_sv_queue` | 8-entry queue of generated values, read at the tail (consume) or head (peek) |
| `stac_hwrng` | the generator: seed queue, generator core, SV queue and the reseed policy |
| `stac_pf_buffer` | data prefetch buffer with two entries reserved and owned for STACCATO-hinted prefetches |
| `staccato_top` | both parts as added to one core |

The core, its caches and the processor's true-random seed source are not
part of this RTL. Their connections are ports of `staccato_top`.

## The generator

The state is three 32-bit registers, 12 bytes in all. Each clock step
applies the Taus88 combined Tausworthe recurrences. These were chosen
because each register update is only a fixed bit permutation plus a narrow
XOR:

```
S1' = reseed ? seed : {S1[19:1], S1[18:6]  ^ S1[31:19]}   // 13 XOR gates
S2' = reseed ? 8    : {S2[27:3], S2[29:23] ^ S2[31:25]}   //  7 XOR gates
S3' = reseed ? 16   : {S3[14:4], S3[28:8]  ^ S3[31:11]}   // 21 XOR gates
out = S1 ^ S2 ^ S3                                         // 32 three-input XORs
```

`out` is combinational from the registers, so a value is ready every cycle.
Reseeding goes through S1 only. S2 and S3 restart from the fixed non-zero
values 8 and 16, which keeps all three registers in the valid range Taus88
requires. An S1 seed of 0 or 1 gives a zero S1 component (Taus88 needs
S1 > 1). The hardware does not reject such seeds: software must avoid them.

The S3 slice `S3[14:4]` is the standard Taus88 one. Take care if you compare
this with other write-ups of the design: the upper slice of S3 must come from
the low-order bits. A version that keeps `S3[31:21]` in place never changes
those bits. The testbenches check the generator against the usual
shift-and-mask form of Taus88:
`s = ((s & mask) << r) ^ (((s << q) ^ s) >> k)`.

## The two queues and the HEAD/TAIL protocol

This is the part that makes the helper thread work, and it is worth reading
closely.

The **SV Queue** holds 8 values (32 bytes). New values enter at the head.
The generator steps whenever the queue can take a value. So after reset the
queue fills in 8 cycles and then stays full. A tail read frees a slot, and
the generator refills it in the same cycle, so the core can take one value
per cycle without waiting.

An RDRAND carries an `END` operand (`rd_end`):

- **TAIL** is used by the main thread. It returns the oldest value and
  removes it.
- **HEAD** is used by the helper thread. It returns the newest value and
  removes nothing. With a full queue, that is exactly the value the main
  thread will receive **8 tail reads later**.

So the helper thread reads HEAD once after each main-thread draw. It then
knows each random number eight draws before the main thread uses it. It can
compute the derived address, or the transformed value, and prefetch or store
it. Rejection loops (draw again while `r > BIAS`) work the same way, as long
as the helper repeats the main thread's sequence of draws. The handshake is
`rd_valid`/`rd_end` in, `rd_ready`/`rd_data` out. `rd_ready` is low only
while the queue is empty, which happens right after reset. There is a single
read port: the core's SMT contexts share it, and the core arbitrates between
them. A HEAD read made while the queue is not full returns the newest value,
which is then fewer than 8 draws ahead.

The **Seed Queue** holds 2 seeds (8 bytes). It has two sources:

- RDSEED with a source register (`core_seed_*`), for software that wants to
  replay a known stream;
- the processor's seed generator (`sg_seed_*`), if the processor has one.

A software write is taken first when both arrive in the same cycle.

### Reseed policy

`reseed_interval` is the number of values each seed should produce. A
counter counts the values pushed since the last reseed. When it reaches the
interval and a seed is waiting, the seed is loaded. The value pushed in that
same cycle is the last one from the old state.

- 100 gives a reseed every 100 values. That 1% rate is the rate at which this
  generator, reseeded from a true-random source, matches the statistical
  quality of a hardware entropy instruction.
- 0 applies every seed as soon as it is queued. This is the replay mode.
  After writing seed `S`, the next 8 tail reads return the values already in
  the queue. The 9th returns `S ^ 8 ^ 16`, and Taus88 from `(S, 8, 16)`
  follows. The queue is not flushed on a reseed.

The interval counter and its port are this implementation's choice of
mechanism. The design itself only fixes the reseed rate, the queue sizes and
the datapath.

## The prefetch buffer

A helper thread that prefetches eight draws ahead brings lines into the cache
early. An ordinary prefetch buffer or cache might evict such a line before
the main thread gets to it. `stac_pf_buffer` prevents that as follows:

- Entries 0 and 1 are reserved for prefetches with the **STACCATO** hint.
  Each entry carries an ownership bit.
- When an owned entry's fill returns, the line goes to the L1 with
  `fill_keep` set. This tells the cache to place the line away from the
  next-to-be-evicted position. The entry itself stays allocated (`HELD`).
- The entry is released only when the main thread's demand access to that
  line arrives (`demand_valid`/`demand_line`, reported by
  `demand_stac_hit`).
- If both reserved entries are held, a further STACCATO prefetch waits
  (`pf_req_ready` low). The helper thread therefore can never run so far
  ahead that it throws away its own work.

Entries 2 to 7 serve the ordinary hints T0, T1, T2 and NTA:

- They are freed when their fill returns.
- An ordinary prefetch that finds no free entry is accepted and dropped
  (`pf_drop`).
- A request for a line already held by an entry of the same class is merged
  (`pf_merge`).

Miss requests go out on a valid/ready port tagged with the entry number. The
lowest-numbered waiting entry goes first, so StAccato entries have priority.
A request that was not accepted stays on the port until it is. Assertions
check that rule and that every fill answers an outstanding request.

The buffer tracks line addresses only: line data belongs to the cache and is
not modelled. The 8-entry size, the 48-bit address space (42-bit line
numbers, 64-byte lines) and the merge, drop and wait rules are this
implementation's choices. The two reserved entries, the ownership bit and the
keep-on-fill behaviour are the design's.

## Interfaces and timing at a glance

- Clock: one clock. Reset: asynchronous, active low. After reset the stream
  starts from `(RESET_SEED, 8, 16)`.
- Random values: one per cycle, sustained, from a full SV Queue. A
  tail read returns its data combinationally in the cycle it is made.
- Seeds: a seed written in cycle t is queued at t+1. If the interval allows,
  it is loaded into the state at the edge ending t+1.
- Prefetches and fills: one of each per cycle.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `SEED_DEPTH` | 2 | Seed Queue entries (design value) |
| `SV_DEPTH` | 8 | SV Queue entries, i.e. how far the helper sees ahead (design value) |
| `CNT_W` | 16 | width of `reseed_interval` (own choice) |
| `RESET_SEED` | `32'h2545_F491` | S1 after reset, must be > 1 (own choice) |
| `PF_ENTRIES` | 8 | prefetch buffer entries (own choice) |
| `STAC_ENTRIES` | 2 | entries reserved for STACCATO prefetches (design value) |
| `LINE_W` | 42 | line-number width (own choice) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/staccato_pkg.sv tb/tb_staccato_top.sv --top-module tb_staccato_top
./obj_dir/Vtb_staccato_top
```

| Testbench | What it checks |
|---|---|
| `tb_stac_taus_gen` | stream, hold and reseed against a shift-and-mask Taus88 reference |
| `tb_stac_seed_queue` | order, flags and count against a queue model under random traffic |
| `tb_stac_sv_queue` | tail/head semantics, push during a full-queue read, no stall at one read per cycle |
| `tb_stac_hwrng` | the whole generator cycle by cycle against a model; fill time, lookahead, replay seed, 10 reseeds per 1000 values at interval 100 |
| `tb_stac_pf_buffer` | ownership until demand, waiting third StAccato prefetch, merge, drop, priority, keep flag; random phase against a model |
| `tb_staccato_top` | end-to-end at default sizes (see below) |
| `tb_staccato_workloads` | workload patterns at default sizes: a Monte Carlo pi estimate (100,000 points read at one value per cycle, no stall, estimate within 0.03); Box-Muller deviates precomputed by a helper thread from head reads and matched by the main thread (mean and variance checked); reseed rates of 100%, 2% and 1%; replay of a stream from a software seed |

`tb_staccato_top` runs a mini-batch sampler over a 3,999,805-row table of
304-byte rows. For each draw, the main thread takes the tail value, works for
25 cycles and loads the row. The helper thread peeks the head and prefetches
the row it will need eight draws later. Seeds arrive from a model seed
source at a 1% reseed rate, and the next cache level answers after 20
cycles. The testbench checks that:

- the first values follow Taus88 from reset;
- every head value reappears eight tail reads later;
- after warm-up every main-thread load finds its line owned by StAccato;
- the mechanisms all occur: full queue, helper waiting for an entry, merge,
  reseed, kept fill, ordinary drop and replay seed.

## How far to trust it, and where it departs

- **Taken from the design:** the generator datapath, including the reseed
  constants 8 and 16; the queue sizes and the HEAD/TAIL semantics; the single
  seed path into S1; the one-value-per-cycle rate; the two owned prefetch
  entries and the keep-on-fill behaviour.
- **This implementation's choices:**
  - the reseed interval counter and its port;
  - the reset seed and the seed-source priority;
  - the absence of a queue flush on reseed;
  - all prefetch-buffer sizing, merge, drop and wait rules;
  - all handshakes.
- **Not covered:** the core, ISA decode of the extended RDRAND, RDSEED and
  PREFETCHh instructions, the caches, the seed source and the compiler pass.
  The compiler pass is software: it rewrites `rand()` calls into TAIL reads
  on the main thread and builds a helper thread that uses HEAD reads and
  STACCATO prefetches.
- Statistical quality (the Dieharder results) and speed-ups come from
  software measurements and are not reproduced here. Only cycle behaviour is
  verified.
