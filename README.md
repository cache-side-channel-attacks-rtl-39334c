# TSCache: a randomized cache hierarchy that is both timing-analysable and side-channel resistant

Safety-critical real-time software (automotive, for example) needs two things
from its caches that usually pull in opposite directions:

* **Timing analysability.** Measurement-based probabilistic timing analysis
  (MBPTA) collects execution times and fits a statistical model to them. That
  only works if the cache behaviour seen in testing is representative of what
  happens in the field, whatever addresses the linker gives the code and data
  at integration time. Randomizing *where* lines are placed (with a seed) does
  this: each run sees a fresh, random layout, and the addresses no longer
  decide the conflicts.
* **Resistance to contention-based cache timing attacks** (Prime+Probe,
  Evict+Time, Bernstein's AES attack). These rely on an attacker being able
  to evict chosen victim lines on purpose.

Random placement alone does not stop such attacks if the attacker runs with
the *same* seed as the victim: both then share one random layout, and the
attacker can learn it. The idea of this design is to keep the MBPTA-friendly
random placement and **give every software component its own seed**, switched
by the operating system at each context switch, with fresh seeds and a flush
once per hyperperiod. Attacker and victim lines then collide in sets that are
random and independent of their addresses, while each component still sees
the randomized, analysable timing MBPTA needs.

This repository holds synthesizable SystemVerilog for the cache hierarchy
and its seed handling, with self-checking testbenches.

## The hierarchy

```
          fetch port                     data port
              |                              |
      +-------v-------+              +-------v-------+
      | L1I rand_cache|              | L1D rand_cache|     16 KB, 128 sets, 4 ways
      |  random modulo|              |  random modulo|     32-byte lines
      +-------+-------+              +-------+-------+
              |        +------------+        |
              +------->| l2_arbiter |<-------+          round-robin, 1 in flight
                       +-----+------+
                             |
                     +-------v-------+
                     | L2 rand_cache |                   256 KB, 2048 sets, 4 ways
                     |    hashRP     |
                     +-------+-------+
                             |
                        memory port

  lfsr_prng --> random replacement bits, and a value the OS reads for seeds
  seed_ctrl --> seed of each cache, bypass mode, flush, hold (drain)
```

`tscache_top` wires these together. The processor core and main memory are
outside the design: their connections are the top's `if_*`, `d_*` and `mem_*`
ports. The operating system talks to `seed_ctrl` through the `cmd_*` ports.

| module | role |
|---|---|
| `tsc_pkg` | shared constants (32-bit addresses, 32-byte lines, 64-bit seeds), request struct, seed struct, command enum |
| `lfsr_prng` | 32-bit maximal-length LFSR |
| `benes_network` | recursive Benes permutation network of any width |
| `rm_placement` | random-modulo set index (L1) |
| `hashrp_placement` | hash-based random set index (L2) |
| `rand_cache` | set-associative cache using either placement, random replacement, flush, hold |
| `l2_arbiter` | shares the L2 between the two L1s |
| `seed_ctrl` | seed registers, drain-then-switch sequencing, flush |
| `tscache_top` | the whole hierarchy |

## Random placement: the two functions

The set index of a line is computed from its address *and the current seed*.
The two levels use different functions, because they need different
guarantees.

### Random modulo (L1): a seeded permutation of the index bits

```
xi  = index ^ seed[6:0]            (7 index bits, 128 sets)
xt  = tag   ^ seed[26:7]           (20 tag bits)
set = Benes_network(xi), switches driven by xt folded onto its 15 controls
```

A Benes network only ever *permutes* its input bits. So for one tag, that is
one 4 KB page when the way size equals the page size as it does here, the 128
line indices go to 128 different sets, for every seed. Lines of different
pages meet in a set for some seeds and not for others. This "page-fixed"
randomness is enough for MBPTA as long as page contents stay the same across
integrations, which an RTOS can easily guarantee. It also keeps the L1 miss
rate close to plain modulo placement.

The network (`benes_network`) is built recursively: an input column of 2x2
switches, an upper and a lower half-size sub-network, and an output column.
The L1 has 7 index bits, an odd width. For odd widths the last line skips both
switch columns and goes into the larger, lower sub-network, so every control
setting is still a permutation. With all controls 0 the network is the
identity, so seed 0 on tag 0 gives plain modulo placement. The 7-line network
has 15 switches. The 20 XORed tag bits are XOR-folded onto them
(`ctrl[j mod 15] ^= xt[j]`), so every tag bit has an effect.

### hashRP (L2): rotate-and-XOR hash of the whole line address

The L2's way size (64 KB) is much larger than a page, so a page-preserving
permutation is not an option. hashRP hashes the full 27-bit line address:

```
L        = addr[31:5]
amt_i    = (seed[27+5i +: 5] ^ L[5i .. 5i+4, wrapping]) mod 27     i = 0..6
r_0      = rotate_left(seed[26:0], amt_0)
r_i      = rotate_left(L,          amt_i)                           i = 1..6
set      = XOR-fold( r_0 ^ r_1 ^ ... ^ r_6 ) to 11 bits
```

Any two distinct lines share a set for some seeds and not for others
("full randomness"), and one line visits all sets as the seed changes. The
design choices here are subtle, and the testbench checks them:

* **An even number of rotated address copies.** Rotation and XOR-folding keep
  the parity of the number of 1 bits. If an odd number of copies of the
  address entered the XOR, two lines whose addresses differ in an odd number
  of bits would always land in sets of different parity, so they could never
  collide, for any seed. With seven rotators, one rotates the seed and six
  rotate the address. `N_ROT` must therefore be odd, and an elaboration-time
  check enforces it.
* **Address bits in the rotation amounts.** This makes the hash non-linear in
  the address. Two lines are rotated by different amounts, so whether they
  collide depends on the seed. The 5-bit slices of the seven amounts cover all
  27 line-address bits.
* **The seed term** `r_0` spreads each line over every set as the seed
  changes.

### Bypass

`bypass = 1` makes both functions forward the address index bits unchanged,
which gives plain modulo placement. Software that needs neither
analysability nor protection can then use the caches as ordinary caches. One
bypass bit serves the whole hierarchy. It is set together with the seeds by a
`seed_ctrl` command.

## Seeds, context switches and flushes

`seed_ctrl` holds the three seed registers (L1I, L1D, L2) and the bypass bit.
The operating system keeps each software component's seeds in its own task
data, and gives them to the hardware with a command:

* `CMD_SWITCH`: a context switch to another software component, or to the OS
  itself, which has its own seed. No flush is needed. Each component finds
  its own lines again under its own seed, because its data is private.
* `CMD_FLUSH`: the end of a hyperperiod. New random seeds are loaded (the OS
  draws them from `prng_value`) and every cache is invalidated. Execution
  times in different hyperperiods are then independent, as MBPTA requires.

Both commands go through the same sequence:

1. `hold` rises in the cycle after acceptance. No cache takes a new access.
2. **DRAIN**: `seed_ctrl` waits until no cache and not the arbiter is busy.
   Accesses already in flight finish under the old seed.
3. **APPLY**, one cycle: the seeds and the bypass bit are loaded, `flush`
   pulses for `CMD_FLUSH`, and `cmd_done` pulses.

With idle caches a command takes 2 cycles. Otherwise it also waits for the
access in flight to finish: at most one per cache, the longest being an L2
miss, so memory latency plus a few cycles.

Software obligations, which the hardware does not check:

* **Distinct seeds per component.** The protection rests on it. Runnables of
  the same component must share a seed if they communicate through memory.
  Different components, and the OS, must not share one.
* **Data shared across seeds.** The caches keep the full line address as tag,
  so a lookup never returns a wrong line. But data written under one seed and
  then read under another can be read from a stale copy that the other seed
  placed elsewhere. This is the price of not flushing on every switch. Data
  passed between components must be flushed, or passed through the OS with
  care.

## Cache behaviour and timing

`rand_cache` is one parameterizable cache (`PLACE`, `SETS`, `WAYS`).

* **Write policy:** write-through, no-write-allocate, at both levels. A store
  updates the line on a hit and is always passed down. Memory is always
  current, so a flush only clears valid bits, in one cycle.
* **Replacement:** fill an invalid way if there is one, otherwise a way picked
  by PRNG bits (random replacement). Each cache sees a differently rotated
  copy of the PRNG word.
* **Tags** hold the full 27-bit line address, because hashRP mixes index bits
  into the set.
* **Arrays** are read synchronously at the edge that accepts a request, as
  SRAM macros would be. Each way has its own tag and data array.
* **Protocol on every link:** `valid/ready` for a `mem_req_t` request, which
  is either a line read or a word write with byte strobes. Exactly one
  `rvalid` pulse answers each request, carrying the whole line (for writes it
  is just an acknowledge). A request waiting for `ready` stays stable, and
  simulation assertions in `rand_cache` check this. Each cache has one access
  in flight.

Latencies, counted from the edge that accepts the request to the cycle in
which the response is valid:

| case | cycles |
|---|---|
| L1 hit | 1 |
| L1 miss, L2 hit | 4 (L1 lookup, request to the arbiter, grant, L2 lookup) |
| L1 miss, L2 miss | memory latency + 6 |
| store | as the corresponding read, since every store goes through to memory |

## Parameters

| parameter | where | default | note |
|---|---|---|---|
| `L1_SETS`, `L1_WAYS` | `tscache_top` | 128, 4 | 16 KB with 32-byte lines |
| `L2_SETS`, `L2_WAYS` | `tscache_top` | 2048, 4 | 256 KB |
| `PLACE` | `rand_cache` | `PLACE_RM` | `PLACE_HASHRP` for the L2 |
| `N_ROT` | `hashrp_placement` | 7 | must be odd |
| `ADDR_W`, `LINE_BYTES`, `SEED_W` | `tsc_pkg` | 32, 32, 64 | shared constants |

`SETS` and `WAYS` must be powers of two. The seed must be wide enough for
both placement functions: RM needs index + tag bits (27), hashRP needs 27 +
5 x `N_ROT` bits (62). Elaboration-time checks catch a seed that is too
narrow.

## Where this design makes its own choices

The cache geometry, random modulo for the L1s, hashRP for the L2, the
seed-XOR-then-Benes structure of RM, rotators feeding XORs in hashRP, bypass,
per-component seeds, draining before a seed change and the flush once per
hyperperiod are the design's defining features. The following are choices
made here to complete it:

* 32-bit addresses and 32-byte lines. The line size follows from the
  geometry: 16 KB / (128 x 4) = 32 B.
* The exact hashRP wiring described above, including address-dependent
  rotation amounts and the parity rule.
* XOR-folding of the RM tag onto the switch controls, and the recursive
  Benes construction for odd widths.
* Write-through, no-write-allocate caches, one access in flight per cache,
  and full-line-address tags.
* The PRNG: a 32-bit Galois LFSR, x^32 + x^22 + x^2 + x + 1, reset value
  `0xACE12468`. Loading zero gives the reset value.
* Round-robin arbitration between L1I and L1D, one transaction at a time.
* The command interface of `seed_ctrl`, zero seeds at reset, randomized
  placement (bypass off) at reset.

Not included: the processor core, main memory, and the OS software that keeps
per-component seeds. A behavioural memory model, `tb/mem_model.sv`, serves
the testbenches.

## Testbenches

Every testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it shows |
|---|---|
| `tb_lfsr_prng` | sequence matches an independent bit-level model; seed load; zero guard |
| `tb_benes_network` | identity at zero controls; every setting is a permutation (7, 8 and 11 lines); many permutations reached |
| `tb_rm_placement` | bypass = modulo; one page fills all 128 sets for any seed; lines of different pages collide for some seeds only |
| `tb_hashrp_placement` | matches a reference written with explicit bit indices; any pair, including pairs in one page, collides for some seeds only |
| `tb_rand_cache` | 8-set 2-way cache against a shadow memory: hits, misses, write strobes, evictions, seed change without flush, flush, hold, bypass, write-through count, 1-cycle hit |
| `tb_l2_arbiter` | stable requests, responses routed to the right L1, round-robin under contention |
| `tb_seed_ctrl` | hold, no change while busy, 2-cycle switch, single flush pulse |
| `tb_tscache_top` | full-size hierarchy end to end: both ports at once against a shadow memory; context switch during traffic (drain); a component finds its lines again after a switch back; flush with PRNG-drawn seeds; bypass; latencies 1, 4 and memory + 6; every mechanism counted |
| `tb_autosar_schedule` | full size: six hyperperiods of a three-component schedule with its OS invocation; distinct seeds, shared buffer within one component, one flush and six switches per hyperperiod; prints one runnable's execution time per hyperperiod, which varies from one hyperperiod to the next |
| `tb_contention_attack` | full size: an evict-and-time attack on one victim line, 40 trials per setting. With a shared seed, the attacker's chosen 16-line eviction set evicts the line in nearly every trial; with per-component seeds it almost never does (limits: at least 90 % and at most 25 %) |

To run one with Verilator, for example the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tsc_pkg.sv tb/tb_tscache_top.sv --top-module tb_tscache_top
./obj_dir/Vtb_tscache_top
```

The full-size tests take seconds. The arrays of the full hierarchy are about
2.6 Mbit, held as per-way memories.

## Limits and things to watch

* The lint tool reports the inner nets of the outermost `benes_network` level
  as undriven, because it does not follow the self-instantiated sub-networks.
  They are driven. The permutation tests simulate every width used.
* Only one access is in flight per cache, and the L2 serves one L1 at a time.
  This keeps the drain logic simple, but it is not a high-bandwidth design.
* The security property depends on seed management in software, and so does
  the consistency of data shared across seeds. See "Seeds, context switches
  and flushes".
* An attack over millions of AES encryptions is far beyond RTL simulation.
  `tb_contention_attack` runs the core step of such an attack, the targeted
  eviction of one victim line, and shows the effect of per-component seeds on
  it. It does not recover a key.
