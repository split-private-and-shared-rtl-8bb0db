# SPS2: split private and shared L2 caches for a snooping chip multiprocessor

A chip multiprocessor has to choose how to organise its second-level cache. Private L2s
(one per core) are close and fast but replicate every line that several cores read, which
wastes capacity and raises the off-chip miss rate. One shared L2 keeps a single copy of
everything but is large, slow and contended. SPS2 splits the L2 of each core by *kind of
data*:

* lines used by **one** processor live in that processor's **private L2 (PL2)**, small and
  fast (5 cycles);
* lines used by **two or more** processors live once in the **shared L2 (SL2)**, a
  banked, multi-ported cache that every core reads through its own port and that the
  snooping bus also reaches (12 cycles).

Each core also has a private L1 (PL1). A six-state MOSI-derived protocol records, for every
line, not only whether it is clean, dirty or owned but also whether one or several
processors have used it; that second bit decides where the line goes when it is replaced.

This repository holds synthesizable SystemVerilog for the whole on-chip hierarchy of the
four-core configuration: four node controllers each with PL1 and PL2, the four-bank SL2,
the snooping bus with its arbiter, and a top level that brings out the processor ports and
the main-memory port. Processors and DRAM are not part of the RTL; the testbenches drive
the processor ports and use a behavioural memory model.

## Structure

```
      cpu0          cpu1          cpu2          cpu3
       |             |             |             |
  +---------+   +---------+   +---------+   +---------+
  |node_ctrl|   |node_ctrl|   |node_ctrl|   |node_ctrl|
  | PL1 PL2 |   | PL1 PL2 |   | PL1 PL2 |   | PL1 PL2 |
  +---------+   +---------+   +---------+   +---------+
    |     |       |     |       |     |       |     |
    |    rd0      |    rd1      |    rd2      |    rd3       SL2 read ports
    |     |       |     |       |     |       |     |        (they cross the bus)
  ==+=====|=======+=====|=======+=====|=======+=====|====+====+==  snoop_bus
          |             |             |             |    |    |   (bus_arbiter inside)
          |             |             |             |    |    +-- mem_* port
          |             |             |             |    |        (off-chip memory)
  +-------+-------------+-------------+-------------+----+------+
  |  sl2_ctrl   bank0      bank1      bank2      bank3   bus    |
  |                                                      port   |
  +-------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `sps2_pkg` | Types (`cstate_t`, `buscmd_t`, line/word/address types) and the protocol rules as functions |
| `cache_array` | Set-associative tag/state/data store with LRU, used for every PL1, PL2 and the SL2 |
| `node_ctrl` | One core's PL1 + PL2 and the controller that keeps them coherent |
| `sl2_ctrl` | The shared L2: four line-interleaved banks, a bus port and a read port per node |
| `sl2_bank` | One SL2 bank and the SL2 state rules (helper of `sl2_ctrl`) |
| `bus_arbiter` | Round-robin bus arbiter, grant held for a whole tenure |
| `snoop_bus` | Atomic snooping bus: broadcast, data sourcing, write-backs |
| `sps2_top` | Four nodes + SL2 + bus |

## Line states

| State | Meaning | May live in |
|---|---|---|
| I  | invalid | anywhere |
| S1 | clean, used by one processor only | PL1, PL2 |
| M1 | dirty, used by one processor only, sole copy | PL1, PL2 |
| S2 | clean, used by two or more processors | PL1, PL2, SL2 |
| M2 | dirty, used by two or more processors, sole copy | PL1, PL2, SL2 |
| O  | owned: dirty, other clean S2 copies may exist; this copy answers requests | PL1, PL2, SL2 |

PL1 and PL2 of one node are **exclusive** (a line is in one or the other); a PL1 copy may
coexist with an SL2 copy (for example S2 in a PL1 and S2 or O in the SL2). Seen from one
node, the state of a line is the pair (private state, SL2 state), e.g. `S2O` or `M1I`.

## How an access proceeds

`node_ctrl` handles one processor access at a time:

1. **PL1 hit.** A load, or a store to an M1/M2 line, completes the cycle after the request
   is seen. No bus activity.
2. **PL1 miss.** After the PL2 access time the PL2 is checked. On a PL2 hit the line moves
   up into PL1 (keeping its state) and the access is replayed as a PL1 hit.
3. **Making room in PL1.** Before a line enters PL1 the victim is replaced:

   | PL1 victim | goes to | PL2 victim it displaces |
   |---|---|---|
   | S1, M1 | PL2 | S1/S2: dropped; M1: `PUTM` to memory; M2/O: `PSL2` to the SL2 |
   | S2, M2, O | SL2 (`PSL2`) | – |

4. **SL2 read.** A load that misses in both private caches looks the line up in the SL2
   through the node's own read port, without the bus. On a hit the line enters PL1 as S2
   (the SL2 keeps S2 or O) or as M2 (the SL2 held M2 and hands it over). Only on a miss
   does the node go to the bus.
5. **Bus miss.** If the SL2 does not have it either, a load issues `GETS`, a store
   issues `GETX` (also for a store to an S1/S2/O line, which keeps its own data). All other
   nodes snoop their PL1 and PL2 and the SL2 is looked up at the same time. The line comes
   from a node holding it dirty, else from the SL2, else from memory. The filled state:

   | Command | Condition | New state |
   |---|---|---|
   | GETS | SL2 held it M2 (the SL2 copy moves to the reader) | M2 |
   | GETS | some other cache held a copy | S2 |
   | GETS | only memory had it | S1 |
   | GETX | no other cache held a copy (and, for an upgrade, the node had S1) | M1 |
   | GETX | otherwise | M2 |

A node whose SL2 read is outstanding answers no snoop until the line is in its PL1. The
SL2 bank orders the read with any bus command on the same line, so either the bus command
comes first (and the read misses), or it comes later and its snoop finds the new copy.

Any step that needs the bus first wins it and then keeps it (`bus_req` stays high) until
the processor access completes, so a miss together with its write-backs is atomic. This
is what makes the controller simple: while a node owns the bus nobody else can change a
line it is working on, and while it waits for the bus it keeps answering snoops and
re-evaluates its caches from scratch once granted.

### Snoop reactions (other nodes)

| Snooped | Private state | New state | Supplies data |
|---|---|---|---|
| GETS | M1, M2, O | O | yes |
| GETS | S1, S2 | S2 | no |
| GETX | M1, M2, O | I | yes |
| GETX | S1, S2 | I | no |

A valid copy of any kind raises `s_shared`, which is what turns a filled line into S2/M2.

### The SL2

Lines are spread over four banks by the low two bits of the line address. Each bank
serves one access at a time and takes 12 cycles, so accesses to different banks overlap.
A bank takes the bus port first when both the bus and read ports want it; read ports
waiting for the same bank take turns. A read-port access behaves like a `GETS`.

| Request | SL2 state | Result |
|---|---|---|
| GETS hit | S2, O | supplies, unchanged |
| GETS hit | M2 | supplies, invalidated (the reader takes M2) |
| GETX hit | any | supplies, invalidated |
| PSL2 of S2 | line held | dropped |
| PSL2 of O/M2 | line held (S2) | overwritten, O |
| PSL2 | miss | allocated with the pushed state; an M2/O victim is written to memory, an S2 victim dropped |

## Bus transactions and timing

`snoop_bus` runs one command at a time for the node holding the grant:

* `GETS`/`GETX`: snoop every other node (`s_valid` held until each `s_done`) and request
  the SL2 in parallel; when all have answered, take a node's data, else the SL2's, else
  read memory.
* `PSL2`: hand the line to the SL2; if it returns a dirty victim, write that to memory.
* `PUTM`: write the line to memory.

The command ends with a one-cycle `m_done`, with `m_rdata`, `m_shared` and `m_sl2_m2`.

Latencies with the default parameters, counted from the cycle the request is first seen
by an idle node:

| Event | Cycles |
|---|---|
| PL1 hit | 1 |
| PL2 hit, free PL1 way | L2_LAT + 2 = 7 |
| SL2 hit through the read port, free PL1 way | L2_LAT + SL2_LAT + 3 = 20 |
| SL2 lookup inside a bus command, bank free | SL2_LAT = 12 |
| Memory access | set by the memory (200 in the testbench model) |

## Interfaces

* **Processor** (per node): hold `cpu_req`, `cpu_we`, `cpu_addr` (byte address of a 64-bit
  word), `cpu_wdata` until `cpu_ready`; load data is on `cpu_rdata` in that cycle.
* **Memory**: `mem_req` stays high until a one-cycle `mem_ack`; `mem_laddr` is a 64-byte
  line address; read data arrives with `mem_ack`.
* `ready` rises after every cache has cleared its state array, one set per cycle after
  reset (2048 cycles with the default sizes, set by the PL2). Requests before that wait.

## Parameters (`sps2_top`)

| Parameter | Default | Origin |
|---|---|---|
| `N_NODES` | 4 | evaluated configuration |
| `L1_SETS` × `L1_WAYS` | 256 × 4 (64 KB, 64-byte lines) | size from the evaluated configuration; 4 ways chosen here |
| `L2_SETS` × `L2_WAYS` | 2048 × 4 (0.5 MB) | evaluated configuration |
| `L2_LAT` | 5 | evaluated configuration |
| `SL2_SETS` × `SL2_WAYS` | 4096 × 8 (2 MB) | evaluated configuration |
| `SL2_LAT` | 12 | evaluated configuration |
| `SL2_BANKS` | 4 | banks chosen here; the scheme says only "multi-banked" |

`L2_WAYS = 1` gives a direct-mapped PL2, an option the scheme explicitly allows.
Addresses are 32 bits (4 GB), words 64 bits, lines 64 bytes (`sps2_pkg`).

## Where this RTL departs from, or adds to, the published scheme

* **SL2 ports and banks.** The scheme gives a multi-banked SL2 with four ports but not
  how they are organised. Here there are four banks with one access each in flight, a read
  port per node and a bus port. The bus itself still carries one command at a time.
* **Conflicting replacement rules.** The scheme says both that an evicted S1 line "goes
  to the SL2" and that S1/M1 PL1 victims go to the PL2; the second, more specific rule is
  implemented. Likewise an M1 line leaving the PL2 is written to memory, although the scheme
  also mentions moving overflowing private data to the SL2 when it has room.
* **When the SL2 is searched.** It is read after the PL2 miss, not at the same time. Only
  loads use the read port. Stores always go to the bus, because the other copies must be
  invalidated. A node that already holds the bus for a write-back sends `GETS` directly;
  the SL2 is looked up as part of that command.
* **Own choices** where the scheme is silent: LRU replacement with an invalid-way-first
  rule, round-robin arbitration, the handshakes, one outstanding access per processor, the
  M1/M2 choice on an upgrade (M2 unless the node held S1 and nobody else answered), the
  handling of P_SL2 onto a line the SL2 already holds, and the reset sweep.
* The scheme's coherence proofs (model checking of the protocol) are not reproduced. The
  same inconsistency conditions are checked here by simulation only: two owners, an
  exclusive copy beside another copy, and node states outside the reachable twelve.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it shows |
|---|---|
| `tb_cache_array` | hit/victim/LRU against an independent model, reset sweep |
| `tb_bus_arbiter` | one-hot grant, tenure held, round-robin order, fairness |
| `tb_sl2_ctrl` | every SL2 rule above against a model, on the bus port and the read ports; 12-cycle access; four banks working at once; reads of one bank taking turns; bus port first |
| `tb_snoop_bus` | data source priority, `m_shared`/`m_sl2_m2`, write-back paths, memory latency |
| `tb_node_ctrl` | loads return the latest value under random snoops and random SL2 read answers; PL1 hit 1 cycle, PL2 hit 7 cycles; upgrade, PUTM/PSL2 rules; SL2 read hit (S2 and M2) and miss |
| `tb_sps2_top` | four cores, 16 000 random loads/stores on shrunk caches, every load checked against a reference image; every mechanism (PL1 hit, PL2 hit, GETS, GETX, PSL2, PUTM, cache-to-cache supply, SL2 supply on the bus, SL2 M2 hand-over, loads served by the SL2 read ports (also as M2), two or more SL2 banks busy at once, SL2 victim write-back, memory read, bus contention) must occur; whenever the bus is idle a monitor reads every cache array and checks the coherence invariants (below) |
| `tb_sps2_kernels` | the top at its default sizes running, from four processor models, a two-pass radix sort of 2048 keys and a 128 x 128 transpose (the communication patterns of the SPLASH-2 radix and FFT programs) with flag barriers; results read back and compared; about 1.1 million cycles |
| `tb_sps2_full` | the top at its default sizes with a 200-cycle memory: a short directed sequence with latency checks, including a 20-cycle SL2 read-port hit |

The coherence invariants checked by `tb_sps2_top` for every line in use are:

* no node holds a line in both PL1 and PL2;
* there is at most one owner (M1, M2 or O) over all caches;
* an M1, M2 or S1 copy is the only valid copy anywhere;
* every node's pair (private state, SL2 state) is one of the twelve reachable ones: II, IS2,
  IM2, IO, S1I, S2I, S2S2, S2O, M1I, M2I, OI and OS2.

All twelve pairs must also occur during the run. With GETX made to spare clean copies,
the monitor reports tens of thousands of violating samples.

`tb/mem_model.sv` is the behavioural memory (sparse, fixed latency); an unwritten line
reads as a pattern computed from its address.

What this does not show: performance numbers for the full benchmark programs (there is no
processor model, only the reduced kernels above), a formal proof of the protocol (the
invariants are checked by simulation only), and anything about timing closure or SRAM
macros; the caches are plain arrays.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sps2_pkg.sv tb/tb_sps2_top.sv --top-module tb_sps2_top -o sim
./obj_dir/sim
```

Replace `tb_sps2_top` with any testbench name. The end-to-end test runs in about a
second. The full-size ones need more memory to build (the SL2 alone is 16 Mbit) but also
simulate in seconds; `tb_sps2_kernels` takes about ten.
