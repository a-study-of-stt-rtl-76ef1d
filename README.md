# STT-RAM processing in cache and in memory

Moving operands between memory and the processor often costs more than the
arithmetic done on them. This design moves simple arithmetic into the memory
hierarchy itself. The L1 and L2 caches are built from relaxed-retention
STT-RAM and compute inside their arrays ("processing in cache", PiC). The
non-volatile STT-RAM main memory does the same ("processing in memory", PiM).

The central trick is analog. An STT-RAM cell is a resistor: a '0' has low
resistance and a '1' has high resistance. Turn on two word-lines at once and
each bit-line carries the sum of two cell currents. That sum falls into one of
three levels: both '0', exactly one '1', or both '1'. Two sense amplifiers with
different reference currents turn these levels into AND and OR (with NAND and
NOR as their complements). A small logic block on every bit-line then builds
XOR and a full adder from these values. A whole row of 32-bit words (16, 64 or
256 of them, depending on the level) is computed in one operation and written
back into another row.

Two further mechanisms make this work in a real hierarchy:

* **Retention monitoring.** Relaxed-retention STT-RAM forgets its data after
  75 µs (L1) or 10 ms (L2). Every cache block has a 2-bit counter that restarts
  whenever the block is written. Before the data can decay, the block is
  written back to the level below (if dirty) or dropped.
* **Operation chaining.** The processor does not wait for the in-memory
  units. It queues "store operand" and "compute" commands and keeps going.
  Each finished computation is signalled by a DONE pulse.

## The hierarchy at a glance

| Level | Size | Cell | Retention | Parallel 32-bit ops | Row | Read | Write | Logical | Add |
|---|---|---|---|---|---|---|---|---|---|
| L1 | 32 KB | relaxed STT-RAM | 75 µs | 16 | 1 block (64 B) | 1 | 2 | 3 | 15 |
| L2 | 1 MB | relaxed STT-RAM | 10 ms | 64 | 4 blocks | 2 | 4 | 6 | 16 |
| Memory (PiM) | 512 MB | non-volatile STT-RAM | — | 256 | 16 blocks | 32 | 56 | 88 | 97 |

Latencies are in cycles of a 2 GHz core clock. These numbers are the
defaults of `pic_system`. Two alternative configurations are available
through parameters only:

* L2 with 75 µs retention: `L2_WRITE=3`, `L2_ADD=15`, `L2_TICK=37500`.
* Memory with 512 lanes: `MEM_LANES=512`, `MEM_ROWS=262144`.

## How a bit-line computes

`stt_bitline` models the currents and `mwl_sense_amp` models the comparators.
Both are behavioural models of analog circuitry, on an integer current scale.
With a tunnel magneto-resistance ratio of 150 %, R_AP = 2.5 × R_P. The model
therefore gives a '0' cell 25 units of current and a '1' cell 10 units:

| Cells on the two word-lines | Bit-line current | AND ref (27) → AND | OR ref (42) → OR |
|---|---|---|---|
| 0, 0 | 50 | 0 | 0 |
| 0, 1 or 1, 0 | 35 | 0 | 1 |
| 1, 1 | 20 | 1 | 1 |

A sense amplifier outputs 1 when the bit-line current is **below** its
reference, because a '1' is the high-resistance state. The unit values and the
midpoint references are this design's choice. Only the ratio and the
three-level scheme are fixed. Process variation is not modelled.

A regular read uses the same amplifiers. The addressed word-line is raised
together with a reference word-line that holds '0', and the OR output is taken.
There is no separate read-only sense path. A write drives one word-line.

## Bit-line logic and the ripple-carry lane

`bl_logic` sits after the sense amplifiers of each bit-line. Its four select
lines pick the result:

* Sel2:Sel1 choose NAND, AND, OR or NOR through a 4:1 multiplexer.
* Sel3 replaces that with XOR, formed as OR & NAND.
* Sel4 replaces it with the full-adder sum XOR ^ Cin.
* The carry Co = AND | (XOR & Cin) always goes to the next bit-line.

`pic_lane` puts 32 of these side by side to form a ripple-carry adder.
Logical results are ready as soon as the sense amplifiers settle, inside the
read time. This is why the logical latency is exactly read plus write at every
level.

Addition is bit-serial in chunks. A level has `ADD_STEPS = add − read − write`
cycles for the add: 12 at L1, 10 at L2 and 9 in memory. The lane resolves
`BPC = ceil(32 / ADD_STEPS)` bits per cycle: 3 at L1 and 4 at L2 and in memory.
A carry register carries the result from one chunk to the next. Steps left
over at the end are idle, so every level meets its table latency exactly.

## Subarray operation and timing

`pic_subarray` holds `ROWS × (LANES·32)` bits. Its word-line decoder can raise
two rows at once. A row-wide result always lands in a whole destination row.
The bit-line decoder picks one 64-byte block out of a row for reads and
writes.

Handshake: `req_valid`/`req_ready`, where ready means idle. One operation runs
at a time, and `done` pulses in its last cycle. Counting from the accepting
clock edge to the cycle in which `done` is high:

| Operation | Cycles |
|---|---|
| read | `READ_LAT` (`rdata` valid with `done`) |
| write | `WRITE_LAT` |
| AND, NAND, OR, NOR, XOR | `READ_LAT + WRITE_LAT` |
| ADD | `ADD_LAT` |

Both operands must lie in the same array, in rows whose words line up lane by
lane. Unaligned operands are not handled.

## Retention: counters, ticks and expiry

* **Counter clock.** `retention_tick_gen` divides the core clock into the
  counter clock: every 37,500 cycles (18.75 µs) for the L1, every 5,000,000
  cycles (2.5 ms, i.e. 10 ms / 4) for the L2.
* **Counter.** Each block has a `block_monitor_counter` with four states.
  Any write restarts it: a store, a fill, a write-back from above, or a PiC
  result (which rewrites every block of its row). Each tick moves it one state
  up, and it holds in the last state.
* **Expiry.** Reaching the last state raises `expire`. This happens between
  two and three tick periods after the last write, so always before the
  retention time of four periods has passed.

A computation rewrites whole blocks, so one counter per block is enough. This
is why the lane count of a level is a multiple of 16 (one 64-byte block).

`pic_level` wraps a subarray with this per-block state:

* **State per block:** a valid bit, a dirty bit, a counter, and a *home*
  address, i.e. where the block belongs in the level below.
* **Finding expired blocks:** a scanner visits one block per cycle. A full
  sweep (512 or 16,384 cycles) is much shorter than a tick period, so no
  expiring block is missed.
* **Expiry port:** when the scanner finds an expired block it stops and shows
  the block on `exp_*`. The controller writes it back to its home if it is
  dirty, then acknowledges it. The acknowledge invalidates the block and the
  scan moves on.
* **Memory:** the memory level (`RELAXED=0`) has none of this state. It
  always hits and never expires.

Home bookkeeping:

| What is written | Dirty | Home |
|---|---|---|
| Stored block, PiC result | yes | the command's `home` field (a result row takes `home`, `home+1`, …) |
| Fill from below | no | the command's `home` field |
| Write-back from above into a valid block | yes | keeps its own home |
| Write-back from above into an invalid block | yes | the command's `home` field; for an expiry write-back, the block's own address |

The caches are **directly addressed**. There are no tags, no set
associativity and no replacement policy. Software, or a controller added in
front, decides where each block lives.

## The controller and operation chaining

`pic_controller` takes `pic_cmd_t` commands into an 8-entry queue:

| `kind` | Meaning | Fields used |
|---|---|---|
| `CMD_STORE` | StorePIM: write one block | `level`, `addr_d`, `home`, `data` |
| `CMD_LOAD` | read one block, answered on `rsp_*` | `level`, `addr_a` |
| `CMD_COMPUTE` | Compute_Inst_PIM: row op, answered by `done` | `level`, `op`, `addr_a`, `addr_b`, `addr_d`, `home` |
| `CMD_MOVE` | copy a block from `src_level` to `level` | `addr_a` (source), `addr_d`, `home` |

How commands are handled:

* **Move direction.** A move downwards is a write-back: the target becomes
  dirty and keeps its home. A move upwards is a fill: the target is clean.
* **Order.** Commands run strictly in order, one at a time. Nothing checks
  data hazards; the program (or its compiler) must order dependent commands.
* **Stalls.** The processor is stalled only when the queue is full
  (`cmd_ready` low).
* **Expiry first.** Before taking the next command, the controller serves an
  expiring L1 block, then an expiring L2 block.

Operation chaining is the usage pattern this supports. For example, the
processor computes products and StorePIMs each one, issues a compute that adds
the first batch, and keeps producing and storing the next batch while the
addition runs.

## Files

All modules are in `rtl/`, with one module or package per file.

| File | Role |
|---|---|
| `pic_pkg.sv` | widths, `pic_op_e`, `bl_sel_t`, `pic_cmd_t`, current scale |
| `stt_bitline.sv` | bit-line current model (behavioural) |
| `mwl_sense_amp.sv` | sense-amplifier model (behavioural) |
| `bl_logic.sv` | per-bit-line logic |
| `pic_lane.sv` | 32-bit lane, chunked ripple-carry add |
| `pic_subarray.sv` | array, decoders, sensing, lanes, sequencing |
| `block_monitor_counter.sv` | per-block retention counter |
| `retention_tick_gen.sv` | counter clock |
| `pic_level.sv` | one hierarchy level with block state and expiry |
| `sync_fifo.sv` | command queue |
| `pic_controller.sv` | command execution, DONE, write-backs |
| `pic_system.sv` | top: L1 + L2 + memory + controller |

Reset (`rst_n`) is asynchronous and active low. The arrays themselves are not
reset.

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pic_system \
    rtl/pic_pkg.sv $(ls rtl/*.sv | grep -v pic_pkg) tb/tb_pic_system.sv -o sim
obj_dir/sim
```

| Testbench | What it covers |
|---|---|
| `tb_stt_bitline`, `tb_mwl_sense_amp` | current levels and comparator outputs |
| `tb_bl_logic` | all operations and carries, exhaustively |
| `tb_pic_lane` | random operands, add latency for 12 and 9 steps |
| `tb_pic_subarray` | reads, writes, all operations, latency of each |
| `tb_block_monitor_counter`, `tb_retention_tick_gen` | counting, clear, expire, tick spacing |
| `tb_pic_level` | valid/dirty/home bookkeeping, expiry timing window, non-volatile level |
| `tb_pic_controller` | command routing, queue stall, DONE, expiry write-back order |
| `tb_pic_system` | end to end at reduced sizes (see below) |
| `tb_pic_workloads` | small kernels through the command port: matrix add in L2 and memory, string compare, binarised dot products, carry-less multiply |

`tb_pic_system` shrinks the arrays but keeps the real latencies. It runs
operations in all three levels, fills, write-backs, expiries of dirty and
clean blocks, misses, queue stalls and commands accepted while a computation
runs. It fails if any of these never happens.

The full-size top has not been simulated. At the default sizes the L2 alone
has 16,384 block counters. Verilator expands each one into its own code,
giving about 240 MB of C++ that takes roughly half an hour to compile on one core.
The largest configuration simulated is the one in `tb_pic_system`:

* L1: 8 rows of 16 lanes;
* L2: 16 rows of 64 lanes;
* memory: 8 rows of 256 lanes;
* all latencies and lane widths at their defaults.

The full-size top does pass lint and elaboration.

## How far to trust it, and where it departs

Followed closely:

* three-level sensing and the AND/OR references;
* the bit-line logic with four selects and a carry chain;
* ripple-carry addition;
* every size, lane count and latency in the tables above;
* 2-bit counters that restart on write and raise an expiry flag, with an
  18.75 µs counter clock;
* whole-block PiC results;
* reads through the compute sense amplifiers with a '0' word-line;
* the Compute/DONE handshake and StorePIM / Compute_Inst_PIM commands.

This design's own choices:

* the integer current scale;
* the chunked schedule that spreads an add over the add cycles;
* the 2.5 ms L2 counter period;
* the expiry scanner and home-address bookkeeping;
* the command format, queue depth and move command;
* L2 with 10 ms retention and memory with 256 lanes as the defaults;
* each level modelled as one array rather than mats of smaller subarrays.

Not built:

* tags, set associativity and replacement;
* process variation and all energy and area behaviour;
* the processor itself, which sits outside `pic_system` and drives its command
  port.
