# A 4-way set-associative cache with tree pseudo-LRU replacement

A small, non-pipelined processor sits in front of a slow main memory. This
design puts a 256-byte cache between them. The cache is 4-way set-associative:
16 lines of 128 bits, in 4 sets of 4 ways. A finite state machine controls it.
Stores are written through to memory when they hit. When they miss they go
around the cache, so the cache never holds data that memory lacks. Loads that
miss fetch a whole 4-word block from a 4 KB main memory. That memory is built
from four 32-bit banks, so the whole block arrives in one access. The line a
miss replaces is chosen by a tree pseudo-LRU (PLRU): three bits per set that
approximate least-recently-used order.

The cycle counts are the point of the design. They come from a processor that
raises `rd` or `wr` to the moment the operation is over:

| access     | cycles | of which `stall` is high |
|------------|--------|--------------------------|
| read hit   | 3      | 0                        |
| read miss  | 5      | 3                        |
| write hit  | 3      | 2                        |
| write miss | 3      | 2                        |

## Address split

Addresses are word addresses. Main memory sees only bits 9:0 of the 32-bit
processor address.

| bits  | field | use                                                        |
|-------|-------|------------------------------------------------------------|
| 9:4   | tag   | compared with the 4 tags of the set (6 bits)               |
| 3:2   | index | selects one of the 4 sets                                  |
| 1:0   | word  | selects the 32-bit word of the 128-bit block; also the bank |

The controller tells the data array which line to use with
`loctn = {index, way}`, a 4-bit number from 0 to 15.

## Block diagram

```
            addr[9:4] tag, addr[3:2] index      rd wr flush        stall
processor ───────────────────────────────► cache_controller ───────────►
                                           ├ cache_fsm
                                           ├ tag_array   (tag + valid per line)
                                           └ plru_tree   (3 bits per set)
                                  loctn[3:0], refill, update
                                           │
addr[1:0], wdata ─────────────────► cache_data_array ── rdata ──► processor
                                           ▲ 128-bit block
             read_from_mem, write_to_mem   │         ready
cache_controller ───────────────► main_memory_system ──────► cache_controller
addr[9:0], wdata ───────────────►  4 x memory_bank (256 x 32)
```

## The controller's state machine

`cache_fsm` has one state for each step of an access:

```
Reset ──► Request ──rd──► Read Cache ──hit──► Provide Data ──► Request
             │                 └──miss──► Read Main Memory ──► Bring Data ──► Provide Data
             ├──wr, hit──► Write Cache ──► Write to Main Memory ──► Request
             └──wr, miss─────────────────► Write to Main Memory ──► Request
```

- **Request.** This is the idle state. `rd`, `wr` and `flush` are looked at
  only here. `flush` wins over both requests and `rd` wins over `wr`. On a
  write the tags are compared in this state, and `stall` goes high at once.
- **Read Cache.** The tags are compared. On a hit the PLRU is updated, and the
  next state puts the word out. On a miss `stall` goes high, and the PLRU
  victim is stored in the way register.
- **Read Main Memory.** `read_from_mem` is high for one cycle. All four banks
  read the block's row together.
- **Bring Data.** The state waits for `ready`. When `ready` comes, `refill`
  loads the 128-bit block into line `{index, victim}` and the tag is written
  as valid. The PLRU then points at that way.
- **Provide Data.** `rdata` carries the word, and `stall` is low.
- **Write Cache** (write hit). `update` writes the word into the line. In the
  same cycle `write_to_mem` sends it to memory. This is the write-through.
- **Write to Main Memory.** `write_to_mem` stays high until memory answers
  with `ready`, then the machine returns to Request. On a write hit the answer
  is already there on entry, because the write went out in Write Cache. On a
  write miss the write goes out here and the answer comes one cycle later.
  Either way the write stalls for 2 cycles.

The whole cycle budget depends on one timing fact. Main memory answers one
cycle after a command (`data_ready` is a register). A slower memory simply
keeps the machine in Bring Data or Write to Main Memory longer. `stall` stays
high all that time.

### Processor protocol

The processor drives `addr`, plus `wdata` for a store, and raises `rd` or
`wr`. It holds all of them until the first rising clock edge that meets two
conditions:

- at least three cycles have passed since it raised the request, and
- `stall` is low.

On a load, `rdata` holds the word in that last cycle. Then the processor drops
the request, or issues the next one straight away. The controller is back in
Request by then.

The controller reads `addr` directly and does not latch it. So the address
must not change while a request is held.

## Tree pseudo-LRU

Each set has a three-node tree, `b[2:0]`:

- `b[0]`, the root, records which half was used last: ways 0/1 or ways 2/3.
- `b[1]` records which of ways 0 and 1 was used last.
- `b[2]` records which of ways 2 and 3 was used last.

To find the victim, start at the root and follow the side that was *not* used
last, down to a leaf. Every read hit, write hit and refill updates the root and
the one node on the path to the way used. A write miss changes nothing, since
nothing is allocated. Reset or flush clears the trees. A cleared set then
fills in the order 3, 1, 2, 0. The victim is never the way used most recently.
There is no separate preference for invalid ways: the tree alone decides.

## Main memory

`main_memory_system` has four `memory_bank`s of 256 × 32 bits each. Row
`addr[9:2]` is the same in all four banks, and bank k holds word k of every
block. A read reads all banks and returns `data_out = {bank3, bank2, bank1,
bank0}`. A write goes only to bank `addr[1:0]`, through a one-hot write decode.
`data_ready` is the OR of the banks' one-cycle ready pulses.

Reset clears each bank's output register and `data_ready`, but not the words
it holds. The arrays therefore map onto block RAM, and main memory holds
undefined values until they are written. The testbenches store every word
first.

## Reset, flush and what is not kept

- `reset` is asynchronous and active high. It puts the FSM in Reset. It also
  clears every valid bit, every PLRU tree and the way register. The FSM moves
  to Request on the first clock edge after `reset` falls.
- `flush` is taken in Request. In one cycle it invalidates every line and
  clears the PLRU trees. It does not stall.
- There is no dirty bit. With write-through on hits and write-around on
  misses, a line is never newer than memory, so nothing has to be written back
  when a line is evicted.
- The data array has no reset. A line is read only after it has been refilled
  and marked valid.

## Where this RTL differs from the published description

- **Half cycles.** The published figures give read misses as 5.5 cycles (in
  one place 4.5) and writes as 3.5 cycles. Here they take 5 and 3 whole
  cycles. The stall counts are the same: 3 for a read miss and 2 for a write.
  The half cycles depend on where the processor's request falls against the
  clock edge. This RTL does not model that.
- **Write stall.** To stall a write for exactly 2 cycles, `stall` is raised
  combinationally in Request as soon as `wr` is seen. The write-through is also
  issued in Write Cache, in the same cycle as the cache update. Both are this
  design's choices.
- **Word select.** The source describes a general data multiplexer inside the
  controller. Here the word selection (`offset`) sits in the data array, as in
  the published top-level netlist.
- **Choices the source leaves open:**
  - the encoding of `loctn` as `{index, way}`;
  - the PLRU bit polarity;
  - the bank timing, with its one-cycle answer;
  - the combinational read of the data array;
  - priority of `rd` over `wr`;
  - flush accepted only between accesses;
  - reset not clearing memory contents.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|------|----------|
| `cache_pkg.sv` | sizes, the address split, the FSM state type |
| `cache_top.sv` | top level: controller, data array, main memory |
| `cache_controller.sv` | FSM, tag array and PLRU, plus the way register and `loctn` |
| `cache_fsm.sv` | state machine, stall and command outputs, assertions |
| `tag_array.sv` | 16 tags with valid bits, comparator |
| `plru_tree.sv` | tree pseudo-LRU, 3 bits per set |
| `cache_data_array.sv` | 16 × 128-bit lines, refill / word update / word read |
| `main_memory_system.sv` | four banks, block read, word write, ready OR |
| `memory_bank.sv` | 256 × 32-bit bank with one-cycle ready |

The widths come from `cache_pkg`. `tag_array` and `plru_tree` can also take
their index and tag widths as parameters.

## Simulation

Each block has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each
one ends by printing `TB_RESULT checks=N failures=M`. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cache_top \
    -y rtl -y tb +libext+.sv rtl/cache_pkg.sv tb/tb_cache_top.sv
./obj_dir/Vtb_cache_top
```

- `tb_cache_top` runs the whole system at its default sizes. It plays the
  processor for about 5000 random loads, stores and flushes, then reads back
  part of memory. A reference model holds its own memory, tags and PLRU
  trees. From these it predicts each load's data and whether each access
  hits. The test checks the cycle and stall counts of every access. It also
  counts read hits and misses, write hits and misses, replacements of valid
  lines, flushes and stall cycles, and fails if any of them never happened.
- `tb_test_vectors` runs three short hand-worked vector sets:
  - read miss, read hit and write hit;
  - the same with write misses;
  - repeated updates of one address.

  It then flushes the cache and reads the written words back from memory.
- `tb_cache_fsm`, `tb_cache_controller`, `tb_tag_array`, `tb_plru_tree`,
  `tb_cache_data_array`, `tb_main_memory_system` and `tb_memory_bank` test
  each block alone. The controller test walks one set through its PLRU fill
  and victim order by hand.

Every testbench has a watchdog. The simulator is two-state, and main memory is
not reset, so the tests that use memory write every word before they read it.
