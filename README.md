# A linear stack cache

A stack machine keeps procedure parameters and local variables on a stack in
memory, and nearly all of its data references land close to the top of that
stack. This design is a data cache built for that pattern. It does not keep a
set of unrelated blocks chosen by a hash of the address. It holds **one
contiguous window of the stack**: every quad from a *base* block up to the
*top of stack* (TOS). The window is contiguous, so no block needs an address
tag. Two boundary registers say what is cached, and block `b` of the stack
always sits in RAM slot `b mod NBLK`. Each cycle the cache serves two reads
and one write from the processor, and it follows the processor's TOS as
procedures are called and return.

The organisation and the two replacement policies come from J.A.H. Paalman's
1990 master thesis "A stack cache for the C-processor" (Eindhoven University
of Technology). That work defines the blocks, the order of the control
actions and an example configuration. It leaves timing, handshakes, most sizes
and all circuit detail open. The RTL here fills those in; the choices are
listed in [Departures and own choices](#departures-and-own-choices).

All sizes are in **quads** (32-bit words). Addresses are 30-bit quad
addresses. Each is qualified by a 16-bit process identification number
(**PIN**), and every process has its own stack.

## The stack window

```
 address
   ^        not stack data: passed to memory uncached
   |   TOS  ---------------------------------  <- tos register (quad)
   |        |  cached, contiguous           |
   |        |  (at most CACHE_QUADS)        |
   |  base  ---------------------------------  <- base register (block)
   |        |  stack, in main memory only   |
   | bottom ---------------------------------  <- bottom register (quad)
   |        not stack data: passed to memory uncached
```

- **Stack data** is every address from the process's stack *bottom* to its
  TOS. Nothing else is cached.
  - Anything above the TOS, below the bottom, or with another PIN goes to
    memory as a single uncached quad access.
  - The class is decided per port by `compare_unit`: other task, global, hit
    or miss.
- **Hit.** The PIN matches, the address lies in the stack, its block is at or
  above `base`, and the slot's valid bit is set. A hit is answered in the
  cycle of the request: the RAM read is asynchronous, so `rd_ack` and
  `rd_data` come in the same cycle as `rd_req`.
- **Miss.** A stack address whose block is below `base` or not valid.
- **Status per block** (`linear_tag_block`):
  - a valid bit per block;
  - a dirty bit per *transfer block* (4 quads), so that only modified quarters
    of a block go back to memory;
  - a *clear* bit per quad, which marks space that was allocated but never
    written. Such a quad reads as zero, so new stack space never shows data
    left behind by an earlier frame or process.

## Following the TOS: overflow, underflow and the two policies

The processor reports each TOS move with a command (`ctl_op = CTL_SET_TOS`).
This is where a stack cache differs from an ordinary cache.

### TOS moves up (call)

- If the new TOS still fits (`new TOS block - base < NBLK`), only the TOS
  register changes. The newly covered blocks are marked valid and their quads
  clear. No memory is read: space above the old TOS has no defined content.
- If the new TOS does not fit, the window must slide up. This is an
  **overflow**:
  1. The blocks that fall out at the bottom are invalidated.
  2. Dirty ones among them are first copied, one quad per cycle, into the
     write buffer.
  3. The base then moves up.

### TOS moves down (return)

- Blocks above the new TOS are invalidated without any write-back. Their data
  is dead.
- The quads above the new TOS in its own block are marked clear.
- If the new TOS is below the base, the window is empty. This is an
  **underflow**: the base jumps to the TOS block and that block is fetched.

### Cut back K (`REPL = REPL_CUT_BACK_K`)

Space is made or data fetched only when it is needed. A reference below the
base (a return into a frame that had been pushed out) does two things:

- It fetches the missed block.
- It lowers the base in steps of **K blocks**. The new base is the
  highest multiple-of-K step at or below the missed block. It is never below
  the stack bottom, and never so low that the window would exceed the cache.

The missed block is fetched first and answered as soon as its quad arrives.
The blocks between the new and the old base are then fetched one by one in
idle cycles, highest first. K therefore controls how far the cache reaches
ahead of a run of returns.

### Hybrid (`REPL = REPL_HYBRID`, the default)

This adds two background activities to cut back K. Both run only in cycles
when nothing else is pending.

- **Early write-back.** A *dirty pointer* marks the lowest block that may be
  dirty. Every write below it pulls it down.
  - While `TOS block - dirty pointer > DIRTY_OFFSET`, the block at the
    pointer is written back through the write buffer and the pointer
    advances.
  - The block stays valid; only its dirty bits are cleared.
  - A later overflow or task switch then finds little left to write.
- **Prefetch.** While `TOS block - base < PREFETCH_OFFSET` and the base is
  above the stack bottom, the block just below the base is fetched. A run of
  returns then finds its data already present.

The cost of the hybrid policy is bus traffic. Blocks can be written back and
later modified again, and prefetched blocks may never be used.

## Misses, the read buffer and the write buffer

There is one bus to memory, carrying one quad per transaction. Two buffers sit
between it and the RAM.

### Read buffer (`read_buffer`, one block)

- A fetch allocates the read buffer for its block. The fetch begins with the
  transfer block that holds the missed quad and wraps around the block.
- Each quad becomes readable the moment it arrives. A waiting read completes
  as soon as its quad is there, not when the whole block is in the RAM.
- A **write miss** completes as soon as the buffer is allocated. The data goes
  into the buffer and marks its quad as *written*. The stale copy fetched from
  memory later never overwrites a written quad.
- When the block is complete, it is moved into the RAM, one quad per cycle,
  through the RAM's second write port. While it moves, writes to that block
  wait (`lock`). A quad written in the buffer arrives in the RAM already
  dirty.
- **No room in the RAM.** This happens when the missed block lies more than a
  cache size below the TOS.
  - A read is answered from the read buffer, which keeps the block without
    moving it in.
  - A write goes straight to memory.

### Write buffer (`write_buffer`, FIFO of `WB_ENTRIES` blocks)

- The control block copies a block out of the RAM through the RAM's third
  read port. While it copies, processor writes to that block are held off for
  at most `BLOCK_QUADS` cycles.
- The buffer drains in the background and writes only the quads of dirty
  transfer blocks.
- A fetch or an uncached access to a block that is still in the write buffer
  waits until it has drained. Memory is therefore never read stale, and no
  data path from the write buffer back to the RAM is needed.

### Bus unit (`bus_unit`)

- It shares the memory port between the control block (fetches and uncached
  accesses) and the write buffer.
- The control block wins when both ask at once, so write-backs fill the gaps
  between demand transfers.
- A granted transfer is never preempted.

### One miss at a time

`replacement_unit` handles one action at a time, in this order:

1. the lowest-numbered port with a request that neither the RAM nor the read
   buffer can serve (read port 0, read port 1, then the write port);
2. a pending command;
3. filling the gap left by a cut back;
4. the hybrid write-back;
5. the hybrid prefetch.

A started action, including a prefetch, is never interrupted.

## Task switches

`CTL_TASK_SWITCH` carries the PIN, TOS and stack bottom of the next process.
The window only describes one stack, so the cache is flushed:

1. Every dirty block is copied into the write buffer.
2. All blocks are invalidated.
3. The new PIN, TOS and bottom are loaded.
4. The base is set to the new TOS block, so the new process starts with an
   empty window and underflows into its own stack.

Requests carrying a PIN other than the current one are served uncached.

The hybrid policy shortens a flush because most old data has already been
written back.

## Interface and timing

Top module: `linear_stack_cache`. Types are in `sc_pkg`.

| Signal | Dir | Meaning |
|---|---|---|
| `rd_req/rd_pin/rd_addr [NRD]` | in | read request per port, held until `rd_ack` |
| `rd_ack/rd_data [NRD]` | out | data valid with ack; same cycle on a hit |
| `wr_req/wr_pin/wr_addr/wr_data` | in | write request, held until `wr_ack` |
| `wr_ack` | out | write is taken at this clock edge; same cycle on a hit |
| `ctl_valid/ctl_op/ctl_pin/ctl_tos/ctl_bottom` | in | command (`CTL_SET_TOS`, `CTL_TASK_SWITCH`), held until `ctl_ready` |
| `ctl_ready` | out | one-cycle pulse when the command has been carried out |
| `mem_req/mem_we/mem_pin/mem_addr/mem_wdata` | out | one-quad memory transaction, stable until `mem_ack` |
| `mem_ack/mem_rdata` | in | one-cycle acknowledge; read data valid with it |
| `events` | out | one-cycle strobes per mechanism, for statistics |

Notes on the interface:

- All ports can complete in the same cycle. Two reads and one write per clock
  is the steady state while everything hits.
- A write and a read to the same address in one cycle: the read returns the
  old value.
- The reset `rst_n` is asynchronous and active low. After reset everything is
  invalid and no address counts as stack data until the first task switch.

`events` (`sc_events_t`) counts:
- RAM hits and read-buffer hits;
- demand fetches and reads with no room in the RAM;
- uncached accesses;
- overflows and underflows;
- task switches;
- cut-back gap fills;
- prefetches and early write-backs;
- blocks entering the write buffer.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CACHE_QUADS` | 512 | RAM size in quads |
| `BLOCK_QUADS` | 16 | block size (unit of allocation and fetch) |
| `TB_QUADS` | 4 | transfer block (unit of dirty tracking) |
| `NRD` | 2 | read ports (there is always one write port) |
| `WB_ENTRIES` | 4 | write-buffer depth in blocks |
| `REPL` | `REPL_HYBRID` | `REPL_CUT_BACK_K` or `REPL_HYBRID` |
| `K` | 2 | cut-back step in blocks |
| `DIRTY_OFFSET` | 24 | hybrid write-back distance in blocks |
| `PREFETCH_OFFSET` | 8 | hybrid prefetch distance in blocks |

- The first four defaults are the example configuration of the original
  design. The others are this design's choices; the original leaves them to
  simulation.
- All sizes must be powers of two.
- `DIRTY_OFFSET` should stay below the number of blocks `NBLK`, and
  `PREFETCH_OFFSET` well below it.
- `TB_QUADS` may equal `BLOCK_QUADS` (one dirty bit per block) or be a single
  quad.

## Modules

| File | Role |
|---|---|
| `rtl/sc_pkg.sv` | widths, types, request classes, command codes, event record |
| `rtl/linear_stack_cache.sv` | top: port logic, hit/miss steering, wiring |
| `rtl/compare_unit.sv` | per-port classification (combinational) |
| `rtl/data_ram.sv` | `CACHE_QUADS` x 32 RAM: NRD+1 asynchronous read ports, 2 clocked write ports |
| `rtl/linear_tag_block.sv` | valid/dirty/clear bits; TOS, base, dirty pointer, PIN, bottom |
| `rtl/read_buffer.sv` | one-block fetch buffer with per-quad valid and written flags |
| `rtl/write_buffer.sv` | FIFO of blocks to write back, dirty transfer blocks only |
| `rtl/bus_unit.sv` | two-master arbiter for the memory port |
| `rtl/replacement_unit.sv` | control FSM: misses, TOS moves, task switch, hybrid background work |

The data RAM's ports are used as follows:

- The processor owns read ports 0 to NRD-1 and write port 0.
- The control block owns read port NRD, for copies into the write buffer.
- The control block owns write port 1, for moves from the read buffer.

The original design calls for exactly these extra ports so that buffer
traffic never blocks the processor.

## Simulation

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_linear_stack_cache \
    rtl/sc_pkg.sv tb/sc_tb_pkg.sv tb/mem_model.sv rtl/*.sv tb/tb_linear_stack_cache.sv
./obj_dir/Vtb_linear_stack_cache
```

Block testbenches (`tb_data_ram`, `tb_compare_unit`, `tb_linear_tag_block`,
`tb_read_buffer`, `tb_write_buffer`, `tb_bus_unit`) need only `sc_pkg`, the
module itself and, for the last two, `sc_tb_pkg` and `mem_model`.

### End-to-end testbenches

`tb_linear_stack_cache` (hybrid) and `tb_lsc_cut_back_k` (cut back K, K = 2)
run the full design at its default sizes against `mem_model`, a memory with a
fixed 3-cycle latency. Their shared stimulus is in `tb/lsc_tb_body.svh`. Both
finish in well under a second.

Stimulus:
- Two processes run with separate stacks.
- Instructions issue two reads and one write in the same cycle.
- Frames are called and returned at random.
- Recursion bursts grow the stack to several times the cache size and then
  unwind.
- There are accesses outside the stack and to the other process's stack, and
  periodic task switches.

Checks:
- A shadow memory checks every read.
- Hits must take zero cycles.
- Newly allocated stack space must read as zero.
- At the end, a final flush writes everything back and memory is compared
  quad by quad with the shadow.
- Each mechanism is counted and must have happened at least once: RAM hit,
  read-buffer hit, demand fetch, read with no room, uncached access, overflow,
  underflow, task switch, cut-back fill, and, in hybrid mode only, prefetch
  and early write-back.

The same stimulus has also been run, over several seeds, at other
parameter sets. Every data, zero-fill and latency check passed at all of them:
- cut back K with K = 1, and with K = 4 on a 128-quad cache whose transfer
  block is the whole block;
- hybrid on a 64-quad cache with 4-quad blocks and 1-quad transfer blocks;
- hybrid on a 256-quad cache with 8-quad blocks and K = 3;
- hybrid with a one-entry write buffer and `DIRTY_OFFSET` = 4.

Some sizes make a mechanism unreachable for this stimulus, and the coverage
check then reports it:
- A 1024-quad cache is larger than the deepest recursion, so a read never
  finds the RAM without room.
- With `PREFETCH_OFFSET` = 2, a demand fetch after each return lowers the base
  first, so no prefetch happens.

### Block testbenches

Each block testbench compares against its own reference model:
- the RAM against an array;
- the tag block against a bit-level copy of its rules;
- the read buffer against per-quad valid/written tracking;
- the write buffer against the list of writes it must make;
- the bus unit against arbitration rules and a reference memory, including
  the latency of one transaction.

Each testbench has been checked against a deliberately broken copy of its
module, and every such copy fails it.

## Departures and own choices

Where the original is only an outline, these are decisions of this RTL.

- **Write-buffer contents.** The write buffer holds whole blocks, 4 of them,
  as in the original's example.
  The processor cannot read or write data waiting in the write buffer, as the
  original allows; such accesses wait for it to drain.
- **Bus.** The memory interface is a one-quad request/acknowledge handshake.
  Burst transfers, and a real MMU with address translation, are outside this
  design. `mem_pin` and `mem_addr` carry the virtual address.
- **Hit check.** The hit check uses magnitude comparators against TOS, base and
  bottom, not the TOS-relative adder suggested in the original.
- **Writes with no room in the RAM.** The original sends such a write through
  the buffers (a whole transfer block straight to the write buffer, otherwise
  the read buffer). Here it is a single uncached write to memory.
- **Background work is not preempted.** The original lets demand requests
  interrupt a prefetch or an early write-back. Here a started prefetch or
  write-back runs to its end, which costs a demand miss at most one block
  transfer of extra waiting.
- **Read buffer entries.** The original's example has 4 entries in each
  buffer. The read buffer here has one, because the control block handles one
  miss at a time.
- **Stack bottom register.** Added so that fetches and prefetches never go
  below the stack.
- **Uncached data.** Everything that is not the running process's stack data
  goes to memory uncached.
- **Clear bits.** Newly allocated blocks are always cleared; the original makes
  clearing optional.
- **Interface.** The command port for TOS moves and task switches, the
  handshakes and the reset values are this design's.
- **Unset values.** K, both hybrid offsets and the write-buffer depth have no
  values in the original.

Parts of the original work that are **not** built:

- the *direct-mapped* stack cache, an alternative to this organisation for
  very frequent task switches, with a full tag per block;
- the *global data cache*, an optional two-way set-associative cache with a
  snoopy coherence unit, only outlined in the original;
- *intelligent buffers*, buffer entries tagged with a destination so the
  buffers act as a small associative extension of the cache;
- the processor core and the MMU/main memory, which lie outside the cache. A
  behavioural memory model stands in for the latter in the testbenches.

The original evaluates no workloads or traces, so no performance figures are
claimed here.
