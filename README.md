# Accelerator management through an ISA extension

On-chip accelerators are usually driven through a kernel driver. Every
command then costs a system call, a copy into memory-mapped registers and
OS locking, which is thousands of cycles. This design moves that work into
hardware instead. A CPU core gets six extra instructions:

- `RESERVE`, `CHECK`, `TRANSFER`, `EXEC`, `ISBUSY` and `RELEASE`.
- Each one becomes a short message on a dedicated accelerator network.

Every accelerator is fronted by a small manager. The manager implements the
same protocol for any accelerator type:

- an ownership queue, so several processes can share one accelerator safely;
- a state machine that collects buffer descriptors;
- a busy flag;
- the answers to the two instructions that return a value.

A user program can therefore reserve an accelerator, hand it memory
buffers, start an operation and poll for completion with plain
instructions. No driver is involved.

The RTL here builds the following:

- the core-side instruction unit;
- the accelerator network;
- the generic manager, with its comparator, message buffer and reservation
  queue;
- a DMA, used twice by the vector unit (load port and store port);
- a vector accelerator as the one complete datapath.

The top level, `acc_system`, connects four cores to four accelerators. Only
accelerator 0 has a datapath inside. Accelerators 1 to 3 (an FFT unit, an
AES unit and a convolution engine in the reference system) have only their
managers. Their datapath side is brought out as `ext_*` ports.

## The six instructions

All six are R-type instructions. They use opcode `custom-0` (`0001011`) with
`funct3 = 000`. `funct7` holds the instruction code:

| code | instruction | rd | rs1 | rs2 | waits for answer |
|---|---|---|---|---|---|
| 1 | RESERVE  | –        | accId | –    | no |
| 2 | CHECK    | ret      | accId | –    | yes |
| 3 | TRANSFER | size (read as a source) | accId | vptr | no |
| 4 | EXEC     | –        | accId | opId | no |
| 5 | ISBUSY   | ret      | accId | –    | yes |
| 6 | RELEASE  | –        | accId | –    | no |

The core adds two values that the program cannot forge:

- `procId`, taken from a CSR. It can be any value that identifies the
  process, for example the page-table pointer.
- `coreId`, its own number. The core adds it only to CHECK and ISBUSY, so
  the answer can find its way back.

TRANSFER translates `vptr` through the core's TLB (`tlb_vaddr`/`tlb_paddr`)
and sends the physical pointer. An `accId` at or above `NUM_ACC` does not
produce a message. Instead the core unit raises `illegal_insn` together with
`done`.

The four instructions that do not wait commit as soon as their last packet
has been accepted by the network. CHECK and ISBUSY commit when the answer
arrives. The unit then writes the value to `rd` through
`wb_valid`/`wb_rd`/`wb_data`. The core unit handles one accelerator
instruction at a time, and `issue_ready` is low while one is outstanding.

### Return values

| instruction | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| CHECK  | caller owns the accelerator | caller is queued | caller is unknown (never asked, or queue was full) | – |
| ISBUSY | free | busy | last EXEC asked for an opId the accelerator does not have | caller is not the owner |

## Messages

A message is a string of 64-bit packets. The last packet carries a `last`
flag beside the data (`acm_flit_t`). Requests take two packets, or three
for TRANSFER. Answers take one packet.

```
request packet 0   [63:56] inst          [7:0] accId
                   CHECK/ISBUSY : [15:8]  coreId
                   TRANSFER     : [47:8]  size (40 bits, bytes)
                   EXEC         : [39:8]  opId (32 bits)
request packet 1   procId (64 bits)
request packet 2   pptr   (TRANSFER only)

answer packet      [63:56] inst  [47:16] ret  [15:8] coreId  [7:0] accId
```

The packing helpers are in `acm_pkg`: `req_head`, `resp_pack`,
`pkt_core_id` and `resp_ret`.

## The accelerator network (`anoc`)

The network has two directions.

Requests:

- A round-robin arbiter picks one core at a time.
- That core keeps the path until its last packet, so messages never
  interleave. This is the point where concurrent commands from different
  cores are serialised.
- The packets then pass a `LATENCY`-stage pipeline.
- Finally they are broadcast to every accelerator.
- A packet leaves the network only when all accelerators can take it in the
  same cycle. Each accelerator's comparator decides whether the message is
  its own.

Answers:

- A second arbiter merges the accelerators' answers.
- They pass through another `LATENCY`-stage pipeline.
- Each answer is delivered to the core whose number is in its `coreId`
  field.

`LATENCY` is 16 cycles in each direction. The reference system uses a ring.
This network is a shared medium with the same ordering guarantees and a
fixed delay; it does not model per-hop ring timing.

## The manager (`acc_manager`)

Three parts front each accelerator:

- `acm_rx` collects the packets of a message into a buffer. It drops the
  message unless `accId` equals the accelerator's `ACC_ID`.
- A `reservation_queue` holds the waiting processes. It is a 4-entry FIFO of
  32-bit procIds. The head entry is the owner.
- The control unit executes the command.

### Ownership

| request | effect |
|---|---|
| RESERVE | An idle accelerator becomes owned by the caller. Otherwise the caller is appended to the queue, unless it is already the owner, already queued, or the queue is full (the request is then lost). |
| CHECK | Answers as in the return-value table. |
| RELEASE from the owner | Pops the head. The next process in the queue becomes owner with a fresh state (RESERVED). With nobody waiting the accelerator goes IDLE. |
| RELEASE while the accelerator is busy | Remembered, and carried out when the running operation signals `done`. |
| TRANSFER, EXEC or RELEASE from a non-owner | Silently ignored. |
| ISBUSY from a non-owner | Gets code 3, so one process cannot watch another's work. |

### Buffer collection

The state is `IDLE`, `RESERVED`, `T1 … T(K-1)` or `READY`. `state` encodes it
as 0, 1, 2, 3, and `xfer_count` tells the T states apart.

- Each TRANSFER stores one `(pptr, size)` descriptor in the next of `K`
  registers (`K = 3` here: two sources and a destination).
- The K-th TRANSFER moves the state to READY.
- In READY, a further TRANSFER starts a new set. The descriptor becomes
  buffer 0 and the state becomes T1.
- In READY, EXEC checks `opId < NUM_OPS`. If it passes, the manager pulses
  `start` with `start_op` and sets the busy flag. The datapath clears the
  flag with a one-cycle `done` pulse.
- EXEC is also accepted in a state T*h*, if the operation needs no more
  than *h* buffers. This lets one accelerator mix operations of different
  arity. The manager shows the pending opId on `op_query`, and the datapath
  answers on `op_bufs` in the same cycle. In the vector unit, reduce-sum
  needs two buffers (A and the destination) and the other operations need
  three. The other accelerators of the top report three for every
  operation.
- A bad opId sets an error that ISBUSY reports until the next good EXEC or
  RELEASE.
- Any other EXEC is ignored: one while busy, one in RESERVED, or one in a T
  state that has too few buffers.

`bufs` stays visible and can be rewritten while an operation runs, so
transfers can overlap computation. A datapath must therefore copy the
descriptors at `start`, as `vector_acc` does.

### Command timing

The manager works on one command at a time. A command takes effect a fixed
number of cycles after its message leaves `acm_rx`:

- RESERVE, CHECK and RELEASE: 3 cycles.
- TRANSFER, EXEC and ISBUSY: 1 cycle.

Parameters `LAT_*` hold these values. An answer is offered on the following
cycle. With the default network, an idle round trip seen from the core is:

    packets + 2 × 16 + command latency + 3 cycles

That gives 40 cycles for CHECK and 38 for ISBUSY.

## Vector accelerator (`vector_acc`, `acc_dma`)

The three buffers are A, B and the destination. Sizes are in bytes, and
elements are 64-bit signed integers. The operations are:

| opId | operation | execute cycles per strip |
|---|---|---|
| 0 | add | 2 |
| 1 | sub (a−b) | 2 |
| 2 | mul (low 64 bits) | 5 |
| 3 | div (÷0 gives −1; overflow gives the dividend) | 14 |
| 4 | min | 4 |
| 5 | max | 4 |
| 6 | dot product, one word at dst[0] | 5 |
| 7 | reduce-sum of A, one word written to buffer 1; needs only two buffers | 2 |

The vector is processed in strips of `LANES` elements (16 by default). The
length of A sets the element count. Three stages work on different strips
at the same time:

1. **Load** reads the A strip and then the B strip into one of two input
   slots. It uses its own DMA on the L3 load port (`ld_*`). Reduce-sum
   skips B.
2. **Execute** takes a full input slot and computes all lanes for the
   operation's latency (`ex_busy_q` is high for exactly those cycles). It
   writes the result into one of two result slots. Dot product and
   reduce-sum instead add into an accumulator.
3. **Store** writes a full result slot through a second DMA on the L3
   store port (`st_*`). For the two reductions it writes one word after
   the last strip.

Strip i+1 can load while strip i executes and strip i−1 is stored.
`done` pulses after the last store. Source and destination areas must be
either equal or disjoint. A destination that overlaps a source at an
offset can be written before the later strips of that source are read.

`acc_dma` is the memory port for the stages:

- It issues 64-bit word requests to an L3-style port with valid/ready.
- It expects read data back in order.
- Writes are posted.

## Parameters of the top (`acc_system`)

| parameter | default | meaning |
|---|---|---|
| NUM_CORES | 4 | cores, each with a `core_acm_unit` |
| NUM_ACC | 4 | accelerators, each with a manager; accelerator 0 is the vector unit |
| ANOC_LATENCY | 16 | one-way network delay in cycles |
| QUEUE_DEPTH | 4 | reservation queue entries (owner included) |
| LANES | 16 | vector lanes per strip (the reference system varies 16 to 1024) |

Core *i* has `coreId` *i*. The manager of the vector accelerator accepts
opIds 0–7. The other managers accept opIds 0–255.

## Where this departs from the reference framework

- **Elements:** the vector unit computes on integers, not floating point.
- **Pipeline depth:** each stage boundary has two slots. That depth is a
  choice of this design.
- **Loading policy:** buffers are read lazily, when EXEC arrives. TRANSFER
  only records the descriptor. An eager unit would start loading on
  TRANSFER.
- **Lane count:** the reference system sweeps 16 to 1024 lanes. `LANES` is
  a parameter with default 16, and only 4 and 16 lanes have been simulated.
- **Missing datapaths:** the FFT, AES and convolution accelerators are
  represented only by their managers.
- **Network topology:** the ring network is replaced by a fixed-delay
  shared network.
- **Network delay:** the delay is 16 cycles each way. The reference system
  quotes both 16 and "15 on average".
- **Register widths:** the reference estimate sizes the status and buffer
  registers at 32 bits. Here each buffer register holds a full 64-bit
  pointer and 40-bit size, because that is what the messages carry.
- **procId width:** procIds are queued and compared on their low 32 bits,
  while messages carry 64 bits.
- **Own choices:** the instruction encoding, the answer packet layout,
  ISBUSY codes 2 and 3, and the READY→T1 reading of a TRANSFER in READY
  belong to this design.

The host cores, TLB, caches and DRAM are outside the design.

## Files

| file | content |
|---|---|
| `rtl/acm_pkg.sv` | widths, message types, packing helpers |
| `rtl/core_acm_unit.sv` | core-side instruction unit |
| `rtl/anoc.sv`, `rtl/acm_arbiter.sv`, `rtl/acm_pipe.sv` | network, arbiter, delay pipeline |
| `rtl/acm_rx.sv` | comparator and message buffer |
| `rtl/reservation_queue.sv` | owner/waiter FIFO with search |
| `rtl/acc_manager.sv` | manager control unit |
| `rtl/acc_dma.sv` | DMA |
| `rtl/vector_acc.sv` | vector datapath |
| `rtl/acc_system.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/l3_mem_model.sv` | behavioural memory with a read/write port and a write-only store port, fixed read latency and random stalls; simulation only |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
build and run one with Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/acm_pkg.sv tb/tb_acc_system.sv \
    --top-module tb_acc_system -o sim
./obj_dir/sim
```

Replace `tb_acc_system` with any other testbench name.

`tb_acc_system` runs the whole fabric with every parameter at its default. It
takes about ten seconds. Four cores run programs in parallel:

- two processes compete for the vector unit, one queued behind the other;
- operations are spread over several strips;
- ISBUSY polling;
- a RELEASE that is deferred while the unit is busy;
- a reduce-sum started in state T2 after two TRANSFERs;
- a bad opId;
- an illegal accId;
- an external accelerator driven end to end;
- strip loads overlapping the execute or store step of earlier strips.

The test also:

- checks memory results against values computed in the testbench;
- checks the idle round-trip times;
- counts how often each mechanism occurred, and fails if one never did.

The block testbenches check these points:

- `tb_acc_manager`: the command latencies cycle by cycle.
- `tb_vector_acc`: execute cycles per strip, and that loading overlaps
  execute or store.
- `tb_anoc`: the network delay.

`tb_workloads` runs two benchmark programs on the default fabric:

- **Dot-product:** vectors of 128, 1K, 8K, 64K and 512K elements. Each
  size is a RESERVE/TRANSFER/EXEC/ISBUSY sequence, checked against a
  reference sum.
- **Pathfinder:** a 6 × 100 grid walk, run by a second process that waits
  in the reservation queue until the first releases the unit. Each grid row
  takes three vector operations: two mins over buffers shifted by one
  element, then an add of the wall row.

It prints the cycles per size. With a 36-cycle memory and no stalls, a
512K-element dot-product takes about 3.60 million cycles. The execute step
is busy for about 164 thousand of them. Loads dominate the rest: the load
DMA waits for the last word of a strip before it starts the next request
burst, so each 16-word strip of A and of B pays the full memory latency. The interface
itself costs a few dozen cycles per command sequence.
