# Deterministic batch transaction processor

This is a transaction processor for a key-value table held in FPGA global memory.
It uses deterministic concurrency control. Nothing locks or waits while a transaction
executes. Instead, transactions are first grouped into **batches**, where no two
transactions in a batch conflict on a record. Each batch then runs on a pipeline of
compute units that never take a lock.

Batches execute one after another. So the final table is the one you would get by
running the batches serially, and the makeup of each batch depends only on the order
in which the transactions arrived.

The workload is single-field YCSB (the Yahoo! Cloud Serving Benchmark):

- Each transaction reads or writes one 64-byte field of one record.
- A record has 8 fields.
- YCSB-A is 50 % writes and YCSB-B is 5 % writes.
- Keys follow a Zipf distribution. Its skew, theta, sets how contended the popular records are.

```
               in_txn ──► batch_lock_manager ──► batch_scheduler ──► det_kernel
                          (readers/writers       (writes objects,    (wg_dispatcher +
                           bitmaps, retry queue)  two batch slots)    NUM_CU × det_cu)
                                                      │                    │
                                                      └──► mem_arbiter ◄───┘
                                                               │
                                                     global memory port (512-bit)
```

## Batch locking (`batch_lock_manager`)

The lock state of a batch is just two bitmaps, **readers** and **writers**, with one
bit per record. The manager takes the transaction at the head of its queue and looks
up its key:

| type  | admitted when                     | then sets        |
|-------|-----------------------------------|------------------|
| write | neither readers nor writers is set | writers[key] |
| read  | writers is not set                | readers[key]     |

- An admitted transaction goes out to the scheduler.
- A refused transaction is put back at the tail of the same queue and tried again later.
- Locks are never released inside a batch. They are all released at once, by clearing both bitmaps before the next batch opens.

This is what keeps the hardware small. There are no lists of waiting transactions, and
no per-lock counters.

The bitmaps are RAMs of `BMP_W`-bit words. One lock attempt takes two cycles: a
registered bitmap read, then the decision and the update. Clearing sweeps one word per
cycle. At the defaults (2^20 records, 64-bit words) that is 16 384 cycles per batch,
and it overlaps the previous batch's execution.

**When a batch closes.** A batch closes when it holds `BATCH_SIZE` transactions. There
is one subtlety. A refused transaction can never succeed later in the same batch,
because locks only accumulate. With a bounded queue, the manager could therefore spin
for ever on transactions that are all blocked. So a batch also closes early when every
queued transaction has been refused since the last admission or arrival, and one of
these holds:

- `drain` is high, meaning no more input is coming.
- The queue is full, meaning nothing new can get in.

The refused transactions are then retried first in the next batch. A new transaction is
accepted only while a queue slot is still free for a transaction that might need to be
put back.

## Two batch slots (`batch_scheduler`)

Global memory holds two slots. Each slot has a transactions buffer and a results
buffer, each `2*BATCH_SIZE` words. A slot cycles through four states:

FREE → FILLING → READY → RUNNING → FREE

- **FILLING.** The lock manager's admitted stream is written into the transactions buffer. Each object is 2 words.
- **READY.** The batch is closed and its last object is written.
- **RUNNING.** The kernel is launched on it. Launches happen strictly in batch order, so batch *n+1* touches the table only after every access of batch *n* has completed.

While one slot runs, the lock manager fills the other. `batch_done` reports the
transactions and results buffers of each executed batch, and its size. Results remain
valid until the slot is refilled, which is two batches later.

## The kernel (`det_kernel`, `wg_dispatcher`, `det_cu`)

A launch covers `count` work items, split into work groups of `WG_SIZE`. The dispatcher
gives the next group to the lowest-numbered compute unit that is ready. It raises
`done` once every group has been handed out and every unit is idle.

Each compute unit (`det_cu`) is a pipeline that runs these steps for work item *i*:

1. Load the 1024-bit transaction object from `txn_base + 2i`: a header word, then a value word.
2. Read or write the whole 512-bit field at `table_base + key*8 + col`. This is one full-width memory access.
3. Store the result object at `res_base + 2i`. The header is `{id, success=1}`. The value is the field read, or zero for a write.

Loads for later items are issued while earlier items wait for the table. So
`TQ_DEPTH` objects and `RQ_DEPTH` results can be in flight in each unit. Issue priority
is result stores first, then table accesses, then object loads. This way a full result
queue never blocks the table step.

No ordering is kept between items. A batch contains no conflicts, so none is needed.

## Memory map and object layout

All addresses are 512-bit word addresses, in a 2^26-word (4 GiB) space.

| region                 | base (word)      | size (words)            |
|------------------------|------------------|-------------------------|
| table                  | `TABLE_BASE` = 0 | NUM_KEYS × 8 (2^23)     |
| transactions, slot s   | `TXN_BASE` + s·2·BATCH_SIZE | 2·BATCH_SIZE |
| results, slot s        | `RES_BASE` + s·2·BATCH_SIZE | 2·BATCH_SIZE |

`TXN_BASE` is 0x100_0000 and `RES_BASE` is 0x110_0000.

The transaction header packs `{id[31:0], type, key[31:0], col[2:0]}` into its low 68
bits. The second word is the value to write. The result header holds `{id, success}` in
its low 33 bits, and the second word holds the value read. Types and helpers are in
`hobbes_pkg`.

## Sharing the memory port (`mem_arbiter`)

The scheduler's writes and every compute unit share one port. The arbiter grants
requesters round-robin. For each read it records the requester in a routing FIFO, so
the in-order read data goes back to the right unit. A read is held back while that FIFO
is full.

Each transaction costs seven word accesses:

- 2 writes by the scheduler
- 2 object loads
- 1 table access
- 2 result stores

So throughput is bounded by the memory port, not by the number of compute units.

## Top level (`hobbes_top`)

The top module wires the blocks above together. It brings out these signals:

- The transaction input: `in_valid`/`in_ready`/`in_txn` and `drain`.
- The global memory port: valid/ready requests, with read data returned in order and always accepted.
- The batch completion report.
- Event and activity outputs (`stat_*`) for counting retries, early and full closes, and unit activity.

The host, the PCIe link and the DRAM are outside the design.

## Relation to the published design

What follows the published architecture:

- The batch locking algorithm, with readers/writers bitmaps and retry-by-requeue.
- Batches of 131 072 transactions.
- Locking the next batch while the previous one executes.
- Three global buffers: transactions, results and table.
- 1024-bit objects aligned to the 512-bit memory word.
- 8 fields of 64 bytes, at `key*8 + col`.
- A lock-free kernel that loads the object, does one full-width table access and stores the result.
- Several compute units fed by a hardware work scheduler. 1, 2 and 4 units were evaluated, and the default is 4.

Where this RTL departs from it, or fills gaps:

- **The lock manager is hardware here.** In the original it is host software. Admitted transactions are written directly into device memory, instead of being copied over PCIe per batch. Two slots are used.
- **The original lock manager scans a complete, pre-generated transaction list.** It therefore always fills a batch. This design has a bounded queue (`QUEUE_DEPTH` = 8192), and adds the early-close rule above. On write-heavy, skewed inputs (YCSB-A), batches close before they reach 131 072.
- **Sizes the original does not give are choices here:**
  - 2^20 records.
  - `WG_SIZE` = 256.
  - The queue depths.
  - The memory map.
  - The header layout.
  - Id and key widths of 32 bits.
  - A zero result value for writes.
- **Keys are reduced to their low `log2(NUM_KEYS)` bits.**
- **The kernel pipeline is written by hand.** Its latency and stages are not those of the original compiler-generated pipeline.

## Simulation

The testbenches are self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`.

The full design shares a checking environment, `tb/hobbes_env.sv`, with a memory model,
`tb/ddr_model.sv`. The memory model has a fixed latency, random back-pressure, and
deterministic initial contents.

The environment does the following:

- Generates a scrambled-Zipf YCSB stream.
- Checks that every transaction executes exactly once, in a batch without conflicts.
- Checks every result against a serial reference table, and then checks the final table.
- Counts each mechanism (retries, full and early closes, lock/execute overlap, memory stalls, per-unit activity) and fails if one never occurs.

| testbench              | what it runs |
|------------------------|--------------|
| `tb_batch_lock_manager`, `tb_batch_scheduler`, `tb_det_cu`, `tb_wg_dispatcher`, `tb_mem_arbiter`, `tb_det_kernel` | each block alone, at small sizes |
| `tb_hobbes_top`        | the whole design: 1024 records, batches of 64, 2 units, 1500 transactions, YCSB-A at theta 0.9 |
| `tb_hobbes_full`       | the top at default parameters: 139 264 YCSB-B transactions, theta 0.1 |
| `tb_ycsb_workloads`    | four default-size instances: YCSB-A and YCSB-B at theta 0.1 and 0.5 |
| `tb_cu_scaling`        | 1, 2 and 4 compute units on the same YCSB-B stream; checks kernel time against the memory bound |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hobbes_pkg.sv rtl/*.sv tb/ddr_model.sv tb/hobbes_env.sv tb/tb_hobbes_full.sv \
  --top-module tb_hobbes_full
./obj_dir/Vtb_hobbes_full
```

The same command works for every testbench; just change the last file and the top
module name. Extra files in the list do no harm.

## Measured behaviour

These runs use the default configuration: 4 compute units and a memory latency of 20
cycles, with 10 % random stalls. Each run has 139 264 transactions.

| workload        | batches (full) | refusals / txn | cycles / txn |
|-----------------|----------------|----------------|--------------|
| YCSB-B, θ 0.1   | 3 (1)          | 0.05           | 8.9          |
| YCSB-B, θ 0.5   | 9 (1)          | 0.10           | 9.6          |
| YCSB-A, θ 0.1   | 4 (0)          | 4.2            | 16.8         |
| YCSB-A, θ 0.5   | 24 (0)         | 3.4            | 16.9         |

On YCSB-B the port is busy about 80 % of the time, moving 7 words per transaction. On
YCSB-A the two-cycle lock attempts dominate, because each transaction is refused about
four times before it is admitted.

With 1, 2 and 4 compute units the kernel takes 5.58, 5.56 and 5.57 cycles per
transaction (32 768 YCSB-B transactions). That is the bound of five accesses per
transaction on a port with 10 % stalls: a single unit already keeps the memory busy,
and more units do not make the kernel faster.

All checks pass. The full YCSB-B run alone checks about 700 000 objects and table words.
