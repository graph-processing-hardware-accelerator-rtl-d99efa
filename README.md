# Hardware priority queue accelerator for shortest-path routing

Routing a wire in a VLSI layout while choosing where to insert buffers and
which wire widths to use is a multi-weight shortest-path search. Such a
search spends much of its time in its priority queue. The queue holds the
frontier of partial solutions, ordered by tentative cost. It is asked, again
and again, to INSERT a new candidate and to EXTRACT the cheapest one.

This design moves that queue into hardware. It is a memory-mapped
peripheral for a soft processor that runs the router. The processor writes
a 32-bit priority (the cost) and a 32-bit identifier (what the cost belongs
to). One bus write then INSERTs the pair, or EXTRACTs the pair with the
smallest priority. Both take one clock cycle, however full the queue is.

The hardware queue has a fixed length, so software keeps any overflow. The
peripheral tells the processor when the hardware queue is full. The
processor's queue library then keeps further entries in a software queue
and merges the two on EXTRACT. This split is the *hybrid* queue.

```
           system bus (Avalon-MM)
                 |
   +-------------v--------------------------------------------------+
   | pq_accelerator                                                 |
   |  +----------------+  tok   +------------+  tok   +------------+ |
   |  | avalon_if_unit |------->| hw_pq_unit |------->| hw_pq_unit | | ... NUM_UNITS
   |  |  registers,    |  shift |  DEPTH     |  shift |  DEPTH     | |
   |  |  count, flags  |------->|  cells     |------->|  cells     | |
   |  |                |<-------|            |<-------|            | |
   |  +----------------+  head  +------------+  head  +------------+ |
   +----------------------------------------------------------------+
```

## The queue unit: a systolic sorted array

`hw_pq_unit` is the core of the design and the hardest part to follow.

It is a line of `DEPTH` cells, and the head is cell 0. Cell *i* has two
registers:

* **P[i]**, the *resident*: the entry the cell currently holds.
* **T[i]**, the *token*: an entry that is still moving down the line and
  will be compared with P[i] in the coming cycle.

Each entry carries a valid bit.

**Compare step.** This runs in every cycle and in every cell at once. If a
cell has a token, it compares the token with its resident. The smaller entry
stays as the resident. The larger one leaves as the cell's outgoing token.
An empty cell simply takes the token. When priorities are equal, the
resident stays.

**INSERT.** The new entry is written into T[0]. Then the outgoing token of
each cell becomes the token of the next cell. An entry therefore travels
down the line one cell per cycle. It pushes larger entries ahead of it until
it reaches an empty cell. Data only moves between neighbouring cells. No
input bus reaches every cell, so the length of the queue does not load a
shared net.

**EXTRACT.** The `shift_i` line is raised. The entry that leaves is the
head's post-compare resident, `min(P[0], T[0])`, shown on `head_o`. In the
same cycle the whole line moves one place towards the head:

* each cell takes the post-compare resident of the cell behind it;
* each cell keeps its own outgoing token as its new token. Its neighbour's
  contents have moved into its place, so the token still meets the right
  entry.

**Why the head is always the minimum.** The array keeps two invariants:

1. The residents are sorted and fill a prefix of the cells.
2. A token in front of cell *j* is never smaller than the resident of cell
   *j*-1. It only got there by losing a comparison against that resident,
   or against a smaller one.

Together these mean that every entry beyond cell 0 is at least P[0]. So
`min(P[0], T[0])` is the smallest entry in the queue, even while earlier
INSERTs are still moving. Both operations keep both invariants. As a
result, any sequence of one operation per cycle is served correctly. This
includes an EXTRACT in the cycle right after an INSERT.

**Cascading.** A unit has a pair of ports at its tail:

* `tok_o` and `tok_i`: the token leaving the last cell becomes the next
  unit's incoming token;
* `head_i` and `head_o`: on a shift, the next unit's head enters the last
  cell.

Chained units behave exactly like one longer array, and all of them share
`shift_i`. The chain's last `head_i` is tied to "empty". The chain's last
`tok_o` would carry an entry pushed out of a full queue. The interface unit
makes sure this never happens, and an assertion in the top checks it.

**Cost.** Each cell holds two 65-bit registers, one 32-bit comparator and
the multiplexers around them. Nothing in the unit depends on its fill level.
Only the `shift_i` control line fans out to every cell.

## The register interface (`avalon_if_unit`)

This is an Avalon memory-mapped slave with 32-bit data, a 2-bit word
address and a fixed read latency of one clock. It has no `waitrequest`, and
every access completes in one cycle.

| addr | name   | write                                        | read                          |
|------|--------|----------------------------------------------|-------------------------------|
| 0    | PRIO   | priority of the next INSERT                  | priority last extracted       |
| 1    | ID     | identifier of the next INSERT                | identifier last extracted     |
| 2    | CMD    | bit0 INSERT staged entry, bit1 EXTRACT (bit1 wins if both are set) | STATUS |
| 3    | STATUS | writing 1 clears the matching sticky bit (3, 4) | see below                  |

The STATUS bits are:

* bit 0: empty.
* bit 1: full.
* bit 2: the last EXTRACT returned an entry.
* bit 3: sticky flag, an INSERT was refused because the queue was full.
* bit 4: sticky flag, an EXTRACT found the queue empty.
* bits 31:16: the number of entries.

The unit counts the entries itself, so "full" is exact. An INSERT while full
is refused: the queue is not changed and bit 3 is set. The queue array
therefore never overflows.

An EXTRACT is sent to the queue in the cycle of the CMD write, and the
result is captured at that clock edge. The next bus cycle can already read
it from PRIO and ID.

A typical sequence looks like this:

```
INSERT:   write PRIO, write ID, write CMD=1          (3 bus writes)
EXTRACT:  write CMD=2, read PRIO, read ID            (+ read STATUS if unsure it was non-empty)
```

The hybrid policy for software is as follows:

* **INSERT:** read STATUS. If it is full, keep the entry in a software
  queue.
* **EXTRACT:** take the hardware minimum. If the software queue holds
  something smaller, write the hardware entry back and return the software
  one. The EXTRACT has just freed a slot, so the write-back cannot be
  refused.

The end-to-end testbench contains this policy as a model.

## Parameters

| parameter   | where            | default | meaning                                   |
|-------------|------------------|---------|-------------------------------------------|
| `DEPTH`     | `pq_accelerator`, `hw_pq_unit` | 16 | entries per queue unit (at least 2) |
| `NUM_UNITS` | `pq_accelerator` | 1       | cascaded queue units; capacity = DEPTH x NUM_UNITS |
| `CAPACITY`  | `avalon_if_unit` | 16      | entries the attached queue holds (set by the top) |
| `PRIO_W`, `ID_W` | `pq_pkg`    | 32, 32  | priority and identifier widths            |

The count field in STATUS is 16 bits wide, so keep the capacity below
65536.

## Where this design makes its own choices

The following points come from the accelerator's specification:

* a 64-bit entry, with a 32-bit priority and a 32-bit identifier;
* INSERT and EXTRACT, each taking constant time;
* a queue length set by a parameter;
* the ability to cascade units into a longer queue;
* an Avalon interface unit placed between the system bus and the queue
  unit;
* hardware/software hybrid handling of overflow.

The following points are this design's own choices:

* **The internal architecture of the queue.** It is the systolic
  neighbour-to-neighbour array described above. It was chosen because it
  gives constant-time operations without a bus that reaches every cell.
* **Minimum-first order.** A shortest-path search wants the smallest cost
  first.
* **Default length of 16 entries per unit, with a single unit.**
* **The register map, the status word and the sticky flags.** The same
  applies to the rule that a refused INSERT leaves the queue unchanged.
* **Tie handling.** An entry does not overtake an older entry of equal
  priority in the same cell. Strict first-in, first-out order among equal
  priorities is *not* guaranteed.
* **Reset.** It is asynchronous and active low. After reset the queue is
  empty and all flags are clear.

Outside this RTL, and not provided here:

* the soft processor;
* the system interconnect;
* the UART link to the host;
* the routing software and the software half of the hybrid queue.

The top's Avalon slave ports are where the interconnect connects.

## Files

| file | contents |
|------|----------|
| `rtl/pq_pkg.sv` | entry and slot types, register addresses, status bit positions |
| `rtl/hw_pq_unit.sv` | systolic queue unit with cascade ports |
| `rtl/avalon_if_unit.sv` | Avalon slave, entry counter, full/empty, refusal |
| `rtl/pq_accelerator.sv` | top: interface unit plus `NUM_UNITS` chained queue units |
| `tb/tb_hw_pq_unit.sv` | two units of 4 cascaded; random one-op-per-cycle traffic against a reference queue; overfill and drain |
| `tb/tb_avalon_if_unit.sv` | register map, one-cycle command issue, read latency, count, full/empty, sticky flags, with a reference queue behind it |
| `tb/pq_accel_tb_body.svh` | shared end-to-end test: hybrid software/hardware queue model driving the accelerator over the bus |
| `tb/tb_pq_accelerator.sv` | end-to-end test, 2 cascaded units of 4 entries |
| `tb/tb_pq_accelerator_full.sv` | end-to-end test at the default parameters |
| `tb/tb_maze_route.sv` | workload: Dijkstra maze search over a 24 x 24 weighted routing grid with a blockage, frontier kept in the default-size accelerator through the hybrid policy, costs checked against a Bellman-Ford reference |

## Verification

Every testbench checks itself against an independent reference model and
prints `TB_RESULT checks=N failures=M` at the end. Each one also has a
cycle watchdog.

The end-to-end tests run thousands of random hybrid INSERT/EXTRACT
operations with many tied priorities. They count each of the following
events and fail if any of them never happens:

* an entry redirected to software while the queue is full;
* a software entry returned ahead of the hardware minimum;
* a refused INSERT;
* an EXTRACT on an empty queue;
* an entry crossing from one cascaded unit into the next (when there is
  more than one unit);
* a back-to-back EXTRACT, INSERT, EXTRACT at full capacity, issued in
  consecutive cycles.

The last test checks both the result and the cycle count. Assertions check
these rules:

* no simultaneous read and write on the bus;
* a valid head whenever a non-empty queue is extracted;
* the count never exceeds the capacity;
* nothing leaves the end of the cascade chain.

The maze-routing workload test runs a real search on a 24 x 24 grid. Its
frontier peaks at about 30 entries, so about a fifth of the inserted
entries spill into the software queue of the default 16-entry accelerator.
The test checks the cheapest cost to every cell.

What is *not* verified:

* timing closure or frequency on any device;
* behaviour with `DEPTH` below 2;
* the real software driver.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Itb \
  rtl/pq_pkg.sv rtl/hw_pq_unit.sv rtl/avalon_if_unit.sv rtl/pq_accelerator.sv \
  tb/tb_pq_accelerator.sv --top-module tb_pq_accelerator -o sim
./obj_dir/sim
```

To run another test, swap the testbench file and `--top-module`:

* `tb_pq_accelerator_full` runs the same flow at the default size.
* `tb_maze_route` runs the maze-search workload, also at the default size.
* `tb_hw_pq_unit` needs only `pq_pkg.sv` and `hw_pq_unit.sv`.
* `tb_avalon_if_unit` needs only `pq_pkg.sv` and `avalon_if_unit.sv`.

Each test runs in well under a second.
