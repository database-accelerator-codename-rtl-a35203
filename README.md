# dpu — a streaming database processing unit

SQL queries are compiled into query plans made of relational-algebra operators:
filter, sort, join, arithmetic and group-by. This design puts each operator into
its own hardware block, a *tile*. A tile consumes one or more streams of column
elements and produces one or more output streams. A query runs by streaming table
columns through the tiles in the order the plan gives. For example, "revenue per
order for items discounted more than 10 %" becomes:

```
discount ──► boolgen(> 10) ──► flags
flags + price/discount/orderkey ──► colfilter (once per column)
filtered columns ──► sorter (on l.orderkey) ──► joiner (with orders.orderkey)
1 - discount, × price ──► ALU ──► aggregator(SUM, grouped by orderkey)
```

`dpu_top` holds one instance of every tile and brings all of their stream ports
out. A host, with a FIFO on each port, moves the streams between tiles and
writes each tile's opcode before a pass. Neither the host nor the FIFOs are part
of this RTL.

All arithmetic is on 32-bit signed integers. Floating-point columns are not
supported. Scale such values to integers, for example percent instead of 0.1.

## Streams and the done terminator

Every tile port is an Avalon-ST style link with **ready latency 1**:

| signal  | direction       | meaning |
|---------|-----------------|---------|
| `valid` | source → sink   | a flit is transferred in this cycle |
| `flit`  | source → sink   | `dpu_pkg::flit_t`: `{done, data[31:0]}` |
| `ready` | sink → source   | the source may send in the **next** cycle |

A source may raise `valid` in cycle *t* only if `ready` was high in cycle *t−1*.
Every such cycle is a transfer. The sink must accept it.

Tiles do not know how long a stream is. A stream ends with one **terminator**, a
flit with `done = 1` whose data word is not an element. A tile forwards the end
of its input streams as one terminator on each of its outputs. A pass is
finished when the terminator has come out. Because the terminator is a separate
flit, a tile that drops elements (colfilter, joiner) can still end its output
correctly.

## The input buffer (`st_buffer`)

Every tile input goes through a two-slot buffer. The buffer lets the tile logic
be a single combinational action while every path between tiles stays short.

* **EMPTY**: `in_ready = 1`, and nothing is offered to the tile. An arriving
  flit goes into the main slot.
* **MAIN_FULL**: the main slot is offered to the tile (`out_valid = 1`).
  `in_ready = !(in_valid & !next)`, where `next` is the tile's "I consume it
  this cycle". If a flit arrives in a cycle when the tile does not consume, the
  buffer cannot refuse it, because the source acted on last cycle's ready. The
  flit is parked in the aux slot, and ready drops at once.
* **AUX_FULL**: `in_ready = 0`. When the tile consumes the main flit, the aux
  flit moves up. The source cannot have sent anything while ready was low, so
  the buffer never needs a third slot. An assertion checks this.

When data streams at full rate, only the main slot is used: one flit per cycle
with a one-cycle latency. `in_ready` depends on `in_valid` and on the tile's
`next`, but never on the tile's downstream ready. So no combinational path runs
backwards through a chain of tiles.

## Tile pattern

On the output side, each tile registers the AND of its downstream readys
(`was_rdy`). It sends only when `was_rdy` is set, which satisfies ready
latency 1. The tile logic is one guarded action: when every input it needs
holds a flit and `was_rdy` is set, it drives the outputs and pulses `next` on
the inputs it used. A tile that drops an element (colfilter on a 0 flag, joiner
on a key mismatch) does so without waiting for `was_rdy`. With all links
ready, each tile handles one element per cycle. The exception is the sorter.

Two handshake rules are checked by assertions in the RTL. Each tile sends only
after a cycle in which its downstream was ready. A buffer never receives a flit
while both of its slots are full.

Each configurable tile has a write port: `cfg_write`, `cfg_addr[1:0]` and
`cfg_wdata[31:0]`. Registers reset to 0.

| tile | inputs → outputs | function | configuration |
|------|------------------|----------|---------------|
| `boolgen_tile` | 2 → 1 | `out = C(in1, in2)` or `C(in1, K)` as 0/1 | reg 0: `[2:0]` condition (`==,!=,<,<=,>,>=` = 0..5), `[3]` use constant; reg 1: K |
| `colfilter_tile` | 2 → 1 | emits `in2[i]` where bit 0 of `in1[i]` is 1 | none |
| `alu_tile` | 2 → 1 | add / sub / mul / div, two columns (op 0–3) or column and constant (op 4–7) | reg 0: op; reg 1: signed constant |
| `aggregator_tile` | 2 → 1 | one result per run of equal keys on input 1: NOP (first value), COUNT, SUM, MIN, MAX, AVG (= 0..5) | reg 0: op |
| `joiner_tile` | 4 → 4 | merge equi-join | reg 0: one bit per payload column, 1 = candidate table |
| `sorter_tile` | 4 → 4 | sorts blocks of 32 tuples | none |

Arithmetic wraps at 32 bits with no overflow flag. Division by zero gives 0,
and most-negative ÷ −1 gives most-negative. Average is sum ÷ count, rounded
toward zero.

### Aggregator

Input 1 carries the group key and input 2 the value. Only equality is tested.
A group is a run of consecutive equal keys, so the input is normally sorted on
the key. A pair in the current group is absorbed without output. A pair with a
new key sends the old group's result and starts the new group in the same cycle.
On the terminator, the last result goes out first and the terminator follows.
The tile outputs only the result. To list the group keys, run a NOP pass with
the key column on both inputs.

### Joiner

Input 1 is the candidate table's key, a primary key with each value at most
once. Input 2 is the foreign table's key. Inputs 3 and 4 are payload columns,
and each one advances with the table it belongs to. Both key columns must be
ascending in signed order. The tile takes one merge step per cycle:

* equal keys: emit `(in1, in2, in3, in4)`, then advance the foreign side,
  since several foreign rows can match one key;
* `key1 < key2`: advance the candidate side;
* `key1 > key2`: advance the foreign side; this foreign row has no partner.

When one side's terminator arrives, the other side is drained. When both have
ended, a terminator goes out on all four outputs. Output rows come in
foreign-table order.

## Sorter mesh (`sorter_tile`, `sort_cell`)

The sorter is the only tile that cannot stream. It collects a block of
`K = 32` tuples of `NCOLS = 4` columns and returns the block in ascending
order. Column 1 is the primary key, column 2 breaks ties, and so on. For
example, with 2 columns and `K = 8`:

```
in1 : 6 5 3 1 8 12 1 45 | 5 8 7 3 3 2 10 14
in2 : 1 1 1 3 2 2  2 2  | 1 2 3 9 8 6 7  8
out1: 1 1 3 5 6 8 12 45 | 2 3 3 5 7 8 10 14
out2: 2 3 1 1 1 2 2  2  | 6 8 9 1 3 2 7  8
```

A longer stream comes out as sorted runs of `K` tuples. Merging the runs is the
host's job.

**Cells.** A `sort_cell` holds one element. For each incoming element, it keeps
the larger of the two and passes the smaller one to its right neighbour. After a
chain of `K` cells has seen `n ≤ K` elements, cell 0 holds the largest, cell 1
the second largest, and so on. Elements move one cell per cycle, so the chain
is a pipeline and the comparison path stays short.

**Mesh.** There is one row of cells per column, so a column of the mesh holds
one tuple. The rows must agree on whether to swap. Each cell sends a command to
the cell below it:

* `SWAP` or `PASS` when its own elements differ (or when it was told);
* `DK` ("don't know") when the incoming element equals the held one.

The top row is always fed `DK`, so it always compares. A lower row obeys a
`SWAP` or `PASS` from above and compares its own elements only on `DK`. A row
that reported `DK` holds equal values, so swapping or passing gives it the same
result either way. The command chain runs down the `NCOLS` rows within one
cycle.

**Phases** (`sorter_tile`):

1. **FILL**: the mesh steps every cycle. When all four input buffers hold a
   flit, the tuple enters cell 0; otherwise a bubble enters. The phase ends
   after `K` tuples or at a terminator.
2. **FLUSH**: the mesh keeps stepping until no element is in flight (at most
   `K` cycles).
3. **DRAIN**: each cycle the held tuples shift one cell right. When the last
   cell holds a tuple, it goes out on all four outputs, smallest first, and
   only when the downstream readys allow. Empty cells shift out with no output.
4. **TERM**: entered when the block ended with the terminator. The terminator
   is sent on all outputs.

A block of *n* tuples takes about *n* + up to `K` + `K` cycles. The mesh has
`NCOLS × K` cells, each with two 32-bit registers: 8192 register bits at the
default size.

## Top level (`dpu_top`)

Parameters: `SORT_COLS = 4`, `SORT_K = 32`, `JOIN_COLS = 4`.

The stream ports are named `<tile>_in_valid/_in_flit/_in_ready` and
`<tile>_out_valid/_out_flit/_out_ready`, for `<tile>` in `bg` (boolgen), `cf`
(colfilter), `so` (sorter), `jn` (joiner), `alu` and `ag` (aggregator). These
are 16 input and 12 output streams, 28 in all, and each is a packed array of
`flit_t`. One configuration port is shared by all tiles: `cfg_addr[4:2]` selects
the tile and `cfg_addr[1:0]` the register.

| `cfg_addr[4:2]` | tile |
|-----------------|------|
| 0 | boolgen |
| 1 | joiner |
| 2 | ALU |
| 3 | aggregator |

Reset is synchronous and active low (`rst_n`). It clears all buffers, state and
configuration.

## What follows the reference design and what is chosen here

These points follow the reference design:

* the tile set and tile functions;
* Avalon-ST links with ready latency 1 and a registered downstream ready;
* the two-slot input buffer and its state table;
* the ALU opcodes 0–7;
* one configuration bit per joiner payload column;
* the sorter's keep-larger cell rule and its mesh with swap / don't-know
  commands;
* the 4 × 32 sorter and the 4-column joiner;
* the example results above.

These are choices made for this RTL:

* the terminator as a flit of its own;
* the boolgen condition set and encoding;
* the aggregator opcode values, and NOP meaning "first value of the group";
* the register maps and the shared configuration port;
* zero for division by zero;
* the sorter's FILL/FLUSH/DRAIN/TERM controller and its unload order;
* the joiner's behaviour at the end of a stream;
* integer-only data.

Not included:

* the memory-mapped FIFOs on each port (16 entries in the reference system);
* the host processor and its driver;
* the bus interconnect;
* floating-point columns;
* the JIT-controlled pipeline sketched as future work.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
The stream testbenches use two helpers: `tb/st_source.sv` (a ready-latency-1
source with random gaps) and `tb/st_sink.sv` (random back pressure, and it
counts ready-latency violations).

| testbench | what it runs |
|-----------|--------------|
| `st_buffer_tb` | 400 random words under random consume; ready per state, aux-slot use, one-cycle latency, one word per cycle at full rate |
| `sort_cell_tb` | two stacked cells against a model of the SWAP/PASS/DK rule |
| `alu_tile_tb`, `boolgen_tile_tb`, `colfilter_tile_tb`, `aggregator_tile_tb`, `joiner_tile_tb` | every opcode against values computed in the testbench; the ALU also at one result per cycle |
| `sorter_tile_tb` | the 2 × 8 example above, and 75 random tuples through the default 4 × 32 sorter |
| `dpu_top_tb` | the revenue query end to end at default parameters (110 line items, 24 orders); counts buffer stalls, terminators, reconfigurations, constant mode, dropped rows, several sort blocks, sort-key ties, unmatched join rows and group boundaries |
| `dpu_query2_tb` | `select t1.id, min(t2.id*t2.y) from t1, t2 where t1.id = t2.x and t1.id = t2.id`: sort, join, boolgen equality of two columns, filter, multiply, MIN |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dpu_pkg.sv tb/dpu_top_tb.sv --top-module dpu_top_tb -o sim
./obj_dir/sim
```

Each testbench takes a few seconds at most.
