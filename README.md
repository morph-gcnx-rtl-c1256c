# Morph-GCNX accelerator RTL

A graph convolutional network (GCN) layer computes A·X·W: a *sparse*
aggregation (the adjacency matrix A times the features) and a *dense*
combination (times the weights W). Most accelerators are built for one
fixed dataflow and one kind of traffic. This design instead uses one array
of identical processing elements (PEs) that each run either kind of product.
The links between the PEs can be cut and turned around at run time. So the
16 × 16 array can be split into independent sub-arrays, each running its
own GCN task, or one phase of a task, with its own traffic pattern
(broadcast or unicast).

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, with
one self-checking testbench per block in `tb/`.

## Structure

```
morph_gcnx (top)
 ├─ optimizer            partition + engine split + link programming
 ├─ row_grouper          density-balanced row-to-PE assignment (8 rows, 4 PEs)
 ├─ controller           executes the command stream
 ├─ morph_interconnect   16 row links, 16 column links, 256 routers
 │   ├─ morph_link       segmented, reversible single-cycle broadcast line
 │   └─ morph_router     horizontal + vertical morph_switch, registered turn
 ├─ pe ×256
 │   ├─ pe_ctrl          command FSM (clear / SpMM / GEMM / drain), CSC column pointers
 │   ├─ smb              sparse-matrix buffer (value + row index per nonzero)
 │   ├─ idmb             input dense-matrix buffer, 2 read ports
 │   ├─ lookahead_fifo   16-entry FIFO of prefetched nonzeros
 │   ├─ drp              dense-row prefetcher (fixed 2-cycle latency)
 │   ├─ mac_array        16 × fp64_mac, read-modify-write of an ODMB row with forwarding
 │   └─ odmb             output dense-matrix buffer, per-lane write enable
 └─ glb_bank ×16         2 MB global-buffer bank per PE row, stream engine
```

`morph_pkg` holds the shared sizes and types: the flit, the commands and
the router configuration.

## The PE: one engine for sparse and dense products

The PE computes outer products. For SpMM (A·X with A sparse), A is held in
compressed-sparse-column (CSC) form. The column pointers live in a 33-entry
register file in `pe_ctrl`. Values and row indices live in the SMB. The
dense operand rows live in the IDMB. For each column j, `pe_ctrl` walks that
column's nonzeros:

1. The nonzero (value, output row i) is pushed into the look-ahead FIFO.
   At the same time the DRP is asked for dense row j of the IDMB.
2. Two cycles later the DRP delivers row j. The FIFO pops the matching
   nonzero at that moment, so the FIFO covers the prefetch latency.
3. The MAC array reads ODMB row i, adds value × X[j][0..15] in 16 FP64
   lanes, and writes the row back one cycle later. If the next nonzero hits
   the same output row, the sum just computed is forwarded and the stale
   ODMB read is ignored. `bypass_hit` flags each forward.

The sustained rate is one nonzero per cycle. A tile of 26 nonzeros takes
about 40 cycles including pipeline fill.

Dense GEMM (combination) uses the same pipeline. The k rows of W sit in
IDMB rows 0..k-1. The left matrix, n × k, sits in IDMB rows 16..16+n-1.
The control unit reads each left-matrix row through the IDMB's second port
and feeds its elements as if they were nonzeros. So n and k are at most 16
per pass. Larger products are tiled by whoever issues the commands.

`PE_DRAIN` sends the first n ODMB rows out as write flits for the global
buffer, to address `glb_base + row*16 + lane`. It takes 17 cycles per row.
`PE_CLEAR` zeroes n rows. Every command is accepted only when `busy` is low.

The arithmetic is IEEE-754 binary64. Products and sums are rounded
separately, to nearest-even; this is not a fused multiply-add. Subnormal
inputs and results are flushed to zero.

## Morphable interconnect

Every PE row and every PE column has one **morphable link**. This is a
chain of nodes joined by repeaters. Each repeater has two control bits:

* `store = 1` cuts the link at that point (segmentation). The pieces on
  either side work independently, which is how partitions are isolated.
* `dir` sets which way the repeater drives: 1 drives towards higher node
  numbers (east or south), 0 the other way (reversal).

A flit injected at a node reaches every node downstream of it, up to the
next cut, **in the same cycle**. So one injection is a broadcast to a whole
row or column segment. Unicast uses the same path: the receiving switch
filters on the flit's 8-bit destination id, unless the flit's `bcast` bit is
set. If two sources drive one segment in the same cycle, `link_collision`
is raised. The testbenches treat that as an error.

Row links have `COLS+1` nodes. Node 0, at the west end, is that row's
GLB bank. Nodes 1..COLS are the routers. Column links have `ROWS` nodes,
one per router.

Each **router** has a horizontal and a vertical switch. Each switch chooses
what to inject on its link: nothing (`INJ_NONE`), the own PE's output
(`INJ_PE`), or what arrived on the other link (`INJ_TURN`). A turn passes
through a register, so it costs one cycle. This also keeps the links free of
combinational loops. The PE listens either to the row link or to the column
link (`pe_from_v`). Routers handle row and column traffic only; there is no
general mesh routing.

## Global buffer

There are 16 banks of 262144 × 64-bit words, 32 MB in all, one bank per
PE row. A bank answers two kinds of requests:

* A stream command. The bank sends `len` consecutive words from `base`
  onto its row link, one per cycle. Each word goes out as a copy of a flit
  header (destination, target buffer, start address) with the address
  incremented. The first flit appears two cycles after the command.
* A write-back. Flits marked `BUF_GLB` that arrive from the link are
  written into the bank.

The `dram_*` ports give the off-chip side one word port per bank. The
external DRAM (HBM) itself is not part of this RTL.

## Controller and command set

The controller executes one `ctrl_cmd_t` at a time. `host_cmd_ready` is
high when it can take the next command.

| op | effect |
|---|---|
| `OP_CFG_ROUTER` | load a router's `{h_inj, v_inj, pe_from_v}` |
| `OP_CFG_HLINK` / `OP_CFG_VLINK` | load a row or column link's `store` and `dir` masks |
| `OP_GLB_STREAM` | start a bank stream; the command completes when the bank is idle again |
| `OP_PE_CMD` | send a PE command to a rectangle of PEs once all of them are idle |
| `OP_WAIT` | wait until a rectangle of PEs and all banks are idle |

`host_cmd_ready` means the command was accepted, not that it has finished.
To wait for the end of an `OP_WAIT`, send any command after it (for
example `OP_NOP`): it is taken only once the wait is over.

At reset every repeater is cut and no router injects anything.

## Optimizer and row grouping

The `optimizer` takes up to NT = 4 tasks. Each task is described by its
aggregation and combination MAC counts and its N and C dimensions. It makes
these decisions:

* **Partition.** Each task gets a band of whole PE rows, with the GLB
  banks of those rows. Rows are shared in proportion to the task's MAC
  count. Every task gets at least one row, and leftover rows go to the
  heaviest task.
* **Engine split.** Inside a band, the columns are split between the
  aggregation and combination engines by the ratio of the two phase loads.
* **Dataflow.** The two phases run in parallel when N·C fits the band's
  GLB capacity, and sequentially otherwise. A loop order is chosen to match.

The optimizer then sends the controller the link settings for that
partition. Column links are cut at band boundaries and point south inside
a band. Row links are fully joined and point east, away from the bank. This
is the hardware half of the published greedy search. The workload sampling,
the cost models and the tile-size search are left to software. The
interface gives each task's MAC counts directly.

The `row_grouper` balances one 8 × 8 sparse tile over 4 PEs, two rows per
PE. It ranks the rows by nonzero count and deals the ranks in snake order:
PE p gets ranks p and 7−p. So the densest row is paired with the sparsest,
and each PE gets about the same work. The result is registered one cycle
after `rg_start`.

## Departures and choices

These points are this design's own choices, not taken from the published
architecture:

* Word formats and widths. Flit layout, command encoding, the 16-bit SMB
  row index, the 20-bit buffer addresses and the 8-bit PE ids.
* Buffer organisation. SMB: 32768 entries of {64-bit value, 16-bit index}
  (320 KB). IDMB: 32 rows × 16 lanes (4 KB). ODMB: 2048 rows × 16 lanes
  (256 KB).
* Timing. The DRP latency (2 cycles), the MAC pipeline depth (read, then
  write one cycle later) and the registered router turn.
* The global buffer layout. One bank per PE row at the row link's west end.
* The PE is fed the column coordinate j to fetch dense row j. The FIFO
  carries the output row index i.
* The optimizer implements only the proportional partition, the engine split
  and the dataflow rule. Its search and cost models are not built.
* NT = 4 tasks share the array at once. A mix of five datasets needs one
  of them to wait, or a larger NT.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a hung run as a failure. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/morph_pkg.sv tb/tb_pe.sv --top-module tb_pe -o sim
./obj_dir/sim
```

Block testbenches: `tb_fp64_mac`, `tb_mac_array`, `tb_lookahead_fifo`,
`tb_smb`, `tb_idmb`, `tb_odmb`, `tb_drp`, `tb_pe_ctrl`, `tb_pe`,
`tb_morph_link`, `tb_morph_router` (covers `morph_switch`),
`tb_morph_interconnect`, `tb_glb_bank`, `tb_controller`, `tb_row_grouper`,
`tb_optimizer`. The testbenches check results against models that use
`real` arithmetic with the same order of operations, bit-exact.

`tb_morph_gcnx` runs the whole accelerator at 4 × 4 PEs with smaller
buffers (256-entry SMB, 64-row ODMB, 4096-word banks). In it:

* The optimizer splits the array between two tasks.
* One band runs an SpMM. Its CSC tile is unicast and its dense rows are
  broadcast along row 0.
* The other band runs a GEMM at the same time. Its operands are turned from
  a row link onto a column link.
* Both row links are then reversed, and the results drain into the GLB.
  They are read back through the `dram_*` ports and compared with the model.

The testbench counts broadcasts, turns, cycles with both bands busy, MAC
forwards, write-backs and collisions. It fails if any of these (other than
collisions) never happens, or if any collision occurs. This is the largest
size simulated end to end. At the full 16 × 16 size, with its 256 PEs and
4096 FP64 lanes, the C++ compile of the Verilator model alone takes more
than ten minutes.

Every top-level parameter defaults to the full size. To try other sizes,
override `ROWS`, `COLS`, `SDEPTH`, `IROWS`, `OROWS`, `BANKW` and `NT` on
`morph_gcnx`. `ROWS` and `COLS` must stay at 16 or less: link and router
indices in commands are 4 bits wide.
