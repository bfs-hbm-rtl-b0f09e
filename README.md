# BFS engine for CSR graphs in High-Bandwidth Memory

This is a single fixed-function engine for breadth-first search (BFS) over a
sparse graph held in external HBM. You give it a source vertex. It streams the
graph's adjacency data over one 256-bit AXI4 read port and reports every
reachable vertex with its hop distance (BFS level), in BFS order. The host
never touches the loop. There is no software dispatch, and the run time is
fixed by the graph and the memory latency. That makes it suitable where
tail latency must be deterministic: k-hop neighbourhood queries for fraud
scoring, graph databases, and similar.

The engine is deliberately serial. It has one memory transaction in flight
and one visited-bitmap operation in flight. Its speed therefore comes from
hiding as many memory round trips as possible in the data layout, not from
parallelism. Two layout tricks do most of this:

* **Both ends of a row-pointer pair come from one read.** `row_ptr[v]` and
  `row_ptr[v+1]` sit next to each other, so one transaction returns both.
  There is no second round trip per vertex.
* **Eight neighbours per beat.** A 256-bit beat carries eight 32-bit vertex
  IDs. A vertex's whole adjacency list comes back as one burst, which is
  consumed from an eight-entry beat buffer.

The inner loop is bounded by the visited bitmap. It is an on-chip block RAM
that allows one read-modify-write every two cycles.

## Graph layout in memory

The graph is stored in Compressed Sparse Row (CSR) form, as two arrays of
32-bit words:

| array | location | contents |
|---|---|---|
| `row_ptr[0..|V|]` | byte `ROW_PTR_BASE + 4v` (default 0) | index in `col_idx` of vertex v's first out-edge |
| `col_idx[0..|E|-1]` | byte `COL_IDX_BASE + 4e` (default 1 MB) | destination vertex of edge e |

Vertex v's out-edges are `col_idx[row_ptr[v] .. row_ptr[v+1]-1]`. An
undirected graph stores each edge in both directions. Both base addresses
must be multiples of 32 bytes. Only the low `VERTEX_W` bits of a `col_idx`
entry are used as the vertex ID.

With the default bases, the `row_ptr` region is 1 MB long, which holds
262,143 vertices. A larger graph needs a larger `COL_IDX_BASE`. The bitmap
itself covers 2^20 vertices.

## How one vertex is expanded

The controller (`bfs_ctrl`) runs the following loop. Cycle counts assume a
memory that answers 20 cycles after it accepts an address and never stalls.

1. **Pop** `{level, vid}` from the frontier FIFO (2 cycles: the FIFO has a
   registered read port). If the FIFO is empty, the search is finished.
2. **Pointer read.** Request the 32-byte beat that holds `row_ptr[vid]`. The
   pair is at lanes `vid%8` and `vid%8+1`. When `vid%8 = 7`, the pair
   straddles two beats, so the same transaction asks for two beats
   (`arlen = 1`). This is still one transaction and one latency.
3. **Leaf test.** If `row_ptr[vid+1] <= row_ptr[vid]` the vertex has no
   out-edges, and the controller goes back to step 1.
4. **Adjacency burst.** One request covers every beat that holds part of the
   list. The list generally does not start on a beat boundary, so the burst
   runs from beat `floor(start/8)` to beat `floor((end-1)/8)`. That can be one
   beat more than `ceil(degree/8)`.
5. **Scatter.** Each beat is latched into an eight-entry buffer. The lanes
   that belong to the list are walked in order. The first beat starts at lane
   `start%8`, and the walk stops when the edge count runs out. For each
   neighbour w:
   * check w in the bitmap (issue 1 cycle, result 1 cycle later);
   * if w is already visited, go to the next lane (3 cycles in all);
   * otherwise set w's bit, which needs a second bitmap slot. In the cycle
     the set completes, w is reported on the discovery stream with `level+1`
     and pushed into the FIFO (5 cycles in all).

   When a beat's lanes are used up, the controller takes the next beat of the
   burst. The memory holds that beat back (`rready` low) until the controller
   is ready.

The frontier FIFO keeps BFS order without any extra bookkeeping. Every level-L
vertex is pushed before any level-(L+1) vertex, and the level travels inside
the FIFO entry.

### Controller states

| state | what happens |
|---|---|
| `IDLE` | wait for `start`; latch `source` |
| `INIT` | set the source's bit; when done, report it at level 0 and push it |
| `DEQUEUE` | pop the frontier head, or go to `DONE` if the frontier is empty |
| `FETCH_PTR` | hand the pointer-read request to the read master |
| `WAIT_PTR` | take the beat(s), latch `edge_start`/`edge_end` |
| `CHECK_EDGES` | compute the edge count; skip leaves |
| `ISSUE_EDGES` | hand the adjacency burst request to the read master |
| `RECV_BEAT` | latch a beat into the 8-entry buffer; choose the first lane |
| `SCATTER_RD` | issue the bitmap check for the current lane |
| `SCATTER_CHK` | evaluate the check; for a new vertex, issue the set, then report and push it |
| `NEXT_EDGE` | advance the lane; go to the next beat, or back to `DEQUEUE` |
| `DONE` | `done` high until reset |

`INIT`, `DEQUEUE` and `SCATTER_CHK` last several cycles. A 2-bit phase
register steps through them.

## The visited bitmap pipeline

`visited_bitmap` keeps one bit per vertex in 32-bit words. For 2^20 vertices
that is 32,768 words, or 128 KB. Vertex v lives in word `v[VERTEX_W-1:5]`,
bit `v[4:0]`.

```
edge n   : op_valid && !busy  -> latch op, word address, bit; RAM read starts
cycle n+1: busy = 1           -> check: chk_valid, chk_visited = word[bit]
                                 set:   set_done; word | (1<<bit) written at edge n+2
edge n+2 : earliest next acceptance
```

Only one operation is ever in flight. That rules out read-after-write
hazards without a bypass network, but it limits the engine to one bitmap
operation every two cycles. This is the throughput limit of the inner loop.

The RAM is cleared by an initial block, which becomes block-RAM initial
values on an FPGA. **Reset does not clear it.** The engine therefore runs one
traversal per bitmap initialisation. A second search needs a reload of the
RAM contents or a power-up. An ASIC would add a clearing sequencer (32K
cycles at full size), and this RTL does not include one. While `rst_n` is low
the RAM cannot be written, so pipeline registers that have not yet been reset
cannot corrupt it at power-up.

## Cycle budget

With memory latency L and no stalls, the run from `start` to `done` takes:

```
3                                          start, INIT
+ per expanded vertex: 2 + 1 + 1 + L + 1   pop, request, AR, pointer beat, leaf test
      + (if not a leaf) 1 + 1 + L          request, AR, first adjacency beat
+ 3 per neighbour examined + 2 per newly discovered vertex
+ 1 per extra beat (pointer pair straddling beats, lists spanning beats)
+ 1                                        final pop finds the FIFO empty
```

For the 8-vertex ladder graph (0-1-2-3 over 4-5-6-7, with rungs) at L = 20
this gives 456 cycles, and the full-size testbench measures exactly that. A
reference implementation of the same architecture reports 514 cycles for
this graph. The levels and discovery order are identical.

In steady state the per-vertex overhead is about 2L + 7 cycles (47 at
L = 20). Each edge costs 3 or 5 cycles, plus its share of the burst. High
degrees amortise the overhead. Low degrees are dominated by the two memory
latencies per vertex.

### Measured on large graphs

The default-size engine was run on random graphs with heavy-tailed
(Pareto) out-degrees and uniformly random neighbours. Memory latency was 20
cycles, with no stalls.

| graph | vertices | edges | frontier overflow | cycles | bitmap RMW share |
|---|---|---|---|---|---|
| mean degree 9.4 | 250,000 | 2.35 M | yes | 5.7 M | 22.6 % |
| mean degree 38.4 | 60,000 | 2.30 M | yes | 1.6 M | 42.2 % |

The RMW share is 2 cycles per examined edge divided by total cycles. It is a
measure of how much of the time the inner loop does useful work, and it grows
with degree as the per-vertex overhead is amortised. Both runs overflowed the
2048-entry frontier, so size `FIFO_DEPTH` for the graph. Because the engine
is serial, a 3-hop neighbourhood of tens of thousands of vertices takes
milliseconds at 250 MHz: 45,570 vertices took 1.8 ms in the second graph.
Microsecond answers are possible only for small neighbourhoods.

## Interfaces (`bfs_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse in `IDLE` to begin |
| `source` | in | `VERTEX_W` | source vertex |
| `done` | out | 1 | frontier exhausted; held until reset |
| `visited_count` | out | `VERTEX_W+1` | vertices discovered so far (source included) |
| `overflow` | out | 1 | sticky: a discovered vertex could not be queued |
| `axi_err` | out | 1 | sticky: a read returned a non-OKAY response |
| `out_valid`, `out_vid`, `out_level` | out | 1, `VERTEX_W`, 16 | discovery stream, one strobe per vertex, in BFS order |
| `m_axi_ar*` | out | | `arvalid`, `araddr[32:0]`, `arlen[7:0]`, `arsize[2:0]`, `arburst`, `arid[3:0]`, `arlock`, `arcache`, `arprot`; `arready` in |
| `m_axi_r*` | in | | `rvalid`, `rdata[255:0]`, `rlast`, `rresp`, `rid`; `rready` out |

There is no backpressure on the discovery stream. A consumer must take a
result in every cycle that `out_valid` is high, and strobes are at least 5
cycles apart. The engine has no hop limit: to answer a k-hop query, ignore or
stop at levels above k.

AR attributes are fixed: full-width beats (`arsize = 3'b101`), `INCR`, no
lock, `arcache = 4'b0011`, `arprot = 3'b010`, ID 0. The read master
(`axi4_rd_master`) splits any request that would cross a 4 KB boundary. It
issues the pieces one after another, so every burst stays legal however long
an adjacency list is.

## Parameters

| parameter | default | effect |
|---|---|---|
| `VERTEX_W` | 20 | 2^VERTEX_W vertices; bitmap of 2^(VERTEX_W-5) words |
| `AXI_DATA_W` | 256 | bus width; 8 vertex IDs per beat |
| `AXI_ADDR_W` | 33 | 8 GB address space |
| `AXI_ID_W` | 4 | AXI ID width |
| `FIFO_DEPTH` | 2048 | frontier capacity, entries of 16 + `VERTEX_W` bits |
| `ROW_PTR_BASE` | `33'h0` | base of `row_ptr` |
| `COL_IDX_BASE` | `33'h0010_0000` | base of `col_idx` (1 MB) |

At the defaults, the bitmap is 1 Mbit and the FIFO 73,728 bits. Both are
written as arrays with synchronous read ports so that they map to block RAM.
`VERTEX_W` must be at least 6.

## Limits and design choices to know about

* **Frontier overflow.** The FIFO holds at most `FIFO_DEPTH` vertices. If a
  vertex is discovered while the FIFO is full, it is still marked visited and
  reported, but its own neighbours are never explored. The `overflow` flag
  then says the result is incomplete. Graphs whose frontier can exceed 2048
  vertices need a larger `FIFO_DEPTH`; large power-law graphs are an example.
* **One memory transaction at a time.** The next vertex's pointer read waits
  until the current scatter loop ends. Prefetching the next pointer pair, or
  running several engines behind an arbiter, are possible extensions and are
  not included here.
* **Aligned reads.** Every read starts on a beat boundary, and unwanted lanes
  are skipped inside the engine. An AXI4 slave returns whole aligned beats,
  so the engine never relies on a slave shifting data to an unaligned start
  address. The price is one extra beat now and then: for pointer pairs with
  `vid%8 = 7`, and for lists that cross a beat boundary.
* **Reset.** Reset clears every register and the FIFO pointers, but not the
  bitmap (see above).
* **Levels** are 16 bits and wrap after 65,535 hops.
* **Errors.** A SLVERR/DECERR response only raises `axi_err`. The data is
  used as delivered.

## Files

| file | contents |
|---|---|
| `rtl/bfs_pkg.sv` | state encoding, level width, AXI constants |
| `rtl/bfs_top.sv` | top level: the four units wired together |
| `rtl/bfs_ctrl.sv` | traversal state machine |
| `rtl/axi4_rd_master.sv` | AR/R channel handling, 4 KB burst splitting |
| `rtl/vertex_fifo.sv` | frontier FIFO |
| `rtl/visited_bitmap.sv` | 2-cycle read-modify-write visited bitmap |
| `tb/hbm_mem_model.sv` | behavioural AXI4 read slave: fixed latency, optional random stalls, error injection |
| `tb/tb_visited_bitmap.sv` | random check/set traffic against a reference; response timing; 1 op per 2 cycles |
| `tb/tb_vertex_fifo.sv` | random push/pop against a queue; full, empty, drop-on-full |
| `tb/tb_axi4_rd_master.sv` | data, `last`, AR legality, 4 KB splits, latency, error flag |
| `tb/tb_bfs_ctrl.sv` | controller with the real FIFO and bitmap; exact discovery sequence; per-edge and per-pop cycle costs |
| `tb/tb_bfs_top.sv` | end to end on random 1500-vertex graphs with memory stalls; overflow and error engine; counts every mechanism |
| `tb/tb_bfs_top_full.sv` | default-size engine on the 8-vertex ladder graph; levels, order, exact cycle count |
| `tb/tb_bfs_workload.sv` | default-size engine on 250,000- and 60,000-vertex power-law graphs; exact sequence including overflow; cycle-model bounds |

Every testbench checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M`. A reference BFS inside the testbench produces
the expected discovery sequence, modelling the same queue capacity. It is the
standard queue-based BFS, which visits neighbours in `col_idx` order, so the
hardware must match it vertex for vertex.

## Simulating

With Verilator 5 (two-state, so the testbenches reset everything they read):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/bfs_pkg.sv tb/tb_bfs_top.sv --top-module tb_bfs_top
./obj_dir/Vtb_bfs_top
```

Replace `tb_bfs_top` with any other testbench name. Each one runs in a few
seconds. The full-size testbench instantiates `bfs_top` with no parameter
overrides.
