# Self-reconfiguration through on-chip memory

An FPGA normally changes its function by loading a new configuration
bit-stream, and on current devices only an external host can do that. The
designs here adapt to a new problem instance without touching the bit-stream.
The logic is compiled once. Everything that varies from one instance to the
next is kept in on-chip memory: look-up tables, interconnect addresses, code
words. The chip adapts by rewriting that memory itself, in a few cycles.

The RTL implements the three applications of the paper "Efficient
Self-Reconfigurable Implementations Using On-Chip Memory". It also includes
the generic building block that the paper uses to explain the idea:

| Unit | Problem | What lives in memory |
|---|---|---|
| `kmp_matcher` | find every occurrence of a pattern in a text (Knuth-Morris-Pratt) | the pattern characters and the automaton's back-edges, one word per state |
| `bf_sssp` | single-source shortest paths (Bellman-Ford) | the graph's edge list and the distance of every vertex |
| `gp_tree` | genetic programming: evaluate a program tree | an n·log2(m)-bit word choosing each node's function |
| `logiclet_interconnect` | generic: logiclets joined by switchable wires | one "active interconnect" address per logiclet |

`self_reconfig_top` places all four side by side. They share only the clock
and the reset, and each has its own group of ports (prefixes `kmp_`, `bf_`,
`gp_`, `ic_`). All resets are synchronous and active low (`rst_n`).

## Logiclets and addressable interconnect

The paper describes a self-reconfigurable circuit as a set of small logic
elements, called *logiclets*, joined by a network of interconnects. All the
interconnects exist in the compiled logic. At run time one of them per
logiclet is marked "active". The choice is a bit pattern stored in memory,
and it can be stored in two ways:

* **Distributed memory.** Each logiclet has its own memory element that holds
  the address of its active interconnect, and a multiplexer follows that
  address. `logiclet_interconnect` implements this form. It has N = 8
  logiclets by default, the number drawn in the paper's figure. Each stored
  word is `{active, source}`. Writing one word (`cfg_we`, `cfg_dst`,
  `cfg_src`, `cfg_active`) rewires one input. An input whose interconnect is
  inactive reads zero; that value is this design's choice. The GP tree node
  uses the same pattern: a multiplexer driven by a stored code.
* **Shared memory.** Logiclets exchange data by using the same memory
  address. The shortest-path unit works this way: its pipeline stages pass
  distances to each other through the data memory.

A logiclet whose function is itself a memory look-up is the other way to
reconfigure. The string matcher's automaton is an example.

## String matching (`kmp_matcher`)

### The automaton

State q means "the last q text characters equal the first q pattern
characters". Both look-up memories are addressed by the state. Each has
MAX_LEN+1 words:

* `u_pattern_mem[q]` holds pattern character P[q].
* `u_backedge_mem[q]` holds the back-edge of state q. This is the length of
  the longest proper prefix of P[0..q-1] that is also a suffix of it (the
  KMP failure function).

In each cycle (`kmp_datapath`):

```
eq   = (state != M) && (text_char == P[state])
next = eq ? state + 1 : backedge[state]
```

The comparator and the back-edge read work in parallel. Only one comparator is
needed, whatever the pattern length. The text character is used up on a
match, or on a mismatch in state 0. On any other mismatch the back-edge is
taken and the same character is compared again in the next cycle, with
`txt_ready` low. In state M (a full match) the comparison always fails, so the
automaton continues through back-edge M. This is how overlapping occurrences
are found.

### Building the back-edges on chip (`kmp_ctrl`)

Changing the pattern is only a series of memory writes. The hard part is
computing the back-edges without a host. The controller uses the automaton
itself. While pattern character P[q] (q ≥ 1) is being loaded, it is also fed
to the datapath as if it were text. The datapath starts in state 0 and so
consumes P[1], P[2], …. After it consumes P[q], its state is the longest
prefix of P that ends at position q. That value is exactly back-edge q+1, and
it is written to `u_backedge_mem[q+1]` in the same cycle. Building the table
this way only reads back-edges of states ≤ q, and those are already written.
Back-edges 0 and 1 are 0.

This method is this design's own choice. The paper says only that the
pre-processing is done on chip, by a simple control circuit, through the
look-up table.

Controller phases: `IDLE → INIT → LOAD → RUN`.
* INIT writes back-edge 0 and clears the state.
* LOAD accepts pattern characters on `pat_valid`/`pat_ready`. The pattern ends
  at `pat_last`, or after MAX_LEN characters.
* In RUN, text characters are accepted on `txt_valid`/`txt_ready`.
* If `pat_valid` is raised during RUN, a new pattern is loaded. This is
  reconfiguration while in operation.

### Interface and timing

* Text rate: one character per cycle, plus one stall cycle per back-edge
  taken. Over a text of L characters there are fewer than L back-edges in
  total (standard KMP bound).
  On random texts with six-character patterns the measured cost is 1.2 to
  1.5 cycles per character; periodic patterns such as `aaaaaa` are the
  slowest.
* `kmp_match` pulses one cycle after the character that completes an
  occurrence is accepted. `kmp_match_pos` gives that character's index in the
  text, counted from 0 since the last pattern load.
* Loading an M-character pattern takes 2 + M cycles, plus the back-edges
  taken while the table is built.
* `kmp_backedge` marks the cycles in which a back-edge is taken.
* Defaults: MAX_LEN = 6, the pattern size the paper reports. Characters are
  8 bits wide (this design's choice).

## Shortest paths (`bf_sssp`)

### Datapath

The graph is data, not logic:
* `u_graph_mem` maps an edge number to `{src, dst, weight}` (`bf_pkg::edge_t`).
* `u_data_mem` (`bf_dist_mem`) holds the current distance of every vertex.

`bf_pipeline` relaxes one edge per clock cycle in three stages, as in the
paper:

1. **Memory read.** Look up the edge, then read d(src) and d(dst).
2. **Edge relaxation.** Compute d(src) + w. It is an improvement if d(src) is
   finite, the sum does not overflow, and the sum is smaller than d(dst).
3. **Memory write.** Write the new d(dst).

Weights and distances are 16-bit unsigned, the weight precision the paper
evaluates. The all-ones value `bf_pkg::INF` means "not reached".

### Read-after-write hazards

The pipeline must handle an edge that reads a distance which an older edge,
still in stage 2 or 3, is about to lower. This handling is this design's
addition; the paper does not discuss hazards. Without it, a newer edge can
overwrite a better distance with a worse one, and the result is wrong, not
just slow.

Stage 1 therefore compares both vertex numbers with the destination of stage
2, whose result is still combinational, and of stage 3, whose write is
pending. On a match it takes the newer value (`bypass` pulses). With this
forwarding, the pipeline gives exactly the result of relaxing the edges one at
a time in order. So the number of passes equals that of a sequential
Bellman-Ford.

### Control (`bf_ctrl`)

The paper leaves the control circuit out. Here it works as follows:

1. **Initialise** the data memory, one vertex per cycle: 0 for the source,
   INF for the others.
2. **Issue** edge numbers 0 … e−1, one per cycle.
3. **Drain** the pipeline, which takes 1 to 3 cycles.
4. **Repeat** from step 2 until a pass changes no distance, or until n−1
   passes are done.

A run takes n + passes·(e + drain) cycles, which is O(n·e) as in the paper.
The paper's 16.7 ns average relaxation time corresponds to this one edge per
cycle at about 60 MHz on its FPGA.

### Interface

1. **Load the graph.** Write edges while the unit is not busy (`bf_edge_we`,
   `bf_edge_addr`, `bf_edge_wdata`).
2. **Start a run.** Pulse `bf_start` with `bf_num_vertices` ≥ 1,
   `bf_num_edges` and `bf_source`. `bf_busy` stays high until `bf_done`
   pulses. `bf_passes` gives the number of passes.
3. **Read the results.** Distances are read combinationally through
   `bf_dist_raddr`/`bf_dist_rdata` while the unit is idle.

Sizes are in `bf_pkg`: 64 vertices and 256 edges. The paper gives no graph
size, so these are this design's choice. Change `MAX_V` and `MAX_E` to resize;
the vertex and edge widths follow from them.

## Genetic-programming tree (`gp_tree`, `gp_node`)

A program is a complete binary tree with fixed wiring (`DEPTH` = 3 gives the
7 nodes drawn in the paper).

* Every node (`gp_node`) contains all members of the function set side by
  side, as logiclets. A multiplexer driven by the node's 2-bit code picks one
  output.
* Node i's code is `rep[2i +: 2]`, in heap order: node 0 is the root, and the
  children of node i are 2i+1 and 2i+2.
* Leaf j reads terminals 2j and 2j+1.
* The whole program is therefore the 14-bit word `rep`, held in flip-flops
  (distributed memory).

The evolution phase changes a program by rewriting that word. Use `rep_we`
to load a whole word, for example another member of the population. Use
`node_we`, `node_idx` and `node_func` to change one node, as a mutation
would. The tree is combinational. `result` is registered and shows a new
program one cycle after the write.

The paper does not list the function set. This design uses {ADD, SUB, AND,
XOR} on 8-bit values (`gp_pkg::gp_func_e`). The paper's figure draws three
logiclets per node; four were chosen so that all 2-bit codes are used.
Evolution operators and fitness evaluation are not described in enough detail
to build, so they are not included. `gp_tree` provides the ports they would
drive.

## Departures and open points

* **Memory read timing.** The matcher's two tables are block RAMs with a
  registered read (`bram_sdp`, write-first). The paper draws the state
  register driving their address bus. Here the datapath gives the RAMs the
  *next* state (`mem_raddr`), so the RAM's own address register plays the
  part of the state register. The behaviour is identical cycle for cycle.
  The shortest-path memories (`lut_ram`, `bf_dist_mem`) are read
  asynchronously, like distributed RAM. This lets stage 1 look up an edge and
  then its two distances within one cycle.
* **Graph storage.** The graph is stored as an edge list (O(e) words). The
  text speaks of an adjacency matrix, but the paper's area figure is O(e) and
  its pipeline is driven by an edge number. Negative weights are not
  supported.
* **Data-memory read ports.** The data memory has two read ports. The paper's
  figure shows a single read address.
* **Back-edges.** These are the plain KMP failure function, not a variant
  that skips repeated characters.
* **Design choices.** The stall rule of the matcher, the hazard forwarding,
  the controllers, the handshakes, the GP function set and all widths not
  listed above are this design's choices.
* **Clock rates.** The paper's clock rates (110 MHz for the matcher with a
  six-character pattern, 16.7 ns per relaxed edge) come from its FPGA
  implementation. They are not claims of this RTL.

## Files

`rtl/` holds one module or package per file:
* the shared packages `bf_pkg` and `gp_pkg`;
* `bram_sdp`, the block RAM used for the matcher's two tables;
* `lut_ram`, the asynchronous-read memory used for the graph edge list;
* the units above and their parts.

`tb/` holds one self-checking testbench per module, named `tb_<module>`. Each
testbench compares the module with a model computed independently in the
testbench: brute-force search, a direct failure-function computation,
sequential Bellman-Ford, or tree evaluation. Where the timing is specified,
the testbench also checks the cycle counts. Each one ends by printing
`TB_RESULT checks=N failures=F`.

`tb_self_reconfig_top` runs the whole design at its default sizes. It
reconfigures the matcher while it is running, runs graphs up to the full
64-vertex, 256-edge size, rewrites GP programs and rewires the interconnect.
It fails if any of these mechanisms never occurred: back-edge stall, match,
distance bypass, multi-pass run, early stop, pass limit, GP word load, GP node
rewrite, interconnect rewire, inactive interconnect.

Two further testbenches run the workloads at their evaluated sizes:
* `tb_workload_kmp6` matches six-character patterns against 20,000-character
  texts and prints the cycles per character.
* `tb_workload_sssp16` runs full-size graphs with weights over the whole
  16-bit range. Paths longer than 16 bits must stay unreached.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/bf_pkg.sv rtl/gp_pkg.sv tb/tb_self_reconfig_top.sv \
    --top-module tb_self_reconfig_top
./obj_dir/Vtb_self_reconfig_top
```

Replace the testbench name to run any other test. Every run takes seconds.
