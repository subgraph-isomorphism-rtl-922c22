# Two-channel stream core for FPGA subgraph isomorphism

Subgraph isomorphism asks how many copies of a small labelled *query* graph
occur inside a large labelled *data* graph. The multi-way-join (MWJ) engine
modelled here grows partial solutions one query node at a time. For each
partial solution it fetches, from hash-indexed edge tables, the data edges
that could extend it, and then keeps only the candidates that satisfy every
query edge.

In such an engine, time goes mostly into reading edge tables from DRAM.
This RTL covers the dataflow of a version that splits that work over **two
memory banks**. Every data edge is stored in the bank given by the most
significant bit of a hash of its *indexing* node. The tasks that read edges
are duplicated, one copy per bank. The partial-solution stream is split in
front of them and merged again behind them.

Most of the logic here is about splitting and merging streams without losing
alignment. Work items and their side data must take the same channel, in
the same order. A merge must never mix half a sequence from one channel
with half from the other. The end of a group must not overtake tuples of
the same group still in flight on the other channel.

The SystemVerilog covers the stream blocks whose behaviour is fully
specified, plus the preprocessing that places edges into the two banks. The
remaining pipeline stages appear as ports of the top (see *What is not
here*).

## The loop of partial solutions

```
 FIFO -> enlarge_sol -> [edgebuild] -> findmin -> findchannel
                                                   |         |
                                   ch0: [readmin]->homomorphism   ch1: same
                                                   |         |
                                                  merge_h -> hstream -> [seqbuild/tuplebuild]
                                                                          |
                                                                tuplebuild_split
                                                      solutions /  ch0 tuples  \ ch1 tuples
                                                  fulldetect   [intersect..compact] x2
                                                           \        mergeasmset
                                                            \          |
                                                      [merge solandset] <- [filter]
                                                                 |
                                                             [assembly] -> FIFO
```
Blocks in brackets are outside this RTL; their streams are ports of
`less_x2_top`.

### Node words and packets

A FIFO word is 32 bits wide. Bit 31 set marks a **radix**, a node already
accepted into the partial solution. Bit 31 clear marks an **extension**, a
proposed next node that still has to be verified. Solutions sharing their
radices are stored compressed: `A B C D E` means the two candidates
`{A,B,C,D}` and `{A,B,C,E}`. Two radix values are reserved:

- `FAKE_NODE = 0xFFFF_FFFE` starts single-node solutions (`FAKE e1 e2`).
- `STOP_NODE = 0xFFFF_FFFF` ends the run.

`mwj_enlarge_sol` expands the compressed form into one packet per candidate
(`A B C D|last`, `A B C E|last`). A radix that follows an extension opens a
new radix group. Expansion happens early, right after the FIFO, so that
every packet can later follow its own minset tuple into either channel.

### Choosing the minimum set and the channel (`mwj_findmin`, `mwj_findchannel`)

For each packet, edgebuild proposes one tuple per query edge that constrains
the new node: a table id and the data node playing the indexing role.
`mwj_findmin` handles each tuple in turn:

1. It reads the bloom word at `{table, hash[H1_W-1:0]}` of the indexing
   node.
2. It takes that word from the bloom bank selected by `hash[31]`.
3. It keeps the tuple whose bloom word has the fewest set bits, because
   that set is likely to be the smallest.

It then emits the winning tuple, its bloom word and the packet's nodes, in
that order.

`mwj_findchannel` reads these three in the same order. It sends all three to
channel `hash(indexing)[31]`, which is the bank that holds the indexing
node's edges. A stop tuple is copied to both channels, and the stop node
follows on both.

### Homomorphism filter and hstream merge

In each channel, readmin (not included) returns the minset word and the
candidate nodes. `mwj_homomorphism` drops any candidate already present in
the packet. Such a candidate would map two query nodes onto one data node.
It emits one sequence:

```
solution nodes (last on the final one), minset word, surviving candidates (last on the final one)
```

If no candidate survives, a single beat with `nil = 1, last = 1` closes the
set. The final survivor is known only when the input's last candidate
arrives, so one candidate is held back by a cycle.

`mwj_merge_h` polls both channels without blocking. Once it picks a
channel, it stays on it until the whole three-part sequence has passed.
When both channels are ready at the same time, it alternates between them.
A stop from one channel is absorbed. After both channels have stopped, one
stop node leaves.

### Keeping verification aligned: padding tuples

Stage by stage, the verify chain checks a candidate against the edge sets
of the remaining query edges. Each set ends with a tuple flagged
`last_edge`, and each solution ends with a `last_set` tuple. Splitting these
tuples over two chains breaks end-of-set detection. A `last_edge` tuple in
channel 0 can reach the merge before regular tuples of the same set that
are still in channel 1.

`mwj_tuplebuild_split` handles each tuple by kind:

| input tuple | where it goes |
|---|---|
| solution node | single solution output |
| edge tuple | channel `hash(node)[31]` |
| edge tuple with `last_edge` | its channel, **then** a padding `last_set` with `pos = 1` to both channels |
| real `last_set` (`pos = 0`) | both channels |
| stop | both channels |

`mwj_mergeasmset` merges the two chains:

- Regular tuples pass straight through.
- A `last_edge` tuple is held in a register.
- A `last_set` or stop closes its channel, which is not read again until
  the other channel delivers the matching marker.

When both markers are present, the merge acts on their kind:

- Padding: the held `last_edge` tuple is released. Every tuple of that set
  has now left both chains, so the end-of-set flag is correct downstream.
- Real `last_set` or stop: a single copy is sent.

Both channels are then unlocked.

`mwj_fulldetect` receives the solution packets. It flags a packet as
complete when its length equals the number of query vertices `nq`. It
buffers the packet first, so the flag is valid on every beat.

## Preprocessing: placing edges in the banks

`build_table_descriptors` reads the query:

1. Vertex positions in the matching order are loaded first.
2. For each query edge, the endpoint earlier in the order becomes the
   indexing node.
3. The (indexing label, indexed label) pair is looked up in the
   `labelToTable` matrix. The first time a pair is seen, it gets the next
   table number.
4. The table and its partner node are appended to both endpoints' lists:
   the list of tables each node indexes, and the list each node is indexed
   by.

`store_edges` places the data edges:

- A data edge can belong to two tables, one per direction. For each
  direction that has a table:
  - the indexing node is hashed;
  - `hash[31]` picks the bank;
  - `{table, hash[H1_W-1:0]}` picks the block inside the bank.
- The edges are processed in two passes over the edge list:
  1. **Count**: one counter per block and bank.
  2. **Prefix** (`prefix` pulse): each counter becomes the block's start
     offset, so within a bank the blocks lie back to back.
  3. **Store**: each edge is written through the bank's `em_wr_*` port at
     its block's running offset, and the offset is then incremented.
- When the store pass is done, `blk_end - blk_cnt .. blk_end` is the address
  range of each block.

The counters are per-bank RAMs with one write port each. `clear` and
`prefix` each take `2^(TABLE_W+H1_W)` = 4096 cycles.

## Files

| file | role |
|---|---|
| `rtl/less_pkg.sv` | widths, reserved words, stream structs, `node_hash` / `node_bank` |
| `rtl/less_x2_top.sv` | all blocks wired together; outside stages as ports |
| `rtl/sol_fifo.sv` | partial-solution FIFO (first-word fall-through) |
| `rtl/mwj_enlarge_sol.sv` | FIFO word stream -> one packet per candidate |
| `rtl/mwj_findmin.sv` | bloom fullness minimum, bank chosen by hash MSB |
| `rtl/bloom_ram.sv` | the two bloom banks |
| `rtl/mwj_findchannel.sv` | split by hash MSB, stop broadcast |
| `rtl/mwj_homomorphism.sv` | per-channel candidate filter, builds the hstream |
| `rtl/mwj_merge_h.sv` | sequence-atomic merge of the two hstreams |
| `rtl/mwj_tuplebuild_split.sv` | tuple routing and padding insertion |
| `rtl/mwj_mergeasmset.sv` | merge of verified tuples with padding sync |
| `rtl/mwj_fulldetect.sv` | complete-solution flag |
| `rtl/build_table_descriptors.sv` | labelToTable and per-node table lists |
| `rtl/store_edges.sv` | count / prefix / store split of data edges over two banks |

Every stream uses a valid/ready handshake: a beat moves on a clock edge
where both are high. Reset is asynchronous and active low.

## Parameters and sizes

| name | value | basis |
|---|---|---|
| channels / banks | 2 | the design point of this architecture |
| node word | 32 bits | FIFO word format |
| `MAX_QV` | 8 | largest query in the evaluation set (8 vertices) |
| `TABLE_W` | 5 (32 tables) | largest evaluated query has 26 edges, so at most 26 tables |
| `H1_W` | 7 | chosen here; in the original system it is tuned per query |
| `BLOOM_W` | 64 | chosen here |
| `LABEL_W` | 4 | chosen here |
| `EA_W` (edge address) | 24 | both directions of a 4.66 M-edge graph fit in 2^24 entries per bank |
| FIFO depth | 1024 | chosen here; the original FIFO is in DRAM |

The hash is `id * 0x9E3779B1` (32 bits), chosen here. Only the use of its
MSB as bank/channel select and of low bits as block address is part of the
architecture.

## How far to trust it, and where it departs

- The split, merge, padding, bank-select and two-pass storage rules follow
  the architecture as described. The following are choices made here:
  - stream field layouts;
  - the `nil` terminator of an empty candidate set;
  - round-robin merge priority;
  - emitting the real `last_set` and the stop only once, after both
    copies have arrived;
  - bloom fullness measured as a popcount;
  - block and bloom address layouts.
- The FIFO and the blooms are on-chip here. The original keeps them in DRAM
  behind AXI masters.
- The FIFO's separate stop-signal stream is replaced by the in-band
  `STOP_NODE`.
- `store_edges` updates a block counter with one read-modify-write per
  cycle. The original places a small cache in front of the counters; that
  cache is not modelled.
- Throughput is not pipelined to one item per cycle:
  - `mwj_findmin` takes two cycles per tuple;
  - `mwj_tuplebuild_split` registers each tuple before routing it;
  - `mwj_fulldetect` buffers a packet before sending it.

  Cycle counts are therefore this RTL's own. No throughput figure is
  claimed.
- Parallelism is fixed at two: channel selects are one bit wide. Going to
  four would need two hash bits and four-way versions of the split and
  merge blocks.

## What is not here

These are not implemented; their streams are ports of the top:

- edgebuild, which expands query-vertex structures into tuples;
- readmin counters and readmin edges, which do the DRAM reads;
- seqbuild, and the tuple generation inside tuplebuild;
- intersect, offset, blockbuild, verify, compact and filter;
- merge solandset and assembly;
- writeBloom, blockToHTB and the start-candidate proposal;
- the AXI interconnect, the processing system and the DRAM.

Their internal workings or memory layouts are not specified well enough to
build them faithfully.

## Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mwj_mergeasmset \
  -y rtl -y tb +libext+.sv -Irtl rtl/less_pkg.sv tb/tb_mwj_mergeasmset.sv
./obj_dir/Vtb_mwj_mergeasmset
```

`tb/tb_less_x2_top.sv` runs the whole top at its default sizes, taking about
20 k cycles. It plays the missing stages and checks every output against
models built in the testbench:

- the per-bank edge counts after the count pass;
- every hstream sequence, in per-channel order;
- every merged verify tuple, group by group;
- the complete-solution flags.

It also counts each mechanism and fails if any never occurs:

- FAKE start;
- routing to each channel;
- stop broadcast;
- homomorphism drop;
- empty candidate set;
- channel switch in the merge;
- padding and its synchronisation;
- complete solution;
- both banks filled;
- dst->src direction stored.

The testbenches use `$urandom` stimulus. Every variable that is read is
initialised, so they run on two-state simulators.
