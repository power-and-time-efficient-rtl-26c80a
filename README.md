# Partitioned-TCAM IPv4 lookup engine

A router looks up every packet's destination address in a routing table
and keeps the *longest* stored prefix that covers it (longest prefix match,
LPM). A ternary CAM (TCAM) does the search in one step because every row
compares in parallel. A conventional TCAM, though, needs its rows sorted by
prefix length so that a priority encoder can pick the longest match. Adding
a route to a sorted table can then mean moving up to N entries.

This engine removes the sorting. It splits the table **by output port**:
every route that leads to port *p* lives in partition *p*, in any free row.
Next to each TCAM row, a small memory holds the route's prefix length,
stored *one-cold*. The TCAM match lines drive that memory directly. So a
search returns, for each port, the set of prefix lengths that matched
there. A small selection circuit then takes the longest length and reports
the port whose partition produced it. That port is the forwarding
decision. No port number is stored and no priority encoder spans the rows.
Inserting a route is a single write into an empty row of the right
partition, so it takes one cycle however full the table is.

The architecture follows Ahn, Lee and Lee, "Power and Time Efficient IP
Lookup Table Design Using Partitioned TCAMs" (2013). The RTL, the interfaces
and every detail listed under "Design choices" below belong to this
implementation.

## How a search produces a forwarding decision

Each table row holds three things:

| field   | width | meaning |
|---------|-------|---------|
| value   | 32    | prefix, with the bits below the length cleared |
| care    | 32    | 1 = bit compared, 0 = don't care; the top *len* bits are 1 |
| length  | 32    | one-cold: all ones, except a 0 in column *len*−1 (column 0 = /1, column 31 = /32) |

plus a valid bit. A search works in five steps, all in one clock cycle:

1. **TCAM** (`tcam_array`). Row *r* raises `match[r]` if it is valid and
   agrees with the key on every cared-for bit. Any number of rows may match.
2. **Length memory** (`length_sram`). The match lines are its word lines, so
   all matching rows are read at once. Each column behaves as a wired-AND:
   it reads 0 if any activated row stores 0 there. (In silicon, each cell
   gets extra access transistors and can only pull its bit line low.) Reads
   cannot conflict, because one address matches at most one stored prefix of
   each length. Column *c* therefore reads 0 exactly when a prefix of
   length *c*+1 matched in this block.
3. **Sub-tables and partitions** (`sub_table`, `partition_combiner`). The
   table is built from many small blocks. This keeps the bit lines short:
   512-row blocks are the default. Each block has its own TCAM and length
   memory. All blocks of one partition drive the same 32 length lines,
   ORed onto shared columns that end in a pull-up. The result is 32
   active-low lines per port.
4. **Selection** (`selection_logic`). The lines of all ports are ORed to find
   the longest length that was found anywhere. The port whose lines show
   that length is the answer. This is the whole "priority" logic: it sees
   only NUM_PORTS × 32 inputs, however many routes the table holds.
5. **Output** (`output_demux`). The packet is sent to that port. If nothing
   matched, the packet is dropped.

Example, with port 2 holding 10.0.0.0/8 and port 0 holding 10.1.0.0/16. For
key 10.1.2.3, port 2's lines show column 7 low and port 0's lines show
column 15 low. The longest length found is 16, so the packet goes to
port 0 with `out_len` = 16. For key 10.9.9.9 only port 2 reports a length
(8), so the packet goes to port 2.

Because a length is reported, not a row address, two stored copies of the
same prefix would show up as the same length twice. Nothing breaks, but the
lower port number then wins. Routes are expected to be unique; insertion
does not check.

## Partitions and their boundaries

Routes are rarely spread evenly over ports: one port often carries most of
them. The blocks therefore form a chain cut into partitions at programmable
boundaries. Boundaries can only sit between *groups* of `GROUP_BLOCKS`
blocks (16 blocks = 8192 rows at the defaults, 32 groups).

`cut[g]` = 1 closes the boundary between group *g*−1 and group *g*; `cut[0]`
has no meaning. Group *g* belongs to port `popcount(cut[g:1])`. Groups
numbered past the last port are left unconnected. They report nothing and
take no routes.

After reset, the groups are shared equally: with 4 ports, a boundary before
groups 8, 16 and 24, which gives each port 65 536 rows. Writing
`cfg_cut = 32'hE000_0000` with `cfg_we` gives port 0 groups 0–28
(237 568 rows, more than 90% of the table) and ports 1–3 one group each.
Changing the boundaries does not move any entries. A block that changes
partition keeps its routes, and they now lead to its new port. Program the
boundaries while the table is empty, or accept that effect.

## Inserting a route

Drive `ins_valid` for one cycle with `ins_prefix`, `ins_len` (1–32) and
`ins_port`. In that cycle, `routing_table` finds the first block of that
port's partition that has an empty row, and the lowest empty row in that
block. Both searches are combinational. The entry is written at the next
clock edge:

* value = prefix with the low bits cleared;
* care mask and one-cold length, both derived from `ins_len`.

One cycle later, the result comes back:

* `ins_ok` pulses, with `ins_block` and `ins_row` giving the location written;
* or `ins_full` pulses if the partition had no empty row. Nothing is then written.

No entry is ever moved. The row chosen does not matter to lookups, because
entries within a partition need no order. A length of 0 cannot be stored (no
default route) and triggers an assertion. There is no delete operation.

Insertion and lookup share the table. During an insertion cycle the line
arbiter grants no input, so a packet that is waiting is simply taken one
cycle later. A packet that is already being looked up is not affected. It
sees the table as it was before the write.

## Packet path and timing

```
 input lines --> line_arbiter + input_mux --> separator ==> routing_table --> selection_logic --> output_demux --> output lines
 (in_valid/        (round robin, one           (register:      (all blocks,     (longest length,    (register:
  in_ready)         packet per cycle)           packet + dst)   in parallel)     then its port)      one-hot out_valid)
```

| clock edge | what happens |
|-----------|--------------|
| before *k* | the arbiter raises `in_ready[i]` for one requesting line (combinational from `in_valid`) |
| *k*        | the separator registers the packet and its destination address (header bytes 16–19, bits [31:0]) |
| *k*→*k*+1  | search, length read, partition combining and selection |
| *k*+1      | `out_valid[port]`, `out_pkt` and `out_len` are registered; or `out_drop` |

So the latency is two clock edges and the throughput is one lookup per
clock. In the original evaluation the search path takes about 11.6 ns in
total: 6.5 ns TCAM search, 4.1 ns length-memory read for a 512-row block,
and about 1 ns of selection. That is what the single lookup cycle has to
hold.

A packet is carried as its 160-bit IPv4 header, with byte 0 in bits
[159:152]. `in_valid[i]` must stay high with the same packet until
`in_ready[i]`. Output lines cannot push back.

## Top-level interface (`ip_lookup_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears valid bits, boundaries to equal split) |
| `in_valid` | in | NUM_PORTS | line *i* has a packet |
| `in_pkt` | in | NUM_PORTS × PKT_W (unpacked) | the packets |
| `in_ready` | out | NUM_PORTS | one-hot: packet of line *i* taken this cycle |
| `ins_valid`, `ins_prefix`, `ins_len`, `ins_port` | in | 1, 32, 6, log2 NUM_PORTS | insert a route |
| `ins_ok`, `ins_full` | out | 1 | result, one cycle after `ins_valid` |
| `ins_block`, `ins_row` | out | log2 NUM_BLOCKS, log2 BLOCK_ROWS | location written |
| `cfg_we`, `cfg_cut` | in | 1, NUM_BLOCKS/GROUP_BLOCKS | load the partition boundaries |
| `out_valid` | out | NUM_PORTS | one-hot: packet on output port |
| `out_pkt`, `out_len` | out | PKT_W, 6 | packet and matched prefix length |
| `out_drop` | out | 1 | packet discarded, no route |

| parameter | default | |
|-----------|---------|--|
| `NUM_PORTS` | 4 | input lines = output ports = partitions |
| `NUM_BLOCKS` | 512 | sub-tables; 512 × 512 = 262 144 routes |
| `BLOCK_ROWS` | 512 | rows per sub-table (128 and 256 are the other sizes the original evaluates) |
| `GROUP_BLOCKS` | 16 | boundary granularity; must divide `NUM_BLOCKS` |
| `PKT_W` | 160 | header width carried with the packet |

The 4 ports, the 256K-route table, the 512-row blocks and the 32-bit
prefix/length words are the original design's figures. Its power
comparison also uses 16-port routers and 128K to 1024K routes. With
`NUM_PORTS = 16`, the 32 groups give 16 partitions. Tables above 256K routes
need more blocks.

## Files

| file | contents |
|------|----------|
| `rtl/iplu_pkg.sv` | widths, types, care-mask and one-cold encoders |
| `rtl/tcam_array.sv` | ternary rows, parallel match lines |
| `rtl/length_sram.sv` | one-cold length memory read by the match lines |
| `rtl/sub_table.sv` | one block: TCAM + length memory + lowest-empty-row finder |
| `rtl/partition_combiner.sv` | boundary switches and per-port wired-OR of the length lines |
| `rtl/selection_logic.sv` | longest length, then its port |
| `rtl/routing_table.sv` | all blocks, combiner, one-cycle insertion |
| `rtl/line_arbiter.sv`, `rtl/input_mux.sv` | round-robin choice of input line |
| `rtl/separator.sv` | destination address split-off, lookup-stage register |
| `rtl/output_demux.sv` | steering to the output port, drop flag |
| `rtl/ip_lookup_top.sv` | the whole engine |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_ip_lookup_top.sv` | end-to-end test at a small size (16 blocks of 4 rows) |
| `tb/tb_ip_lookup_full.sv` | end-to-end test at the default size (262 144 rows) |
| `tb/tb_workload_skewed.sv` | table filled to capacity, 90.6% of routes on one port, at 1/8 of the default size |
| `tb/ip_lookup_tb_body.svh` | reference model and stimulus shared by the two end-to-end tests |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that ends a hung run as a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/iplu_pkg.sv \
    tb/tb_ip_lookup_top.sv --top-module tb_ip_lookup_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other one. The end-to-end tests work
as follows:

* **Stimulus.** All lines offer packets. Their destinations cluster around a
  few base addresses, and nested routes of many lengths on different ports
  are inserted while traffic flows.
* **Checking.** A reference model predicts each packet's port, length or
  drop at exactly two clock edges, and each insertion's block and row, or
  its refusal.
* **Two phases.** The test runs once with the reset boundaries and once with
  uneven ones loaded through `cfg_we`.
* **Coverage (small test only).** The small test also counts forwarded and
  dropped packets, refused insertions, insertion stalls, lookups matching in
  several blocks or several ports, and contended arbitration. It fails if any
  of these never happened.
* **Skewed fill.** `tb_workload_skewed` uses 64 blocks of 512 rows, with
  the default's 32 boundary groups. It gives port 0 29 of the 32 groups,
  inserts one /24 route per clock until all 32 768 rows are used, and
  checks every location. It then checks that each port refuses one more
  route, and that lookups on the full table forward or drop correctly.
* **Run times.** The full-size test takes about two minutes to build and
  a few seconds to run.

## Design choices and departures

These points are not fixed by the original description. They are choices
of this implementation.

* **Timing.** The original gives path delays in nanoseconds (see above), not
  a clocking scheme. Here, the whole search-and-select path is one cycle.
  Arbitration and separation take the cycle before it, and the result is
  registered after it.
* **Write addressing.** Lookups need no address decoder. Writes, though,
  still pick a row by address in both the TCAM and the length memory.
* **Ternary storage.** Each TCAM cell is a value bit plus a care bit. Each
  row has a valid bit, cleared at reset, so empty rows never match.
* **Length memory.** The modified cell (a 6T cell with four extra
  transistors) is modelled by its logic behaviour only: a cell can pull its
  bit line low only when it stores 0. The RTL holds ordinary storage and a
  wired-AND read.
* **Boundaries.** The group size, the contiguous-chain numbering and the
  boundary register are assumptions. The original only says that partition
  sizes are programmable at a minimum grouping size, and that switches
  cannot sit at every block boundary.
* **Empty-row search.** The row is chosen by two combinational find-first
  searches: first free block, then lowest free row. The original only
  requires "any" open location.
* **Stalls.** An insertion stalls packet intake for its one cycle.
* **Arbiter and packets.** Round-robin arbitration between input lines.
  Packets are headers only. There is no output back-pressure, and packets
  without a route are dropped.
* **Not provided.** There is no route deletion or modification, no duplicate
  check, and no default (/0) route.
* **Physical detail.** Column pull-ups, bit-line precharge and sense
  amplifiers have no RTL counterpart beyond the logic they implement.

## Trust and limits

* Every module has its own self-checking testbench. Each testbench was also
  run against a deliberately broken copy of its module, and failed as
  expected.
* The reference models in the testbenches are written independently of the
  RTL. They compute matches by shifting addresses, not from care masks or
  one-cold words.
* At the defaults, the table is 262 144 × 97 bits of storage with a
  comparator per row. In RTL this is flip-flops and gates. The code
  synthesizes logically, but a real chip would use custom TCAM and SRAM
  macros with the behaviour described above. Generic synthesis of the
  full-size table is very slow and memory hungry. Scale `NUM_BLOCKS` down
  for synthesis experiments.
* The latency, area and power figures of the original (custom cells in 0.25
  µm and 0.5 µm processes) are not reproduced by this RTL.
