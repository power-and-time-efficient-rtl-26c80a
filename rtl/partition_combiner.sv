// partition_combiner: groups the blocks into one partition per output port
// and merges each partition's bit lines into 32 length lines.
//
// The blocks form a chain divided into NUM_GROUPS groups of GROUP_BLOCKS
// blocks. Between group g-1 and group g sits a boundary switch, cut[g]
// (cut[0] is unused). Closed switches split the chain into contiguous
// partitions: group g belongs to port popcount(cut[g:1]). Groups past the
// last port's partition are left unconnected and never report a match. So
// partition sizes are programmable in steps of one group, and a port that
// carries most routes can be given most of the table.
//
// Within a partition, the blocks' outputs for a length are ORed onto a shared
// column that has a pull-up at its far end and the selection logic at the
// other. Logically: port_len_n[p][c] is 0 when any block of partition p has
// column c low. Since an address matches at most one prefix per length,
// two blocks never report the same length.
//
// Purely combinational. blk_port/blk_en give the block-to-port map to the
// insertion logic.
//
// The OR scheme, the pull-up and programmable boundaries at a minimum group
// size follow the described design; the group size of 16 blocks and the
// popcount numbering of partitions are this implementation's choices.
module partition_combiner
  import iplu_pkg::*;
#(
  parameter int unsigned NUM_PORTS    = 4,
  parameter int unsigned NUM_BLOCKS   = 512,
  parameter int unsigned GROUP_BLOCKS = 16,
  localparam int unsigned NUM_GROUPS = NUM_BLOCKS / GROUP_BLOCKS,
  localparam int unsigned PORT_W     = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  len_lines_t        blk_len_n  [NUM_BLOCKS],
  input  logic [NUM_GROUPS-1:0] cut,
  output len_lines_t        port_len_n [NUM_PORTS],
  output logic [PORT_W-1:0] blk_port   [NUM_BLOCKS],
  output logic [NUM_BLOCKS-1:0] blk_en
);

  logic [PORT_W-1:0] grp_port [NUM_GROUPS];
  logic [NUM_GROUPS-1:0] grp_en;

  // Partition number of each group from the boundary switches.
  always_comb begin
    int unsigned seg;
    seg = 0;
    for (int unsigned g = 0; g < NUM_GROUPS; g++) begin
      if (g != 0 && cut[g]) seg++;
      grp_en[g]   = (seg < NUM_PORTS);
      grp_port[g] = PORT_W'(seg);
    end
  end

  always_comb begin
    for (int unsigned b = 0; b < NUM_BLOCKS; b++) begin
      blk_port[b] = grp_port[b / GROUP_BLOCKS];
      blk_en[b]   = grp_en[b / GROUP_BLOCKS];
    end
  end

  // Active-low wired-OR of the partition's blocks, per length column.
  always_comb begin
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      port_len_n[p] = '1;
    for (int unsigned b = 0; b < NUM_BLOCKS; b++)
      if (blk_en[b]) port_len_n[blk_port[b]] &= blk_len_n[b];
  end

endmodule
