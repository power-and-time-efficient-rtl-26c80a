// routing_table: the partitioned TCAM routing table with O(1) insertion.
//
// NUM_BLOCKS sub-tables of BLOCK_ROWS entries each form one physical array.
// The partition_combiner assigns contiguous groups of blocks to output ports
// (the cut vector sets the boundaries) and merges each partition's outputs
// into 32 active-low length lines per port. Every route of a partition leads
// to the same port, so entries inside a partition need no order at all.
//
// Lookup: key -> port_len_n is combinational, all blocks search in parallel.
//
// Insertion: ins_valid with prefix, length (1..32) and port. In the same
// cycle the first block of that port's partition with an empty row is chosen
// and the entry is written into its lowest empty row at the rising edge: one
// cycle, whatever the table holds, with no entry moved. The prefix bits below
// the length are cleared, the care mask and one-cold length are derived from
// the length. One cycle later ins_ok (written, with ins_block/ins_row) or
// ins_full (the partition had no empty row, nothing written) pulses.
//
// Partitioning by port, one-cold lengths and insertion into any open
// location follow the described design. The way the open location is found,
// the result handshake, and the lack of deletion are this implementation's.
module routing_table
  import iplu_pkg::*;
#(
  parameter int unsigned NUM_PORTS    = 4,
  parameter int unsigned NUM_BLOCKS   = 512,
  parameter int unsigned BLOCK_ROWS   = 512,
  parameter int unsigned GROUP_BLOCKS = 16,
  localparam int unsigned NUM_GROUPS = NUM_BLOCKS / GROUP_BLOCKS,
  localparam int unsigned PORT_W     = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int unsigned BLK_W      = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned ROW_W      = $clog2(BLOCK_ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  addr_t             key,
  output len_lines_t        port_len_n [NUM_PORTS],
  // partition boundaries
  input  logic [NUM_GROUPS-1:0] cut,
  // insertion
  input  logic              ins_valid,
  input  addr_t             ins_prefix,
  input  len_t              ins_len,
  input  logic [PORT_W-1:0] ins_port,
  output logic              ins_ok,
  output logic              ins_full,
  output logic [BLK_W-1:0]  ins_block,
  output logic [ROW_W-1:0]  ins_row
);

  len_lines_t        blk_len_n [NUM_BLOCKS];
  logic [NUM_BLOCKS-1:0] has_free;
  logic [ROW_W-1:0]  free_row  [NUM_BLOCKS];
  logic [PORT_W-1:0] blk_port  [NUM_BLOCKS];
  logic [NUM_BLOCKS-1:0] blk_en;

  addr_t             wr_care, wr_value;
  len_lines_t        wr_len_n;
  logic              sel_found;
  logic [BLK_W-1:0]  sel_blk;
  logic [ROW_W-1:0]  sel_row;

  assign wr_care  = len_to_care(ins_len);
  assign wr_value = ins_prefix & wr_care;
  assign wr_len_n = len_to_onecold(ins_len);

  // Open location: first block of the port's partition with an empty row.
  always_comb begin
    sel_found = 1'b0;
    sel_blk   = '0;
    for (int b = NUM_BLOCKS - 1; b >= 0; b--)
      if (blk_en[b] && blk_port[b] == ins_port && has_free[b]) begin
        sel_found = 1'b1;
        sel_blk   = BLK_W'(b);
      end
    sel_row = free_row[sel_blk];
  end

  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_blk
    sub_table #(.ROWS(BLOCK_ROWS)) u_sub (
      .clk, .rst_n, .key,
      .wr_en    (ins_valid && sel_found && sel_blk == BLK_W'(b)),
      .wr_row   (sel_row),
      .wr_value (wr_value),
      .wr_care  (wr_care),
      .wr_len_n (wr_len_n),
      .len_n    (blk_len_n[b]),
      .has_free (has_free[b]),
      .free_row (free_row[b])
    );
  end

  partition_combiner #(
    .NUM_PORTS(NUM_PORTS), .NUM_BLOCKS(NUM_BLOCKS), .GROUP_BLOCKS(GROUP_BLOCKS)
  ) u_comb (
    .blk_len_n, .cut, .port_len_n, .blk_port, .blk_en
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ins_ok    <= 1'b0;
      ins_full  <= 1'b0;
      ins_block <= '0;
      ins_row   <= '0;
    end else begin
      ins_ok    <= ins_valid && sel_found;
      ins_full  <= ins_valid && !sel_found;
      ins_block <= sel_blk;
      ins_row   <= sel_row;
    end
  end

  // A route length outside 1..32 cannot be stored in the one-cold word.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ins_valid |-> (ins_len >= 1 && ins_len <= 32))
    else $error("routing_table: insertion with prefix length %0d", ins_len);

endmodule
