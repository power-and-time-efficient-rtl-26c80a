// ip_lookup_top: IPv4 longest-prefix-match forwarding engine built from
// routing tables partitioned by output port.
//
// Data path, one packet per cycle:
//   cycle t    line_arbiter grants one waiting input line (in_ready), the
//              input_mux passes its packet, and the separator registers it
//              together with its destination address;
//   cycle t+1  all sub-tables search the address in parallel, their one-cold
//              length memories report every matched prefix length, the
//              partition_combiner merges them into 32 lines per port, the
//              selection_logic picks the longest length and the port whose
//              partition found it, and output_demux registers the packet onto
//              that output port (out_valid) or flags it as dropped.
// So a packet leaves two clock edges after it was granted.
//
// Route insertion (ins_valid, prefix, length 1..32, port) writes into any
// empty row of the port's partition in a single cycle; no table sorting. That
// cycle the arbiter grants nothing, as the table's lines are in use for the
// write. ins_ok (with the block and row written) or ins_full
// answers one cycle later.
//
// Partition boundaries: cfg_we loads cfg_cut into the boundary register (see
// partition_combiner). After reset the NUM_GROUPS groups are split equally
// between the ports. Moving a boundary moves the entries of the blocks that
// change partition with them; the table is meant to be reconfigured while
// empty.
//
// Defaults: 4 ports, 512 blocks of 512 rows = 256K routes, 32-bit IPv4
// prefixes, as in the described design; the boundary group size of 16
// blocks, the header-only packet format, the two-stage timing and the
// insertion stall are this implementation's choices.
module ip_lookup_top
  import iplu_pkg::*;
#(
  parameter int unsigned NUM_PORTS    = 4,
  parameter int unsigned NUM_BLOCKS   = 512,
  parameter int unsigned BLOCK_ROWS   = 512,
  parameter int unsigned GROUP_BLOCKS = 16,
  parameter int unsigned PKT_W        = 160,
  localparam int unsigned NUM_GROUPS = NUM_BLOCKS / GROUP_BLOCKS,
  localparam int unsigned PORT_W     = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int unsigned BLK_W      = (NUM_BLOCKS > 1) ? $clog2(NUM_BLOCKS) : 1,
  localparam int unsigned ROW_W      = $clog2(BLOCK_ROWS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // input lines
  input  logic [NUM_PORTS-1:0]  in_valid,
  input  logic [PKT_W-1:0]      in_pkt [NUM_PORTS],
  output logic [NUM_PORTS-1:0]  in_ready,
  // route insertion
  input  logic                  ins_valid,
  input  addr_t                 ins_prefix,
  input  len_t                  ins_len,
  input  logic [PORT_W-1:0]     ins_port,
  output logic                  ins_ok,
  output logic                  ins_full,
  output logic [BLK_W-1:0]      ins_block,
  output logic [ROW_W-1:0]      ins_row,
  // partition boundaries
  input  logic                  cfg_we,
  input  logic [NUM_GROUPS-1:0] cfg_cut,
  // output lines
  output logic [NUM_PORTS-1:0]  out_valid,
  output logic [PKT_W-1:0]      out_pkt,
  output len_t                  out_len,
  output logic                  out_drop
);

  // Equal split: a boundary before every NUM_GROUPS/NUM_PORTS-th group.
  function automatic logic [NUM_GROUPS-1:0] equal_cuts();
    logic [NUM_GROUPS-1:0] c;
    c = '0;
    for (int unsigned p = 1; p < NUM_PORTS; p++)
      c[(p * NUM_GROUPS) / NUM_PORTS] = 1'b1;
    return c;
  endfunction

  logic [NUM_GROUPS-1:0] cut_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cut_q <= equal_cuts();
    else if (cfg_we) cut_q <= cfg_cut;
  end

  // Stage 0: arbitration, multiplexing, separation.
  logic [PORT_W-1:0] grant_idx;
  logic [PKT_W-1:0]  mux_pkt;

  line_arbiter #(.NUM_IN(NUM_PORTS)) u_arb (
    .clk, .rst_n,
    .req       (in_valid),
    .enable    (!ins_valid),
    .grant     (in_ready),
    .grant_idx (grant_idx)
  );

  input_mux #(.NUM_IN(NUM_PORTS), .PKT_W(PKT_W)) u_mux (
    .in_pkt, .sel(grant_idx), .out_pkt(mux_pkt)
  );

  logic             look_valid;
  logic [PKT_W-1:0] look_pkt;
  addr_t            look_dst;

  separator #(.PKT_W(PKT_W)) u_sep (
    .clk, .rst_n,
    .in_valid  (|in_ready),
    .in_pkt    (mux_pkt),
    .out_valid (look_valid),
    .out_pkt   (look_pkt),
    .dst_addr  (look_dst)
  );

  // Stage 1: partitioned search and selection.
  len_lines_t        port_len_n [NUM_PORTS];
  logic              sel_hit;
  logic [PORT_W-1:0] sel_port;
  len_t              sel_len;

  routing_table #(
    .NUM_PORTS(NUM_PORTS), .NUM_BLOCKS(NUM_BLOCKS),
    .BLOCK_ROWS(BLOCK_ROWS), .GROUP_BLOCKS(GROUP_BLOCKS)
  ) u_table (
    .clk, .rst_n,
    .key        (look_dst),
    .port_len_n (port_len_n),
    .cut        (cut_q),
    .ins_valid, .ins_prefix, .ins_len, .ins_port,
    .ins_ok, .ins_full, .ins_block, .ins_row
  );

  selection_logic #(.NUM_PORTS(NUM_PORTS)) u_sel (
    .port_len_n, .hit(sel_hit), .port(sel_port), .length(sel_len)
  );

  output_demux #(.NUM_PORTS(NUM_PORTS), .PKT_W(PKT_W)) u_out (
    .clk, .rst_n,
    .in_valid  (look_valid),
    .in_pkt    (look_pkt),
    .hit       (sel_hit),
    .sel       (sel_port),
    .length    (sel_len),
    .out_valid (out_valid),
    .out_pkt   (out_pkt),
    .out_len   (out_len),
    .drop      (out_drop)
  );

endmodule
