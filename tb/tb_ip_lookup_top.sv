// End-to-end testbench of ip_lookup_top at a reduced size: 4 ports, 16
// blocks of 4 rows (64 routes), boundary groups of 2 blocks. Small enough
// that partitions fill up, so refused insertions are exercised as well as
// forwarding, drops, insertion stalls, nested and multi-port matches,
// arbitration between lines and reprogrammed partition boundaries. Every
// mechanism must occur at least once.
module tb_ip_lookup_top;
  import iplu_pkg::*;
  localparam int unsigned NP = 4, NB = 16, ROWS = 4, GB = 2, PKT_W = 160;
  localparam int unsigned N_CYCLES = 600, N_ROUTES = 120;
  localparam bit CHECK_COVERAGE = 1;

`include "ip_lookup_tb_body.svh"

  ip_lookup_top #(.NUM_PORTS(NP), .NUM_BLOCKS(NB), .BLOCK_ROWS(ROWS), .GROUP_BLOCKS(GB), .PKT_W(PKT_W)) dut (.*);
endmodule
