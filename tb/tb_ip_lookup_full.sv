// End-to-end testbench of ip_lookup_top at its default size: 4 ports, 512
// blocks of 512 rows (256K routes), 160-bit headers. Inserts routes while
// packets flow from all four input lines and checks every forwarding
// decision and insertion location against a reference model, with the reset
// partition boundaries and then with uneven ones.
module tb_ip_lookup_full;
  import iplu_pkg::*;
  localparam int unsigned NP = 4, NB = 512, ROWS = 512, GB = 16, PKT_W = 160;
  localparam int unsigned N_CYCLES = 600, N_ROUTES = 200;
  localparam bit CHECK_COVERAGE = 0;

`include "ip_lookup_tb_body.svh"

  ip_lookup_top dut (.*);
endmodule
