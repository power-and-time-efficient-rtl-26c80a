// Workload testbench: a routing table filled to capacity with a skewed port
// distribution, as in core routers where over 90% of prefixes leave through
// one port. Runs ip_lookup_top at 1/8 of its default table (64 blocks of 512
// rows = 32 768 routes) but with the default 32 boundary groups, so the
// proportions are those of the full 262 144-route table: port 0 is given 29
// of 32 groups (90.6%), ports 1-3 one group each.
//
// One /24 route is inserted per clock cycle, back to back, until every row is
// used; each insertion's block and row is checked. Then one more route per
// port must be refused. Finally, packets to random stored routes must leave
// on their route's port with length 24; addresses outside all routes must be
// dropped. Also checks that the whole fill took one cycle per route.
module tb_workload_skewed;
  import iplu_pkg::*;
  localparam int unsigned NP = 4, NB = 64, ROWS = 512, GB = 2, PKT_W = 160;
  localparam int unsigned NG = NB / GB, GROUP_ROWS = GB * ROWS;
  localparam int unsigned CAP = NB * ROWS;
  localparam int unsigned P0_CAP = (NG - NP + 1) * GROUP_ROWS;   // 29 groups

  logic clk = 0, rst_n = 0;
  logic [NP-1:0]    in_valid = '0;
  logic [PKT_W-1:0] in_pkt [NP];
  logic [NP-1:0]    in_ready;
  logic             ins_valid = 0;
  addr_t            ins_prefix = '0;
  len_t             ins_len = len_t'(24);
  logic [1:0]       ins_port = '0;
  logic             ins_ok, ins_full;
  logic [5:0]       ins_block;
  logic [8:0]       ins_row;
  logic             cfg_we = 0;
  logic [NG-1:0]    cfg_cut = '0;
  logic [NP-1:0]    out_valid;
  logic [PKT_W-1:0] out_pkt;
  len_t             out_len;
  logic             out_drop;
  int checks = 0, failures = 0;
  int n_ok = 0, n_refused = 0, n_fwd = 0, n_drop = 0;

  ip_lookup_top #(.NUM_PORTS(NP), .NUM_BLOCKS(NB), .BLOCK_ROWS(ROWS), .GROUP_BLOCKS(GB), .PKT_W(PKT_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (CAP + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Route i: prefix i.x.x/24 (i in the top 24 bits' low part), port by index.
  function automatic int port_of(int i);
    if (i < int'(P0_CAP)) return 0;
    return 1 + (i - int'(P0_CAP)) / int'(GROUP_ROWS);
  endfunction
  function automatic addr_t prefix_of(int i);
    return addr_t'(i) << 8;
  endfunction
  // Expected location: port 0 fills groups 0..28 in order, port p>0 group 28+p.
  function automatic int loc_of(int i);
    if (i < int'(P0_CAP)) return i;
    return (NG - NP + port_of(i)) * GROUP_ROWS + (i - int'(P0_CAP)) % GROUP_ROWS;
  endfunction

  initial begin
    int exp_i;
    longint t_start, t_end;
    logic pend;
    for (int i = 0; i < NP; i++) in_pkt[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg_we = 1;
    for (int p = 1; p < NP; p++) cfg_cut[NG - NP + p] = 1'b1;
    @(negedge clk);
    cfg_we = 0;

    // Fill: one insertion per cycle, result checked one cycle later.
    pend = 0; exp_i = 0;
    t_start = $time;
    for (int i = 0; i <= int'(CAP) + int'(NP); i++) begin
      if (pend) begin
        checks++;
        if (exp_i < int'(CAP)) begin
          if (!ins_ok || ins_full || int'(ins_block) * int'(ROWS) + int'(ins_row) != loc_of(exp_i)) begin
            failures++;
            if (failures < 10) $display("FAIL route %0d at block %0d row %0d, expected row %0d", exp_i, ins_block, ins_row, loc_of(exp_i));
          end else n_ok++;
        end else begin
          if (!ins_full || ins_ok) begin failures++; $display("FAIL extra route %0d not refused", exp_i); end
          else n_refused++;
        end
      end
      if (i < int'(CAP) + int'(NP)) begin
        ins_valid = 1;
        if (i < int'(CAP)) begin
          ins_prefix = prefix_of(i); ins_len = len_t'(24); ins_port = 2'(port_of(i));
        end else begin
          ins_prefix = 32'hFF00_0000; ins_len = len_t'(8); ins_port = 2'(i - int'(CAP));
        end
        exp_i = i; pend = 1;
        @(negedge clk);
      end
    end
    ins_valid = 0;
    t_end = $time;
    checks++;
    if ((t_end - t_start) / 10 != CAP + NP) begin
      failures++; $display("FAIL fill took %0d cycles for %0d insertions", (t_end - t_start) / 10, CAP + NP);
    end
    $display("filled %0d routes (%0d on port 0) in %0d cycles, %0d refused", n_ok, P0_CAP, (t_end - t_start) / 10, n_refused);

    // Lookups on the full table, one packet per cycle from line 0.
    for (int k = 0; k < 400; k++) begin
      automatic int r = (k % 4 == 3) ? int'(CAP) + $urandom_range(0, 1000) : $urandom_range(0, CAP - 1);
      if (k % 8 == 0) r = (k % 16 == 0) ? int'(CAP) - 1 : int'(P0_CAP) - 1 + (k % 3);
      in_valid = 4'b0001;
      in_pkt[0] = {5{$urandom()}};
      in_pkt[0][31:0] = prefix_of(r) | addr_t'($urandom_range(0, 255));
      @(negedge clk);        // accepted at this edge
      in_valid = '0;
      @(negedge clk);        // result registered at this edge
      checks++;
      if (r < int'(CAP)) begin
        if (out_valid !== (4'b0001 << port_of(r)) || out_len != len_t'(24) || out_drop) begin
          failures++; $display("FAIL route %0d: out_valid=%b len=%0d, expected port %0d", r, out_valid, out_len, port_of(r));
        end else n_fwd++;
      end else begin
        if (out_valid !== '0 || !out_drop) begin failures++; $display("FAIL address beyond routes not dropped"); end
        else n_drop++;
      end
    end
    checks++;
    if (n_refused != int'(NP) || n_fwd == 0 || n_drop == 0) begin
      failures++; $display("FAIL coverage refused=%0d forwarded=%0d dropped=%0d", n_refused, n_fwd, n_drop);
    end
    $display("forwarded=%0d dropped=%0d", n_fwd, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
