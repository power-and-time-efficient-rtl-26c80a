// Self-checking testbench for routing_table at a small size (8 blocks of 4
// rows, groups of 2 blocks, 4 ports). Inserts random routes, checks the
// location each lands in and the one-cycle insertion result, fills
// partitions until insertions are refused, and compares the length lines of
// every port for random and constructed keys with a reference table. A
// second phase repeats this with uneven partition boundaries.
module tb_routing_table;
  import iplu_pkg::*;
  localparam int unsigned NP = 4, NB = 8, ROWS = 4, GB = 2, NG = NB / GB;
  localparam int unsigned CAP = NB * ROWS;

  logic clk = 0, rst_n = 0;
  addr_t key = '0;
  len_lines_t port_len_n [NP];
  logic [NG-1:0] cut = '0;
  logic ins_valid = 0;
  addr_t ins_prefix = '0;
  len_t ins_len = len_t'(1);
  logic [1:0] ins_port = '0;
  logic ins_ok, ins_full;
  logic [2:0] ins_block;
  logic [1:0] ins_row;
  int checks = 0, failures = 0;
  int n_full = 0, n_ok = 0, n_multi = 0;

  // reference
  addr_t m_pfx [CAP];
  int    m_len [CAP];
  int    m_port [CAP];
  int    n;
  int    blk_cnt [NB];

  routing_table #(.NUM_PORTS(NP), .NUM_BLOCKS(NB), .BLOCK_ROWS(ROWS), .GROUP_BLOCKS(GB)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int part_of(int b);
    int s = 0;
    for (int g = 1; g <= b / GB; g++) if (cut[g]) s++;
    return s;
  endfunction

  task automatic check_lookup(addr_t k);
    len_lines_t e [NP];
    int n_match = 0;
    for (int p = 0; p < NP; p++) e[p] = '1;
    for (int i = 0; i < n; i++)
      if ((k >> (32 - m_len[i])) == (m_pfx[i] >> (32 - m_len[i]))) begin
        e[m_port[i]][m_len[i]-1] = 1'b0;
        n_match++;
      end
    if (n_match > 1) n_multi++;
    key = k; #1;
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (port_len_n[p] !== e[p]) begin
        failures++; $display("FAIL key=%h port %0d got %h exp %h", k, p, port_len_n[p], e[p]);
      end
    end
  endtask

  task automatic insert(addr_t pfx, int len, int port);
    int eb = -1;
    for (int b = 0; b < NB; b++)
      if (eb < 0 && part_of(b) == port && blk_cnt[b] < ROWS) eb = b;
    ins_valid = 1; ins_prefix = pfx; ins_len = len_t'(len); ins_port = 2'(port);
    @(negedge clk);
    ins_valid = 0;
    checks++;
    if (eb < 0) begin
      n_full++;
      if (!ins_full || ins_ok) begin failures++; $display("FAIL expected full for port %0d", port); end
    end else begin
      n_ok++;
      if (!ins_ok || ins_full || int'(ins_block) != eb || int'(ins_row) != blk_cnt[eb]) begin
        failures++;
        $display("FAIL insert port %0d: ok=%b blk=%0d row=%0d exp blk=%0d row=%0d", port, ins_ok, ins_block, ins_row, eb, blk_cnt[eb]);
      end
      blk_cnt[eb]++;
      m_pfx[n] = pfx & len_to_care(len_t'(len)); m_len[n] = len; m_port[n] = port; n++;
    end
  endtask

  task automatic run_phase(logic [NG-1:0] c);
    addr_t base = $urandom();
    rst_n = 0; cut = c; n = 0;
    for (int b = 0; b < NB; b++) blk_cnt[b] = 0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    check_lookup($urandom());
    for (int i = 0; i < 48; i++) begin
      // unique (prefix,len) pairs: length i%32+1 of a few bases
      int len = (i % 32) + 1;
      addr_t pfx = (i < 32) ? base : ~base;
      insert(pfx, len, $urandom_range(0, NP - 1));
      check_lookup(base);
      check_lookup(pfx | ($urandom() >> len));
    end
    for (int i = 0; i < 100; i++) check_lookup((i % 2) ? $urandom() : base ^ (32'h1 << $urandom_range(0, 31)));
  endtask

  initial begin
    run_phase(4'b1110);            // equal partitions: 2 blocks per port
    run_phase(4'b0010);            // port 0: 1 group, port 1: 3 groups, ports 2,3: none
    checks++;
    if (n_full == 0 || n_ok == 0 || n_multi == 0) begin
      failures++; $display("FAIL coverage full=%0d ok=%0d multi=%0d", n_full, n_ok, n_multi);
    end
    $display("inserted=%0d refused=%0d multi-match lookups=%0d", n_ok, n_full, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
