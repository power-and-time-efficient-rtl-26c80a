// Shared body of the end-to-end testbenches of ip_lookup_top. The including
// module defines NP, NB, ROWS, GB, PKT_W, N_CYCLES, N_ROUTES, CHECK_COVERAGE
// and instantiates the DUT as "dut" on the signals declared here.
//
// Traffic: every input line offers packets (held until in_ready) whose
// destination is either random or close to one of a few base addresses that
// carry nested routes of many lengths on different ports. Routes are inserted
// while traffic flows. A reference model keeps the route list and each
// block's fill level; every accepted packet gets its expected port, length
// or drop, due exactly two clock edges after acceptance. Each insertion's
// block, row or refusal is checked one cycle later. The test runs twice:
// with the reset partition boundaries and with uneven ones loaded through
// cfg_we.

  localparam int unsigned NG     = NB / GB;
  localparam int unsigned CAP    = NB * ROWS;
  localparam int unsigned PORT_W = (NP > 1) ? $clog2(NP) : 1;
  localparam int unsigned MAXR   = 2 * N_ROUTES;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0]    in_valid = '0;
  logic [PKT_W-1:0] in_pkt [NP];
  logic [NP-1:0]    in_ready;
  logic             ins_valid = 0;
  addr_t            ins_prefix = '0;
  len_t             ins_len = len_t'(1);
  logic [PORT_W-1:0] ins_port = '0;
  logic             ins_ok, ins_full;
  logic [$clog2(NB)-1:0] ins_block;
  logic [$clog2(ROWS)-1:0] ins_row;
  logic             cfg_we = 0;
  logic [NG-1:0]    cfg_cut = '0;
  logic [NP-1:0]    out_valid;
  logic [PKT_W-1:0] out_pkt;
  len_t             out_len;
  logic             out_drop;

  int checks = 0, failures = 0;
  longint edge_cnt = 0;

  // mechanism counters
  int n_stall = 0, n_full = 0, n_ins = 0, n_drop = 0, n_hit = 0;
  int n_multiport = 0, n_nested = 0, n_contend = 0, n_reconfig = 0, n_pkts = 0;

  // reference model
  addr_t m_pfx [MAXR];
  int    m_len [MAXR];
  int    m_port [MAXR];
  int    m_n = 0;
  int    blk_cnt [NB];
  logic [NG-1:0] cur_cut;
  addr_t bases [4];

  typedef struct {
    logic [PKT_W-1:0] pkt;
    logic             hit;
    int               port;
    int               len;
    longint           due;
  } exp_t;
  exp_t q [$];

  logic [PKT_W-1:0] pend [NP];
  logic [NP-1:0]    pend_v = '0;
  int serial = 0;

  logic exp_ins_pending = 0, exp_ins_full = 0;
  int   exp_blk = 0, exp_row = 0;

  always #5 clk = ~clk;
  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  initial begin
    repeat (N_CYCLES * 3 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int part_of(int b);
    int s = 0;
    for (int g = 1; g <= b / GB; g++) if (cur_cut[g]) s++;
    return s;
  endfunction

  function automatic logic [NG-1:0] equal_cut();
    logic [NG-1:0] c = '0;
    for (int p = 1; p < NP; p++) c[(p * NG) / NP] = 1'b1;
    return c;
  endfunction

  function automatic logic covers(addr_t a, addr_t pfx, int len);
    return (a >> (32 - len)) == (pfx >> (32 - len));
  endfunction

  function automatic exp_t lookup(logic [PKT_W-1:0] pkt);
    exp_t e;
    addr_t a = pkt[31:0];
    int ports_hit = 0, nmatch = 0;
    logic [NP-1:0] ph = '0;
    e.pkt = pkt; e.hit = 0; e.port = 0; e.len = 0; e.due = 0;
    for (int i = 0; i < m_n; i++)
      if (covers(a, m_pfx[i], m_len[i])) begin
        nmatch++;
        ph[m_port[i]] = 1'b1;
        if (!e.hit || m_len[i] > e.len || (m_len[i] == e.len && m_port[i] < e.port)) begin
          e.hit = 1; e.len = m_len[i]; e.port = m_port[i];
        end
      end
    if ($countones(ph) > 1) n_multiport++;
    if (nmatch > 1) n_nested++;
    return e;
  endfunction

  function automatic logic known(addr_t pfx, int len);
    for (int i = 0; i < m_n; i++)
      if (m_len[i] == len && covers(pfx, m_pfx[i], len)) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [PKT_W-1:0] new_packet();
    logic [PKT_W-1:0] p;
    addr_t a;
    for (int w = 0; w < (PKT_W + 31) / 32; w++) p[w*32 +: 32] = $urandom();
    if ($urandom_range(0, 3) == 0) a = $urandom();
    else a = bases[$urandom_range(0, 3)] ^ ($urandom() >> $urandom_range(4, 32));
    p[31:0]  = a;                       // destination address
    p[63:32] = 32'(serial++);           // source field carries a serial number
    return p;
  endfunction

  task automatic check_outputs();
    exp_t e;
    logic any_out = (out_valid != '0) || out_drop;
    if (q.size() > 0 && q[0].due == edge_cnt) begin
      e = q.pop_front();
      checks++;
      if (e.hit) begin
        if (out_valid !== (NP'(1) << e.port) || out_drop || out_pkt !== e.pkt || int'(out_len) != e.len) begin
          failures++;
          $display("FAIL edge %0d dst %h: out_valid=%b len=%0d, expected port %0d len %0d",
                   edge_cnt, e.pkt[31:0], out_valid, out_len, e.port, e.len);
        end else n_hit++;
      end else begin
        if (out_valid !== '0 || !out_drop || out_pkt !== e.pkt) begin
          failures++;
          $display("FAIL edge %0d dst %h: expected drop, out_valid=%b drop=%b", edge_cnt, e.pkt[31:0], out_valid, out_drop);
        end else n_drop++;
      end
    end else if (any_out) begin
      failures++; checks++;
      $display("FAIL edge %0d: unexpected output", edge_cnt);
    end
  endtask

  task automatic check_insert_result();
    if (!exp_ins_pending) begin
      if (ins_ok || ins_full) begin failures++; $display("FAIL spurious insertion result"); end
      return;
    end
    exp_ins_pending = 0;
    checks++;
    if (exp_ins_full) begin
      if (!ins_full || ins_ok) begin failures++; $display("FAIL expected a refused insertion"); end
    end else if (!ins_ok || ins_full || int'(ins_block) != exp_blk || int'(ins_row) != exp_row) begin
      failures++;
      $display("FAIL insertion at block %0d row %0d, expected block %0d row %0d (ok=%b)", ins_block, ins_row, exp_blk, exp_row, ins_ok);
    end
  endtask

  // Issue an insertion this cycle and update the model.
  task automatic start_insert();
    addr_t pfx;
    int len, port, eb;
    do begin
      len  = $urandom_range(1, 32);
      pfx  = ($urandom_range(0, 4) == 0) ? $urandom() : bases[$urandom_range(0, 3)];
      pfx  = pfx & len_to_care(len_t'(len));
    end while (known(pfx, len));
    // mostly port 0, as in real tables where one port dominates
    port = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(0, NP - 1);
    ins_valid = 1; ins_prefix = pfx | ($urandom() & ~len_to_care(len_t'(len)));
    ins_len = len_t'(len); ins_port = PORT_W'(port);
    eb = -1;
    for (int b = 0; b < NB; b++)
      if (eb < 0 && part_of(b) == port && blk_cnt[b] < ROWS) eb = b;
    exp_ins_pending = 1;
    exp_ins_full = (eb < 0);
    n_ins++;
    if (eb < 0) n_full++;
    else begin
      exp_blk = eb; exp_row = blk_cnt[eb]; blk_cnt[eb]++;
      m_pfx[m_n] = pfx; m_len[m_n] = len; m_port[m_n] = port; m_n++;
    end
    if (in_valid != '0) n_stall++;
  endtask

  task automatic run_phase(logic [NG-1:0] cut, logic do_cfg);
    int routes_done = 0;
    // reset everything
    rst_n = 0; in_valid = '0; ins_valid = 0; pend_v = '0; m_n = 0; q.delete();
    exp_ins_pending = 0;
    for (int b = 0; b < NB; b++) blk_cnt[b] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    cur_cut = equal_cut();
    if (do_cfg) begin
      cfg_we = 1; cfg_cut = cut;
      @(negedge clk);
      cfg_we = 0; cur_cut = cut; n_reconfig++;
    end
    for (int t = 0; t < N_CYCLES; t++) begin
      @(negedge clk);
      check_outputs();
      check_insert_result();
      ins_valid = 0;
      // offer packets
      for (int i = 0; i < NP; i++)
        if (!pend_v[i] && $urandom_range(0, 2) != 0 && t < N_CYCLES - 4) begin
          pend[i] = new_packet(); pend_v[i] = 1'b1;
        end
      in_valid = pend_v;
      for (int i = 0; i < NP; i++) in_pkt[i] = pend[i];
      if (routes_done < N_ROUTES && $urandom_range(0, 2) == 0 && t < N_CYCLES - 4) begin
        start_insert();
        routes_done++;
      end
      #1;
      if (ins_valid && in_ready != '0) begin
        failures++; $display("FAIL packet granted during an insertion");
      end
      if ($countones(in_ready) > 1) begin failures++; $display("FAIL several grants"); end
      for (int i = 0; i < NP; i++)
        if (in_ready[i] && in_valid[i]) begin
          exp_t e = lookup(pend[i]);
          e.due = edge_cnt + 2;
          q.push_back(e);
          pend_v[i] = 1'b0;
          n_pkts++;
          if ($countones(in_valid) > 1) n_contend++;
        end
    end
    // drain: the last cycle's grant and insertion take effect at the next edge
    repeat (3) begin
      @(negedge clk);
      check_outputs();
      check_insert_result();
      in_valid = '0; ins_valid = 0;
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d packets never left", q.size()); end
  endtask

  initial begin
    logic [NG-1:0] uneven;
    for (int i = 0; i < NP; i++) in_pkt[i] = '0;
    for (int i = 0; i < 4; i++) bases[i] = $urandom();
    // uneven partitions: port 0 takes all groups but one per other port
    uneven = '0;
    for (int p = 1; p < NP; p++) uneven[NG - NP + p] = 1'b1;
    run_phase('0, 0);
    run_phase(uneven, 1);
    $display("packets=%0d forwarded=%0d dropped=%0d insertions=%0d refused=%0d stalls=%0d",
             n_pkts, n_hit, n_drop, n_ins, n_full, n_stall);
    $display("nested matches=%0d multi-port matches=%0d contended grants=%0d reconfigurations=%0d",
             n_nested, n_multiport, n_contend, n_reconfig);
    if (CHECK_COVERAGE) begin
      checks++;
      if (n_hit == 0 || n_drop == 0 || n_ins == 0 || n_full == 0 || n_stall == 0 ||
          n_nested == 0 || n_multiport == 0 || n_contend == 0 || n_reconfig == 0) begin
        failures++; $display("FAIL some mechanism was never exercised");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
