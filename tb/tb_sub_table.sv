// Self-checking testbench for sub_table: fills the block row by row at the
// reported free row, checks the free-row reporting, and checks that a search
// returns the one-cold lines of every stored prefix that matches the key.
module tb_sub_table;
  import iplu_pkg::*;
  localparam int unsigned ROWS = 8;

  logic clk = 0, rst_n = 0;
  addr_t key = '0, wr_value = '0, wr_care = '0;
  logic wr_en = 0;
  logic [2:0] wr_row = '0;
  len_lines_t wr_len_n = '1, len_n;
  logic has_free;
  logic [2:0] free_row;
  int checks = 0, failures = 0;

  addr_t m_pfx [ROWS];
  int    m_len [ROWS];
  int    n = 0;

  sub_table #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic len_lines_t expect_lines(addr_t k);
    len_lines_t e = '1;
    for (int i = 0; i < n; i++)
      if (m_len[i] == 0 || (k >> (32 - m_len[i])) == (m_pfx[i] >> (32 - m_len[i])))
        e[m_len[i]-1] = 1'b0;
    return e;
  endfunction

  task automatic search(addr_t k);
    key = k; #1;
    checks++;
    if (len_n !== expect_lines(k)) begin
      failures++; $display("FAIL key=%h len_n=%h exp=%h", k, len_n, expect_lines(k));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    search(32'h0A00_0001);
    // Nested prefixes of one address, so that several rows match at once.
    for (int i = 0; i < ROWS; i++) begin
      automatic int len = (i < 5) ? 4 + 6 * i : $urandom_range(1, 32);
      automatic addr_t base = (i < 5) ? 32'h0A14_1E28 : $urandom();
      checks++;
      if (!has_free || free_row != 3'(i)) begin failures++; $display("FAIL free_row=%0d exp %0d", free_row, i); end
      wr_en = 1; wr_row = free_row;
      wr_care = len_to_care(len_t'(len));
      wr_value = base & wr_care;
      wr_len_n = len_to_onecold(len_t'(len));
      @(negedge clk);
      wr_en = 0;
      m_pfx[n] = base & wr_care; m_len[n] = len; n++;
      search(32'h0A14_1E28);
    end
    checks++; if (has_free) begin failures++; $display("FAIL block full but has_free"); end
    for (int i = 0; i < 200; i++) begin
      if (i % 3 == 0) search($urandom());
      else search(m_pfx[$urandom_range(0, ROWS-1)] | ($urandom() & 32'h0000_ffff));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
