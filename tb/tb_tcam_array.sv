// Self-checking testbench for tcam_array: writes random ternary rows, then
// compares the match lines for random and constructed keys with a reference
// model kept in the testbench. Also checks that a write is visible to the
// search in the cycle after it and that an unwritten row never matches.
module tb_tcam_array;
  localparam int unsigned ROWS = 16;
  localparam int unsigned KW   = 32;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [3:0] wr_row = '0;
  logic [KW-1:0] wr_value = '0, wr_care = '0, key = '0;
  logic [ROWS-1:0] match, valid;
  int checks = 0, failures = 0;

  logic [KW-1:0] m_val [ROWS];
  logic [KW-1:0] m_care [ROWS];
  logic [ROWS-1:0] m_valid = '0;

  tcam_array #(.ROWS(ROWS), .KEY_W(KW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ROWS-1:0] expect_match(logic [KW-1:0] k);
    logic [ROWS-1:0] e;
    for (int r = 0; r < ROWS; r++) begin
      e[r] = m_valid[r];
      for (int b = 0; b < KW; b++)
        if (m_care[r][b] && (m_val[r][b] != k[b])) e[r] = 1'b0;
    end
    return e;
  endfunction

  task automatic check_key(logic [KW-1:0] k);
    key = k;
    #1;
    checks++;
    if (match !== expect_match(k)) begin
      failures++;
      $display("FAIL key=%h match=%b expected=%b", k, match, expect_match(k));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Empty table: nothing matches, even an all-don't-care key.
    check_key(32'h0);
    check_key(32'hffff_ffff);
    checks++; if (valid !== '0) failures++;
    // Fill half the rows with prefixes of random length.
    for (int r = 0; r < ROWS; r += 2) begin
      automatic int len = $urandom_range(1, 32);
      wr_en = 1; wr_row = 4'(r);
      wr_care  = ~32'h0 << (32 - len);
      wr_value = $urandom() & wr_care;
      m_val[r] = wr_value; m_care[r] = wr_care;
      @(negedge clk);
      m_valid[r] = 1'b1;
      wr_en = 0;
      // Written row matches its own prefix in the next cycle.
      check_key(m_val[r] | (~m_care[r] & $urandom()));
      checks++; if (!match[r]) begin failures++; $display("FAIL row %0d not matching after write", r); end
    end
    checks++; if (valid !== m_valid) failures++;
    // Random and constructed keys.
    for (int i = 0; i < 300; i++) begin
      automatic int r = $urandom_range(0, ROWS - 1);
      if (i % 2 == 0) check_key($urandom());
      else check_key((m_val[r & ~1] & m_care[r & ~1]) | (~m_care[r & ~1] & $urandom()));
    end
    // Overwrite a row with a full-length (/32) entry and check exact matching.
    wr_en = 1; wr_row = 4'd2; wr_value = 32'hC0A8_0101; wr_care = '1;
    m_val[2] = wr_value; m_care[2] = wr_care;
    @(negedge clk); wr_en = 0;
    check_key(32'hC0A8_0101);
    check_key(32'hC0A8_0100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
