// Self-checking testbench for length_sram: writes one-cold length words,
// activates random sets of word lines (several at once) and checks that each
// column reads 0 exactly when an activated row holds 0 there.
module tb_length_sram;
  import iplu_pkg::*;
  localparam int unsigned ROWS = 16;

  logic clk = 0;
  logic wr_en = 0;
  logic [3:0] wr_row = '0;
  logic [31:0] wr_len_n = '1;
  logic [ROWS-1:0] word_line = '0;
  logic [31:0] len_n;
  int checks = 0, failures = 0;
  logic [31:0] model [ROWS];

  length_sram #(.ROWS(ROWS), .LEN_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      automatic int len = $urandom_range(1, 32);
      wr_en = 1; wr_row = 4'(r);
      wr_len_n = '1; wr_len_n[len-1] = 1'b0;
      model[r] = wr_len_n;
      @(negedge clk);
    end
    wr_en = 0;
    // No word line: all columns stay precharged.
    word_line = '0; #1;
    checks++; if (len_n !== '1) failures++;
    // Single row: reads exactly its one-cold word.
    for (int r = 0; r < ROWS; r++) begin
      word_line = '0; word_line[r] = 1'b1; #1;
      checks++; if (len_n !== model[r]) begin failures++; $display("FAIL row %0d", r); end
    end
    // Several rows at once.
    for (int i = 0; i < 300; i++) begin
      logic [31:0] e;
      word_line = ROWS'($urandom());
      #1;
      e = '1;
      for (int r = 0; r < ROWS; r++)
        if (word_line[r]) for (int c = 0; c < 32; c++) if (!model[r][c]) e[c] = 1'b0;
      checks++;
      if (len_n !== e) begin failures++; $display("FAIL wl=%b len_n=%h exp=%h", word_line, len_n, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
