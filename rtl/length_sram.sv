// length_sram: prefix-length memory read through the TCAM match lines.
//
// Each of the ROWS words holds its entry's prefix length one-cold: LEN_W ones
// with a single zero in column length-1. The word lines are the TCAM match
// lines, so any number of rows can be read in the same cycle. A cell only
// pulls its bit line low when it stores a zero (the extra access transistors
// of the 10T cell), so column c reads 0 exactly when some activated row has
// length c+1, and reads 1 (precharged) otherwise. Because a destination
// address matches at most one stored prefix of each length, no two activated
// rows drive the same column and the read never conflicts.
//
// Interface and timing: writes go through the separate WR path (wr_en,
// wr_row, wr_len_n) at the rising clock edge. word_line -> len_n is
// combinational. There is no reset: a row is only ever activated after its
// TCAM row has been written.
//
// The multi-row one-cold read follows the described design; the column order
// is this implementation's choice.
module length_sram #(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned LEN_W = 32,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [LEN_W-1:0] wr_len_n,
  input  logic [ROWS-1:0]  word_line,
  output logic [LEN_W-1:0] len_n
);

  logic [LEN_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_len_n;
  end

  // Wired-AND bit lines: an activated row can only pull a column down.
  always_comb begin
    len_n = '1;
    for (int unsigned r = 0; r < ROWS; r++)
      if (word_line[r]) len_n &= mem[r];
  end

endmodule
