// tcam_array: one ternary CAM sub-table of ROWS entries, KEY_W bits each.
//
// Every row holds a value, a care mask (care=0 marks a don't-care "X" cell)
// and a valid bit. The search is fully parallel and combinational: row r
// raises match[r] when it is valid and every cared-for bit equals the key.
// Several rows may match at once; nothing here prioritises them, because the
// match lines drive the word lines of the length memory directly instead of a
// priority encoder.
//
// Interface and timing: one write port (wr_en, wr_row, wr_value, wr_care),
// written at the rising clock edge and visible to searches from the next
// cycle. key -> match is combinational within the lookup cycle. rst_n clears
// only the valid bits; value and care of an empty row are never looked at.
//
// The row/match-line organisation follows the described design; the
// value/care storage and the valid bit are this implementation's choices.
module tcam_array #(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned KEY_W = 32,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [KEY_W-1:0] wr_value,
  input  logic [KEY_W-1:0] wr_care,
  input  logic [KEY_W-1:0] key,
  output logic [ROWS-1:0]  match,
  output logic [ROWS-1:0]  valid
);

  logic [KEY_W-1:0] value_q [ROWS];
  logic [KEY_W-1:0] care_q  [ROWS];
  logic [ROWS-1:0]  valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[wr_row] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value_q[wr_row] <= wr_value;
      care_q[wr_row]  <= wr_care;
    end
  end

  // Match lines: a row mismatches if any compared bit differs.
  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++)
      match[r] = valid_q[r] && (((key ^ value_q[r]) & care_q[r]) == '0);
  end

  assign valid = valid_q;

endmodule
