// sub_table: one block of the partitioned routing table.
//
// A tcam_array of ROWS prefixes is wired row for row to a length_sram, so a
// search returns the one-cold bit lines of every prefix length that matched in
// this block, without a priority encoder or address decoder in between. The
// block also reports whether it has an empty row, and the lowest such row,
// so that an insertion can be placed in one cycle.
//
// Interface and timing: key -> len_n is combinational. A write (wr_en with
// row, value, care mask and one-cold length) lands at the rising edge and
// updates has_free/free_row for the next cycle.
//
// The TCAM-to-SRAM pairing per block follows the described design; choosing
// the lowest empty row is this implementation's choice (any empty row would
// do, the entries of a partition need no order).
module sub_table
  import iplu_pkg::*;
#(
  parameter int unsigned ROWS = 512,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  addr_t            key,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  addr_t            wr_value,
  input  addr_t            wr_care,
  input  len_lines_t       wr_len_n,
  output len_lines_t       len_n,
  output logic             has_free,
  output logic [ROW_W-1:0] free_row
);

  logic [ROWS-1:0] match;
  logic [ROWS-1:0] valid;

  tcam_array #(.ROWS(ROWS), .KEY_W(ADDR_W)) u_tcam (
    .clk, .rst_n, .wr_en, .wr_row, .wr_value, .wr_care, .key,
    .match, .valid
  );

  length_sram #(.ROWS(ROWS), .LEN_W(LEN_W)) u_len (
    .clk, .wr_en, .wr_row, .wr_len_n,
    .word_line(match),
    .len_n
  );

  // Lowest empty row.
  always_comb begin
    has_free = 1'b0;
    free_row = '0;
    for (int r = ROWS - 1; r >= 0; r--)
      if (!valid[r]) begin
        has_free = 1'b1;
        free_row = ROW_W'(r);
      end
  end

endmodule
