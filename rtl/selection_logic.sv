// selection_logic: picks the longest matching prefix length and its port.
//
// Input: 32 active-low length lines from each port's partition (0 in column
// c means a prefix of length c+1 matched there). The logic first ORs the
// ports' lines to find the longest length found anywhere, then finds the
// port whose partition reported that length; that port is the forwarding
// decision. No stored port number and no priority encoder over the table
// rows are needed: the partition itself is the answer.
//
// Purely combinational. hit is 0 when no partition reported any length; port
// and length are then 0.
//
// The two-step choice (longest length, then its partition) follows the
// described design. When two ports report the same longest length, which
// needs a duplicate prefix, the lower port number wins: this
// implementation's choice.
module selection_logic
  import iplu_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 4,
  localparam int unsigned PORT_W = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  len_lines_t        port_len_n [NUM_PORTS],
  output logic              hit,
  output logic [PORT_W-1:0] port,
  output len_t              length
);

  len_lines_t any_len;
  logic [LENNUM_W-2:0] col;   // column index 0..31 of the longest length

  always_comb begin
    any_len = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      any_len |= ~port_len_n[p];
  end

  // Step 1: longest length found.
  always_comb begin
    col = '0;
    for (int unsigned c = 0; c < LEN_W; c++)
      if (any_len[c]) col = (LENNUM_W-1)'(c);
  end

  // Step 2: the partition that found it.
  always_comb begin
    port = '0;
    for (int p = NUM_PORTS - 1; p >= 0; p--)
      if (!port_len_n[p][col]) port = PORT_W'(p);
  end

  assign hit    = |any_len;
  assign length = hit ? len_t'(col) + len_t'(1) : '0;

endmodule
