// input_mux: forwards the packet of the input line chosen by the line
// arbiter to the separator.
//
// A packet is carried as its PKT_W-bit IPv4 header (20 bytes, byte 0 in the
// top bits); payload handling is outside this engine. Combinational.
//
// The multiplexer is part of the described design; the header-only packet
// format is this implementation's choice.
module input_mux #(
  parameter int unsigned NUM_IN = 4,
  parameter int unsigned PKT_W  = 160,
  localparam int unsigned IDX_W = (NUM_IN > 1) ? $clog2(NUM_IN) : 1
) (
  input  logic [PKT_W-1:0] in_pkt [NUM_IN],
  input  logic [IDX_W-1:0] sel,
  output logic [PKT_W-1:0] out_pkt
);

  assign out_pkt = in_pkt[sel];

endmodule
