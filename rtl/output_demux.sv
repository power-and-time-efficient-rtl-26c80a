// output_demux: delivers the packet to the output port chosen by the
// selection logic.
//
// At the rising edge that ends the lookup cycle, out_valid[sel] is raised for
// one cycle with the packet on out_pkt and the matched prefix length on
// out_len. A packet whose address matched no prefix is not delivered; drop
// pulses instead. Output ports take a packet every cycle (no back-pressure).
//
// Steering the packet with the "outputs select" of the selection logic
// follows the described design; the registered outputs, the shared packet
// bus and the drop flag are this implementation's choices.
module output_demux
  import iplu_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 4,
  parameter int unsigned PKT_W     = 160,
  localparam int unsigned PORT_W = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PKT_W-1:0]     in_pkt,
  input  logic                 hit,
  input  logic [PORT_W-1:0]    sel,
  input  len_t                 length,
  output logic [NUM_PORTS-1:0] out_valid,
  output logic [PKT_W-1:0]     out_pkt,
  output len_t                 out_len,
  output logic                 drop
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      drop      <= 1'b0;
    end else begin
      for (int unsigned p = 0; p < NUM_PORTS; p++)
        out_valid[p] <= in_valid && hit && (sel == PORT_W'(p));
      drop <= in_valid && !hit;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_pkt <= in_pkt;
      out_len <= length;
    end
  end

endmodule
