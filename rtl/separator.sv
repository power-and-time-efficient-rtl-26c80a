// separator: splits the destination address out of the arriving packet.
//
// The IPv4 destination address is header bytes 16 to 19, bits [31:0] of the
// 160-bit header. The separator registers the packet and its address at the
// rising edge after the packet is accepted, so the lookup cycle that follows
// sees a stable key on the routing tables while the packet itself travels on
// to the output stage unchanged. out_valid marks a packet in the lookup
// stage; rst_n clears it.
//
// Separating the destination address from the packet follows the described
// design; the header layout and the register are this implementation's
// choices.
module separator
  import iplu_pkg::*;
#(
  parameter int unsigned PKT_W = 160
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PKT_W-1:0] in_pkt,
  output logic             out_valid,
  output logic [PKT_W-1:0] out_pkt,
  output addr_t            dst_addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_pkt  <= in_pkt;
      dst_addr <= in_pkt[ADDR_W-1:0];
    end
  end

endmodule
