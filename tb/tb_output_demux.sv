// Self-checking testbench for output_demux: random hit/port/length per
// cycle; checks the one-hot output valid, the packet, the length and the
// drop flag one clock edge later.
module tb_output_demux;
  import iplu_pkg::*;
  localparam int unsigned N = 4, W = 160;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, hit = 0;
  logic [W-1:0] in_pkt = '0;
  logic [1:0] sel = '0;
  len_t length = '0;
  logic [N-1:0] out_valid;
  logic [W-1:0] out_pkt;
  len_t out_len;
  logic drop;
  int checks = 0, failures = 0;

  output_demux #(.NUM_PORTS(N), .PKT_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [N-1:0] e;
      in_valid = ($urandom_range(0, 3) != 0);
      hit = ($urandom_range(0, 4) != 0);
      sel = 2'($urandom());
      length = len_t'($urandom_range(1, 32));
      in_pkt = {5{$urandom()}};
      e = (in_valid && hit) ? (N'(1) << sel) : '0;
      @(negedge clk);
      checks++;
      if (out_valid !== e || drop !== (in_valid && !hit)) begin
        failures++; $display("FAIL t=%0d out_valid=%b exp=%b drop=%b", t, out_valid, e, drop);
      end
      if (in_valid) begin
        checks++;
        if (out_pkt !== in_pkt || out_len !== length) begin failures++; $display("FAIL data"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
