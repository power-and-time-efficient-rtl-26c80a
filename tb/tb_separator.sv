// Self-checking testbench for separator: random IPv4 headers; checks that
// the destination address (header bytes 16-19) and the packet appear one
// clock edge after acceptance, and that the valid flag follows in_valid.
module tb_separator;
  localparam int unsigned W = 160;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [W-1:0] in_pkt = '0;
  logic out_valid;
  logic [W-1:0] out_pkt;
  logic [31:0] dst_addr;
  int checks = 0, failures = 0;

  separator #(.PKT_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] last;
    logic [7:0] hdr [20];
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (out_valid !== 1'b0) failures++;
    last = '0;
    for (int t = 0; t < 300; t++) begin
      automatic logic v = ($urandom_range(0, 3) != 0);
      for (int b = 0; b < 20; b++) hdr[b] = 8'($urandom());
      in_valid = v;
      for (int b = 0; b < 20; b++) in_pkt[W-1-8*b -: 8] = hdr[b];
      @(negedge clk);
      checks++;
      if (out_valid !== v) begin failures++; $display("FAIL valid"); end
      if (v) begin
        checks++;
        if (dst_addr !== {hdr[16], hdr[17], hdr[18], hdr[19]} || out_pkt !== in_pkt) begin
          failures++; $display("FAIL dst=%h", dst_addr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
