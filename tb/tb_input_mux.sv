// Self-checking testbench for input_mux: random packets on every input, each
// select value checked against the expected input.
module tb_input_mux;
  localparam int unsigned N = 4, W = 160;
  logic [W-1:0] in_pkt [N];
  logic [1:0] sel;
  logic [W-1:0] out_pkt;
  int checks = 0, failures = 0;
  logic clk = 0;

  input_mux #(.NUM_IN(N), .PKT_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) in_pkt[i] = {5{$urandom()}} ^ W'(i) << 7;
      sel = 2'(t % N);
      #1;
      checks++;
      if (out_pkt !== in_pkt[t % N]) begin failures++; $display("FAIL sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
