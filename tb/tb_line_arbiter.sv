// Self-checking testbench for line_arbiter: random requests and enables,
// compared each cycle with a round-robin reference; also checks that a
// continuously requesting input is served within NUM_IN grants.
module tb_line_arbiter;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0;
  logic enable = 0;
  logic [N-1:0] grant;
  logic [1:0] grant_idx;
  int checks = 0, failures = 0;
  int ptr = 0;

  line_arbiter #(.NUM_IN(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cnt [N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [N-1:0] e;
      int eidx;
      e = '0; eidx = 0;
      req = (t < 200) ? '1 : N'($urandom());
      enable = ($urandom_range(0, 7) != 0);
      #1;
      if (enable)
        for (int i = 0; i < N; i++)
          if (e == '0 && req[(ptr + i) % N]) begin eidx = (ptr + i) % N; e[eidx] = 1'b1; end
      checks++;
      if (grant !== e || (e != '0 && int'(grant_idx) != eidx)) begin
        failures++; $display("FAIL t=%0d req=%b grant=%b exp=%b", t, req, grant, e);
      end
      if (e != '0) ptr = (eidx + 1) % N;
      // fairness while all inputs request
      for (int i = 0; i < N; i++)
        if (!req[i]) wait_cnt[i] = 0;
        else if (enable) wait_cnt[i] = grant[i] ? 0 : wait_cnt[i] + 1;
      for (int i = 0; i < N; i++)
        if (wait_cnt[i] >= N) begin failures++; wait_cnt[i] = 0; $display("FAIL starvation of %0d", i); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
