// Self-checking testbench for selection_logic: random sets of found lengths
// per port, checked against a reference that scans lengths from /32 down and
// ports from 0 up.
module tb_selection_logic;
  import iplu_pkg::*;
  localparam int unsigned NP = 4;

  len_lines_t port_len_n [NP];
  logic hit;
  logic [1:0] port;
  len_t length;
  int checks = 0, failures = 0;
  logic clk = 0;

  selection_logic #(.NUM_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic e_hit; int e_port, e_len;
      for (int p = 0; p < NP; p++) begin
        port_len_n[p] = '1;
        if (t % 10 != 0)
          repeat ($urandom_range(0, 3)) port_len_n[p][$urandom_range(0, 31)] = 1'b0;
      end
      #1;
      e_hit = 0; e_port = 0; e_len = 0;
      for (int l = 32; l >= 1 && !e_hit; l--)
        for (int p = 0; p < NP && !e_hit; p++)
          if (!port_len_n[p][l-1]) begin e_hit = 1; e_port = p; e_len = l; end
      checks++;
      if (hit !== e_hit || (e_hit && (int'(port) != e_port || int'(length) != e_len))) begin
        failures++;
        $display("FAIL hit=%b port=%0d len=%0d exp %b %0d %0d", hit, port, length, e_hit, e_port, e_len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
