// Self-checking testbench for partition_combiner: random block outputs and
// random boundary settings, compared with a model that walks the chain of
// groups and assigns each to a port.
module tb_partition_combiner;
  import iplu_pkg::*;
  localparam int unsigned NP = 4, NB = 16, GB = 2, NG = NB / GB;

  len_lines_t blk_len_n [NB];
  logic [NG-1:0] cut;
  len_lines_t port_len_n [NP];
  logic [1:0] blk_port [NB];
  logic [NB-1:0] blk_en;
  int checks = 0, failures = 0;
  logic clk = 0;

  partition_combiner #(.NUM_PORTS(NP), .NUM_BLOCKS(NB), .GROUP_BLOCKS(GB)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int part [NB];
      len_lines_t e [NP];
      int s;
      for (int b = 0; b < NB; b++) begin
        blk_len_n[b] = '1;
        // a few active-low lengths per block
        repeat ($urandom_range(0, 2)) blk_len_n[b][$urandom_range(0, 31)] = 1'b0;
      end
      cut = (t < 50) ? NG'(8'b0101_0100) : NG'($urandom());
      #1;
      // reference: partition number of each block
      s = 0;
      for (int g = 0; g < NG; g++) begin
        if (g > 0 && cut[g]) s++;
        for (int k = 0; k < GB; k++) part[g*GB+k] = s;
      end
      for (int p = 0; p < NP; p++) begin
        e[p] = '1;
        for (int b = 0; b < NB; b++)
          if (part[b] == p)
            for (int c = 0; c < 32; c++) if (!blk_len_n[b][c]) e[p][c] = 1'b0;
        checks++;
        if (port_len_n[p] !== e[p]) begin
          failures++; $display("FAIL t=%0d cut=%b port %0d got %h exp %h", t, cut, p, port_len_n[p], e[p]);
        end
      end
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (blk_en[b] !== (part[b] < NP) || (part[b] < NP && blk_port[b] != 2'(part[b]))) begin
          failures++; $display("FAIL block %0d map", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
