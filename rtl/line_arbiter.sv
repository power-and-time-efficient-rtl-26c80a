// line_arbiter: round-robin choice of the input line whose packet enters the
// lookup engine.
//
// Each cycle in which enable is high, the first requesting input at or after
// the rotating pointer is granted (one-hot grant plus its index), and the
// pointer moves to the input after it. With enable low (the table is busy
// with an insertion) nothing is granted and the pointer holds. So every
// waiting input is served within NUM_IN grants.
//
// grant is combinational from req/enable and the registered pointer.
//
// The arbiter in front of the input multiplexer is part of the described
// design; its round-robin policy is this implementation's choice.
module line_arbiter #(
  parameter int unsigned NUM_IN = 4,
  localparam int unsigned IDX_W = (NUM_IN > 1) ? $clog2(NUM_IN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_IN-1:0] req,
  input  logic              enable,
  output logic [NUM_IN-1:0] grant,
  output logic [IDX_W-1:0]  grant_idx
);

  logic [IDX_W-1:0] ptr_q;
  logic             any;

  always_comb begin
    logic [IDX_W-1:0] idx;
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int unsigned i = 0; i < NUM_IN; i++) begin
      idx = IDX_W'((int'(ptr_q) + i) % NUM_IN);
      if (!any && enable && req[idx]) begin
        any        = 1'b1;
        grant[idx] = 1'b1;
        grant_idx  = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else if (any) ptr_q <= (int'(grant_idx) == NUM_IN - 1) ? '0 : grant_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
