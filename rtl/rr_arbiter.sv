// rr_arbiter - round-robin arbiter.
//
// Grants one of N requests. The search starts at the input just after the
// one granted last, so every requester is served within N grants. The grant
// is combinational from req; the priority pointer moves only in a cycle where
// `advance` is high (the caller asserts it when the granted transfer really
// happens). The router uses one per output port, as the router description
// prescribes, and one per reconfigurable bank write port (this design's
// choice). Reset gives input 0 the first turn.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] prio_q;  // index with the highest priority
  logic [IW-1:0] win;

  always_comb begin
    gnt = '0;
    win = prio_q;
    for (int unsigned k = 0; k < N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(prio_q) + k) % N);
      if (req[idx] && (gnt == '0)) begin
        gnt[idx] = 1'b1;
        win      = idx;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prio_q <= '0;
    end else if (advance && (gnt != '0)) begin
      prio_q <= (int'(win) == N - 1) ? '0 : win + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (rst) (gnt & ~req) == '0);

endmodule
