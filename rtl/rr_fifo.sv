// rr_fifo - plain circular input FIFO (input channel of the Local port).
//
// DEPTH flit slots, a read pointer, a write pointer and an occupancy count.
// This is the buffer every input channel had before buffers could be shared;
// in this router only the Local channel keeps it, because the Local channel
// neither lends nor borrows slots.
//
// Write side: in_valid/in_ready; a flit is stored at a clock edge where both
// are high. Read side: out_valid/out_ready; out_flit shows the oldest flit
// combinationally and it is removed at an edge where both are high. A full
// FIFO still accepts a write in a cycle where it is read. Latency from write
// to out_valid is one cycle. Synchronous active-high reset empties it.
module rr_fifo
  import rr_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                         clk,
  input  logic                         rst,
  input  flit_t                        in_flit,
  input  logic                         in_valid,
  output logic                         in_ready,
  output flit_t                        out_flit,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [$clog2(DEPTH+1)-1:0]   count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t           slot_q [DEPTH];
  logic [AW-1:0]   rd_q, wr_q;
  logic [CW-1:0]   cnt_q;
  logic            do_wr, do_rd;

  assign out_valid = (cnt_q != '0);
  assign out_flit  = slot_q[rd_q];
  assign do_rd     = out_valid && out_ready;
  assign in_ready  = (cnt_q != CW'(DEPTH)) || do_rd;
  assign do_wr     = in_valid && in_ready;
  assign count     = cnt_q;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_wr) wr_q <= inc(wr_q);
      if (do_rd) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) slot_q[wr_q] <= in_flit;
  end

  assert property (@(posedge clk) disable iff (rst) cnt_q <= CW'(DEPTH));

endmodule
