// rr_channel_ctrl - FIFO control of one reconfigurable input channel.
//
// The channel's queue is spread over three segments: its own slots
// (SEG_OWN), slots borrowed from its right neighbour's bank (SEG_RIGHT) and
// slots borrowed from its left neighbour's bank (SEG_LEFT). Each segment is a
// circular FIFO with its own read and write pointer, i.e. six pointers per
// channel. Sizes and base addresses of the segments come from the allocation
// control; the flits themselves live in the banks (rr_recfg_buffer).
//
// First-in-first-out order across the segments: new flits go to the tail
// segment until it is full, then to the next segment in the cyclic order
// own -> right -> left -> own, but only into one that is empty. So all flits
// lie in a run of segments from the head segment to the tail segment, each
// segment's flits older than the next one's, and the output always reads the
// head segment. This spills into the right neighbour first and the left one
// second, as the router description asks. An idle channel (no flit stored)
// starts again in its own segment; segment pointers return to 0 whenever a
// segment is empty, which lets the allocation control resize empty segments.
//
// Interface: in_valid/in_ready on the input; a flit is stored when the write
// request wr_req[s] of its target segment is granted by that bank (in_ready =
// grant); wr_data is the channel input itself, routed to the input
// multiplexers of all three banks. A full channel does not accept a flit in
// the cycle it is read.
// Output: out_flit is the head segment's read data (the output multiplexer
// MUX_1 choosing between the own dout and the flits returned by the
// neighbours), valid one cycle after the write; it leaves at an edge where
// out_valid and out_ready are high. seg_count and seg_wr_req report each
// segment's occupancy and write intent to the allocation control.
// The segment ordering rule is this design's own; the six pointers, the
// right-before-left order and the return path through MUX_1 follow the
// router description.
module rr_channel_ctrl
  import rr_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                                clk,
  input  logic                                rst,
  // channel input
  input  flit_t                               in_flit,
  input  logic                                in_valid,
  output logic                                in_ready,
  // segment geometry from the allocation control
  input  logic  [2:0][$clog2(DEPTH+1)-1:0]    seg_size,
  input  logic  [2:0][$clog2(DEPTH)-1:0]      seg_base,
  // bank write ports (own, right bank, left bank)
  output logic  [2:0]                         wr_req,
  output logic  [2:0][$clog2(DEPTH)-1:0]      wr_addr,
  output flit_t                               wr_data,
  input  logic  [2:0]                         wr_gnt,
  // bank read ports
  output logic  [2:0][$clog2(DEPTH)-1:0]      rd_addr,
  input  flit_t [2:0]                         rd_data,
  // channel output
  output flit_t                               out_flit,
  output logic                                out_valid,
  input  logic                                out_ready,
  // status
  output logic  [2:0][$clog2(DEPTH+1)-1:0]    seg_count,
  output logic  [2:0]                         seg_wr_req,
  output logic  [$clog2(3*DEPTH+1)-1:0]       occupancy,
  output logic  [$clog2(3*DEPTH+1)-1:0]       capacity
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned TW = $clog2(3 * DEPTH + 1);

  logic [2:0][CW-1:0] cnt_q, cnt_n;
  logic [2:0][AW-1:0] rd_q, wr_q;
  logic [1:0]         head_q, tail_q, head_n, tail_n;
  logic [1:0]         tgt;
  logic               tgt_ok;
  logic               do_wr, do_rd;
  logic [TW-1:0]      total;

  function automatic logic [1:0] nxt(logic [1:0] s);
    return (s == 2'd2) ? 2'd0 : s + 2'd1;
  endfunction

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p, logic [CW-1:0] size);
    return (CW'(p) + CW'(1) >= size) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    total    = '0;
    capacity = '0;
    for (int s = 0; s < 3; s++) begin
      total    = total + TW'(cnt_q[s]);
      capacity = capacity + TW'(seg_size[s]);
    end
  end
  assign occupancy = total;
  assign seg_count = cnt_q;

  // Target segment for the next incoming flit.
  always_comb begin
    logic [1:0] t1, t2;
    t1     = nxt(tail_q);
    t2     = nxt(t1);
    tgt    = tail_q;
    tgt_ok = 1'b0;
    if (total == '0) begin
      if (seg_size[SEG_OWN] != '0)        begin tgt = 2'(SEG_OWN);   tgt_ok = 1'b1; end
      else if (seg_size[SEG_RIGHT] != '0) begin tgt = 2'(SEG_RIGHT); tgt_ok = 1'b1; end
      else if (seg_size[SEG_LEFT] != '0)  begin tgt = 2'(SEG_LEFT);  tgt_ok = 1'b1; end
    end else if (cnt_q[tail_q] < seg_size[tail_q]) begin
      tgt    = tail_q;
      tgt_ok = 1'b1;
    end else if (cnt_q[t1] == '0 && seg_size[t1] != '0) begin
      tgt    = t1;
      tgt_ok = 1'b1;
    end else if (cnt_q[t1] == '0 && cnt_q[t2] == '0 && seg_size[t2] != '0) begin
      tgt    = t2;
      tgt_ok = 1'b1;
    end
  end

  always_comb begin
    wr_req = '0;
    if (in_valid && tgt_ok) wr_req[tgt] = 1'b1;
    for (int s = 0; s < 3; s++) begin
      wr_addr[s] = seg_base[s] + wr_q[s];
      rd_addr[s] = seg_base[s] + rd_q[s];
    end
  end
  assign seg_wr_req = wr_req;
  assign wr_data    = in_flit;
  assign in_ready   = tgt_ok && wr_gnt[tgt];
  assign do_wr      = in_valid && in_ready;

  // Output multiplexer (MUX_1): oldest flit is at the head segment.
  assign out_valid = (total != '0);
  assign out_flit  = rd_data[head_q];
  assign do_rd     = out_valid && out_ready;

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      cnt_n[s] = cnt_q[s] + CW'(do_wr && (tgt == 2'(s))) - CW'(do_rd && (head_q == 2'(s)));
    end
    tail_n = do_wr ? tgt : tail_q;
    if (cnt_n[head_q] != '0)              head_n = head_q;
    else if (cnt_n[nxt(head_q)] != '0)    head_n = nxt(head_q);
    else if (cnt_n[nxt(nxt(head_q))] != '0) head_n = nxt(nxt(head_q));
    else                                  head_n = tail_n;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q  <= '0;
      rd_q   <= '0;
      wr_q   <= '0;
      head_q <= 2'(SEG_OWN);
      tail_q <= 2'(SEG_OWN);
    end else begin
      cnt_q  <= cnt_n;
      head_q <= head_n;
      tail_q <= tail_n;
      for (int s = 0; s < 3; s++) begin
        if (cnt_n[s] == '0) begin
          rd_q[s] <= '0;
          wr_q[s] <= '0;
        end else begin
          if (do_wr && tgt == 2'(s))    wr_q[s] <= inc(wr_q[s], seg_size[s]);
          if (do_rd && head_q == 2'(s)) rd_q[s] <= inc(rd_q[s], seg_size[s]);
        end
      end
    end
  end

  // A segment never holds more flits than its size.
  for (genvar s = 0; s < 3; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst) cnt_q[s] <= seg_size[s]);
  end
  assert property (@(posedge clk) disable iff (rst) (total != '0) |-> (cnt_q[head_q] != '0));

endmodule
