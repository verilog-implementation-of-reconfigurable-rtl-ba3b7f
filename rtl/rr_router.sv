// rr_router - five-port wormhole router whose input buffers are shared
// between neighbouring channels at run time.
//
// Ports L, N, E, S, W (index 0..4). Buffering is at the inputs only. The
// Local input has a plain DEPTH-slot FIFO. The four mesh inputs each own a
// bank of DEPTH slots (rr_recfg_buffer) but may lend slots to, and borrow
// slots from, their two ring neighbours (South's right neighbour is East and
// its left is West; going right: S -> E -> N -> W -> S). A channel can thus
// hold between 0 and 3*DEPTH flits. rr_channel_ctrl keeps each channel's six
// pointers and FIFO order; rr_alloc_ctrl turns the requested depths
// (req_depth, index N=0, E=1, S=2, W=3) into the bank splits and applies them
// one slot at a time while the slots concerned are free. A flit kept in a
// neighbour's bank is returned to its own channel's output multiplexer before
// it reaches the crossbar, so routing is unaffected by where it was stored.
//
// Every input has an XY routing unit (rr_route_xy) and all meet in a 5x5
// crossbar with a round-robin arbiter per output (rr_crossbar).
//
// Interface: in_valid/in_ready and out_valid/out_ready handshakes per port,
// a flit moves at a clock edge where both are high. A flit accepted at edge
// t can leave at edge t+1 at the earliest. occupancy (per port) and capacity
// (per mesh channel) report buffer use for a traffic monitor; reconfig_busy
// is high while the allocation has not reached req_depth.
// The buffer lending scheme follows the router description; handshake,
// header format, XY order and allocation formulas are this design's choices.
module rr_router
  import rr_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                                       clk,
  input  logic                                       rst,
  input  flit_t [NUM_PORTS-1:0]                      in_flit,
  input  logic  [NUM_PORTS-1:0]                      in_valid,
  output logic  [NUM_PORTS-1:0]                      in_ready,
  output flit_t [NUM_PORTS-1:0]                      out_flit,
  output logic  [NUM_PORTS-1:0]                      out_valid,
  input  logic  [NUM_PORTS-1:0]                      out_ready,
  input  logic  [NUM_RING-1:0][$clog2(3*DEPTH+1)-1:0] req_depth,
  output logic  [NUM_PORTS-1:0][$clog2(3*DEPTH+1)-1:0] occupancy,
  output logic  [NUM_RING-1:0][$clog2(3*DEPTH+1)-1:0]  capacity,
  output logic                                       reconfig_busy
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned TW = $clog2(3 * DEPTH + 1);
  localparam int unsigned R  = NUM_RING;

  // Channel-side signals, index = ring channel (N=0, E=1, S=2, W=3).
  logic  [R-1:0][2:0]          ch_wr_req, ch_wr_gnt, ch_seg_wr;
  logic  [R-1:0][2:0][AW-1:0]  ch_wr_addr, ch_rd_addr, ch_seg_base;
  logic  [R-1:0][2:0][CW-1:0]  ch_seg_size, ch_seg_count;
  flit_t [R-1:0]               ch_wr_data;
  flit_t [R-1:0][2:0]          ch_rd_data;
  // Bank-side signals, index = bank, region 0 own / 1 lent left / 2 lent right.
  logic  [R-1:0][2:0]          bk_wr_req, bk_wr_gnt, bk_wr;
  logic  [R-1:0][2:0][AW-1:0]  bk_wr_addr, bk_rd_addr, bk_base;
  logic  [R-1:0][2:0][CW-1:0]  bk_size, bk_count;
  flit_t [R-1:0][2:0]          bk_wr_data, bk_rd_data;

  // Input buffer outputs per port.
  flit_t [NUM_PORTS-1:0]       buf_flit, rt_flit;
  logic  [NUM_PORTS-1:0]       buf_valid, pop;
  port_e [NUM_PORTS-1:0]       rt_port;

  // Bank region r of bank b is used by channel b (r=0), by left(b) as its
  // right-hand borrow (r=1) and by right(b) as its left-hand borrow (r=2).
  for (genvar b = 0; b < R; b++) begin : g_ring
    localparam int unsigned RB = (b + 3) % 4;  // right neighbour
    localparam int unsigned LB = (b + 1) % 4;  // left neighbour

    // bank b <- users
    assign bk_wr_req [b][0] = ch_wr_req [b][SEG_OWN];
    assign bk_wr_req [b][1] = ch_wr_req [LB][SEG_RIGHT];
    assign bk_wr_req [b][2] = ch_wr_req [RB][SEG_LEFT];
    assign bk_wr_addr[b][0] = ch_wr_addr[b][SEG_OWN];
    assign bk_wr_addr[b][1] = ch_wr_addr[LB][SEG_RIGHT];
    assign bk_wr_addr[b][2] = ch_wr_addr[RB][SEG_LEFT];
    assign bk_wr_data[b][0] = ch_wr_data[b];
    assign bk_wr_data[b][1] = ch_wr_data[LB];
    assign bk_wr_data[b][2] = ch_wr_data[RB];
    assign bk_rd_addr[b][0] = ch_rd_addr[b][SEG_OWN];
    assign bk_rd_addr[b][1] = ch_rd_addr[LB][SEG_RIGHT];
    assign bk_rd_addr[b][2] = ch_rd_addr[RB][SEG_LEFT];
    assign bk_count  [b][0] = ch_seg_count[b][SEG_OWN];
    assign bk_count  [b][1] = ch_seg_count[LB][SEG_RIGHT];
    assign bk_count  [b][2] = ch_seg_count[RB][SEG_LEFT];
    assign bk_wr     [b][0] = ch_seg_wr[b][SEG_OWN];
    assign bk_wr     [b][1] = ch_seg_wr[LB][SEG_RIGHT];
    assign bk_wr     [b][2] = ch_seg_wr[RB][SEG_LEFT];

    // channel b <- banks (own, right neighbour's, left neighbour's)
    assign ch_wr_gnt  [b][SEG_OWN]   = bk_wr_gnt [b][0];
    assign ch_wr_gnt  [b][SEG_RIGHT] = bk_wr_gnt [RB][1];
    assign ch_wr_gnt  [b][SEG_LEFT]  = bk_wr_gnt [LB][2];
    assign ch_rd_data [b][SEG_OWN]   = bk_rd_data[b][0];
    assign ch_rd_data [b][SEG_RIGHT] = bk_rd_data[RB][1];
    assign ch_rd_data [b][SEG_LEFT]  = bk_rd_data[LB][2];
    assign ch_seg_size[b][SEG_OWN]   = bk_size   [b][0];
    assign ch_seg_size[b][SEG_RIGHT] = bk_size   [RB][1];
    assign ch_seg_size[b][SEG_LEFT]  = bk_size   [LB][2];
    assign ch_seg_base[b][SEG_OWN]   = bk_base   [b][0];
    assign ch_seg_base[b][SEG_RIGHT] = bk_base   [RB][1];
    assign ch_seg_base[b][SEG_LEFT]  = bk_base   [LB][2];

    rr_recfg_buffer #(.DEPTH(DEPTH)) u_bank (
      .clk    (clk),
      .rst    (rst),
      .wr_req (bk_wr_req[b]),
      .wr_addr(bk_wr_addr[b]),
      .wr_data(bk_wr_data[b]),
      .wr_gnt (bk_wr_gnt[b]),
      .rd_addr(bk_rd_addr[b]),
      .rd_data(bk_rd_data[b])
    );

    rr_channel_ctrl #(.DEPTH(DEPTH)) u_ctrl (
      .clk       (clk),
      .rst       (rst),
      .in_flit   (in_flit[b + 1]),
      .in_valid  (in_valid[b + 1]),
      .in_ready  (in_ready[b + 1]),
      .seg_size  (ch_seg_size[b]),
      .seg_base  (ch_seg_base[b]),
      .wr_req    (ch_wr_req[b]),
      .wr_addr   (ch_wr_addr[b]),
      .wr_data   (ch_wr_data[b]),
      .wr_gnt    (ch_wr_gnt[b]),
      .rd_addr   (ch_rd_addr[b]),
      .rd_data   (ch_rd_data[b]),
      .out_flit  (buf_flit[b + 1]),
      .out_valid (buf_valid[b + 1]),
      .out_ready (pop[b + 1]),
      .seg_count (ch_seg_count[b]),
      .seg_wr_req(ch_seg_wr[b]),
      .occupancy (occupancy[b + 1]),
      .capacity  (capacity[b])
    );
  end

  rr_alloc_ctrl #(.DEPTH(DEPTH)) u_alloc (
    .clk       (clk),
    .rst       (rst),
    .req_depth (req_depth),
    .reg_count (bk_count),
    .reg_wr_req(bk_wr),
    .size      (bk_size),
    .base      (bk_base),
    .busy      (reconfig_busy)
  );

  // Local channel: plain FIFO, no lending.
  logic [CW-1:0] local_count;
  rr_fifo #(.DEPTH(DEPTH)) u_local (
    .clk      (clk),
    .rst      (rst),
    .in_flit  (in_flit[PORT_L]),
    .in_valid (in_valid[PORT_L]),
    .in_ready (in_ready[PORT_L]),
    .out_flit (buf_flit[PORT_L]),
    .out_valid(buf_valid[PORT_L]),
    .out_ready(pop[PORT_L]),
    .count    (local_count)
  );
  assign occupancy[PORT_L] = TW'(local_count);

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_route
    rr_route_xy u_route (
      .clk       (clk),
      .rst       (rst),
      .head_flit (buf_flit[p]),
      .head_valid(buf_valid[p]),
      .fire      (pop[p]),
      .port      (rt_port[p]),
      .out_flit  (rt_flit[p])
    );
  end

  rr_crossbar u_xbar (
    .clk      (clk),
    .rst      (rst),
    .in_flit  (rt_flit),
    .in_valid (buf_valid),
    .req_port (rt_port),
    .in_pop   (pop),
    .out_flit (out_flit),
    .out_valid(out_valid),
    .out_ready(out_ready)
  );

endmodule
