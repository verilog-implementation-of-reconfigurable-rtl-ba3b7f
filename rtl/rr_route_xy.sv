// rr_route_xy - routing unit of one input channel (XY, offsets in the header).
//
// The header flit (bop=1) carries two signed 4-bit offsets written by the
// source: data[7:4] = dx (positive = East), data[3:0] = dy (positive = North).
// Routing is deterministic XY: while dx is non-zero the flit goes East or
// West, then North or South while dy is non-zero, and to the Local port when
// both are zero. The offset of the dimension taken is moved one step toward
// zero in the header that leaves, so the next router sees what remains.
//
// Wormhole: the port chosen for the header is stored when the header leaves
// (`fire`) and is used for the payload and tail flits that follow. The port
// output is combinational from the flit at the head of the channel. XY order
// and the header layout are this design's choice; the router description
// asks only for a deterministic, deadlock-free source-based routing.
module rr_route_xy
  import rr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  flit_t head_flit,
  input  logic  head_valid,
  input  logic  fire,
  output port_e port,
  output flit_t out_flit
);

  port_e       route_q;
  port_e       hdr_port;
  logic signed [3:0] dx, dy;

  assign dx = head_flit.data[7:4];
  assign dy = head_flit.data[3:0];

  always_comb begin
    out_flit = head_flit;
    if (dx > 0) begin
      hdr_port = PORT_E;
      out_flit.data[7:4] = dx - 4'sd1;
    end else if (dx < 0) begin
      hdr_port = PORT_W;
      out_flit.data[7:4] = dx + 4'sd1;
    end else if (dy > 0) begin
      hdr_port = PORT_N;
      out_flit.data[3:0] = dy - 4'sd1;
    end else if (dy < 0) begin
      hdr_port = PORT_S;
      out_flit.data[3:0] = dy + 4'sd1;
    end else begin
      hdr_port = PORT_L;
    end
    if (!head_flit.bop) out_flit = head_flit;
  end

  assign port = head_flit.bop ? hdr_port : route_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      route_q <= PORT_L;
    end else if (head_valid && fire && head_flit.bop) begin
      route_q <= hdr_port;
    end
  end

endmodule
