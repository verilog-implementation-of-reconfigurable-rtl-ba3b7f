// rr_recfg_buffer - buffer slots of one reconfigurable input channel.
//
// DEPTH flit registers that three channels can use at once: the owner and
// its two ring neighbours. The slots are split into three consecutive
// regions, [own | lent to the left neighbour | lent to the right neighbour];
// the region bounds are kept by the allocation control and the pointers by
// each user's channel control, so this block only stores and returns flits.
//
// Write side: one write port behind a 3:1 input multiplexer that selects the
// owner's din or a neighbour's din. Index r of wr_req/wr_addr/wr_data belongs
// to region r's user (0 owner, 1 left neighbour, 2 right neighbour). When
// several want to write in the same cycle a round-robin arbiter grants one
// (wr_gnt, combinational); the flit is stored at the clock edge.
// Read side: three read multiplexers, one per region, return the slot at
// rd_addr[r] combinationally: rd_data[0] goes to the owner's output
// multiplexer, rd_data[1] and rd_data[2] go back to the left and right
// neighbour (the d_S_W / d_S_E paths of the South channel).
// The single write port with its input multiplexer and the three read paths
// follow the router description; the round-robin write arbitration is this
// design's choice. The slots themselves are not reset.
module rr_recfg_buffer
  import rr_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic  [2:0]                        wr_req,
  input  logic  [2:0][$clog2(DEPTH)-1:0]     wr_addr,
  input  flit_t [2:0]                        wr_data,
  output logic  [2:0]                        wr_gnt,
  input  logic  [2:0][$clog2(DEPTH)-1:0]     rd_addr,
  output flit_t [2:0]                        rd_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  flit_t         slot_q [DEPTH];
  logic          we;
  logic [AW-1:0] waddr;
  flit_t         wdata;

  rr_arbiter #(.N(3)) u_warb (
    .clk    (clk),
    .rst    (rst),
    .req    (wr_req),
    .advance(we),
    .gnt    (wr_gnt)
  );

  // Input multiplexer.
  always_comb begin
    we    = 1'b0;
    waddr = '0;
    wdata = '0;
    for (int r = 0; r < 3; r++) begin
      if (wr_gnt[r]) begin
        we    = 1'b1;
        waddr = wr_addr[r];
        wdata = wr_data[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) slot_q[waddr] <= wdata;
  end

  // Read multiplexers.
  always_comb begin
    for (int r = 0; r < 3; r++) rd_data[r] = slot_q[rd_addr[r]];
  end

endmodule
