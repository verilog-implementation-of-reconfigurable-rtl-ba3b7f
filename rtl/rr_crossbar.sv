// rr_crossbar - 5x5 wormhole crossbar with a round-robin arbiter per output.
//
// Each input presents the flit at the head of its buffer (in_flit/in_valid)
// and the output port it needs (req_port, from its routing unit). An idle
// output is won by one of the inputs whose head is a header flit asking for
// it; its round-robin arbiter picks among several. The output then stays
// connected to that input until the input's tail flit (eop) has passed, so
// the flits of a packet are never interleaved with another packet.
//
// Timing: grant and output multiplexer are combinational. A flit moves at a
// clock edge where out_valid and out_ready of its output are high; in_pop
// tells the input buffer to drop it in that same cycle. The connection state
// is registered. Synchronous active-high reset frees every output.
module rr_crossbar
  import rr_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  flit_t [NUM_PORTS-1:0] in_flit,
  input  logic  [NUM_PORTS-1:0] in_valid,
  input  port_e [NUM_PORTS-1:0] req_port,
  output logic  [NUM_PORTS-1:0] in_pop,
  output flit_t [NUM_PORTS-1:0] out_flit,
  output logic  [NUM_PORTS-1:0] out_valid,
  input  logic  [NUM_PORTS-1:0] out_ready
);

  localparam int unsigned P = NUM_PORTS;

  logic [P-1:0]            busy_q;          // output connected
  logic [P-1:0][2:0]       owner_q;         // input holding the output
  logic [P-1:0][P-1:0]     hdr_req;         // [out][in] header requests
  logic [P-1:0][P-1:0]     gnt;             // [out][in] arbiter grants
  logic [P-1:0][P-1:0]     sel;             // [out][in] connection used now
  logic [P-1:0]            fire;

  always_comb begin
    for (int o = 0; o < P; o++) begin
      for (int i = 0; i < P; i++) begin
        hdr_req[o][i] = in_valid[i] && in_flit[i].bop && (int'(req_port[i]) == o);
      end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_arb
    rr_arbiter #(.N(P)) u_arb (
      .clk    (clk),
      .rst    (rst),
      .req    (busy_q[o] ? '0 : hdr_req[o]),
      .advance(fire[o]),
      .gnt    (gnt[o])
    );
  end

  always_comb begin
    in_pop = '0;
    for (int o = 0; o < P; o++) begin
      sel[o] = '0;
      if (busy_q[o]) sel[o][owner_q[o]] = 1'b1;
      else           sel[o] = gnt[o];
      out_valid[o] = 1'b0;
      out_flit[o]  = '0;
      for (int i = 0; i < P; i++) begin
        if (sel[o][i]) begin
          out_valid[o] = in_valid[i];
          out_flit[o]  = in_flit[i];
        end
      end
      fire[o] = out_valid[o] && out_ready[o];
      for (int i = 0; i < P; i++) begin
        if (sel[o][i] && fire[o]) in_pop[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q  <= '0;
      owner_q <= '0;
    end else begin
      for (int o = 0; o < P; o++) begin
        if (fire[o]) begin
          busy_q[o] <= !out_flit[o].eop;
          for (int i = 0; i < P; i++) begin
            if (sel[o][i]) owner_q[o] <= 3'(i);
          end
        end
      end
    end
  end

  // No input is taken by two outputs in the same cycle.
  logic [P-1:0] pop_twice;
  always_comb begin
    for (int i = 0; i < P; i++) begin
      int n;
      n = 0;
      for (int o = 0; o < P; o++) n += int'(sel[o][i] && fire[o]);
      pop_twice[i] = (n > 1);
    end
  end
  assert property (@(posedge clk) disable iff (rst) pop_twice == '0);

endmodule
