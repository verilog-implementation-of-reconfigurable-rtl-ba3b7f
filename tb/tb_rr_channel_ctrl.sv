// tb_rr_channel_ctrl - self-checking test of a reconfigurable channel's
// FIFO control.
//
// The testbench plays the three banks (own, right neighbour's, left
// neighbour's) with its own slot arrays and grants writes at random. For
// several segment geometries it checks:
//  - filling from empty with no reads uses the own segment first, then the
//    right-hand borrow, then the left-hand one, and stops at the sum of the
//    sizes;
//  - under random traffic, flits leave in the order they entered, addresses
//    stay inside their segment, occupancy matches the model;
//  - the channel drains back to empty.
module tb_rr_channel_ctrl;
  import rr_pkg::*;
  localparam int DEPTH = 4;
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);
  localparam int TW = $clog2(3 * DEPTH + 1);
  logic clk = 1'b0, rst = 1'b1;
  flit_t in_flit, out_flit, wr_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [2:0][CW-1:0] seg_size, seg_count;
  logic [2:0][AW-1:0] seg_base, wr_addr, rd_addr;
  logic [2:0] wr_req, wr_gnt, seg_wr_req;
  flit_t [2:0] rd_data;
  logic [TW-1:0] occupancy, capacity;
  int checks = 0, failures = 0;
  flit_t bank[3][DEPTH];
  flit_t q[$];
  logic [7:0] tag = 0;

  rr_channel_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always_comb for (int s = 0; s < 3; s++) rd_data[s] = bank[s][rd_addr[s]];
  always @(posedge clk) for (int s = 0; s < 3; s++) if (wr_req[s] && wr_gnt[s]) bank[s][wr_addr[s]] <= wr_data;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR %s", msg);
    end
  endtask

  // One cycle of traffic with model update; returns the segment written or -1.
  task automatic cycle(bit want_in, bit want_out, bit rnd_gnt, output int wseg);
    bit w, r;
    @(negedge clk);
    in_flit   = '{bop: 1'b0, eop: 1'b0, data: tag};
    in_valid  = want_in;
    out_ready = want_out;
    wr_gnt    = rnd_gnt ? 3'($urandom) : 3'b111;
    #1;
    check(occupancy == TW'(q.size()), $sformatf("occupancy %0d exp %0d", occupancy, q.size()));
    check(out_valid == (q.size() != 0), "out_valid");
    if (q.size() != 0) check(out_flit == q[0], $sformatf("out %h exp %h", out_flit, q[0]));
    check($countones(wr_req) <= 1, "more than one write request");
    wseg = -1;
    for (int s = 0; s < 3; s++) if (wr_req[s]) begin
      check(wr_addr[s] >= seg_base[s] && 32'(wr_addr[s]) < 32'(seg_base[s]) + 32'(seg_size[s]),
            "write outside segment");
      if (wr_gnt[s]) wseg = s;
    end
    w = in_valid && in_ready;
    r = out_valid && out_ready;
    check(w == (wseg >= 0), "in_ready does not match grant");
    @(posedge clk);
    if (r) void'(q.pop_front());
    if (w) begin q.push_back(in_flit); tag++; end
  endtask

  initial begin
    int sizes[6][3] = '{'{4, 0, 0}, '{2, 3, 4}, '{0, 4, 1}, '{1, 1, 1}, '{4, 4, 4}, '{3, 0, 2}};
    int ws;
    in_valid = 0; out_ready = 0; wr_gnt = '0; in_flit = '0;
    seg_size = '0; seg_base = '0;
    foreach (sizes[g]) begin
      int cap, n;
      int order[$];
      order.delete();
      rst = 1'b1;
      for (int s = 0; s < 3; s++) begin
        seg_size[s] = CW'(sizes[g][s]);
        seg_base[s] = AW'((sizes[g][s] == DEPTH) ? 0 : $urandom % (DEPTH - sizes[g][s] + 1));
      end
      cap = sizes[g][0] + sizes[g][1] + sizes[g][2];
      repeat (2) @(posedge clk);
      rst = 1'b0;
      check(capacity == TW'(cap), "capacity");
      // fill from empty
      n = 0;
      for (int k = 0; k < cap + 3; k++) begin
        cycle(1, 0, 0, ws);
        if (ws >= 0) order.push_back(ws);
      end
      check(q.size() == cap, $sformatf("fill reached %0d of %0d", q.size(), cap));
      for (int k = 0; k < order.size(); k++) begin
        int exp;
        exp = (k < sizes[g][0]) ? 0 : (k < sizes[g][0] + sizes[g][1]) ? 1 : 2;
        check(order[k] == exp, $sformatf("geometry %0d flit %0d went to segment %0d, exp %0d", g, k, order[k], exp));
      end
      // random traffic
      for (int k = 0; k < 1500; k++) cycle($urandom % 2 == 0, ($urandom % 3) != 0, 1, ws);
      // drain
      for (int k = 0; k < 3 * DEPTH + 2; k++) cycle(0, 1, 0, ws);
      check(q.size() == 0 && occupancy == 0, "drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
