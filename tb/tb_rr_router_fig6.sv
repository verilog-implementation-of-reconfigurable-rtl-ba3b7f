// tb_rr_router_fig6 - the router built with 10 slots per channel, running
// the partition example of a 10-slot South bank: South keeps 2 slots, lends
// 5 to West and 3 to East (layout [South | West | East]).
//
// Sources on all five inputs send packets (header with signed XY offsets,
// then payload; the first payload flit is {input, packet number}); sinks on
// all outputs accept with random back-pressure. A scoreboard computes each
// packet's output port and rewritten header independently (X first, then
// Y), and checks that every packet arrives whole, not interleaved, and in
// order per input/output pair.
//
// Requested depths N=10, E=13, S=2, W=15 produce that split: West borrows 5
// from its right neighbour South, East finds nothing spare in North and
// borrows 3 from its left neighbour South. With their outputs blocked the
// West, East and South inputs must fill to exactly 15, 13 and 2 flits, South's
// bank then holding flits of all three channels; afterwards every packet must
// arrive intact. Same scoreboard as the default-size end-to-end test.
module tb_rr_router_fig6;
  import rr_pkg::*;
  localparam int P = 5;
  localparam int DEPTH = 10;
  localparam int TW = $clog2(3 * DEPTH + 1);
  logic clk = 1'b0, rst = 1'b1;
  flit_t [P-1:0] in_flit, out_flit;
  logic  [P-1:0] in_valid, in_ready, out_valid, out_ready;
  logic  [3:0][TW-1:0] req_depth;
  logic  [P-1:0][TW-1:0] occupancy;
  logic  [3:0][TW-1:0] capacity;
  logic  reconfig_busy;
  int checks = 0, failures = 0;

  rr_router #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ---------------------------------------------------------------- sources
  flit_t src_q[P][$];
  flit_t exp_q[P][P][$];   // [out][in]
  int    pkt_id[P];
  int    sent = 0, received = 0;
  int    src_rate = 100;   // percent of cycles a source offers a new flit
  logic [P-1:0] sink_block = '0;
  int    sink_rate = 75;

  function automatic int xy_port(int dx, int dy);
    if (dx > 0) return 2;
    if (dx < 0) return 4;
    if (dy > 0) return 1;
    if (dy < 0) return 3;
    return 0;
  endfunction

  task automatic send(int s, int dx, int dy, int len);
    flit_t f;
    int o, ndx, ndy;
    o = xy_port(dx, dy);
    ndx = (o == 2) ? dx - 1 : (o == 4) ? dx + 1 : dx;
    ndy = (o == 1) ? dy - 1 : (o == 3) ? dy + 1 : dy;
    for (int k = 0; k < len; k++) begin
      f.bop = (k == 0);
      f.eop = (k == len - 1);
      f.data = (k == 0) ? {4'(dx), 4'(dy)} : (k == 1) ? {3'(s), 5'(pkt_id[s])} : 8'($urandom);
      src_q[s].push_back(f);
      if (k == 0) f.data = {4'(ndx), 4'(ndy)};
      exp_q[o][s].push_back(f);
    end
    pkt_id[s]++;
    sent += len;
  endtask

  task automatic send_random(int s);
    int dx, dy;
    dx = int'($urandom % 5) - 2;
    dy = int'($urandom % 5) - 2;
    send(s, dx, dy, 2 + int'($urandom % 8));
  endtask

  // Drive at the falling edge; a flit once offered stays until taken.
  always @(negedge clk) begin
    for (int s = 0; s < P; s++) begin
      if (!(in_valid[s] && !in_ready_q[s])) begin
        if (src_q[s].size() != 0 && int'($urandom % 100) < src_rate) begin
          in_valid[s] <= 1'b1;
          in_flit[s]  <= src_q[s][0];
        end else begin
          in_valid[s] <= 1'b0;
        end
      end
      out_ready[s] <= !sink_block[s] && int'($urandom % 100) < sink_rate;
    end
  end
  logic [P-1:0] in_ready_q;   // was the offered flit taken at the last edge
  always @(posedge clk) begin
    for (int s = 0; s < P; s++) begin
      in_ready_q[s] <= in_ready[s];
      if (!rst && in_valid[s] && in_ready[s]) void'(src_q[s].pop_front());
    end
  end

  // ------------------------------------------------------------------ sinks
  flit_t cur[P][$];
  always @(posedge clk) begin
    if (!rst) begin
      for (int o = 0; o < P; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          if (cur[o].size() == 0) check(out_flit[o].bop, $sformatf("output %0d: packet without header", o));
          else check(!out_flit[o].bop, $sformatf("output %0d: header inside a packet", o));
          cur[o].push_back(out_flit[o]);
          received++;
          if (out_flit[o].eop) begin
            int s;
            s = (cur[o].size() > 1) ? int'(cur[o][1].data[7:5]) : 0;
            check(s < P, "bad source tag");
            if (s < P) begin
              foreach (cur[o][k]) begin
                check(exp_q[o][s].size() != 0 && cur[o][k] == exp_q[o][s][0],
                      $sformatf("output %0d from input %0d flit %0d: got %h", o, s, k, cur[o][k]));
                if (exp_q[o][s].size() != 0) void'(exp_q[o][s].pop_front());
              end
            end
            cur[o].delete();
          end
        end
      end
    end
  end

  // ------------------------------------------------------ mechanism counters
  int n_borrow_right = 0, n_borrow_left = 0, n_return = 0, n_bank_conflict = 0;
  int n_recfg_step = 0, n_recfg_wait = 0, n_contention = 0, n_wormhole_hold = 0;
  int n_backpressure = 0, n_over_depth = 0;
  logic [3:0] head_remote;
  assign head_remote[0] = dut.g_ring[0].u_ctrl.head_q != 2'd0;
  assign head_remote[1] = dut.g_ring[1].u_ctrl.head_q != 2'd0;
  assign head_remote[2] = dut.g_ring[2].u_ctrl.head_q != 2'd0;
  assign head_remote[3] = dut.g_ring[3].u_ctrl.head_q != 2'd0;
  always @(posedge clk) begin
    if (!rst) begin
      for (int b = 0; b < 4; b++) begin
        if (dut.ch_wr_req[b][1] && dut.ch_wr_gnt[b][1]) n_borrow_right++;
        if (dut.ch_wr_req[b][2] && dut.ch_wr_gnt[b][2]) n_borrow_left++;
        if (head_remote[b] && dut.pop[b + 1]) n_return++;
        if ($countones(dut.bk_wr_req[b]) > 1) n_bank_conflict++;
        if (int'(occupancy[b + 1]) > DEPTH) n_over_depth++;
      end
      if (dut.u_alloc.apply != '0) n_recfg_step++;
      if (reconfig_busy && dut.u_alloc.apply == '0) n_recfg_wait++;
      for (int o = 0; o < P; o++) begin
        if (!dut.u_xbar.busy_q[o] && $countones(dut.u_xbar.hdr_req[o]) > 1) n_contention++;
        if (dut.u_xbar.busy_q[o] && dut.u_xbar.hdr_req[o] != '0) n_wormhole_hold++;
      end
      for (int s = 0; s < P; s++) if (in_valid[s] && !in_ready[s]) n_backpressure++;
    end
  end

  task automatic drain(int max_cycles);
    int n;
    n = 0;
    while ((received < sent) && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    check(received == sent, $sformatf("drain: %0d of %0d flits delivered", received, sent));
  endtask

  task automatic set_depth(int n, int e, int s, int w);
    @(negedge clk);
    req_depth[0] = TW'(n); req_depth[1] = TW'(e); req_depth[2] = TW'(s); req_depth[3] = TW'(w);
  endtask

  task automatic wait_config(int n, int e, int s, int w);
    int k;
    k = 0;
    @(negedge clk);
    while (reconfig_busy && k < 1000) begin @(negedge clk); k++; end
    check(!reconfig_busy, "reconfiguration did not finish");
    check(int'(capacity[0]) == n && int'(capacity[1]) == e && int'(capacity[2]) == s && int'(capacity[3]) == w,
          $sformatf("capacity N%0d E%0d S%0d W%0d, exp N%0d E%0d S%0d W%0d",
                    capacity[0], capacity[1], capacity[2], capacity[3], n, e, s, w));
  endtask

  initial begin
    in_valid = '0; in_flit = '0; out_ready = '0; in_ready_q = '0;
    foreach (pkt_id[s]) pkt_id[s] = 0;
    for (int c = 0; c < 4; c++) req_depth[c] = TW'(DEPTH);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    sink_rate = 100;

    set_depth(10, 13, 2, 15);
    wait_config(10, 13, 2, 15);
    check(dut.bk_size[2][0] == 2 && dut.bk_size[2][1] == 5 && dut.bk_size[2][2] == 3,
          $sformatf("South bank split %0d/%0d/%0d, exp 2/5/3", dut.bk_size[2][0], dut.bk_size[2][1], dut.bk_size[2][2]));
    check(dut.bk_base[2][1] == 2 && dut.bk_base[2][2] == 7, "South bank layout");

    sink_block = 5'b10110;          // North, East, West outputs blocked
    send(4, 1, 0, 10);              // West input -> East output
    send(4, 2, 0, 10);
    send(2, -1, 0, 10);             // East input -> West output
    send(2, -2, 0, 10);
    send(3, 0, 1, 5);               // South input -> North output
    repeat (100) @(posedge clk);
    @(negedge clk);
    check(int'(occupancy[4]) == 15, $sformatf("West holds %0d, exp 15", occupancy[4]));
    check(int'(occupancy[2]) == 13, $sformatf("East holds %0d, exp 13", occupancy[2]));
    check(int'(occupancy[3]) == 2,  $sformatf("South holds %0d, exp 2", occupancy[3]));
    check(dut.g_ring[3].u_ctrl.cnt_q[SEG_RIGHT] == 5, "West flits in South bank");
    check(dut.g_ring[1].u_ctrl.cnt_q[SEG_LEFT] == 3, "East flits in South bank");
    sink_block = '0;
    sink_rate = 70;
    for (int k = 0; k < 20; k++) for (int s = 0; s < P; s++) send_random(s);
    drain(20000);
    for (int o = 0; o < P; o++) for (int s = 0; s < P; s++)
      check(exp_q[o][s].size() == 0, $sformatf("flits from %0d to %0d missing", s, o));
    check(n_borrow_right > 0 && n_borrow_left > 0 && n_return > 0, "borrowing not exercised");
    $display("flits %0d; borrow right %0d, borrow left %0d, returned from neighbour %0d",
             received, n_borrow_right, n_borrow_left, n_return);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
