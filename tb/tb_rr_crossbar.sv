// tb_rr_crossbar - self-checking test of the 5x5 wormhole crossbar.
//
// Each input offers a stream of packets (2..6 flits) to random outputs; the
// testbench acts as the input buffers (popping on in_pop) and as the
// receivers (random out_ready). Every payload flit carries {input, packet
// number}. Checks: a packet's flits arrive back to back on its output with
// no other packet interleaved; packets of one input to one output arrive in
// order and intact; a flit only moves when out_ready is high; every packet
// arrives. Contention (two headers for one free output in the same cycle)
// must occur.
module tb_rr_crossbar;
  import rr_pkg::*;
  localparam int P = 5;
  localparam int PKTS = 60;
  logic clk = 1'b0, rst = 1'b1;
  flit_t [P-1:0] in_flit, out_flit;
  logic  [P-1:0] in_valid, in_pop, out_valid, out_ready;
  port_e [P-1:0] req_port;
  int checks = 0, failures = 0;

  typedef struct { int dst; int len; int id; } pkt_t;
  pkt_t  src_q[P][$];         // packets still to send per input
  int    flit_idx[P];         // position inside current packet
  flit_t exp_q[P][P][$];      // [dst][src] expected flits
  int    cur_src[P];          // input of packet in progress per output, -1 idle
  int    contention = 0, delivered = 0, total = 0;

  rr_crossbar dut (.*);

  always #5 clk = ~clk;

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

  function automatic flit_t mk(int s, pkt_t p, int k);
    flit_t f;
    f.bop  = (k == 0);
    f.eop  = (k == p.len - 1);
    f.data = (k == 0) ? 8'(p.dst) : {3'(s), 5'(p.id)};
    return f;
  endfunction

  task automatic drive();
    for (int s = 0; s < P; s++) begin
      in_valid[s] = src_q[s].size() != 0;
      in_flit[s]  = '0;
      req_port[s] = PORT_L;
      if (in_valid[s]) begin
        in_flit[s]  = mk(s, src_q[s][0], flit_idx[s]);
        req_port[s] = port_e'(src_q[s][0].dst);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < P; s++) begin
      for (int n = 0; n < PKTS; n++) begin
        pkt_t p;
        p.dst = int'($urandom % P);
        p.len = 2 + int'($urandom % 5);
        p.id  = n;
        src_q[s].push_back(p);
        for (int k = 0; k < p.len; k++) exp_q[p.dst][s].push_back(mk(s, p, k));
        total += p.len;
      end
      cur_src[s] = -1;
      flit_idx[s] = 0;
    end
    out_ready = '0;
    in_valid = '0; in_flit = '0; req_port = '{default: PORT_L};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    while (delivered < total) begin
      @(negedge clk);
      out_ready = P'($urandom) | P'($urandom);
      drive();
      #1;
      for (int o = 0; o < P; o++) begin
        int hdrs;
        hdrs = 0;
        if (cur_src[o] < 0)
          for (int s = 0; s < P; s++) if (in_valid[s] && in_flit[s].bop && int'(req_port[s]) == o) hdrs++;
        if (hdrs > 1) contention++;
      end
      for (int s = 0; s < P; s++) if (in_pop[s]) check(out_ready[int'(req_port[s])], "pop without ready");
      for (int o = 0; o < P; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          int s;
          s = -1;
          for (int i = 0; i < P; i++) if (in_pop[i] && int'(req_port[i]) == o) s = i;
          check(s >= 0, "output fired without input pop");
          if (s >= 0) begin
            if (cur_src[o] >= 0) check(cur_src[o] == s, $sformatf("output %0d interleaved input %0d into %0d", o, s, cur_src[o]));
            else check(out_flit[o].bop, "packet started without header");
            check(exp_q[o][s].size() != 0 && out_flit[o] == exp_q[o][s][0],
                  $sformatf("output %0d from %0d flit %h", o, s, out_flit[o]));
            if (exp_q[o][s].size() != 0) void'(exp_q[o][s].pop_front());
            cur_src[o] = out_flit[o].eop ? -1 : s;
            delivered++;
          end
        end
      end
      @(posedge clk);
      for (int s = 0; s < P; s++) if (in_pop[s]) begin
        if (flit_idx[s] == src_q[s][0].len - 1) begin
          void'(src_q[s].pop_front());
          flit_idx[s] = 0;
        end else flit_idx[s]++;
      end
    end
    for (int o = 0; o < P; o++) for (int s = 0; s < P; s++) check(exp_q[o][s].size() == 0, "undelivered flits");
    check(contention > 0, "no output contention exercised");
    $display("contention cycles %0d, flits %0d", contention, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
