// tb_rr_route_xy - self-checking test of the XY routing unit.
//
// Sends packets with random signed offsets. For each header the expected
// port and rewritten header are computed here: X first (East for dx > 0),
// then Y (North for dy > 0), Local at 0/0, the offset of the dimension taken
// moved one step toward zero. Payload and tail flits must keep the header's
// port and pass unchanged.
module tb_rr_route_xy;
  import rr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  flit_t head_flit, out_flit;
  logic head_valid, fire;
  port_e port;
  int checks = 0, failures = 0;
  int seen[5];

  rr_route_xy dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    head_valid = 0; fire = 0; head_flit = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int pkt = 0; pkt < 400; pkt++) begin
      int dx, dy, exp_port, ndx, ndy, len;
      dx = int'($urandom % 15) - 7;
      dy = int'($urandom % 15) - 7;
      if (pkt % 10 == 0) begin dx = 0; dy = 0; end
      ndx = dx; ndy = dy;
      if (dx > 0)      begin exp_port = 2; ndx = dx - 1; end
      else if (dx < 0) begin exp_port = 4; ndx = dx + 1; end
      else if (dy > 0) begin exp_port = 1; ndy = dy - 1; end
      else if (dy < 0) begin exp_port = 3; ndy = dy + 1; end
      else              exp_port = 0;
      seen[exp_port]++;
      len = 1 + int'($urandom % 4);
      for (int f = 0; f < len; f++) begin
        @(negedge clk);
        head_valid = 1;
        head_flit.bop  = (f == 0);
        head_flit.eop  = (f == len - 1);
        head_flit.data = (f == 0) ? {4'(dx), 4'(dy)} : 8'($urandom);
        fire = 0;
        #1;
        check(int'(port) == exp_port, $sformatf("pkt %0d flit %0d port %0d exp %0d", pkt, f, port, exp_port));
        if (f == 0)
          check(out_flit.data == {4'(ndx), 4'(ndy)} && out_flit.bop == 1'b1,
                $sformatf("header out %h exp %h", out_flit.data, {4'(ndx), 4'(ndy)}));
        else
          check(out_flit == head_flit, "payload changed");
        // hold a random number of cycles before the flit leaves
        repeat ($urandom % 3) @(posedge clk);
        @(negedge clk);
        fire = 1;
        @(posedge clk);
      end
      @(negedge clk); fire = 0; head_valid = 0;
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("port %0d never used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
