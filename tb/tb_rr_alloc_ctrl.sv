// tb_rr_alloc_ctrl - self-checking test of the slot allocation control.
//
// Checks: the design-time split after reset; the worked example of four
// channels with depths N=4, E=2, S=9, W=1 and four slots per bank (South
// keeps its 4 slots, borrows 2 from East and 3 from West); that a bank moves
// at most one slot per cycle; that a region holding flits or being written
// is never resized; random requests against a reference computed here by
// lending slot by slot (right-hand borrows served before left-hand ones);
// region bases are the running sums of the sizes.
module tb_rr_alloc_ctrl;
  import rr_pkg::*;
  localparam int DEPTH = 4;
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);
  localparam int TW = $clog2(3 * DEPTH + 1);
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0][TW-1:0]      req_depth;
  logic [3:0][2:0][CW-1:0] reg_count, size, prev;
  logic [3:0][2:0]         reg_wr_req;
  logic [3:0][2:0][AW-1:0] base;
  logic busy;
  int checks = 0, failures = 0;
  int steps = 0;

  rr_alloc_ctrl #(.DEPTH(DEPTH)) dut (.*);

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

  // Per-cycle invariants: one slot per bank per cycle, busy regions frozen,
  // bases consistent.
  always @(posedge clk) begin
    if (!rst) begin
      prev = size;
      #1;
      for (int b = 0; b < 4; b++) begin
        int d;
        d = 0;
        for (int r = 0; r < 3; r++) d += (size[b][r] > prev[b][r]) ? size[b][r] - prev[b][r] : prev[b][r] - size[b][r];
        check(d == 0 || d == 2, $sformatf("bank %0d moved %0d slot-halves", b, d));
        if (d != 0) steps++;
        check(base[b][0] == 0 && base[b][1] == AW'(size[b][0]) && base[b][2] == AW'(size[b][0] + size[b][1]), "bases");
        check(32'(size[b][0]) + 32'(size[b][1]) + 32'(size[b][2]) == DEPTH, "bank size sum");
      end
    end
  end

  // Reference: want/keep per channel, then slot-by-slot loans.
  task automatic reference(input int req[4], output int exp[4][3]);
    int free[4], need[4];
    for (int c = 0; c < 4; c++) begin
      int want;
      want = (req[c] > 3 * DEPTH) ? 3 * DEPTH : req[c];
      free[c] = (want >= DEPTH) ? 0 : DEPTH - want;
      need[c] = (want > DEPTH) ? want - DEPTH : 0;
      exp[c][1] = 0; exp[c][2] = 0;
    end
    // right-hand loans: channel c asks bank (c+3)%4, region 1
    for (int c = 0; c < 4; c++)
      while (need[c] > 0 && free[(c + 3) % 4] > 0) begin
        need[c]--; free[(c + 3) % 4]--; exp[(c + 3) % 4][1]++;
      end
    // left-hand loans: channel c asks bank (c+1)%4, region 2
    for (int c = 0; c < 4; c++)
      while (need[c] > 0 && free[(c + 1) % 4] > 0) begin
        need[c]--; free[(c + 1) % 4]--; exp[(c + 1) % 4][2]++;
      end
    for (int b = 0; b < 4; b++) exp[b][0] = DEPTH - exp[b][1] - exp[b][2];
  endtask

  task automatic compare(int exp[4][3], string what);
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < 3; r++)
        check(int'(size[b][r]) == exp[b][r],
              $sformatf("%s bank %0d region %0d size %0d exp %0d", what, b, r, size[b][r], exp[b][r]));
  endtask

  initial begin
    int exp[4][3];
    int req[4];
    req_depth = '0; reg_count = '0; reg_wr_req = '0;
    for (int c = 0; c < 4; c++) req_depth[c] = TW'(DEPTH);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    exp = '{'{4, 0, 0}, '{4, 0, 0}, '{4, 0, 0}, '{4, 0, 0}};
    compare(exp, "reset");
    check(!busy, "busy after reset");

    // Worked example: N=4, E=2, S=9, W=1 (index N=0, E=1, S=2, W=3).
    // Bank E (1) lends 2 to its left neighbour S; bank W (3) lends 3 to its
    // right neighbour S.
    req_depth[0] = 4; req_depth[1] = 2; req_depth[2] = 9; req_depth[3] = 1;
    // Hold bank E's own region busy: nothing may change in bank E.
    reg_count[1][0] = 1;
    repeat (10) @(negedge clk);
    check(size[1][0] == 4 && size[1][1] == 0, "busy own region was resized");
    reg_count[1][0] = 0;
    reg_wr_req[1][1] = 1;
    repeat (5) @(negedge clk);
    check(size[1][0] == 4 && size[1][1] == 0, "region with a pending write was resized");
    reg_wr_req[1][1] = 0;
    repeat (10) @(negedge clk);
    exp = '{'{4, 0, 0}, '{2, 2, 0}, '{4, 0, 0}, '{1, 0, 3}};
    compare(exp, "example");
    check(!busy, "busy after example");
    check(32'(size[2][0]) + 32'(size[1][1]) + 32'(size[3][2]) == 9, "south depth is not 9");

    // Random requests.
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int c = 0; c < 4; c++) begin
        req[c] = int'($urandom % (3 * DEPTH + 2));
        req_depth[c] = TW'(req[c]);
      end
      reference(req, exp);
      repeat (4 * DEPTH + 2) @(negedge clk);
      compare(exp, $sformatf("random %0d", t));
      check(!busy, "still busy");
    end
    check(steps > 0, "no reconfiguration step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
