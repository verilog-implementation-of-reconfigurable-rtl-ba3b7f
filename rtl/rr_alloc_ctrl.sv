// rr_alloc_ctrl - buffer-slot allocation control of the four mesh channels.
//
// Input: the depth each of the channels N, E, S, W should have (req_depth,
// index N=0, E=1, S=2, W=3). From it a target split of every bank is worked
// out combinationally:
//   keep[c]  = min(req[c], DEPTH)            own slots the channel keeps
//   need[c]  = min(req[c], 3*DEPTH) - keep[c] slots it must borrow
//   spare[b] = DEPTH - keep[b]               slots bank b can lend
//   right borrow rb[c] = min(need[c], spare[right(c)])
//   left borrow  lb[c] = min(need[c] - rb[c], spare[left(c)] - rb[left(left(c))])
// i.e. a channel asks its right neighbour first and its left neighbour for
// the rest; a bank serves the channel on its left before the one on its
// right, so two borrowers never claim the same slot. Slots nobody borrows
// stay with the owner. Bank b's regions are 0 = own, 1 = lent to its left
// neighbour (= rb[left(b)]), 2 = lent to its right neighbour (= lb[right(b)]),
// laid out in that order from address 0.
//
// Slot-by-slot reconfiguration: each cycle, every bank whose current split
// differs from its target moves one slot from the first region above target
// to the first region below it. The move is applied only when every region
// whose size or base address changes is empty and has no write request in
// that cycle (reg_count / reg_wr_req from the channel controls), so no stored
// flit is ever moved. size/base are registered; reset restores the
// design-time split (each bank entirely its owner's). busy is high while any
// bank is away from its target. base[b][0], the own region's base, is always
// 0; it is kept so that all three regions are addressed the same way.
// The lending order and slot-by-slot update follow the router description;
// the formulas above and the "empty region" condition are this design's.
module rr_alloc_ctrl
  import rr_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                                        clk,
  input  logic                                        rst,
  input  logic [NUM_RING-1:0][$clog2(3*DEPTH+1)-1:0]  req_depth,
  input  logic [NUM_RING-1:0][2:0][$clog2(DEPTH+1)-1:0] reg_count,
  input  logic [NUM_RING-1:0][2:0]                    reg_wr_req,
  output logic [NUM_RING-1:0][2:0][$clog2(DEPTH+1)-1:0] size,
  output logic [NUM_RING-1:0][2:0][$clog2(DEPTH)-1:0]   base,
  output logic                                        busy
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned R  = NUM_RING;

  logic [R-1:0][2:0][CW-1:0] size_q, size_n;
  logic [R-1:0]              apply;
  logic [R-1:0][2:0][CW-1:0] target;

  // Target split.
  always_comb begin
    int keep [R];
    int need [R];
    int spare[R];
    int rb   [R];
    int lb   [R];
    for (int c = 0; c < R; c++) begin
      int want;
      want     = (int'(req_depth[c]) > 3 * DEPTH) ? 3 * DEPTH : int'(req_depth[c]);
      keep[c]  = (want > DEPTH) ? DEPTH : want;
      need[c]  = want - keep[c];
      spare[c] = DEPTH - keep[c];
    end
    for (int c = 0; c < R; c++) begin
      int sr;
      sr    = spare[ring_right(c)];
      rb[c] = (need[c] < sr) ? need[c] : sr;
    end
    for (int c = 0; c < R; c++) begin
      int sl, rest;
      sl    = spare[ring_left(c)] - rb[ring_left(ring_left(c))];
      rest  = need[c] - rb[c];
      lb[c] = (rest < sl) ? rest : sl;
    end
    for (int b = 0; b < R; b++) begin
      target[b][1] = CW'(rb[ring_left(b)]);
      target[b][2] = CW'(lb[ring_right(b)]);
      target[b][0] = CW'(DEPTH - rb[ring_left(b)] - lb[ring_right(b)]);
    end
  end

  // One-slot step toward the target, when the regions it touches are free.
  always_comb begin
    busy = 1'b0;
    for (int b = 0; b < R; b++) begin
      int  dn, rc;
      logic [2:0] changed;
      size_n[b] = size_q[b];
      apply[b]  = 1'b0;
      dn = -1;
      rc = -1;
      for (int r = 2; r >= 0; r--) begin
        if (size_q[b][r] > target[b][r]) dn = r;
        if (size_q[b][r] < target[b][r]) rc = r;
      end
      if (dn >= 0 && rc >= 0) begin
        busy = 1'b1;
        size_n[b][dn] = size_q[b][dn] - 1'b1;
        size_n[b][rc] = size_q[b][rc] + 1'b1;
        changed[0] = (size_n[b][0] != size_q[b][0]);
        changed[1] = changed[0] || (size_n[b][1] != size_q[b][1]);
        changed[2] = (size_n[b][2] != size_q[b][2]);
        apply[b] = 1'b1;
        for (int r = 0; r < 3; r++) begin
          if (changed[r] && (reg_count[b][r] != '0 || reg_wr_req[b][r])) apply[b] = 1'b0;
        end
      end else begin
        changed = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < R; b++) begin
        size_q[b][0] <= CW'(DEPTH);
        size_q[b][1] <= '0;
        size_q[b][2] <= '0;
      end
    end else begin
      for (int b = 0; b < R; b++) begin
        if (apply[b]) size_q[b] <= size_n[b];
      end
    end
  end

  always_comb begin
    for (int b = 0; b < R; b++) begin
      base[b][0] = '0;
      base[b][1] = AW'(size_q[b][0]);
      base[b][2] = AW'(size_q[b][0] + size_q[b][1]);
    end
  end
  assign size = size_q;

  for (genvar b = 0; b < R; b++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst)
      (32'(size_q[b][0]) + 32'(size_q[b][1]) + 32'(size_q[b][2])) == DEPTH);
  end

endmodule
