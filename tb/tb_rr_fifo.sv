// tb_rr_fifo - self-checking test of the plain input FIFO (Local channel).
//
// Random writes and reads against a queue model: data order, occupancy
// count, in_ready low exactly when full and not read, and one-cycle latency
// from write to out_valid on an empty FIFO.
module tb_rr_fifo;
  import rr_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst = 1'b1;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t q[$];
  int full_seen = 0;

  rr_fifo #(.DEPTH(DEPTH)) dut (.*);

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
    in_valid = 0; out_ready = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // latency: write into empty FIFO, valid next cycle
    @(negedge clk);
    in_flit = '{bop: 1'b1, eop: 1'b0, data: 8'h5a}; in_valid = 1;
    #1 check(!out_valid, "valid before write");
    @(posedge clk); q.push_back(in_flit);
    @(negedge clk); in_valid = 0;
    #1 check(out_valid && out_flit == 10'(q[0]), "one-cycle write-to-read latency");
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit w, r;
      @(negedge clk);
      in_flit   = flit_t'($urandom);
      in_valid  = ($urandom % 3) != 0;
      out_ready = (cyc < 1500) ? (($urandom % 3) == 0) : (($urandom % 3) != 0);
      #1;
      check(count == q.size(), $sformatf("count %0d exp %0d", count, q.size()));
      check(out_valid == (q.size() != 0), "out_valid");
      if (q.size() != 0) check(out_flit == q[0], $sformatf("data %h exp %h", out_flit, q[0]));
      check(in_ready == ((q.size() < DEPTH) || out_ready), "in_ready");
      if (q.size() == DEPTH) full_seen++;
      w = in_valid && in_ready;
      r = out_valid && out_ready;
      @(posedge clk);
      if (r) void'(q.pop_front());
      if (w) q.push_back(in_flit);
    end
    check(full_seen > 0, "FIFO never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
