// tb_rr_recfg_buffer - self-checking test of one shared buffer bank.
//
// Three users request the single write port at random with random
// addresses; a model predicts the round-robin grant, keeps its own copy of
// the slots, and checks the three read ports at random addresses.
module tb_rr_recfg_buffer;
  import rr_pkg::*;
  localparam int DEPTH = 4;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0, rst = 1'b1;
  logic  [2:0]         wr_req, wr_gnt;
  logic  [2:0][AW-1:0] wr_addr, rd_addr;
  flit_t [2:0]         wr_data, rd_data;
  int checks = 0, failures = 0;
  flit_t mem[DEPTH];
  bit    known[DEPTH];
  int    prio = 0, conflicts = 0;

  rr_recfg_buffer #(.DEPTH(DEPTH)) dut (.*);

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
    wr_req = '0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [2:0] exp;
      int w;
      @(negedge clk);
      wr_req = 3'($urandom);
      for (int r = 0; r < 3; r++) begin
        wr_addr[r] = AW'($urandom % DEPTH);
        wr_data[r] = flit_t'($urandom);
        rd_addr[r] = AW'($urandom % DEPTH);
      end
      #1;
      exp = '0; w = -1;
      for (int k = 0; k < 3; k++) if (w < 0 && wr_req[(prio + k) % 3]) w = (prio + k) % 3;
      if (w >= 0) exp[w] = 1'b1;
      if ($countones(wr_req) > 1) conflicts++;
      check(wr_gnt == exp, $sformatf("grant %b exp %b (req %b)", wr_gnt, exp, wr_req));
      for (int r = 0; r < 3; r++)
        if (known[rd_addr[r]])
          check(rd_data[r] == mem[rd_addr[r]], $sformatf("read port %0d addr %0d", r, rd_addr[r]));
      @(posedge clk);
      if (w >= 0) begin
        mem[wr_addr[w]] = wr_data[w];
        known[wr_addr[w]] = 1'b1;
        prio = (w + 1) % 3;
      end
    end
    check(conflicts > 0, "no write conflict exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
