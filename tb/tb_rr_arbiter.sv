// tb_rr_arbiter - self-checking test of the round-robin arbiter.
//
// Random request vectors and random advance pulses; a reference model keeps
// its own priority index and predicts the grant: the first requester at or
// after the index, wrapping. Also checks that a steady full request vector
// is served in rotation (each input once per N cycles).
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] req, gnt, exp_gnt;
  logic advance;
  int checks = 0, failures = 0;
  int prio;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst(rst), .req(req), .advance(advance), .gnt(gnt));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) begin
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    end
    return '0;
  endfunction

  initial begin
    int served[N];
    req = '0; advance = 1'b0; prio = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      req     = N'($urandom);
      advance = ($urandom % 4) != 0;
      #1;
      exp_gnt = model(req, prio);
      checks++;
      if (gnt !== exp_gnt) begin
        failures++;
        $display("ERROR cyc %0d req=%b gnt=%b exp=%b", cyc, req, gnt, exp_gnt);
      end
      @(posedge clk);
      if (advance && exp_gnt != '0) begin
        for (int i = 0; i < N; i++) if (exp_gnt[i]) prio = (i + 1) % N;
      end
    end
    // Fairness: all request, every input served once per N grants.
    foreach (served[i]) served[i] = 0;
    for (int cyc = 0; cyc < 4 * N; cyc++) begin
      @(negedge clk);
      req = '1; advance = 1'b1;
      #1;
      for (int i = 0; i < N; i++) if (gnt[i]) served[i]++;
    end
    foreach (served[i]) begin
      checks++;
      if (served[i] != 4) begin
        failures++;
        $display("ERROR input %0d served %0d times in %0d cycles", i, served[i], 4 * N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
