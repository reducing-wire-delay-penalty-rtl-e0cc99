// tb_free_list: random test of a cluster's free register pool.
//
// Pops and pushes registers at random rates (never popping more than are
// free) and keeps a queue model: the visible heads, the count and the set of
// registers handed out are checked every cycle, and no register may be handed
// out twice while it is in use.
module tb_free_list;
  import vpc_pkg::*;

  localparam int POP_W = 4, PUSH_W = 3, NREG = 20, FIRST = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [POP_W-1:0][PREG_W-1:0]  head;
  logic [PREG_W:0]               count;
  logic [$clog2(POP_W+1)-1:0]    pop_cnt;
  logic [PUSH_W-1:0]             push_v;
  logic [PUSH_W-1:0][PREG_W-1:0] push_reg;

  free_list #(.PREGS_N(NREG), .FIRST_FREE(FIRST), .POP_W(POP_W), .PUSH_W(PUSH_W)) dut (.*);

  int checks = 0, failures = 0;
  int q [$];
  int inuse [$];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(3));
    pop_cnt = '0; push_v = '0; push_reg = '0;
    for (int r = FIRST; r < NREG; r++) q.push_back(r);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      int np, nq;
      @(negedge clk);
      check($sformatf("count %0d model %0d", count, q.size()), int'(count) == q.size());
      for (int k = 0; k < POP_W && k < q.size(); k++)
        check($sformatf("head %0d = %0d model %0d", k, head[k], q[k]), int'(head[k]) == q[k]);
      np = $urandom_range(0, POP_W);
      if (np > q.size()) np = q.size();
      pop_cnt = ($clog2(POP_W+1))'(np);
      for (int k = 0; k < np; k++) inuse.push_back(q.pop_front());
      push_v = '0;
      nq = $urandom_range(0, PUSH_W);
      for (int k = 0; k < PUSH_W; k++) begin
        if (k < nq && inuse.size() > 0 && $urandom_range(0, 3) != 0) begin
          int ix;
          ix = $urandom_range(0, inuse.size() - 1);
          push_v[k]   = 1'b1;
          push_reg[k] = PREG_W'(inuse[ix]);
          q.push_back(inuse[ix]);
          inuse.delete(ix);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
