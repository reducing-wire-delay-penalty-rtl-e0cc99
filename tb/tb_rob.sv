// tb_rob: random test of the reorder buffer (16 entries, 3 allocations and
// 2 commits per cycle).
//
// A model keeps, per allocated entry, its done bit and generation. Each cycle
// the test allocates a few entries, reports some as done with their current
// generation, sends stale done reports (old generation, must be ignored) and
// undone requests (clear done, advance generation). Commit must take the
// leading done entries in order, at most two per cycle, and return the
// registers of each committing entry's replaced mapping.
module tb_rob;
  import vpc_pkg::*;

  localparam int E = 16, AW = 3, RW = 2, DP = 2, UP = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [AW-1:0]           alloc_v;
  rob_ent_t [AW-1:0]           alloc_ent;
  logic     [ROB_W-1:0]        tail;
  logic     [7:0]              free_cnt;
  done_t    [DP-1:0]           done;
  logic     [UP-1:0]           undo_v;
  logic     [UP-1:0][ROB_W-1:0] undo_rob;
  logic     [RW-1:0]           cm_v;
  logic     [RW-1:0][ROB_W-1:0] cm_rob;
  rob_ent_t [RW-1:0]           cm_ent;
  logic     [NCL-1:0][RW-1:0]  rel_v;
  logic     [NCL-1:0][RW-1:0][PREG_W-1:0] rel_reg;
  logic                        empty;

  rob #(.ENTRIES(E), .ALLOC_W(AW), .RET_W(RW), .DONE_P(DP), .UNDO_P(UP)) dut (.*);

  int checks = 0, failures = 0;
  int m_idx [$];          // allocated rob indices in order
  bit m_done [E];
  int m_gen [E];
  int m_tag [E];          // pc used as a tag
  int ntag = 0, ncommit = 0, nstale = 0, nundo = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(11));
    alloc_v = '0; alloc_ent = '0; done = '0; undo_v = '0; undo_rob = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      int na, exp_n;
      bit fl;
      @(negedge clk);
      // expected commits from the registered state
      exp_n = 0;
      fl = 1;
      for (int k = 0; k < RW && k < m_idx.size(); k++)
        if (fl && m_done[m_idx[k]]) exp_n++; else fl = 0;
      for (int k = 0; k < RW; k++) begin
        check($sformatf("cycle %0d commit valid %0d", cyc, k), cm_v[k] == (k < exp_n));
        if (k < exp_n) begin
          check("commit order", int'(cm_rob[k]) == m_idx[k] && int'(cm_ent[k].pc) == m_tag[m_idx[k]]);
          check("released register", rel_v[m_tag[m_idx[k]] % NCL][k] == 1'b1 &&
                int'(rel_reg[m_tag[m_idx[k]] % NCL][k]) == m_tag[m_idx[k]] % 50);
        end
      end
      check("free count", int'(free_cnt) == E - m_idx.size());
      check("empty flag", empty == (m_idx.size() == 0));
      for (int k = 0; k < exp_n; k++) begin void'(m_idx.pop_front()); ncommit++; end
      // done reports and undone requests (on entries that are not committing)
      done = '0; undo_v = '0;
      for (int d = 0; d < DP; d++) begin
        if (m_idx.size() > 0 && $urandom_range(0, 2) != 0) begin
          int ix;
          ix = m_idx[$urandom_range(0, m_idx.size() - 1)];
          done[d].v   = 1'b1;
          done[d].rob = ROB_W'(ix);
          if ($urandom_range(0, 4) == 0 && !m_done[ix]) begin
            done[d].gen = GEN_W'(m_gen[ix] + 1);   // stale generation
            nstale++;
          end else begin
            done[d].gen = GEN_W'(m_gen[ix]);
            m_done[ix] = 1;
          end
        end
      end
      if (m_idx.size() > 2 && $urandom_range(0, 3) == 0) begin
        int ix;
        ix = m_idx[$urandom_range(2, m_idx.size() - 1)];
        undo_v[0] = 1'b1;
        undo_rob[0] = ROB_W'(ix);
        m_done[ix] = 0;
        m_gen[ix] = (m_gen[ix] + 1) % (1 << GEN_W);
        nundo++;
      end
      // allocation at the tail
      na = $urandom_range(0, AW);
      if (na > E - m_idx.size()) na = E - m_idx.size();
      alloc_v = '0;
      for (int i = 0; i < na; i++) begin
        int ix;
        ix = (int'(tail) + i) % E;
        ntag++;
        alloc_v[i] = 1'b1;
        alloc_ent[i] = '0;
        alloc_ent[i].pc = PC_W'(ntag);
        alloc_ent[i].free_v = 1'b1;
        alloc_ent[i].old.v[ntag % NCL] = 1'b1;
        alloc_ent[i].old.p[ntag % NCL] = PREG_W'(ntag % 50);
        m_idx.push_back(ix);
        m_done[ix] = 0;
        m_gen[ix]  = 0;
        m_tag[ix]  = ntag;
      end
    end
    check("commits, stale reports and undone requests all exercised",
          ncommit > 100 && nstale > 10 && nundo > 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
