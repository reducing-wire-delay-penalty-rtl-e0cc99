// tb_cluster: directed test of one cluster (16-entry queue, 2-wide issue,
// one network write port).
//
// Phases, each checked against hand-computed values and cycle counts:
//   A. an ADDI and a dependent ADD dispatched together: the dependent one
//      completes exactly one cycle after its producer (local bypass);
//   B. a copy offers its value to the network, waits without a grant, issues
//      once granted and reports nothing itself (the receiver does);
//   C. verification-copies: a correct prediction reports done without using
//      the network, a wrong one sends the real value;
//   D. an operand predicted locally (value 7, real value 20 arriving later
//      from the network): the consumer and its dependent issue early; the
//      delivery makes both reissue with a new generation, sends "undone"
//      requests and leaves the correct results;
//   E. a correct local prediction causes no reissue;
//   F. a register preloaded at dispatch is captured by an operation
//      dispatched in the same cycle;
//   G. commit frees the queue entries and returns the operand values.
module tb_cluster;
  import vpc_pkg::*;

  localparam int IQN = 16, IW = 2, DW = 8, UW = 8, B = 1, NOM = 2, RW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [DW-1:0]              disp_v;
  disp_t    [DW-1:0]              disp;
  logic     [UW-1:0]              upd_v;
  prf_upd_t [UW-1:0]              upd;
  logic     [5:0]                 iq_free;
  logic     [PREGS-1:0]           preg_ready;
  xmsg_t    [NOM-1:0]             xreq;
  logic     [NOM-1:0]             xgnt;
  xmsg_t    [B-1:0]               xdlv;
  done_t    [IW+B-1:0]            done;
  logic     [IQN-1:0]             undo_v;
  logic     [IQN-1:0][ROB_W-1:0]  undo_rob;
  logic     [RW-1:0]              cm_v;
  logic     [RW-1:0][ROB_W-1:0]   cm_rob;
  logic     [RW-1:0][1:0][XLEN-1:0] cm_src;
  logic     [PREG_W-1:0]          dbg_preg;
  logic     [XLEN-1:0]            dbg_val;
  logic     [4:0]                 n_ready, n_issued, n_reissue;

  cluster #(.IQN(IQN), .ISSUE_W(IW), .DISP_W(DW), .UPD_W(UW), .B(B), .NOM(NOM), .RET_W(RW)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int done_cyc [128][$];   // cycles of done reports per rob index
  int done_gen [128][$];
  int undo_cnt [128];
  int reissues = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitor: sample outputs just before each rising edge
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < IW + B; i++)
      if (done[i].v) begin
        done_cyc[done[i].rob].push_back(cyc);
        done_gen[done[i].rob].push_back(int'(done[i].gen));
      end
    for (int e = 0; e < IQN; e++) if (undo_v[e]) undo_cnt[undo_rob[e]]++;
    reissues += n_reissue;
  end

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic disp_t alu(input alu_op_e op, input int rob, input int dst,
                                input int t0, input int t1, input int imm);
    disp_t d;
    d = '0;
    d.kind = K_ALU; d.op = op; d.imm = IMM_W'(imm); d.rob = ROB_W'(rob);
    d.dst_v = 1'b1; d.dst = PREG_W'(dst);
    if (t0 >= 0) begin d.src[0].used = 1'b1; d.src[0].tag = PREG_W'(t0); end
    if (t1 >= 0) begin d.src[1].used = 1'b1; d.src[1].tag = PREG_W'(t1); end
    return d;
  endfunction

  function automatic disp_t xcopy(input op_kind_e k, input int rob, input int src, input int dcl,
                                  input int dst, input int pval);
    disp_t d;
    d = '0;
    d.kind = k; d.rob = ROB_W'(rob); d.dst_v = 1'b1; d.dst_cl = CL_W'(dcl);
    d.dst = PREG_W'(dst); d.pval = XLEN'(pval);
    d.src[0].used = 1'b1; d.src[0].tag = PREG_W'(src);
    return d;
  endfunction

  function automatic prf_upd_t pend(input int tag);
    prf_upd_t u;
    u = '0; u.v = 1'b1; u.tag = PREG_W'(tag);
    return u;
  endfunction

  task automatic idle();
    disp_v = '0; disp = '0; upd_v = '0; upd = '0; xgnt = '0; xdlv = '0; cm_v = '0; cm_rob = '0;
  endtask

  task automatic step(input int n);
    repeat (n) begin @(negedge clk); idle(); end
  endtask

  function automatic logic [XLEN-1:0] rd(input int p);
    return dut.rf_q[p];
  endfunction

  initial begin
    idle();
    dbg_preg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- A: bypass ------------------------------------------------------
    @(negedge clk);
    idle();
    disp_v[0] = 1'b1; disp[0] = alu(OP_ADDI, 1, 10, 0, -1, 5);
    disp_v[1] = 1'b1; disp[1] = alu(OP_ADD, 2, 11, 10, 10, 0);
    disp[1].src[0].fresh = 1'b1; disp[1].src[1].fresh = 1'b1;   // allocated in this group
    upd_v[0] = 1'b1; upd[0] = pend(10);
    upd_v[1] = 1'b1; upd[1] = pend(11);
    step(6);
    check("A: producer done once", done_cyc[1].size() == 1);
    check("A: consumer done once", done_cyc[2].size() == 1);
    if (done_cyc[1].size() == 1 && done_cyc[2].size() == 1)
      check($sformatf("A: back-to-back (%0d, %0d)", done_cyc[1][0], done_cyc[2][0]),
            done_cyc[2][0] == done_cyc[1][0] + 1);
    dbg_preg = 6'd11; #1;
    check($sformatf("A: p11 = %0d (10)", dbg_val), dbg_val == 10 && preg_ready[11]);

    // ---- B: copy waits for a path ----------------------------------------
    @(negedge clk);
    idle();
    disp_v[0] = 1'b1; disp[0] = xcopy(K_COPY, 3, 11, 2, 7, 0);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); idle(); #1;
      check($sformatf("B: copy offered (%0d)", i),
            xreq[0].v && xreq[0].val == 10 && xreq[0].dst_cl == 2 && xreq[0].tag == 7 && xreq[0].rob == 3);
    end
    xgnt[0] = 1'b1;
    @(negedge clk); idle(); #1;
    check("B: copy left after its grant", !xreq[0].v);
    step(3);
    check("B: copy reports nothing itself", done_cyc[3].size() == 0);

    // ---- C: verification-copies ------------------------------------------
    @(negedge clk);
    idle();
    disp_v[0] = 1'b1; disp[0] = xcopy(K_VCOPY, 4, 11, 1, 8, 10);   // correct prediction
    disp_v[1] = 1'b1; disp[1] = xcopy(K_VCOPY, 5, 11, 1, 9, 99);   // wrong prediction
    begin
      bit seen4, seen5;
      seen4 = 0; seen5 = 0;
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); idle(); #1;
        for (int n = 0; n < NOM; n++) begin
          if (xreq[n].v && xreq[n].rob == 4) seen4 = 1;
          if (xreq[n].v && xreq[n].rob == 5) begin
            seen5 = 1;
            check("C: real value sent", xreq[n].val == 10 && xreq[n].tag == 9);
            xgnt[n] = 1'b1;
          end
        end
      end
      step(2);
      check("C: matching verification-copy does not send", !seen4);
      check("C: matching verification-copy reports done", done_cyc[4].size() == 1);
      check("C: mismatching verification-copy sends", seen5);
      check("C: mismatching verification-copy waits for the receiver", done_cyc[5].size() == 0);
    end

    // ---- D: wrong local prediction, selective reissue ----------------------
    @(negedge clk);
    idle();
    upd_v[0] = 1'b1; upd[0] = pend(30);
    @(negedge clk);
    idle();
    disp_v[0] = 1'b1; disp[0] = alu(OP_ADDI, 6, 12, 30, -1, 1);
    disp[0].src[0].has_val = 1'b1; disp[0].src[0].val = 64'd7;
    disp_v[1] = 1'b1; disp[1] = alu(OP_ADDI, 7, 13, 12, -1, 1);
    disp[1].src[0].fresh = 1'b1;
    upd_v[0] = 1'b1; upd[0] = pend(12);
    upd_v[1] = 1'b1; upd[1] = pend(13);
    step(4);
    check("D: speculative results", rd(12) == 8 && rd(13) == 9);
    check("D: both done on the prediction", done_cyc[6].size() == 1 && done_cyc[7].size() == 1);
    xdlv[0].v = 1'b1; xdlv[0].tag = 6'd30; xdlv[0].val = 64'd20; xdlv[0].rob = 7'd50;
    step(5);
    check("D: delivery reported done for the copy", done_cyc[50].size() == 1);
    check("D: undone requests", undo_cnt[6] == 1 && undo_cnt[7] == 1);
    check("D: new done reports with the next generation",
          done_cyc[6].size() == 2 && done_gen[6][1] == 1 && done_cyc[7].size() == 2 && done_gen[7][1] == 1);
    check($sformatf("D: corrected results %0d %0d", rd(12), rd(13)), rd(12) == 21 && rd(13) == 22);
    check("D: two reissues", reissues == 2);

    // ---- E: correct local prediction ----------------------------------------
    @(negedge clk);
    idle();
    upd_v[0] = 1'b1; upd[0] = pend(31);
    @(negedge clk);
    idle();
    disp_v[0] = 1'b1; disp[0] = alu(OP_ADDI, 8, 14, 31, -1, 2);
    disp[0].src[0].has_val = 1'b1; disp[0].src[0].val = 64'd3;
    upd_v[0] = 1'b1; upd[0] = pend(14);
    step(3);
    xdlv[0].v = 1'b1; xdlv[0].tag = 6'd31; xdlv[0].val = 64'd3; xdlv[0].rob = 7'd51;
    step(4);
    check("E: no reissue on a correct prediction",
          done_cyc[8].size() == 1 && undo_cnt[8] == 0 && reissues == 2 && rd(14) == 5);

    // ---- F: preload captured at dispatch --------------------------------------
    @(negedge clk);
    idle();
    upd_v[0] = 1'b1; upd[0] = pend(40); upd[0].preload = 1'b1; upd[0].val = 64'd77;
    disp_v[0] = 1'b1; disp[0] = alu(OP_ADD, 9, 15, 40, 40, 0);
    disp[0].src[0].fresh = 1'b1; disp[0].src[1].fresh = 1'b1;
    upd_v[1] = 1'b1; upd[1] = pend(15);
    step(4);
    check($sformatf("F: preloaded operand %0d", rd(15)), rd(15) == 154 && done_cyc[9].size() == 1);

    // ---- G: commit -----------------------------------------------------------
    check($sformatf("G: %0d free entries before commit", iq_free), iq_free == IQN - 9);
    @(negedge clk);
    idle();
    for (int k = 0; k < RW; k++) begin cm_v[k] = 1'b1; cm_rob[k] = ROB_W'(k + 1); end
    #1;
    check("G: committed operand values",
          cm_src[5][0] == 20 && cm_src[1][0] == 5 && cm_src[1][1] == 5 && cm_src[7][0] == 3);
    @(negedge clk);
    idle();
    cm_v[0] = 1'b1; cm_rob[0] = 7'd9;
    @(negedge clk);
    idle();
    #1;
    check($sformatf("G: %0d free entries after commit", iq_free), iq_free == IQN);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
