// tb_rename_steer: directed test of the rename/steer stage (2-wide groups).
//
// Each phase presents one instruction group, checks the steering decision,
// the operations sent to each cluster (copies, verification-copies, the
// instruction itself with its operand tags and attached predictions), the
// register-file updates, the reorder-buffer entries, the free-list pops and
// statistics, then lets the map table update at the clock edge. After reset
// logical register r lives in cluster r mod 4. The DCOUNT values and resource
// inputs are driven directly by the test. Covered: rule 2.2 (most operands
// mapped, least DCOUNT, lowest index), copy creation and the map update that
// lets a later instruction read the copied register, an intra-group
// dependence, a verification-copy with a preloaded register, rule 2.1 for a
// pending unpredicted operand, a local prediction, rule 1 (balance), the VPB
// relaxation, and stalls on reorder-buffer and issue-queue space.
module tb_rename_steer;
  import vpc_pkg::*;

  localparam int W = 2, DW = 4, AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [W-1:0]                   in_v;
  instr_t   [W-1:0]                   in_ins;
  logic     [W-1:0][1:0][XLEN-1:0]    in_pval;
  logic     [W-1:0][1:0]              in_pconf;
  logic     [W-1:0]                   in_acc;
  logic signed [NCL-1:0][DC_W-1:0]    dc;
  logic     [NCL-1:0][PREGS-1:0]      preg_ready;
  logic     [NCL-1:0][AW-1:0][PREG_W-1:0] fl_head;
  logic     [NCL-1:0][PREG_W:0]       fl_count;
  logic     [NCL-1:0][5:0]            iq_free;
  logic     [7:0]                     rob_free;
  logic     [ROB_W-1:0]               rob_tail;
  logic     [NCL-1:0][DW-1:0]         disp_v;
  disp_t    [NCL-1:0][DW-1:0]         disp;
  logic     [NCL-1:0][AW-1:0]         upd_v;
  prf_upd_t [NCL-1:0][AW-1:0]         upd;
  logic     [3*W-1:0]                 rob_v;
  rob_ent_t [3*W-1:0]                 rob_ent;
  logic     [NCL-1:0][$clog2(AW+1)-1:0] fl_pop;
  logic     [NCL-1:0][5:0]            dc_disp;
  logic     [4:0]                     n_copy, n_vcopy, n_pred, n_bal, n_vpb;
  logic     [LREG_W-1:0]              dbg_lreg;
  logic     [CL_W-1:0]                dbg_cl;
  logic     [PREG_W-1:0]              dbg_preg;

  rename_steer #(.W(W), .DISP_W(DW), .ALLOC_W(AW), .T_BAL(32), .T_VPB(16)) dut (.*);

  int checks = 0, failures = 0;
  int fl_base [NCL];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t ins(input alu_op_e op, input int d, input int s0, input int s1);
    instr_t i;
    i = '0;
    i.pc = PC_W'(32'h100 + 4 * d);
    i.op = op; i.dst_v = 1'b1; i.dst = LREG_W'(d); i.imm = IMM_W'(1);
    if (s0 >= 0) begin i.src_v[0] = 1'b1; i.src[0] = LREG_W'(s0); end
    if (s1 >= 0) begin i.src_v[1] = 1'b1; i.src[1] = LREG_W'(s1); end
    return i;
  endfunction

  // fresh group: defaults, then the caller fills in the instructions
  task automatic group();
    @(negedge clk);
    in_v = '0; in_ins = '0; in_pval = '0; in_pconf = '0;
    dc = '0; preg_ready = '1; iq_free = {NCL{6'd16}}; rob_free = 8'd128;
    for (int c = 0; c < NCL; c++) begin
      fl_count[c] = 7'd30;
      for (int i = 0; i < AW; i++) fl_head[c][i] = PREG_W'(fl_base[c] + i);
    end
  endtask

  // at the end of a group: advance the free lists by what was taken
  task automatic take();
    for (int c = 0; c < NCL; c++) fl_base[c] += int'(fl_pop[c]);
  endtask

  function automatic int ndisp(input int c);
    int n = 0;
    for (int i = 0; i < DW; i++) n += disp_v[c][i];
    return n;
  endfunction

  initial begin
    for (int c = 0; c < NCL; c++) fl_base[c] = 20;
    rob_tail = 7'd10;
    dbg_lreg = '0;
    group();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- T1: ADD r5 = r1 + r2: tie between clusters 1 and 2 -> cluster 1, copy of r2
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 5, 1, 2);
    #1;
    check("T1: accepted", in_acc == 2'b01);
    check("T1: copy in cluster 2", ndisp(2) == 1 && disp[2][0].kind == K_COPY &&
          disp[2][0].dst_cl == 1 && disp[2][0].dst == 20 && disp[2][0].src[0].tag == 0 &&
          disp[2][0].rob == 10);
    check("T1: instruction in cluster 1", ndisp(1) == 1 && disp[1][0].kind == K_ALU &&
          disp[1][0].src[0].tag == 0 && disp[1][0].src[1].tag == 20 && disp[1][0].src[1].fresh &&
          disp[1][0].dst == 21 && disp[1][0].rob == 11);
    check("T1: nothing elsewhere", ndisp(0) == 0 && ndisp(3) == 0);
    check("T1: register updates", upd_v[1] == 4'b0011 && !upd[1][0].preload && upd[1][0].tag == 20 &&
          upd[1][1].tag == 21);
    check("T1: reorder buffer", rob_v == 6'b000011 && rob_ent[0].kind == K_COPY && rob_ent[0].cl == 2 &&
          rob_ent[1].kind == K_ALU && rob_ent[1].free_v && rob_ent[1].old.v[1] && rob_ent[1].old.p[1] == 1);
    check("T1: free-list pops and DCOUNT counts", fl_pop[1] == 2 && fl_pop[2] == 0 &&
          dc_disp[1] == 1 && dc_disp[2] == 1);
    check("T1: statistics", n_copy == 1 && n_vcopy == 0 && n_bal == 0);
    take();
    @(posedge clk); #1;
    dbg_lreg = 5'd5; #1;
    check("T1: r5 now produced in cluster 1", dbg_cl == 1 && dbg_preg == 21);

    // ---- T2: ADD r6 = r2 + r5 (both mapped in cluster 1 now); ADDI r7 = r6 + 1
    group();
    in_v = 2'b11; in_ins[0] = ins(OP_ADD, 6, 2, 5); in_ins[1] = ins(OP_ADDI, 7, 6, -1);
    preg_ready[1][21] = 1'b0;   // r5 not computed yet
    #1;
    check("T2: both accepted", in_acc == 2'b11 && n_copy == 0);
    check("T2: both in cluster 1 without copies", ndisp(1) == 2 && disp[1][0].src[0].tag == 20 &&
          disp[1][0].src[1].tag == 21 && disp[1][1].src[0].tag == disp[1][0].dst &&
          disp[1][1].src[0].fresh);
    take();

    // ---- T3: ADD r8 = r0 + r3, r3 predicted 42 -> cluster 0 with a verification-copy
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 8, 0, 3);
    in_pconf[0][1] = 1'b1; in_pval[0][1] = 64'd42;
    #1;
    check("T3: verification-copy in cluster 3", ndisp(3) == 1 && disp[3][0].kind == K_VCOPY &&
          disp[3][0].pval == 42 && disp[3][0].dst_cl == 0);
    check("T3: preloaded register and predicted operand", ndisp(0) == 1 &&
          upd_v[0][0] && upd[0][0].preload && upd[0][0].val == 42 &&
          disp[0][0].src[1].has_val && disp[0][0].src[1].val == 42);
    check("T3: statistics", n_vcopy == 1 && n_copy == 0);
    take();

    // ---- T4: r11 (cluster 3) pending and not predicted -> its cluster, despite DCOUNT
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 9, 4, 11);
    preg_ready[3][2] = 1'b0;
    dc[0] = -16'sd10; dc[3] = 16'sd10;
    #1;
    check("T4: steered to the pending operand's cluster", ndisp(3) == 1 && disp[3][0].kind == K_ALU &&
          ndisp(0) == 1 && disp[0][0].kind == K_COPY && disp[0][0].dst_cl == 3);
    take();

    // ---- T5: ADD r10 = r11 + r15, r11 pending but predicted 5: local prediction in cluster 3
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 10, 11, 15);
    preg_ready[3][2] = 1'b0;
    in_pconf[0][0] = 1'b1; in_pval[0][0] = 64'd5;
    #1;
    check("T5: local prediction", ndisp(3) == 1 && disp[3][0].src[0].tag == 2 &&
          disp[3][0].src[0].has_val && disp[3][0].src[0].val == 5 && n_pred == 1 && n_vcopy == 0);
    take();

    // ---- T6: imbalance 40 > 32 -> least loaded cluster
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 12, 1, 1);
    dc[0] = 16'sd40; dc[3] = -16'sd40;
    #1;
    check("T6: balance rule", ndisp(3) == 1 && ndisp(1) == 1 && disp[1][0].kind == K_COPY &&
          n_bal == 1 && n_copy == 1);
    take();

    // ---- T7: imbalance 20: predicted operands count as mapped everywhere
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 13, 16, 17);
    in_pconf[0] = 2'b11; in_pval[0][0] = 64'd1; in_pval[0][1] = 64'd2;
    dc[0] = 16'sd20; dc[3] = -16'sd20;
    #1;
    check("T7: VPB relaxation picks the least loaded cluster", ndisp(3) == 1 && n_vcopy == 2 &&
          n_vpb == 1 && n_bal == 0);
    take();

    // ---- T8: same imbalance, nothing predicted: only the mapping clusters compete
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 14, 18, 21);
    dc[0] = 16'sd20; dc[3] = -16'sd20;
    #1;
    check("T8: clusters 1/2 tie -> cluster 1", disp_v[1][0] && disp[1][0].kind == K_ALU &&
          disp_v[2][0] && disp[2][0].kind == K_COPY && n_copy == 1);
    take();

    // ---- T9: stalls
    group();
    in_v[0] = 1'b1; in_ins[0] = ins(OP_ADD, 20, 0, 1);   // needs a copy: 2 rob entries
    rob_free = 8'd1;
    #1;
    check("T9: reorder buffer full", in_acc == 2'b00 && disp_v == '0 && rob_v == '0 && fl_pop == '0);
    in_ins[0] = ins(OP_ADDI, 20, 0, -1);
    in_v = 2'b11; in_ins[1] = ins(OP_ADDI, 21, 20, -1);
    #1;
    check("T9: only the first of the group fits", in_acc == 2'b01 && rob_v == 6'b000001);
    rob_free = 8'd128; iq_free[0] = 6'd0;
    #1;
    check("T9: issue queue full", in_acc == 2'b00 && disp_v == '0);
    iq_free[0] = 6'd16; fl_count[0] = 7'd0;
    #1;
    check("T9: no free register", in_acc == 2'b00);
    in_v = '0;
    @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
