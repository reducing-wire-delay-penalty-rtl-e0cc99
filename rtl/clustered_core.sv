// clustered_core: 4-cluster out-of-order integer core whose steering logic
// exploits value prediction to avoid inter-cluster communication.
//
// Dataflow: a group of up to W decoded instructions per cycle looks up the
// stride value predictor (one lookup per source operand) and enters the
// rename/steer stage, which picks a cluster per instruction with the VPB
// heuristic (DCOUNT balance counters plus the map table's per-cluster valid
// bits), renames it, and creates copies or verification-copies for operands
// that live in other clusters. Operations go to the four clusters and to the
// reorder buffer. Clusters execute out of order; values that must cross
// clusters travel over the pipelined inter-cluster network (B paths per
// destination, LAT cycles). The reorder buffer commits in order, returns
// registers to each cluster's free list and trains the value predictor with
// the committed operand values.
//
// Interface: in_v/in_ins is the decoded instruction group (the front end with
// fetch, branch prediction and caches is outside this model), in_acc tells
// which instructions were taken (a prefix). dbg_lreg/dbg_val read the current
// value of a logical register (architectural once rob_empty is high). The
// remaining outputs are per-cycle event counts for performance monitoring.
module clustered_core
  import vpc_pkg::*;
#(
  parameter int W          = 8,       // decode / rename / commit width
  parameter int IQN        = 16,      // issue-queue entries per cluster
  parameter int ISSUE_W    = 2,       // integer issue width per cluster
  parameter int LAT        = 1,       // inter-cluster latency (cycles)
  parameter int B          = 1,       // inter-cluster paths per destination cluster
  parameter int VP_ENTRIES = 131072,  // value predictor table entries
  parameter int T_BAL      = 32,      // DCOUNT threshold of steering rule 1
  parameter int T_VPB      = 16       // DCOUNT threshold of the VPB relaxation
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic   [W-1:0]          in_v,
  input  instr_t [W-1:0]          in_ins,
  output logic   [W-1:0]          in_acc,
  input  logic   [LREG_W-1:0]     dbg_lreg,
  output logic   [XLEN-1:0]       dbg_val,
  output logic                    rob_empty,
  output logic   [4:0]            ev_commit,   // operations committed
  output logic   [4:0]            ev_copy,     // copies created
  output logic   [4:0]            ev_vcopy,    // verification-copies created
  output logic   [4:0]            ev_pred,     // operands issued on a local prediction
  output logic   [4:0]            ev_bal,      // instructions steered by the balance rule
  output logic   [4:0]            ev_vpb,      // instructions steered with the VPB relaxation
  output logic   [4:0]            ev_sent,     // values sent over the network
  output logic   [6:0]            ev_reissue,  // operations reissued after a misprediction
  output logic   [5:0]            ev_nready,   // NREADY imbalance this cycle
  output logic   [DC_W-1:0]       ev_imbalance // DCOUNT imbalance
);
  localparam int AW   = 3 * W;            // reorder-buffer allocations per cycle
  localparam int NB   = ISSUE_W + B;
  localparam int NOM  = ISSUE_W;
  localparam int PW   = $clog2(W + 1);

  // ---- value predictor ---------------------------------------------------
  logic [2*W-1:0]           lk_v, lk_acc;
  logic [2*W-1:0][PC_W-1:0] lk_pc;
  logic [2*W-1:0]           lk_order;
  logic [2*W-1:0][XLEN-1:0] lk_val;
  logic [2*W-1:0]           lk_conf;
  logic [2*W-1:0]           up_v;
  logic [2*W-1:0][PC_W-1:0] up_pc;
  logic [2*W-1:0]           up_order;
  logic [2*W-1:0][XLEN-1:0] up_val;

  logic [W-1:0][1:0][XLEN-1:0] pval;
  logic [W-1:0][1:0]           pconf;

  always_comb begin
    for (int k = 0; k < W; k++)
      for (int s = 0; s < 2; s++) begin
        lk_v[2*k+s]     = in_v[k] && in_ins[k].src_v[s];
        lk_acc[2*k+s]   = in_acc[k] && in_ins[k].src_v[s];
        lk_pc[2*k+s]    = in_ins[k].pc;
        lk_order[2*k+s] = s[0];
        pval[k][s]      = lk_val[2*k+s];
        pconf[k][s]     = lk_conf[2*k+s];
      end
  end

  stride_vp #(.ENTRIES(VP_ENTRIES), .LOOKUPS(2*W), .UPDATES(2*W)) u_vp (
    .clk, .rst_n, .lk_v, .lk_pc, .lk_order, .lk_acc, .lk_val, .lk_conf,
    .up_v, .up_pc, .up_order, .up_val
  );

  // ---- DCOUNT -------------------------------------------------------------
  logic signed [NCL-1:0][DC_W-1:0] dc;
  logic [NCL-1:0][5:0]             dc_disp;
  logic [CL_W-1:0]                 dc_least;

  dcount #(.CNT_W(6)) u_dcount (
    .clk, .rst_n, .disp_cnt(dc_disp), .cnt(dc), .imbalance(ev_imbalance), .least(dc_least)
  );

  // ---- rename / steer ------------------------------------------------------
  logic     [NCL-1:0][PREGS-1:0]          preg_ready;
  logic     [NCL-1:0][W-1:0][PREG_W-1:0]  fl_head;
  logic     [NCL-1:0][PREG_W:0]           fl_count;
  logic     [NCL-1:0][5:0]                iq_free;
  logic     [7:0]                         rob_free;
  logic     [ROB_W-1:0]                   rob_tail;
  logic     [NCL-1:0][W-1:0]              disp_v;
  disp_t    [NCL-1:0][W-1:0]              disp;
  logic     [NCL-1:0][W-1:0]              upd_v;
  prf_upd_t [NCL-1:0][W-1:0]              upd;
  logic     [AW-1:0]                      rob_v;
  rob_ent_t [AW-1:0]                      rob_ent;
  logic     [NCL-1:0][PW-1:0]             fl_pop;
  logic     [CL_W-1:0]                    dbg_cl;
  logic     [PREG_W-1:0]                  dbg_preg;

  rename_steer #(.W(W), .DISP_W(W), .ALLOC_W(W), .T_BAL(T_BAL), .T_VPB(T_VPB)) u_rename (
    .clk, .rst_n, .in_v, .in_ins, .in_pval(pval), .in_pconf(pconf), .in_acc,
    .dc, .preg_ready, .fl_head, .fl_count, .iq_free, .rob_free, .rob_tail,
    .disp_v, .disp, .upd_v, .upd, .rob_v, .rob_ent, .fl_pop, .dc_disp,
    .n_copy(ev_copy), .n_vcopy(ev_vcopy), .n_pred(ev_pred), .n_bal(ev_bal), .n_vpb(ev_vpb),
    .dbg_lreg, .dbg_cl, .dbg_preg
  );

  // ---- reorder buffer ------------------------------------------------------
  done_t    [NCL-1:0][NB-1:0]             done;
  logic     [NCL-1:0][IQN-1:0]            undo_v;
  logic     [NCL-1:0][IQN-1:0][ROB_W-1:0] undo_rob;
  logic     [W-1:0]                       cm_v;
  logic     [W-1:0][ROB_W-1:0]            cm_rob;
  rob_ent_t [W-1:0]                       cm_ent;
  logic     [NCL-1:0][W-1:0]              rel_v;
  logic     [NCL-1:0][W-1:0][PREG_W-1:0]  rel_reg;

  rob #(.ENTRIES(ROBN), .ALLOC_W(AW), .RET_W(W), .DONE_P(NCL*NB), .UNDO_P(NCL*IQN)) u_rob (
    .clk, .rst_n, .alloc_v(rob_v), .alloc_ent(rob_ent), .tail(rob_tail), .free_cnt(rob_free),
    .done(done), .undo_v(undo_v), .undo_rob(undo_rob),
    .cm_v, .cm_rob, .cm_ent, .rel_v, .rel_reg, .empty(rob_empty)
  );

  always_comb begin
    ev_commit = '0;
    for (int k = 0; k < W; k++) ev_commit += 5'(cm_v[k]);
  end

  // ---- network ---------------------------------------------------------------
  xmsg_t [NCL-1:0][NOM-1:0] xreq;
  logic  [NCL-1:0][NOM-1:0] xgnt;
  xmsg_t [NCL-1:0][B-1:0]   xdlv;

  icn #(.LAT(LAT), .B(B), .NOM(NOM)) u_icn (
    .clk, .rst_n, .req(xreq), .gnt(xgnt), .dlv(xdlv), .n_sent(ev_sent)
  );

  // ---- clusters and their free lists -------------------------------------------
  logic [NCL-1:0][W-1:0][1:0][XLEN-1:0] cm_src;
  logic [NCL-1:0][XLEN-1:0]             dbg_vals;
  logic [NCL-1:0][4:0]                  n_ready, n_issued, n_reissue;

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    free_list #(.PREGS_N(PREGS), .FIRST_FREE(NLOG / NCL), .POP_W(W), .PUSH_W(W)) u_fl (
      .clk, .rst_n, .head(fl_head[c]), .count(fl_count[c]), .pop_cnt(fl_pop[c]),
      .push_v(rel_v[c]), .push_reg(rel_reg[c])
    );

    cluster #(.IQN(IQN), .ISSUE_W(ISSUE_W), .DISP_W(W), .UPD_W(W), .B(B), .NOM(NOM),
              .RET_W(W)) u_cl (
      .clk, .rst_n, .disp_v(disp_v[c]), .disp(disp[c]), .upd_v(upd_v[c]), .upd(upd[c]),
      .iq_free(iq_free[c]), .preg_ready(preg_ready[c]),
      .xreq(xreq[c]), .xgnt(xgnt[c]), .xdlv(xdlv[c]),
      .done(done[c]), .undo_v(undo_v[c]), .undo_rob(undo_rob[c]),
      .cm_v, .cm_rob, .cm_src(cm_src[c]),
      .dbg_preg, .dbg_val(dbg_vals[c]),
      .n_ready(n_ready[c]), .n_issued(n_issued[c]), .n_reissue(n_reissue[c])
    );
  end

  assign dbg_val = dbg_vals[dbg_cl];

  always_comb begin
    ev_reissue = '0;
    for (int c = 0; c < NCL; c++) ev_reissue += 7'(n_reissue[c]);
  end

  // predictor training with committed operand values
  always_comb begin
    for (int k = 0; k < W; k++)
      for (int s = 0; s < 2; s++) begin
        up_v[2*k+s]     = cm_v[k] && cm_ent[k].kind == K_ALU && cm_ent[k].src_used[s];
        up_pc[2*k+s]    = cm_ent[k].pc;
        up_order[2*k+s] = s[0];
        up_val[2*k+s]   = cm_src[cm_ent[k].cl][k][s];
      end
  end

  // ---- NREADY ---------------------------------------------------------------------
  logic [31:0] nready_sum;
  nready_monitor #(.ISSUE_W(ISSUE_W)) u_nready (
    .clk, .rst_n, .n_ready, .nready(ev_nready), .nready_sum
  );

endmodule
