// rename_slot: rename and steer one instruction of a rename group.
//
// Combinational. The slot receives the group state left by the earlier slots
// (map table, registers allocated so far in this group, DCOUNT counters,
// resource use), asks steer_select for a cluster, and then renames:
//   * a source mapped in the chosen cluster reads that register; if its value
//     is not available yet and the predictor is confident, the predicted value
//     is attached so the instruction can issue at once (the producer's result
//     later checks it inside the same cluster);
//   * a source not mapped in the chosen cluster gets a new register there and
//     the mapping is added to the map table; a copy is sent to the producing
//     cluster, or, when the predictor is confident, a verification-copy that
//     only sends the value if the prediction was wrong (the new register is
//     preloaded with the predicted value);
//   * a destination gets a new register in the chosen cluster, its mapping
//     replaces every field of the entry, and the old entry is kept in the
//     reorder buffer so its registers are freed when the instruction commits.
// Copies and verification-copies come first in program order, take a reorder
// buffer entry and an issue-queue entry each and count for DCOUNT like any
// instruction. If the slot does not fit in the free registers, queue entries,
// dispatch ports or reorder buffer, it and all later slots wait.
module rename_slot
  import vpc_pkg::*;
#(
  parameter int T_BAL   = 32,
  parameter int T_VPB   = 16,
  parameter int ALLOC_W = 8,
  parameter int DISP_W  = 8
) (
  input  rn_state_t                          st_in,
  output rn_state_t                          st_out,
  input  logic                               in_v,
  input  instr_t                             ins,
  input  logic [1:0][XLEN-1:0]               pval,
  input  logic [1:0]                         pconf,
  input  logic [NCL-1:0][PREGS-1:0]          preg_ready,
  input  logic [NCL-1:0][ALLOC_W-1:0][PREG_W-1:0] fl_head,
  input  logic [NCL-1:0][PREG_W:0]           fl_count,
  input  logic [NCL-1:0][5:0]                iq_free,
  input  logic [7:0]                         rob_free,
  input  logic [ROB_W-1:0]                   rob_tail,
  output logic                               acc,
  // up to three operations: comm for operand 0, comm for operand 1, the instruction
  output logic     [2:0]                     op_v,
  output logic     [2:0][CL_W-1:0]           op_cl,
  output disp_t    [2:0]                     op,
  output rob_ent_t [2:0]                     op_rob,
  // up to three register-file updates at dispatch
  output logic     [2:0]                     upd_v,
  output logic     [2:0][CL_W-1:0]           upd_cl,
  output prf_upd_t [2:0]                     upd,
  // statistics
  output logic [1:0]                         st_copy,      // copies generated
  output logic [1:0]                         st_vcopy,     // verification-copies generated
  output logic                               st_pred,      // operands issued with a local prediction
  output logic                               st_bal,       // steering rule 1 used
  output logic                               st_vpb        // VPB relaxation active
);
  // ---- steering inputs from the incoming state ----------------------------
  logic [1:0]           s_used, s_avail;
  logic [1:0][NCL-1:0]  s_mapped;
  logic [1:0][CL_W-1:0] s_home;
  logic [CL_W-1:0]      cl;
  logic                 r_bal, r_vpb;
  logic                 r_pend;  // reported by steer_select, not needed here

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      map_ent_t e;
      logic [PREG_W-1:0] hp;
      e           = st_in.map[ins.src[s]];
      hp          = e.p[e.home];
      s_used[s]   = ins.src_v[s];
      s_mapped[s] = e.v;
      s_home[s]   = e.home;
      s_avail[s]  = !st_in.fresh[e.home][hp] && preg_ready[e.home][hp];
    end
  end

  steer_select #(.T_BAL(T_BAL), .T_VPB(T_VPB)) u_steer (
    .dc(st_in.dc), .op_used(s_used), .op_mapped(s_mapped), .op_avail(s_avail),
    .op_home(s_home), .op_pred(pconf), .cl(cl), .rule_bal(r_bal), .rule_pend(r_pend),
    .vpb_on(r_vpb)
  );

  // ---- rename ----------------------------------------------------------
  always_comb begin
    rn_state_t t;
    logic ok;
    map_ent_t e;
    logic [PREG_W-1:0] tg, np, sp, dp;
    logic here;
    logic [CL_W-1:0] h;

    t      = st_in;
    st_out = st_in;
    ok     = 1'b0;
    e      = '0;
    tg     = '0; np = '0; sp = '0; dp = '0;
    here   = 1'b0;
    h      = '0;
    op_v   = '0;
    op_cl  = '0;
    op     = '0;
    op_rob = '0;
    upd_v  = '0;
    upd_cl = '0;
    upd    = '0;
    st_copy = '0; st_vcopy = '0; st_pred = 1'b0;
    st_bal  = 1'b0; st_vpb   = 1'b0;
    acc     = 1'b0;

    // main operation skeleton
    op[2].kind = K_ALU;
    op[2].op   = ins.op;
    op[2].imm  = ins.imm;
    op[2].dst_cl = cl;

    for (int s = 0; s < 2; s++) begin
      if (ins.src_v[s]) begin
        e = t.map[ins.src[s]];
        if (e.v[cl]) begin
          tg   = e.p[cl];
          here = !t.fresh[cl][tg] && preg_ready[cl][tg];
          op[2].src[s].used  = 1'b1;
          op[2].src[s].tag   = tg;
          op[2].src[s].fresh = t.fresh[cl][tg];
          if (!here && pconf[s]) begin
            op[2].src[s].has_val = 1'b1;
            op[2].src[s].val     = pval[s];
            st_pred = 1'b1;
          end
        end else begin
          np = (t.nalloc[cl] < 6'(ALLOC_W)) ? fl_head[cl][t.nalloc[cl][$clog2(ALLOC_W)-1:0]] : '0;
          t.nalloc[cl] += 6'd1;
          h  = e.home;
          sp = e.p[h];
          // communication operation, dispatched to the producing cluster
          op_v[s]          = 1'b1;
          op_cl[s]         = h;
          op[s].kind       = pconf[s] ? K_VCOPY : K_COPY;
          op[s].op         = OP_ADD;
          op[s].rob        = rob_tail + ROB_W'(t.nrob);
          op[s].dst_v      = 1'b1;
          op[s].dst_cl     = cl;
          op[s].dst        = np;
          op[s].pval       = pval[s];
          op[s].src[0].used  = 1'b1;
          op[s].src[0].tag   = sp;
          op[s].src[0].fresh = t.fresh[h][sp];
          op_rob[s].kind   = op[s].kind;
          op_rob[s].cl     = h;
          op_rob[s].pc     = ins.pc;
          t.nrob          += 6'd1;
          t.ndisp[h]      += 6'd1;
          for (int c = 0; c < NCL; c++)
            t.dc[c] = (CL_W'(c) == h) ? t.dc[c] + DC_W'(NCL - 1) : t.dc[c] - DC_W'(1);
          // the new register in the chosen cluster
          upd_v[s]        = 1'b1;
          upd_cl[s]       = cl;
          upd[s].v        = 1'b1;
          upd[s].preload  = pconf[s];
          upd[s].tag      = np;
          upd[s].val      = pval[s];
          op[2].src[s].used    = 1'b1;
          op[2].src[s].tag     = np;
          op[2].src[s].fresh   = 1'b1;
          op[2].src[s].has_val = pconf[s];
          op[2].src[s].val     = pval[s];
          if (pconf[s]) st_vcopy += 2'd1; else st_copy += 2'd1;
          t.map[ins.src[s]].v[cl] = 1'b1;
          t.map[ins.src[s]].p[cl] = np;
          t.fresh[cl][np]         = 1'b1;
        end
      end
    end

    // the instruction itself
    op_v[2]   = 1'b1;
    op_cl[2]  = cl;
    op[2].rob = rob_tail + ROB_W'(t.nrob);
    op_rob[2].kind     = K_ALU;
    op_rob[2].cl       = cl;
    op_rob[2].pc       = ins.pc;
    op_rob[2].src_used = ins.src_v;
    t.nrob     += 6'd1;
    t.ndisp[cl] += 6'd1;
    for (int c = 0; c < NCL; c++)
      t.dc[c] = (CL_W'(c) == cl) ? t.dc[c] + DC_W'(NCL - 1) : t.dc[c] - DC_W'(1);

    if (ins.dst_v) begin
      dp = (t.nalloc[cl] < 6'(ALLOC_W)) ? fl_head[cl][t.nalloc[cl][$clog2(ALLOC_W)-1:0]] : '0;
      t.nalloc[cl] += 6'd1;
      op[2].dst_v   = 1'b1;
      op[2].dst     = dp;
      op_rob[2].free_v = 1'b1;
      op_rob[2].old    = t.map[ins.dst];
      t.map[ins.dst].v       = '0;
      t.map[ins.dst].v[cl]   = 1'b1;
      t.map[ins.dst].p[cl]   = dp;
      t.map[ins.dst].home    = cl;
      t.fresh[cl][dp]        = 1'b1;
      upd_v[2]       = 1'b1;
      upd_cl[2]      = cl;
      upd[2].v       = 1'b1;
      upd[2].preload = 1'b0;
      upd[2].tag     = dp;
    end

    // does it fit?
    ok = in_v && !st_in.stop && (8'(t.nrob) <= rob_free);
    for (int c = 0; c < NCL; c++) begin
      if (t.nalloc[c] > 6'(ALLOC_W) || 7'(t.nalloc[c]) > fl_count[c]) ok = 1'b0;
      if (t.ndisp[c] > 6'(DISP_W) || t.ndisp[c] > iq_free[c]) ok = 1'b0;
    end

    if (ok) begin
      acc      = 1'b1;
      st_out   = t;
      st_bal   = r_bal;
      st_vpb   = r_vpb;
    end else begin
      st_out      = st_in;
      st_out.stop = 1'b1;
      op_v  = '0;
      upd_v = '0;
      st_copy = '0; st_vcopy = '0; st_pred = 1'b0;
    end
  end

endmodule
