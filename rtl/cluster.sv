// cluster: one execution cluster of the clustered core.
//
// Contents: an IQN-entry issue queue holding operand values (data capture), a
// PREGS-entry physical register file with ready bits, ISSUE_W single-cycle
// integer units and the local bypass. Three kinds of operation live in the
// queue: normal ALU instructions, copies (read a local register and send it to
// another cluster) and verification-copies (compare a local register with the
// value another cluster predicted for it and send the real value only when
// they differ, or when an earlier issue of the same operation already sent
// one). Copies and verification-copies use issue slots like any instruction
// and may only issue when the network grants them a path.
//
// Timing: an operation selected in cycle t reads its operands (queue contents,
// or a result broadcast in the same cycle through the local bypass), executes,
// and its result is broadcast and written in cycle t+1, so a dependent local
// instruction can execute in t+1. Values arriving from the network are written
// and broadcast in the cycle they are delivered.
//
// Value speculation and selective reissue: an operand may hold a predicted
// value. Every operand keeps watching its register tag while the operation is
// in the queue; a broadcast with a different value replaces the operand and,
// if the operation had already issued, makes it issue again and sends an
// "undone" request for its reorder-buffer entry. Only the operations that used
// a wrong value reissue, and their new results cascade the same way. A
// prediction that matches costs nothing. Operations therefore stay in the
// queue until they commit (the commit ports free them by reorder-buffer
// index); this, the position-priority select (lowest queue index first) and
// the data-capture organisation are this implementation's choices. The design
// gives the queue and register-file sizes, the issue width, the 0-cycle local
// bypass and the rule that communications use issue width and queue entries.
module cluster
  import vpc_pkg::*;
#(
  parameter int IQN     = 16,   // issue-queue entries (4-cluster configuration)
  parameter int ISSUE_W = 2,    // integer issue width per cluster
  parameter int DISP_W  = 8,    // operations accepted per cycle
  parameter int UPD_W   = 8,    // dispatch-time register-file updates per cycle
  parameter int B       = 1,    // network deliveries per cycle (write ports)
  parameter int NOM     = 2,    // messages offered to the network per cycle
  parameter int RET_W   = 8     // commit ports
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // dispatch
  input  logic     [DISP_W-1:0]              disp_v,
  input  disp_t    [DISP_W-1:0]              disp,
  input  logic     [UPD_W-1:0]               upd_v,
  input  prf_upd_t [UPD_W-1:0]               upd,
  output logic     [5:0]                     iq_free,
  output logic     [PREGS-1:0]               preg_ready,
  // network
  output xmsg_t    [NOM-1:0]                 xreq,
  input  logic     [NOM-1:0]                 xgnt,
  input  xmsg_t    [B-1:0]                   xdlv,
  // completion
  output done_t    [ISSUE_W+B-1:0]           done,
  output logic     [IQN-1:0]                 undo_v,
  output logic     [IQN-1:0][ROB_W-1:0]      undo_rob,
  // commit
  input  logic     [RET_W-1:0]               cm_v,
  input  logic     [RET_W-1:0][ROB_W-1:0]    cm_rob,
  output logic     [RET_W-1:0][1:0][XLEN-1:0] cm_src,   // operand values of committing entries
  // architectural read-out and statistics
  input  logic     [PREG_W-1:0]              dbg_preg,
  output logic     [XLEN-1:0]                dbg_val,
  output logic     [4:0]                     n_ready,    // ready instructions waiting to issue
  output logic     [4:0]                     n_issued,   // operations issued this cycle
  output logic     [4:0]                     n_reissue   // issued operations whose operand changed
);
  localparam int NB = ISSUE_W + B;   // result broadcasts per cycle

  typedef struct packed {
    logic             used;
    logic [PREG_W-1:0] tag;
    logic             have;
    logic [XLEN-1:0]  val;
  } iq_src_t;

  typedef struct packed {
    op_kind_e          kind;
    alu_op_e           op;
    logic [IMM_W-1:0]  imm;
    logic [ROB_W-1:0]  rob;
    logic              dst_v;
    logic [CL_W-1:0]   dst_cl;
    logic [PREG_W-1:0] dst;
    logic [XLEN-1:0]   pval;
    iq_src_t [1:0]     src;
    logic              issued;
    logic              sent;
    logic [GEN_W-1:0]  gen;
  } iq_ent_t;

  iq_ent_t [IQN-1:0]   iq_q;
  logic    [IQN-1:0]   iqv_q;
  logic [XLEN-1:0]     rf_q [PREGS];
  logic [PREGS-1:0]    rdy_q;
  bcast_t  [ISSUE_W-1:0] wb_q;
  done_t   [ISSUE_W-1:0] wbd_q;

  // ---- broadcasts of this cycle -----------------------------------------
  bcast_t [NB-1:0] bc;
  always_comb begin
    for (int i = 0; i < ISSUE_W; i++) bc[i] = wb_q[i];
    for (int j = 0; j < B; j++) begin
      bc[ISSUE_W+j].v   = xdlv[j].v;
      bc[ISSUE_W+j].tag = xdlv[j].tag;
      bc[ISSUE_W+j].val = xdlv[j].val;
    end
  end

  assign preg_ready = rdy_q;
  assign dbg_val    = rf_q[dbg_preg];

  // ---- effective operands, change detection, readiness ------------------
  iq_src_t [IQN-1:0][1:0] eff;
  logic    [IQN-1:0]      chg, rdy, needs_send;
  logic    [IQN-1:0][GEN_W-1:0] gen_nx;

  always_comb begin
    for (int e = 0; e < IQN; e++) begin
      logic ch;
      ch = 1'b0;
      for (int s = 0; s < 2; s++) begin
        eff[e][s] = iq_q[e].src[s];
        if (!iq_q[e].src[s].used) eff[e][s].have = 1'b1;
        for (int b = 0; b < NB; b++) begin
          if (iq_q[e].src[s].used && bc[b].v && bc[b].tag == iq_q[e].src[s].tag) begin
            if (iq_q[e].src[s].have && bc[b].val != iq_q[e].src[s].val) ch = 1'b1;
            eff[e][s].have = 1'b1;
            eff[e][s].val  = bc[b].val;
          end
        end
      end
      chg[e]        = iqv_q[e] && iq_q[e].issued && ch;
      gen_nx[e]     = chg[e] ? iq_q[e].gen + GEN_W'(1) : iq_q[e].gen;
      rdy[e]        = iqv_q[e] && (!iq_q[e].issued || chg[e]) && eff[e][0].have && eff[e][1].have;
      needs_send[e] = (iq_q[e].kind == K_COPY) ||
                      (iq_q[e].kind == K_VCOPY && (iq_q[e].sent || eff[e][0].val != iq_q[e].pval));
    end
  end

  assign undo_v = chg;
  always_comb for (int e = 0; e < IQN; e++) undo_rob[e] = iq_q[e].rob;

  // ---- network requests: first NOM ready operations that must send -------
  logic [NOM-1:0][$clog2(IQN)-1:0] nom_ix;
  always_comb begin
    int n;
    n      = 0;
    xreq   = '0;
    nom_ix = '0;
    for (int e = 0; e < IQN; e++) begin
      if (rdy[e] && needs_send[e] && n < NOM) begin
        xreq[n].v      = 1'b1;
        xreq[n].dst_cl = iq_q[e].dst_cl;
        xreq[n].tag    = iq_q[e].dst;
        xreq[n].val    = eff[e][0].val;
        xreq[n].rob    = iq_q[e].rob;
        xreq[n].gen    = gen_nx[e];
        nom_ix[n]      = ($clog2(IQN))'(e);
        n = n + 1;
      end
    end
  end

  // ---- select: granted sends first, then others by queue position --------
  logic [IQN-1:0] sel;
  always_comb begin
    int n;
    n   = 0;
    sel = '0;
    for (int k = 0; k < NOM; k++)
      if (xgnt[k] && n < ISSUE_W) begin
        sel[nom_ix[k]] = 1'b1;
        n = n + 1;
      end
    for (int e = 0; e < IQN; e++)
      if (rdy[e] && !needs_send[e] && n < ISSUE_W) begin
        sel[e] = 1'b1;
        n = n + 1;
      end
  end

  // results of the selected operations for the write-back stage
  bcast_t [ISSUE_W-1:0] wb_d;
  done_t  [ISSUE_W-1:0] wbd_d;
  always_comb begin
    int n;
    n     = 0;
    wb_d  = '0;
    wbd_d = '0;
    for (int e = 0; e < IQN; e++) begin
      if (sel[e] && !needs_send[e] && n < ISSUE_W) begin
        wbd_d[n].v   = 1'b1;
        wbd_d[n].rob = iq_q[e].rob;
        wbd_d[n].gen = gen_nx[e];
        if (iq_q[e].kind == K_ALU && iq_q[e].dst_v) begin
          wb_d[n].v   = 1'b1;
          wb_d[n].tag = iq_q[e].dst;
          wb_d[n].val = alu_exec(iq_q[e].op, eff[e][0].val, eff[e][1].val, iq_q[e].imm);
        end
        n = n + 1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < ISSUE_W; i++) done[i] = wbd_q[i];
    for (int j = 0; j < B; j++) begin
      done[ISSUE_W+j].v   = xdlv[j].v;
      done[ISSUE_W+j].rob = xdlv[j].rob;
      done[ISSUE_W+j].gen = xdlv[j].gen;
    end
  end

  // ---- dispatch slot assignment -----------------------------------------
  logic [DISP_W-1:0][$clog2(IQN)-1:0] dslot;
  logic [DISP_W-1:0]                  dslot_ok;
  always_comb begin
    int n;
    n        = 0;
    dslot    = '0;
    dslot_ok = '0;
    for (int e = 0; e < IQN; e++) begin
      if (!iqv_q[e] && n < DISP_W) begin
        dslot[n]    = ($clog2(IQN))'(e);
        dslot_ok[n] = 1'b1;
        n = n + 1;
      end
    end
  end

  always_comb begin
    int n;
    n = 0;
    for (int e = 0; e < IQN; e++) n += int'(!iqv_q[e]);
    iq_free = 6'(n);
  end

  // operand capture at dispatch
  function automatic iq_src_t capture(input opnd_t o, input bcast_t [NB-1:0] b,
                                      input logic [UPD_W-1:0] uv, input prf_upd_t [UPD_W-1:0] u,
                                      input logic rdy_bit, input logic [XLEN-1:0] rf_val);
    iq_src_t r;
    logic found;
    r.used = o.used;
    r.tag  = o.tag;
    r.have = !o.used;
    r.val  = '0;
    found  = 1'b0;
    if (o.used) begin
      for (int i = 0; i < NB; i++)
        if (b[i].v && b[i].tag == o.tag) begin
          r.have = 1'b1;
          r.val  = b[i].val;
          found  = 1'b1;
        end
      if (!found && o.fresh) begin
        for (int i = 0; i < UPD_W; i++)
          if (uv[i] && u[i].preload && u[i].tag == o.tag) begin
            r.have = 1'b1;
            r.val  = u[i].val;
            found  = 1'b1;
          end
      end else if (!found && rdy_bit) begin
        r.have = 1'b1;
        r.val  = rf_val;
        found  = 1'b1;
      end
      if (!found && o.has_val) begin
        r.have = 1'b1;
        r.val  = o.val;
      end
    end
    return r;
  endfunction

  // ---- state update ------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iqv_q <= '0;
      iq_q  <= '0;
      wb_q  <= '0;
      wbd_q <= '0;
      rdy_q <= '1;
      for (int r = 0; r < PREGS; r++) rf_q[r] <= '0;
    end else begin
      wb_q  <= wb_d;
      wbd_q <= wbd_d;
      // queue entries: capture broadcasts, issue, reissue
      for (int e = 0; e < IQN; e++) begin
        if (iqv_q[e]) begin
          iq_q[e].src[0] <= eff[e][0];
          iq_q[e].src[1] <= eff[e][1];
          iq_q[e].gen    <= gen_nx[e];
          if (sel[e]) begin
            iq_q[e].issued <= 1'b1;
            if (needs_send[e]) iq_q[e].sent <= 1'b1;
          end else if (chg[e]) begin
            iq_q[e].issued <= 1'b0;
          end
        end
      end
      // commit frees entries
      for (int k = 0; k < RET_W; k++)
        for (int e = 0; e < IQN; e++)
          if (cm_v[k] && iqv_q[e] && iq_q[e].rob == cm_rob[k]) iqv_q[e] <= 1'b0;
      // new entries
      for (int i = 0; i < DISP_W; i++) begin
        if (disp_v[i] && dslot_ok[i]) begin
          iqv_q[dslot[i]]         <= 1'b1;
          iq_q[dslot[i]].kind     <= disp[i].kind;
          iq_q[dslot[i]].op       <= disp[i].op;
          iq_q[dslot[i]].imm      <= disp[i].imm;
          iq_q[dslot[i]].rob      <= disp[i].rob;
          iq_q[dslot[i]].dst_v    <= disp[i].dst_v;
          iq_q[dslot[i]].dst_cl   <= disp[i].dst_cl;
          iq_q[dslot[i]].dst      <= disp[i].dst;
          iq_q[dslot[i]].pval     <= disp[i].pval;
          iq_q[dslot[i]].issued   <= 1'b0;
          iq_q[dslot[i]].sent     <= 1'b0;
          iq_q[dslot[i]].gen      <= '0;
          for (int s = 0; s < 2; s++)
            iq_q[dslot[i]].src[s] <= capture(disp[i].src[s], bc, upd_v, upd,
                                             rdy_q[disp[i].src[s].tag], rf_q[disp[i].src[s].tag]);
        end
      end
      // register file: broadcasts, then dispatch-time updates
      for (int b = 0; b < NB; b++)
        if (bc[b].v) begin
          rf_q[bc[b].tag]  <= bc[b].val;
          rdy_q[bc[b].tag] <= 1'b1;
        end
      for (int i = 0; i < UPD_W; i++)
        if (upd_v[i]) begin
          rdy_q[upd[i].tag] <= upd[i].preload;
          if (upd[i].preload) rf_q[upd[i].tag] <= upd[i].val;
        end
    end
  end

  // operand values of committing entries (predictor training)
  always_comb begin
    cm_src = '0;
    for (int k = 0; k < RET_W; k++)
      for (int e = 0; e < IQN; e++)
        if (cm_v[k] && iqv_q[e] && iq_q[e].rob == cm_rob[k]) begin
          cm_src[k][0] = iq_q[e].src[0].val;
          cm_src[k][1] = iq_q[e].src[1].val;
        end
  end

  // statistics
  always_comb begin
    n_ready = '0; n_issued = '0; n_reissue = '0;
    for (int e = 0; e < IQN; e++) begin
      n_ready   += 5'(rdy[e] && iq_q[e].kind == K_ALU);
      n_issued  += 5'(sel[e]);
      n_reissue += 5'(chg[e]);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (disp_v & ~dslot_ok) == '0)
    else $error("cluster: dispatch into a full issue queue");

endmodule
