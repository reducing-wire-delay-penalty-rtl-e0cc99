// rename_steer: the rename/steer stage and the register map table.
//
// The map table has one entry per logical register with one field per cluster
// (valid bit + physical register) and the cluster that produces the current
// value. Every logical register always has at least one valid field. After
// reset logical register r is mapped in cluster r mod NCL to physical register
// r / NCL there, with value 0.
//
// Each cycle up to W decoded instructions arrive with their value predictions.
// W rename_slot instances are chained so that each instruction sees the map
// table, DCOUNT counters and resource use left by the ones before it; the
// first instruction that does not fit stops the group, and in_acc tells the
// front end which instructions were taken (always a prefix). The stage then
// gathers the operations per cluster (up to DISP_W each), the register-file
// updates per cluster (up to ALLOC_W each), the reorder-buffer entries in
// program order (up to 3 per instruction), the number of registers taken from
// each free list and the number of operations sent to each cluster for
// DCOUNT. The map table is updated at the clock edge. The stage takes one
// cycle; there is no recovery from wrong-path instructions because the front
// end is assumed to deliver the committed path (no branches are modelled).
module rename_steer
  import vpc_pkg::*;
#(
  parameter int W       = 8,    // instructions renamed per cycle (decode width)
  parameter int DISP_W  = 8,    // operations accepted by one cluster per cycle
  parameter int ALLOC_W = 8,    // registers allocated in one cluster per cycle
  parameter int T_BAL   = 32,   // DCOUNT threshold of steering rule 1
  parameter int T_VPB   = 16    // DCOUNT threshold of the VPB relaxation
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // instruction group
  input  logic     [W-1:0]                         in_v,
  input  instr_t   [W-1:0]                         in_ins,
  input  logic     [W-1:0][1:0][XLEN-1:0]          in_pval,
  input  logic     [W-1:0][1:0]                    in_pconf,
  output logic     [W-1:0]                         in_acc,
  // state of the rest of the core
  input  logic signed [NCL-1:0][DC_W-1:0]          dc,
  input  logic     [NCL-1:0][PREGS-1:0]            preg_ready,
  input  logic     [NCL-1:0][ALLOC_W-1:0][PREG_W-1:0] fl_head,
  input  logic     [NCL-1:0][PREG_W:0]             fl_count,
  input  logic     [NCL-1:0][5:0]                  iq_free,
  input  logic     [7:0]                           rob_free,
  input  logic     [ROB_W-1:0]                     rob_tail,
  // results
  output logic     [NCL-1:0][DISP_W-1:0]           disp_v,
  output disp_t    [NCL-1:0][DISP_W-1:0]           disp,
  output logic     [NCL-1:0][ALLOC_W-1:0]          upd_v,
  output prf_upd_t [NCL-1:0][ALLOC_W-1:0]          upd,
  output logic     [3*W-1:0]                       rob_v,
  output rob_ent_t [3*W-1:0]                       rob_ent,
  output logic     [NCL-1:0][$clog2(ALLOC_W+1)-1:0] fl_pop,
  output logic     [NCL-1:0][5:0]                  dc_disp,
  // statistics for this cycle
  output logic     [4:0]                           n_copy,
  output logic     [4:0]                           n_vcopy,
  output logic     [4:0]                           n_pred,
  output logic     [4:0]                           n_bal,
  output logic     [4:0]                           n_vpb,
  // architectural read-out (current producing mapping of a logical register)
  input  logic     [LREG_W-1:0]                    dbg_lreg,
  output logic     [CL_W-1:0]                      dbg_cl,
  output logic     [PREG_W-1:0]                    dbg_preg
);
  map_ent_t [NLOG-1:0] map_q;

  rn_state_t [W:0]                 st;
  logic      [W-1:0][2:0]          s_op_v;
  logic      [W-1:0][2:0][CL_W-1:0] s_op_cl;
  disp_t     [W-1:0][2:0]          s_op;
  rob_ent_t  [W-1:0][2:0]          s_rob;
  logic      [W-1:0][2:0]          s_upd_v;
  logic      [W-1:0][2:0][CL_W-1:0] s_upd_cl;
  prf_upd_t  [W-1:0][2:0]          s_upd;
  logic      [W-1:0][1:0]          s_copy, s_vcopy;
  logic      [W-1:0]               s_pred, s_bal, s_vpb;

  always_comb begin
    st[0]        = '0;
    st[0].map    = map_q;
    st[0].dc     = dc;
  end

  for (genvar k = 0; k < W; k++) begin : g_slot
    rename_slot #(.T_BAL(T_BAL), .T_VPB(T_VPB), .ALLOC_W(ALLOC_W), .DISP_W(DISP_W)) u_slot (
      .st_in(st[k]), .st_out(st[k+1]), .in_v(in_v[k]), .ins(in_ins[k]),
      .pval(in_pval[k]), .pconf(in_pconf[k]), .preg_ready(preg_ready), .fl_head(fl_head),
      .fl_count(fl_count), .iq_free(iq_free), .rob_free(rob_free), .rob_tail(rob_tail),
      .acc(in_acc[k]), .op_v(s_op_v[k]), .op_cl(s_op_cl[k]), .op(s_op[k]), .op_rob(s_rob[k]),
      .upd_v(s_upd_v[k]), .upd_cl(s_upd_cl[k]), .upd(s_upd[k]),
      .st_copy(s_copy[k]), .st_vcopy(s_vcopy[k]), .st_pred(s_pred[k]), .st_bal(s_bal[k]),
      .st_vpb(s_vpb[k])
    );
  end

  // gather per cluster and in program order
  always_comb begin
    int nd [NCL];
    int nu [NCL];
    int nr;
    disp_v  = '0;
    disp    = '0;
    upd_v   = '0;
    upd     = '0;
    rob_v   = '0;
    rob_ent = '0;
    nr      = 0;
    for (int c = 0; c < NCL; c++) begin
      nd[c] = 0;
      nu[c] = 0;
    end
    for (int k = 0; k < W; k++) begin
      for (int j = 0; j < 3; j++) begin
        if (s_op_v[k][j]) begin
          if (nd[s_op_cl[k][j]] < DISP_W) begin
            disp_v[s_op_cl[k][j]][nd[s_op_cl[k][j]]] = 1'b1;
            disp  [s_op_cl[k][j]][nd[s_op_cl[k][j]]] = s_op[k][j];
          end
          nd[s_op_cl[k][j]] += 1;
          if (nr < 3*W) begin
            rob_v[nr]   = 1'b1;
            rob_ent[nr] = s_rob[k][j];
          end
          nr += 1;
        end
        if (s_upd_v[k][j]) begin
          if (nu[s_upd_cl[k][j]] < ALLOC_W) begin
            upd_v[s_upd_cl[k][j]][nu[s_upd_cl[k][j]]] = 1'b1;
            upd  [s_upd_cl[k][j]][nu[s_upd_cl[k][j]]] = s_upd[k][j];
          end
          nu[s_upd_cl[k][j]] += 1;
        end
      end
    end
    for (int c = 0; c < NCL; c++) begin
      fl_pop[c]  = ($clog2(ALLOC_W+1))'(st[W].nalloc[c]);
      dc_disp[c] = st[W].ndisp[c];
    end
  end

  always_comb begin
    n_copy = '0; n_vcopy = '0; n_pred = '0; n_bal = '0; n_vpb = '0;
    for (int k = 0; k < W; k++) begin
      n_copy  += 5'(s_copy[k]);
      n_vcopy += 5'(s_vcopy[k]);
      n_pred  += 5'(s_pred[k]);
      n_bal   += 5'(s_bal[k]);
      n_vpb   += 5'(s_vpb[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NLOG; r++) begin
        map_q[r]                   <= '0;
        map_q[r].home              <= CL_W'(r % NCL);
        map_q[r].v[r % NCL]        <= 1'b1;
        map_q[r].p[r % NCL]        <= PREG_W'(r / NCL);
      end
    end else begin
      map_q <= st[W].map;
    end
  end

  assign dbg_cl   = map_q[dbg_lreg].home;
  assign dbg_preg = map_q[dbg_lreg].p[map_q[dbg_lreg].home];

endmodule
