// stride_vp: stride value predictor for source operands.
//
// One table entry per (PC, operand order) pair holds the last value, the last
// observed stride and a 2-bit saturating confidence counter; a lookup returns
// last + stride and is confident when the counter is above 1. These fields
// and the confidence rule follow the design. Index = {PC word address,
// operand order} modulo ENTRIES.
//
// The table is updated at decode time, as the design asks, but the real value
// of an operand is only known later, so this implementation splits the update:
//   * at decode, every looked-up operand of an accepted instruction advances
//     the speculative last value by one stride and counts one more instance in
//     flight; several lookups of the same entry in one group predict
//     last + 1*stride, last + 2*stride, ... in program order;
//   * at commit, the actual value trains the entry: it is compared with the
//     committed last value plus the stride (counter +1 on a hit, -1 on a
//     miss); on a miss the stride becomes value - committed last value. The
//     speculative last value is then rebuilt as value + (instances still in
//     flight) x stride, which on a hit leaves it unchanged, and the committed
//     last value becomes the value.
// An entry that has never committed a value has no prediction; its first
// commit sets stride 0 and counter 0.
//
// Interface: LOOKUPS combinational read ports (prediction in the same cycle),
// lk_v marks looked-up operands, lk_acc those whose instruction was accepted
// (a subset of lk_v, taken at the clock edge). UPDATES commit ports. All
// updates of one cycle are applied in order: commits first, then decode
// advances, each seeing the earlier ones.
module stride_vp
  import vpc_pkg::*;
#(
  parameter int ENTRIES = 131072,  // 128K-entry table of the main experiments
  parameter int LOOKUPS = 16,      // 8 instructions x 2 operands per cycle
  parameter int UPDATES = 16       // 8 commits x 2 operands per cycle
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // lookup at decode
  input  logic [LOOKUPS-1:0]           lk_v,
  input  logic [LOOKUPS-1:0][PC_W-1:0] lk_pc,
  input  logic [LOOKUPS-1:0]           lk_order,   // 0: left operand, 1: right operand
  input  logic [LOOKUPS-1:0]           lk_acc,
  output logic [LOOKUPS-1:0][XLEN-1:0] lk_val,
  output logic [LOOKUPS-1:0]           lk_conf,
  // training at commit
  input  logic [UPDATES-1:0]           up_v,
  input  logic [UPDATES-1:0][PC_W-1:0] up_pc,
  input  logic [UPDATES-1:0]           up_order,
  input  logic [UPDATES-1:0][XLEN-1:0] up_val
);
  localparam int IDX_W = $clog2(ENTRIES);
  localparam int NEV   = UPDATES + LOOKUPS;

  typedef struct packed {
    logic [XLEN-1:0] last;     // speculative last value (advanced at decode)
    logic [XLEN-1:0] clast;    // last committed value
    logic [XLEN-1:0] stride;
    logic [1:0]      conf;
    logic [7:0]      infl;     // instances decoded but not yet committed
  } vp_ent_t;

  vp_ent_t            table_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;   // entry has committed a value
  logic [ENTRIES-1:0] seen_q;    // entry has been touched since reset (infl is meaningful)

  function automatic logic [IDX_W-1:0] index_of(input logic [PC_W-1:0] pc, input logic order);
    logic [PC_W-2:0] raw;
    raw = {pc[PC_W-1:2], order};
    return IDX_W'(raw % (PC_W-1)'(ENTRIES));
  endfunction

  // ---- lookups --------------------------------------------------------------
  logic [LOOKUPS-1:0][IDX_W-1:0] lk_ix;
  always_comb begin
    for (int l = 0; l < LOOKUPS; l++) begin
      logic [4:0] m;
      lk_ix[l] = index_of(lk_pc[l], lk_order[l]);
      m = 5'd1;
      for (int e = 0; e < l; e++)
        if (lk_v[e] && lk_ix[e] == lk_ix[l]) m += 5'd1;
      lk_val[l]  = table_q[lk_ix[l]].last + XLEN'(m) * table_q[lk_ix[l]].stride;
      lk_conf[l] = valid_q[lk_ix[l]] && (table_q[lk_ix[l]].conf > 2'd1);
    end
  end

  // ---- updates: commit events then decode events, chained ------------------
  logic    [NEV-1:0]            ev_v, ev_valid;
  logic    [NEV-1:0][IDX_W-1:0] ev_ix;
  vp_ent_t [NEV-1:0]            ev_new;

  always_comb begin
    for (int u = 0; u < NEV; u++) begin
      vp_ent_t cur;
      logic    cur_v;
      if (u < UPDATES) begin
        ev_v[u]  = up_v[u];
        ev_ix[u] = index_of(up_pc[u], up_order[u]);
      end else begin
        ev_v[u]  = lk_acc[u-UPDATES];
        ev_ix[u] = lk_ix[u-UPDATES];
      end
      cur   = table_q[ev_ix[u]];
      cur_v = valid_q[ev_ix[u]];
      if (!seen_q[ev_ix[u]]) cur.infl = 8'd0;
      for (int e = 0; e < u; e++)
        if (ev_v[e] && ev_ix[e] == ev_ix[u]) begin
          cur   = ev_new[e];
          cur_v = ev_valid[e];
        end
      ev_new[u]   = cur;
      ev_valid[u] = cur_v;
      if (u < UPDATES) begin
        logic [XLEN-1:0] v;
        logic [7:0]      rem;
        v   = up_val[u];
        rem = (cur.infl == 8'd0) ? 8'd0 : cur.infl - 8'd1;
        ev_new[u].infl  = rem;
        ev_new[u].clast = v;
        ev_valid[u]     = 1'b1;
        if (!cur_v) begin
          ev_new[u].stride = '0;
          ev_new[u].conf   = 2'd0;
        end else if (v == cur.clast + cur.stride) begin
          ev_new[u].conf   = (cur.conf == 2'd3) ? 2'd3 : cur.conf + 2'd1;
        end else begin
          ev_new[u].conf   = (cur.conf == 2'd0) ? 2'd0 : cur.conf - 2'd1;
          ev_new[u].stride = v - cur.clast;
        end
        ev_new[u].last = v + XLEN'(rem) * ev_new[u].stride;
      end else begin
        ev_new[u].infl = (cur.infl == 8'hff) ? 8'hff : cur.infl + 8'd1;
        ev_new[u].last = cur.last + cur.stride;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      seen_q  <= '0;
    end else begin
      for (int u = 0; u < UPDATES; u++)
        if (up_v[u]) valid_q[ev_ix[u]] <= 1'b1;
      for (int u = 0; u < NEV; u++)
        if (ev_v[u]) seen_q[ev_ix[u]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int u = 0; u < NEV; u++)
      if (ev_v[u]) table_q[ev_ix[u]] <= ev_new[u];
  end

endmodule
