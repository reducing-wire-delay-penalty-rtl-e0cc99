// rob: reorder buffer.
//
// Holds every operation in program order: instructions and the copies and
// verification-copies that the rename stage inserts for them. Up to ALLOC_W
// entries are written at the tail per cycle (a prefix of alloc_v) and up to
// RET_W entries leave from the head per cycle, in order, once they are done.
// When an instruction with a destination commits, every physical register of
// the map-table entry it replaced is returned to the free list of its cluster.
//
// Completion is not final: an operation that has to reissue because an operand
// changed (a value misprediction was corrected) sends an "undone" request,
// which clears its done bit and advances the entry's generation number. A done
// report carries the generation of the issue that produced it and is ignored
// when that generation is no longer current, so a late message from an earlier
// issue cannot mark the entry done. Done reports of one cycle are applied
// before undone requests of the same cycle.
//
// The design specifies the 128-entry size and that copies are placed in the
// reorder buffer like normal instructions; the done/undone protocol is this
// implementation's way of making selective reissue safe at commit.
module rob
  import vpc_pkg::*;
#(
  parameter int ENTRIES = ROBN,   // 128
  parameter int ALLOC_W = 24,     // 8 instructions x up to 3 operations
  parameter int RET_W   = 8,      // commit width
  parameter int DONE_P  = 12,     // done report ports
  parameter int UNDO_P  = 64      // undone request ports
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // allocation
  input  logic     [ALLOC_W-1:0]             alloc_v,
  input  rob_ent_t [ALLOC_W-1:0]             alloc_ent,
  output logic     [ROB_W-1:0]               tail,
  output logic     [7:0]                     free_cnt,
  // completion
  input  done_t    [DONE_P-1:0]              done,
  input  logic     [UNDO_P-1:0]              undo_v,
  input  logic     [UNDO_P-1:0][ROB_W-1:0]   undo_rob,
  // commit
  output logic     [RET_W-1:0]               cm_v,
  output logic     [RET_W-1:0][ROB_W-1:0]    cm_rob,
  output rob_ent_t [RET_W-1:0]               cm_ent,
  // registers returned to the free lists: [cluster][commit port]
  output logic     [NCL-1:0][RET_W-1:0]      rel_v,
  output logic     [NCL-1:0][RET_W-1:0][PREG_W-1:0] rel_reg,
  output logic                               empty
);
  rob_ent_t               ent_q  [ENTRIES];
  logic [ENTRIES-1:0]     val_q, done_q;
  logic [GEN_W-1:0]       gen_q  [ENTRIES];
  logic [ROB_W-1:0]       head_q, tail_q;
  logic [7:0]             cnt_q;

  function automatic logic [ROB_W-1:0] wrap(input int unsigned x);
    return ROB_W'(x % ENTRIES);
  endfunction

  assign tail     = tail_q;
  assign free_cnt = 8'(ENTRIES) - cnt_q;
  assign empty    = (cnt_q == 8'd0);

  // commit selection: leading run of done entries
  always_comb begin
    logic go;
    go      = 1'b1;
    cm_v    = '0;
    cm_rob  = '0;
    cm_ent  = '0;
    rel_v   = '0;
    rel_reg = '0;
    for (int k = 0; k < RET_W; k++) begin
      logic [ROB_W-1:0] ix;
      ix = wrap(int'(head_q) + k);
      if (go && val_q[ix] && done_q[ix]) begin
        cm_v[k]   = 1'b1;
        cm_rob[k] = ix;
        cm_ent[k] = ent_q[ix];
        if (ent_q[ix].free_v) begin
          for (int c = 0; c < NCL; c++) begin
            rel_v[c][k]   = ent_q[ix].old.v[c];
            rel_reg[c][k] = ent_q[ix].old.p[c];
          end
        end
      end else begin
        go = 1'b0;
      end
    end
  end

  logic [7:0] n_alloc, n_cm;
  always_comb begin
    n_alloc = '0;
    n_cm    = '0;
    for (int i = 0; i < ALLOC_W; i++) n_alloc += 8'(alloc_v[i]);
    for (int k = 0; k < RET_W; k++)   n_cm    += 8'(cm_v[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val_q  <= '0;
      done_q <= '0;
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      for (int i = 0; i < ENTRIES; i++) gen_q[i] <= '0;
    end else begin
      for (int d = 0; d < DONE_P; d++)
        if (done[d].v && val_q[done[d].rob] && gen_q[done[d].rob] == done[d].gen)
          done_q[done[d].rob] <= 1'b1;
      for (int u = 0; u < UNDO_P; u++)
        if (undo_v[u]) begin
          done_q[undo_rob[u]] <= 1'b0;
          gen_q[undo_rob[u]]  <= gen_q[undo_rob[u]] + GEN_W'(1);
        end
      for (int k = 0; k < RET_W; k++)
        if (cm_v[k]) val_q[cm_rob[k]] <= 1'b0;
      for (int i = 0; i < ALLOC_W; i++)
        if (alloc_v[i]) begin
          val_q [wrap(int'(tail_q) + i)] <= 1'b1;
          done_q[wrap(int'(tail_q) + i)] <= 1'b0;
          gen_q [wrap(int'(tail_q) + i)] <= '0;
        end
      head_q <= wrap(int'(head_q) + int'(n_cm));
      tail_q <= wrap(int'(tail_q) + int'(n_alloc));
      cnt_q  <= cnt_q + n_alloc - n_cm;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < ALLOC_W; i++)
      if (alloc_v[i]) ent_q[wrap(int'(tail_q) + i)] <= alloc_ent[i];
  end

  assert property (@(posedge clk) disable iff (!rst_n) 9'(cnt_q) + 9'(n_alloc) <= 9'(ENTRIES + n_cm))
    else $error("rob: overflow");

endmodule
