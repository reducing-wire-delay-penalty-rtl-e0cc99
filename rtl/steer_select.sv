// steer_select: cluster choice for one instruction (VPB steering heuristic).
//
// Purely combinational. Inputs are the DCOUNT workload counters as they stand
// for this instruction and, per source operand, the clusters where it is mapped,
// whether its value is already available, the cluster that produces it and
// whether the value predictor is confident for it. Rules, in order:
//   1. imbalance (max |DCOUNT|) > T_BAL: take the least loaded cluster.
//   2. otherwise find the clusters with least communication penalty:
//      2.1 an operand that is not available selects the cluster producing it
//          (a confidently predicted operand counts as available);
//      2.2 if all operands are available, select the clusters where most
//          operands are mapped; while the imbalance is above T_VPB a
//          confidently predicted operand counts as mapped in every cluster;
//      2.3 with no source operands, select every cluster.
//   3. choose the least loaded cluster among those selected (lowest index on
//      ties, a choice of this implementation).
// The rules and the thresholds (32 and 16 for four clusters) follow the design.
module steer_select
  import vpc_pkg::*;
#(
  parameter int T_BAL = 32,   // rule 1 threshold (DCOUNT)
  parameter int T_VPB = 16    // VPB threshold for "predicted = mapped everywhere"
) (
  input  logic signed [NCL-1:0][DC_W-1:0] dc,
  input  logic [1:0]                  op_used,
  input  logic [1:0][NCL-1:0]         op_mapped,
  input  logic [1:0]                  op_avail,
  input  logic [1:0][CL_W-1:0]        op_home,
  input  logic [1:0]                  op_pred,
  output logic [CL_W-1:0]             cl,
  output logic                        rule_bal,   // rule 1 fired
  output logic                        rule_pend,  // rule 2.1 fired
  output logic                        vpb_on      // predicted operands counted as mapped everywhere
);
  logic [DC_W-1:0] imb;
  logic [CL_W-1:0] least_all;
  logic [NCL-1:0]  sel;

  always_comb begin
    logic signed [DC_W-1:0] mn;
    imb       = '0;
    least_all = '0;
    mn        = dc[0];
    for (int c = 0; c < NCL; c++) begin
      logic [DC_W-1:0] a;
      a = dc[c][DC_W-1] ? DC_W'(-dc[c]) : DC_W'(dc[c]);
      if (a > imb) imb = a;
      if ($signed(dc[c]) < mn) begin
        mn = dc[c];
        least_all = CL_W'(c);
      end
    end
  end

  always_comb begin
    logic [NCL-1:0] pend;
    logic [1:0] cnt [NCL];
    logic [1:0] best;
    logic signed [DC_W-1:0] mn;
    logic first;

    rule_bal  = imb > DC_W'(T_BAL);
    vpb_on    = imb > DC_W'(T_VPB);
    rule_pend = 1'b0;

    pend = '0;
    for (int s = 0; s < 2; s++)
      if (op_used[s] && !op_avail[s] && !op_pred[s]) pend[op_home[s]] = 1'b1;

    best = '0;
    for (int c = 0; c < NCL; c++) begin
      cnt[c] = '0;
      for (int s = 0; s < 2; s++)
        if (op_used[s] && (op_mapped[s][c] || (vpb_on && op_pred[s]))) cnt[c] += 2'd1;
      if (cnt[c] > best) best = cnt[c];
    end

    if (pend != '0) begin
      sel = pend;
      rule_pend = !rule_bal;
    end else if (op_used != '0) begin
      for (int c = 0; c < NCL; c++) sel[c] = (cnt[c] == best);
    end else begin
      sel = '1;
    end

    cl    = least_all;
    mn    = '0;
    first = 1'b1;
    if (!rule_bal) begin
      for (int c = 0; c < NCL; c++) begin
        if (sel[c] && (first || $signed(dc[c]) < mn)) begin
          mn    = dc[c];
          cl    = CL_W'(c);
          first = 1'b0;
        end
      end
    end
  end

endmodule
