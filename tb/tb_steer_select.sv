// tb_steer_select: test of the VPB steering rules.
//
// Directed cases exercise each rule (balance override, pending operand,
// predicted operand treated as available, most-mapped selection with and
// without the VPB relaxation, no operands). Then random inputs are compared
// with a reference written from the rule list in the testbench.
module tb_steer_select;
  import vpc_pkg::*;

  logic signed [NCL-1:0][DC_W-1:0] dc;
  logic [1:0]           op_used, op_avail, op_pred;
  logic [1:0][NCL-1:0]  op_mapped;
  logic [1:0][CL_W-1:0] op_home;
  logic [CL_W-1:0]      cl;
  logic                 rule_bal, rule_pend, vpb_on;

  steer_select #(.T_BAL(32), .T_VPB(16)) dut (.*);

  int checks = 0, failures = 0;

  function automatic int ref_pick(input int d[NCL], input logic [1:0] used, input logic [1:0] avail,
                                  input logic [1:0] pred, input logic [1:0][NCL-1:0] mapped,
                                  input logic [1:0][CL_W-1:0] home);
    int imb, best, pick;
    bit sel [NCL];
    int cntm [NCL];
    bit anypend;
    imb = 0;
    for (int c = 0; c < NCL; c++) imb = (d[c] > imb) ? d[c] : (-d[c] > imb ? -d[c] : imb);
    for (int c = 0; c < NCL; c++) sel[c] = 1;
    if (imb <= 32) begin
      anypend = 0;
      for (int c = 0; c < NCL; c++) sel[c] = 0;
      for (int s = 0; s < 2; s++)
        if (used[s] && !avail[s] && !pred[s]) begin sel[home[s]] = 1; anypend = 1; end
      if (!anypend) begin
        if (used == 0) for (int c = 0; c < NCL; c++) sel[c] = 1;
        else begin
          best = 0;
          for (int c = 0; c < NCL; c++) begin
            cntm[c] = 0;
            for (int s = 0; s < 2; s++)
              if (used[s] && (mapped[s][c] || (imb > 16 && pred[s]))) cntm[c]++;
            if (cntm[c] > best) best = cntm[c];
          end
          for (int c = 0; c < NCL; c++) sel[c] = (cntm[c] == best);
        end
      end
    end
    pick = -1;
    for (int c = 0; c < NCL; c++) if (sel[c] && (pick < 0 || d[c] < d[pick])) pick = c;
    return pick;
  endfunction

  task automatic apply(input int d[NCL], input string tag, input int exp);
    int r;
    for (int c = 0; c < NCL; c++) dc[c] = DC_W'(d[c]);
    #1;
    r = ref_pick(d, op_used, op_avail, op_pred, op_mapped, op_home);
    checks++;
    if (int'(cl) != r || (exp >= 0 && r != exp)) begin
      failures++;
      $display("FAIL: %s: got %0d ref %0d exp %0d", tag, cl, r, exp);
    end
  endtask

  initial begin
    int d [NCL];
    int seen_bal, seen_pend, seen_vpb;
    seen_bal = 0; seen_pend = 0; seen_vpb = 0;
    // rule 2.3: no operands -> least loaded
    op_used = 0; op_avail = 0; op_pred = 0; op_mapped = 0; op_home = 0;
    d = '{4, -2, 3, -5};  apply(d, "no operands", 3);
    // rule 2.1: pending operand in cluster 2
    op_used = 2'b01; op_home[0] = 2; op_mapped[0] = 4'b0100;
    d = '{-10, 0, 10, 0}; apply(d, "pending operand", 2);
    checks++; if (!rule_pend) begin failures++; $display("FAIL: rule 2.1 flag"); end
    // predicted pending operand counts as available: most-mapped -> cluster 2 only
    op_pred = 2'b01;      apply(d, "predicted operand, balanced", 2);
    // imbalance above 16: predicted operand mapped everywhere -> least loaded
    d = '{-20, 0, 20, 0}; apply(d, "VPB relaxation", 0);
    checks++; if (!vpb_on) begin failures++; $display("FAIL: vpb flag"); end
    // rule 1: imbalance above 32 overrides a pending operand
    op_pred = 0;
    d = '{-40, 0, 40, 0}; apply(d, "balance rule", 0);
    checks++; if (!rule_bal) begin failures++; $display("FAIL: rule 1 flag"); end
    // two available operands, both mapped in cluster 1, one also in 3
    op_used = 2'b11; op_avail = 2'b11; op_pred = 0;
    op_mapped[0] = 4'b1010; op_mapped[1] = 4'b0010; op_home = '{2'd1, 2'd3};
    d = '{-5, 3, 0, 2};   apply(d, "most mapped", 1);

    void'($urandom(99));
    for (int i = 0; i < 3000; i++) begin
      for (int c = 0; c < NCL - 1; c++) d[c] = $urandom_range(0, 60) - 30;
      d[NCL-1] = 0;
      for (int c = 0; c < NCL - 1; c++) d[NCL-1] -= d[c];
      op_used   = 2'($urandom);
      op_avail  = 2'($urandom);
      op_pred   = 2'($urandom);
      for (int s = 0; s < 2; s++) begin
        op_home[s]   = CL_W'($urandom);
        op_mapped[s] = NCL'($urandom) | (NCL'(1) << op_home[s]);
      end
      apply(d, $sformatf("random %0d", i), -1);
      seen_bal  += rule_bal;
      seen_pend += rule_pend;
      seen_vpb  += vpb_on;
    end
    checks++;
    if (seen_bal == 0 || seen_pend == 0 || seen_vpb == 0) begin
      failures++; $display("FAIL: random cases did not cover every rule");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
