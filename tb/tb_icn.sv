// tb_icn: random test of the inter-cluster network with LAT = 2 and B = 2.
//
// Every cycle each cluster offers up to two messages with random destinations
// (each carrying a unique value). Checked each cycle: grants only go to valid
// requests for another cluster, at most B per destination, and the network is
// work-conserving (a destination with pending requests gets min(B, requests)
// grants). Every granted message must come out at its destination exactly
// LAT+1 cycles after the grant, and nothing else may come out. A second phase
// keeps all clusters requesting one destination with B paths busy and checks
// that the round-robin arbiter serves every source within four cycles.
module tb_icn;
  import vpc_pkg::*;

  localparam int LAT = 2, B = 2, NOM = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  xmsg_t [NCL-1:0][NOM-1:0] req;
  logic  [NCL-1:0][NOM-1:0] gnt;
  xmsg_t [NCL-1:0][B-1:0]   dlv;
  logic  [4:0]              n_sent;

  icn #(.LAT(LAT), .B(B), .NOM(NOM)) dut (.*);

  int checks = 0, failures = 0;
  // expected deliveries: per cycle, per destination, list of values
  longint exp_q [int][NCL][$];
  int uniq = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_served [NCL];
    void'($urandom(5));
    req = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      int nreq [NCL];
      int ngnt [NCL];
      int tot;
      @(negedge clk);
      // deliveries due now (before changing inputs: dlv is registered)
      for (int d = 0; d < NCL; d++) begin
        int nexp;
        nexp = exp_q.exists(cyc) ? exp_q[cyc][d].size() : 0;
        for (int j = 0; j < B; j++) begin
          if (j < nexp) begin
            bit hit;
            hit = 0;
            for (int k = 0; k < B; k++)
              if (dlv[d][k].v && longint'(dlv[d][k].val) == exp_q[cyc][d][j]) hit = 1;
            check($sformatf("cycle %0d: value %0d delivered to %0d", cyc, exp_q[cyc][d][j], d), hit);
          end
        end
        tot = 0;
        for (int k = 0; k < B; k++) tot += dlv[d][k].v;
        check($sformatf("cycle %0d: delivery count at %0d", cyc, d), tot == nexp);
        for (int k = 0; k < B; k++)
          if (dlv[d][k].v) check("delivery destination field", int'(dlv[d][k].dst_cl) == d);
      end
      // new requests
      req = '0;
      for (int s = 0; s < NCL; s++)
        for (int n = 0; n < NOM; n++)
          if (cyc >= 1000 || $urandom_range(0, 2) != 0) begin
            uniq++;
            req[s][n].v      = 1'b1;
            req[s][n].dst_cl = (cyc >= 1000) ? CL_W'(0) : CL_W'($urandom_range(0, NCL - 1));
            req[s][n].tag    = PREG_W'($urandom_range(0, PREGS - 1));
            req[s][n].val    = XLEN'(uniq);
            req[s][n].rob    = ROB_W'(uniq);
          end
      #1;
      for (int d = 0; d < NCL; d++) begin nreq[d] = 0; ngnt[d] = 0; end
      tot = 0;
      for (int s = 0; s < NCL; s++)
        for (int n = 0; n < NOM; n++) begin
          if (req[s][n].v && int'(req[s][n].dst_cl) != s) nreq[req[s][n].dst_cl]++;
          if (gnt[s][n]) begin
            tot++;
            check("grant only to a valid request for another cluster",
                  req[s][n].v && int'(req[s][n].dst_cl) != s);
            ngnt[req[s][n].dst_cl]++;
            exp_q[cyc + 1 + LAT][req[s][n].dst_cl].push_back(longint'(req[s][n].val));
            last_served[s] = cyc;
          end
        end
      for (int d = 0; d < NCL; d++)
        check($sformatf("cycle %0d: grants to %0d = min(B, requests)", cyc, d),
              ngnt[d] == ((nreq[d] < B) ? nreq[d] : B));
      check("sent count", int'(n_sent) == tot);
      if (cyc == 999) for (int s = 0; s < NCL; s++) last_served[s] = cyc;
      if (cyc >= 1004)
        for (int s = 1; s < NCL; s++)
          check($sformatf("cycle %0d: source %0d served within 4 cycles", cyc, s),
                cyc - last_served[s] < 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
