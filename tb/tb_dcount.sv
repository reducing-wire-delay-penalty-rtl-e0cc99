// tb_dcount: random test of the DCOUNT workload counters.
//
// Drives random per-cluster dispatch counts and keeps a reference model in
// which every dispatched operation adds N-1 to its cluster's counter and
// subtracts 1 from every other one, one operation at a time. Each cycle the
// counters, the imbalance (max |counter|), the least loaded cluster and the
// zero-sum property are compared with the model.
module tb_dcount;
  import vpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCL-1:0][5:0]             disp_cnt;
  logic signed [NCL-1:0][DC_W-1:0] cnt;
  logic [DC_W-1:0]                 imbalance;
  logic [CL_W-1:0]                 least;

  dcount #(.CNT_W(6)) dut (.*);

  int checks = 0, failures = 0;
  int model [NCL];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(7));
    disp_cnt = '0;
    for (int c = 0; c < NCL; c++) model[c] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      int mx, mn, mi, sum;
      @(negedge clk);
      // compare the registered state with the model
      mx = 0; mn = model[0]; mi = 0; sum = 0;
      for (int c = 0; c < NCL; c++) begin
        int a;
        a = model[c] < 0 ? -model[c] : model[c];
        if (a > mx) mx = a;
        if (model[c] < mn) begin mn = model[c]; mi = c; end
        sum += int'($signed(cnt[c]));
        check($sformatf("cycle %0d counter %0d = %0d (model %0d)", cyc, c, $signed(cnt[c]), model[c]),
              int'($signed(cnt[c])) == model[c]);
      end
      check("imbalance", int'(imbalance) == mx);
      check("least loaded", int'(least) == mi);
      check("counters sum to zero", sum == 0);
      // new dispatches, biased towards one cluster in phases to build imbalance
      for (int c = 0; c < NCL; c++)
        disp_cnt[c] = 6'($urandom_range(0, (c == (cyc / 50) % NCL) ? 6 : 2));
      for (int c = 0; c < NCL; c++)
        for (int k = 0; k < int'(disp_cnt[c]); k++)
          for (int o = 0; o < NCL; o++) model[o] += (o == c) ? NCL - 1 : -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
