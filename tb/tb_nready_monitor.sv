// tb_nready_monitor: exhaustive test of the NREADY imbalance measurement.
//
// Applies every combination of 0..5 ready instructions in each of the four
// clusters (issue width 2) and compares NREADY with min(excess ready
// instructions, idle issue slots) computed in the testbench, then checks the
// running sum after a known sequence.
module tb_nready_monitor;
  import vpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCL-1:0][4:0] n_ready;
  logic [5:0]          nready;
  logic [31:0]         nready_sum;

  nready_monitor #(.ISSUE_W(2)) dut (.*);

  int checks = 0, failures = 0;
  longint expsum = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_ready = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int a = 0; a < 6; a++) for (int b = 0; b < 6; b++)
    for (int c = 0; c < 6; c++) for (int d = 0; d < 6; d++) begin
      int r [4];
      int ex, idle, e;
      @(negedge clk);
      r = '{a, b, c, d};
      ex = 0; idle = 0;
      for (int i = 0; i < 4; i++) begin
        n_ready[i] = 5'(r[i]);
        if (r[i] > 2) ex += r[i] - 2; else idle += 2 - r[i];
      end
      e = (ex < idle) ? ex : idle;
      #1;
      checks++;
      if (int'(nready) != e) begin
        failures++;
        $display("FAIL: ready %0d %0d %0d %0d -> %0d expected %0d", a, b, c, d, nready, e);
      end
      expsum += e;
    end
    @(negedge clk);
    n_ready = '0;
    @(negedge clk);
    checks++;
    if (longint'(nready_sum) != expsum) begin
      failures++;
      $display("FAIL: sum %0d expected %0d", nready_sum, expsum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
