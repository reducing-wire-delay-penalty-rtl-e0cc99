// tb_stride_vp: directed test of the stride value predictor (1K-entry table).
//
// Trains one entry with a strided sequence through the commit ports and checks
// prediction and confidence after each step against values worked out by hand:
// no prediction before the first commit, confidence only after two stride
// hits, speculative advance at decode (including two lookups of the same entry
// in one cycle), repair of the speculative value with the instances still in
// flight after a miss, and independence of the two operand orders.
module tb_stride_vp;
  import vpc_pkg::*;

  localparam int L = 4, U = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [L-1:0]           lk_v, lk_order, lk_acc, lk_conf;
  logic [L-1:0][PC_W-1:0] lk_pc;
  logic [L-1:0][XLEN-1:0] lk_val;
  logic [U-1:0]           up_v, up_order;
  logic [U-1:0][PC_W-1:0] up_pc;
  logic [U-1:0][XLEN-1:0] up_val;

  stride_vp #(.ENTRIES(1024), .LOOKUPS(L), .UPDATES(U)) dut (.*);

  int checks = 0, failures = 0;
  localparam logic [PC_W-1:0] PC = 32'h0000_0120;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    lk_v = '0; lk_acc = '0; up_v = '0; lk_pc = '0; lk_order = '0; up_pc = '0;
    up_order = '0; up_val = '0;
  endtask

  task automatic commit(input logic [XLEN-1:0] v);
    @(negedge clk);
    idle();
    up_v[0] = 1'b1; up_pc[0] = PC; up_order[0] = 1'b0; up_val[0] = v;
    @(posedge clk); #1;
    idle();
  endtask

  // look up PC/order 0 on port 0 (and optionally port 1), with no acceptance
  task automatic peek(input logic [XLEN-1:0] exp_val, input logic exp_conf, input string tag);
    @(negedge clk);
    idle();
    lk_v[0] = 1'b1; lk_pc[0] = PC;
    #1;
    check($sformatf("%s: conf %0d expected %0d", tag, lk_conf[0], exp_conf), lk_conf[0] == exp_conf);
    if (exp_conf)
      check($sformatf("%s: value %0d expected %0d", tag, lk_val[0], exp_val), lk_val[0] == exp_val);
    idle();
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    peek(0, 1'b0, "empty entry");
    commit(10);  peek(0, 1'b0, "after 10");          // stride 0, conf 0
    commit(13);  peek(0, 1'b0, "after 13");          // miss: stride 3, conf 0
    commit(16);  peek(0, 1'b0, "after 16");          // hit: conf 1
    commit(19);  peek(22, 1'b1, "after 19");         // hit: conf 2 -> confident, 19+3

    // decode: two lookups of the same entry in one cycle, both accepted
    @(negedge clk);
    idle();
    lk_v[0] = 1'b1; lk_pc[0] = PC; lk_acc[0] = 1'b1;
    lk_v[2] = 1'b1; lk_pc[2] = PC; lk_acc[2] = 1'b1;
    lk_v[1] = 1'b1; lk_pc[1] = PC; lk_order[1] = 1'b1;  // other operand order: untrained
    #1;
    check($sformatf("group lookup 0 = %0d (22)", lk_val[0]), lk_val[0] == 22 && lk_conf[0]);
    check($sformatf("group lookup 1 = %0d (25)", lk_val[2]), lk_val[2] == 25 && lk_conf[2]);
    check("other operand order not confident", !lk_conf[1]);
    @(posedge clk); #1;
    idle();
    peek(28, 1'b1, "after speculative advance");     // two in flight: 22, 25 -> next 28

    // commit 22 (hit, conf 3), then a miss: 40 instead of 25 with nothing else in flight
    commit(22);  peek(28, 1'b1, "after commit 22");
    commit(40);  peek(40 + 18, 1'b1, "after miss 40");  // conf 2, stride 18, 0 in flight

    // one more in flight, then a miss: speculative value rebuilt with 1 in flight
    @(negedge clk);
    idle();
    lk_v[0] = 1'b1; lk_pc[0] = PC; lk_acc[0] = 1'b1;
    @(posedge clk); #1;
    idle();
    @(negedge clk);
    idle();
    lk_v[0] = 1'b1; lk_pc[0] = PC; lk_acc[0] = 1'b1;
    @(posedge clk); #1;
    idle();
    commit(50);  // miss (expected 58): conf 1, stride 10, 1 still in flight: last = 50 + 10
    peek(0, 1'b0, "after second miss");
    commit(60);  // hit: conf 2
    peek(70, 1'b1, "after re-training");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
