// tb_sensitivity: the clustered core under two configurations of the
// sensitivity study that the end-to-end test does not cover: inter-cluster
// latency 4, and unbounded network bandwidth (6 paths per destination, as
// many values as the other three clusters can offer). Predictor size and the
// VPB threshold are plain parameters as well; they are left out here only to
// keep the build short.
//
// The same generated program as the end-to-end test (a loop body with
// strided, wrapping, random and serial-chain operations) runs on every
// configuration side by side. Each one must produce the registers of a
// sequential reference model and account for every committed operation; the
// test prints the cycles, communications and reissues of each.
module tb_sensitivity;
  import vpc_pkg::*;

  localparam int W     = 8;
  localparam int BODY  = 20;
  localparam int ITERS = 60;
  localparam int N     = BODY * ITERS;
  localparam int NCFG  = 2;
  localparam int CFG_LAT [NCFG] = '{4, 1};
  localparam int CFG_B   [NCFG] = '{1, 6};
  localparam string CFG_NAME [NCFG] = '{"latency 4", "unbounded paths"};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [N];
  instr_t body [BODY];
  logic [XLEN-1:0] ref_rf [NLOG];
  bit      ready = 0;
  bit      fin [NCFG];

  function automatic instr_t mk(input int pc, input alu_op_e op, input int d, input int s0,
                                input int s1, input int imm);
    instr_t i;
    i        = '0;
    i.pc     = PC_W'(pc * 4);
    i.op     = op;
    i.dst_v  = 1'b1;
    i.dst    = LREG_W'(d);
    i.src[0] = LREG_W'(s0);
    i.src[1] = LREG_W'(s1);
    i.imm    = IMM_W'(imm);
    i.src_v  = (op == OP_LI) ? 2'b00 : (op == OP_ADDI) ? 2'b01 : 2'b11;
    return i;
  endfunction

  // reference execution
  task automatic ref_exec(input instr_t i);
    logic [XLEN-1:0] a, b;
    a = ref_rf[i.src[0]];
    b = ref_rf[i.src[1]];
    if (i.dst_v) ref_rf[i.dst] = alu_exec(i.op, a, b, i.imm);
  endtask


  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic   [W-1:0]      in_v;
    instr_t [W-1:0]      in_ins;
    logic   [W-1:0]      in_acc;
    logic   [LREG_W-1:0] dbg_lreg;
    logic   [XLEN-1:0]   dbg_val;
    logic                rob_empty;
    logic [4:0] ev_commit, ev_copy, ev_vcopy, ev_pred, ev_bal, ev_vpb, ev_sent;
    logic [6:0] ev_reissue;
    logic [5:0] ev_nready;
    logic [DC_W-1:0] ev_imbalance;
    longint c_commit = 0, c_copy = 0, c_vcopy = 0, c_sent = 0, c_reissue = 0, cycles = 0;

    clustered_core #(.LAT(CFG_LAT[g]), .B(CFG_B[g])) dut (
      .clk, .rst_n, .in_v, .in_ins, .in_acc, .dbg_lreg, .dbg_val, .rob_empty,
      .ev_commit, .ev_copy, .ev_vcopy, .ev_pred, .ev_bal, .ev_vpb, .ev_sent, .ev_reissue,
      .ev_nready, .ev_imbalance
    );

    bit stop = 0;
    always @(posedge clk) if (rst_n && !stop) begin
      cycles    <= cycles + 1;
      c_commit  <= c_commit  + ev_commit;
      c_copy    <= c_copy    + ev_copy;
      c_vcopy   <= c_vcopy   + ev_vcopy;
      c_sent    <= c_sent    + ev_sent;
      c_reissue <= c_reissue + ev_reissue;
    end

    initial begin
      int ptr, nacc;
      in_v = '0; in_ins = '0; dbg_lreg = '0;
      wait (ready);
      @(negedge clk);
      while (!rst_n) @(negedge clk);
      ptr = 0;
      while (ptr < N) begin
        for (int k = 0; k < W; k++) begin
          in_v[k]   = (ptr + k < N);
          in_ins[k] = (ptr + k < N) ? prog[ptr + k] : '0;
        end
        #1;
        nacc = 0;
        for (int k = 0; k < W; k++) if (in_acc[k]) nacc++;
        @(posedge clk);
        ptr += nacc;
        @(negedge clk);
      end
      in_v = '0;
      while (!rob_empty) @(posedge clk);
      repeat (3) @(posedge clk);
      @(negedge clk);
      stop = 1;
      for (int r = 0; r < NLOG; r++) begin
        dbg_lreg = LREG_W'(r);
        #1;
        check($sformatf("%s: r%0d = %h (expected %h)", CFG_NAME[g], r, dbg_val, ref_rf[r]),
              dbg_val == ref_rf[r]);
      end
      check($sformatf("%s: every committed operation accounted for", CFG_NAME[g]),
            c_commit == longint'(N) + c_copy + c_vcopy);
      $display("%-16s cycles=%0d IPC=%0.2f copies=%0d vcopies=%0d sent=%0d reissue=%0d",
               CFG_NAME[g], cycles, real'(N) / real'(cycles), c_copy, c_vcopy, c_sent, c_reissue);
      fin[g] = 1;
    end
  end

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    void'($urandom(32'd12345));
    // loop body
    body[0]  = mk(0,  OP_ADDI, 1, 1, 0, 1);        // r1 += 1        (induction)
    body[1]  = mk(1,  OP_ADDI, 2, 2, 0, 8);        // r2 += 8        (induction)
    body[2]  = mk(2,  OP_ADD,  3, 1, 2, 0);        // r3 = r1 + r2
    body[3]  = mk(3,  OP_LI,   4, 0, 0, 7);        // r4 = 7
    body[4]  = mk(4,  OP_AND,  5, 1, 4, 0);        // r5 = r1 & 7    (wraps: mispredicts)
    body[5]  = mk(5,  OP_ADD,  6, 5, 3, 0);        // r6 = r5 + r3
    body[6]  = mk(6,  OP_XOR,  7, 7, 6, 0);        // r7 ^= r6       (serial chain)
    body[7]  = mk(7,  OP_ADD,  8, 8, 7, 0);        // r8 += r7       (serial chain)
    body[8]  = mk(8,  OP_SUB,  9, 8, 5, 0);        // r9 = r8 - r5
    body[9]  = mk(9,  OP_XOR,  7, 7, 9, 0);        // r7 ^= r9
    body[10] = mk(10, OP_ADD,  10, 10, 7, 0);      // r10 += r7
    body[11] = mk(11, OP_OR,   11, 10, 5, 0);      // r11 = r10 | r5
    body[12] = mk(12, OP_ADDI, 12, 12, 0, -3);     // r12 -= 3       (induction)
    body[13] = mk(13, OP_ADD,  13, 12, 1, 0);      // r13 = r12 + r1
    body[14] = mk(14, OP_XOR,  14, 13, 11, 0);     // r14 = r13 ^ r11
    body[15] = mk(15, OP_ADD,  8, 8, 14, 0);       // r8 += r14      (serial chain)
    body[16] = mk(16, OP_SUB,  15, 3, 12, 0);      // r15 = r3 - r12
    body[17] = mk(17, OP_ADD,  16, 15, 5, 0);      // r16 = r15 + r5
    body[18] = mk(18, OP_XOR,  17, 16, 17, 0);     // r17 ^= r16
    body[19] = mk(19, OP_AND,  18, 17, 4, 0);      // r18 = r17 & 7
    for (int it = 0; it < ITERS; it++)
      for (int b = 0; b < BODY; b++) prog[it*BODY + b] = body[b];
    // a few random instructions at distinct PCs in every 10th iteration
    for (int it = 5; it < ITERS; it += 10)
      for (int b = 0; b < 6; b++) begin
        int d, s0, s1;
        d  = 19 + int'($urandom_range(0, 12));
        s0 = int'($urandom_range(0, 31));
        s1 = int'($urandom_range(0, 31));
        prog[it*BODY + b] = mk(1000 + it*8 + b, alu_op_e'($urandom_range(0, 4)), d, s0, s1, 0);
      end

    for (int r = 0; r < NLOG; r++) ref_rf[r] = '0;
    for (int i = 0; i < N; i++) ref_exec(prog[i]);
    for (int g = 0; g < NCFG; g++) fin[g] = 0;
    ready = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NCFG; g++) all &= fin[g];
    end while (!all);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
