// dcount: per-cluster workload counters (the DCOUNT balance metric).
//
// Each cluster has a signed counter, zero after reset. For every operation
// dispatched to cluster c, counter c grows by N-1 and each other counter
// shrinks by 1, so the counters always sum to zero and counter c equals N times
// the difference between the operations sent to c and the per-cluster average.
// With k_c operations dispatched to c in one cycle out of K in total, counter c
// therefore changes by N*k_c - K. The imbalance is the largest absolute
// counter value and the least loaded cluster is the one with the smallest
// counter (lowest index on ties); both are derived combinationally from the
// registered counters. The update rule is the design's; the counter width
// (DC_W = 16 bits) is this implementation's choice: the steering rule that
// sends work to the least loaded cluster once the imbalance passes its
// threshold keeps the counters far from that range.
module dcount
  import vpc_pkg::*;
#(
  parameter int CNT_W = 6    // width of the per-cycle dispatch count of one cluster
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NCL-1:0][CNT_W-1:0]     disp_cnt,   // operations dispatched this cycle
  output logic signed [NCL-1:0][DC_W-1:0] cnt,      // current counters
  output logic [DC_W-1:0]               imbalance,  // max |counter|
  output logic [CL_W-1:0]               least       // cluster with the smallest counter
);
  logic signed [NCL-1:0][DC_W-1:0] cnt_q;
  assign cnt = cnt_q;

  logic [DC_W-1:0] total;
  always_comb begin
    total = '0;
    for (int c = 0; c < NCL; c++) total += DC_W'(disp_cnt[c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else begin
      for (int c = 0; c < NCL; c++)
        cnt_q[c] <= cnt_q[c] + DC_W'(NCL) * DC_W'(disp_cnt[c]) - total;
    end
  end

  always_comb begin
    logic signed [DC_W-1:0] mn;
    imbalance = '0;
    least     = '0;
    mn        = cnt_q[0];
    for (int c = 0; c < NCL; c++) begin
      logic [DC_W-1:0] a;
      a = cnt_q[c][DC_W-1] ? DC_W'(-cnt_q[c]) : DC_W'(cnt_q[c]);
      if (a > imbalance) imbalance = a;
      if ($signed(cnt_q[c]) < mn) begin
        mn    = cnt_q[c];
        least = CL_W'(c);
      end
    end
  end

endmodule
