// nready_monitor: workload-imbalance measurement (the NREADY metric).
//
// Counts, for the current cycle, the ready instructions that cannot issue
// because their cluster's issue width is exceeded but could have issued in
// another cluster that has idle units: min(sum of excess ready instructions,
// sum of idle issue slots). The definition is the design's; it is used only to
// measure balance (steering itself uses DCOUNT). The monitor also accumulates
// the value over time in a 32-bit counter.
module nready_monitor
  import vpc_pkg::*;
#(
  parameter int ISSUE_W = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NCL-1:0][4:0]    n_ready,
  output logic [5:0]             nready,
  output logic [31:0]            nready_sum
);
  always_comb begin
    int ex, idle;
    ex   = 0;
    idle = 0;
    for (int c = 0; c < NCL; c++) begin
      if (int'(n_ready[c]) > ISSUE_W) ex   += int'(n_ready[c]) - ISSUE_W;
      else                            idle += ISSUE_W - int'(n_ready[c]);
    end
    nready = 6'((ex < idle) ? ex : idle);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nready_sum <= '0;
    else        nready_sum <= nready_sum + 32'(nready);
  end

endmodule
