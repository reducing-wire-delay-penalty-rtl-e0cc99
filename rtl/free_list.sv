// free_list: free pool of physical registers of one cluster.
//
// A circular buffer holding the numbers of the free physical registers. After
// reset it holds registers FIRST_FREE .. PREGS-1 (the lower registers start out
// holding the initial mappings of the logical registers). The POP_W registers
// at the head are visible every cycle; the rename stage takes pop_cnt of them
// at the clock edge. Up to PUSH_W registers are returned per cycle at commit,
// in port order. The design only says that each cluster has a free pool from
// which registers are allocated; the FIFO organisation is this
// implementation's choice. Popping more than count is not allowed (assertion).
module free_list
  import vpc_pkg::*;
#(
  parameter int PREGS_N    = PREGS,  // registers in the cluster
  parameter int FIRST_FREE = 8,      // registers below this are mapped at reset
  parameter int POP_W      = 8,      // allocations per cycle
  parameter int PUSH_W     = 8       // releases per cycle
) (
  input  logic                            clk,
  input  logic                            rst_n,
  output logic [POP_W-1:0][PREG_W-1:0]    head,
  output logic [PREG_W:0]                 count,
  input  logic [$clog2(POP_W+1)-1:0]      pop_cnt,
  input  logic [PUSH_W-1:0]               push_v,
  input  logic [PUSH_W-1:0][PREG_W-1:0]   push_reg
);
  localparam int PTR_W = $clog2(PREGS_N);

  logic [PREG_W-1:0] buf_q [PREGS_N];
  logic [PTR_W-1:0]  rd_q, wr_q;
  logic [PREG_W:0]   cnt_q;

  function automatic logic [PTR_W-1:0] wrap(input int unsigned x);
    return PTR_W'(x % PREGS_N);
  endfunction

  assign count = cnt_q;

  always_comb begin
    for (int k = 0; k < POP_W; k++) head[k] = buf_q[wrap(int'(rd_q) + k)];
  end

  // write position of each release: packed behind the earlier valid ones
  logic [PREG_W:0]                npush;
  logic [PUSH_W-1:0][PTR_W-1:0]   wpos;
  always_comb begin
    npush = '0;
    for (int k = 0; k < PUSH_W; k++) begin
      wpos[k] = wrap(int'(wr_q) + int'(npush));
      npush  += (PREG_W+1)'(push_v[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= wrap(PREGS_N - FIRST_FREE);
      cnt_q <= (PREG_W+1)'(PREGS_N - FIRST_FREE);
      for (int r = 0; r < PREGS_N; r++) buf_q[r] <= PREG_W'((r + FIRST_FREE) % PREGS_N);
    end else begin
      for (int k = 0; k < PUSH_W; k++)
        if (push_v[k]) buf_q[wpos[k]] <= push_reg[k];
      wr_q  <= wrap(int'(wr_q) + int'(npush));
      rd_q  <= wrap(int'(rd_q) + int'(pop_cnt));
      cnt_q <= cnt_q + npush - (PREG_W+1)'(pop_cnt);
    end
  end

  // the rename stage never takes more registers than are free
  assert property (@(posedge clk) disable iff (!rst_n) (PREG_W+1)'(pop_cnt) <= cnt_q)
    else $error("free_list: pop beyond count");

endmodule
