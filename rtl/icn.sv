// icn: inter-cluster bypass network.
//
// NCL x B independent paths: each destination cluster owns B pipelined buses,
// each one feeding a dedicated register-file write port of that cluster, and
// any cluster may drive any of them. A path is held for a single cycle per
// value because the buses are fully pipelined. Every cycle each cluster offers
// up to NOM messages (copies, or verification-copies that found a
// misprediction); for every destination a round-robin arbiter over the source
// clusters grants at most B of them, and the cluster issues only the granted
// ones, so the paths are reserved by the issue logic like any other resource.
//
// Timing: a message granted in cycle t (the cycle the copy executes) is
// registered at the end of t and then travels LAT more cycles, so it is
// delivered (written and broadcast in the destination) in cycle t+1+LAT; with
// LAT = 1 a consumer in the destination can execute in t+2, one idle cycle
// after the copy. The path model, its bandwidth B and the latency follow the
// design; the round-robin policy is this implementation's choice. The design
// also studies an unbounded number of paths; B = 1 is the cost-effective
// arrangement it recommends and is the default here.
module icn
  import vpc_pkg::*;
#(
  parameter int LAT = 1,   // wire latency in cycles (1 in the base configuration)
  parameter int B   = 1,   // paths (write ports) per destination cluster
  parameter int NOM = 2    // messages offered per source cluster per cycle
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  xmsg_t [NCL-1:0][NOM-1:0]          req,
  output logic  [NCL-1:0][NOM-1:0]          gnt,
  output xmsg_t [NCL-1:0][B-1:0]            dlv,     // per destination
  output logic  [4:0]                       n_sent   // messages granted this cycle
);
  logic [NCL-1:0][CL_W-1:0] rr_q;   // first source cluster to serve, per destination
  xmsg_t [NCL-1:0][B-1:0]   grant_msg;
  xmsg_t [LAT:0][NCL-1:0][B-1:0] pipe_q;

  always_comb begin
    int              used;
    logic [CL_W-1:0] s;   // source cluster being considered (NCL is a power of two)
    gnt       = '0;
    grant_msg = '0;
    used      = 0;
    s         = '0;
    for (int d = 0; d < NCL; d++) begin
      used = 0;
      for (int i = 0; i < NCL; i++) begin
        s = rr_q[d] + CL_W'(i);
        for (int n = 0; n < NOM; n++) begin
          if (req[s][n].v && int'(req[s][n].dst_cl) == d && int'(s) != d && used < B) begin
            gnt[s][n]          = 1'b1;
            grant_msg[d][used] = req[s][n];
            used               = used + 1;
          end
        end
      end
    end
  end

  always_comb begin
    n_sent = '0;
    for (int s = 0; s < NCL; s++)
      for (int n = 0; n < NOM; n++) n_sent += 5'(gnt[s][n]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q   <= '0;
      pipe_q <= '0;
    end else begin
      pipe_q[0] <= grant_msg;
      for (int l = 1; l <= LAT; l++) pipe_q[l] <= pipe_q[l-1];
      for (int d = 0; d < NCL; d++) rr_q[d] <= rr_q[d] + CL_W'(1);
    end
  end

  assign dlv = pipe_q[LAT];

endmodule
