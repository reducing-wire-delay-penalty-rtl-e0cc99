// vpc_pkg: shared constants and types of the clustered core with
// value-prediction-based steering.
//
// The core is a 4-cluster out-of-order integer back-end. Instructions are
// renamed and steered to a cluster at decode; an operand that lives in another
// cluster is either copied there by a "copy" operation executed in the producer
// cluster, or predicted by a stride value predictor and checked in the producer
// cluster by a "verification-copy" that only sends the value over the long
// inter-cluster wires when the prediction was wrong.
//
// Sizes follow the 4-cluster configuration of the design (56 physical
// registers and a 16-entry issue queue per cluster, 128-entry reorder buffer,
// 8-wide rename and commit, DCOUNT thresholds 32 and 16). The register and
// instruction encodings (32 logical integer registers, 64-bit data, a small
// ALU instruction set) are this implementation's own choice.
package vpc_pkg;

  // ---- global sizes --------------------------------------------------------
  localparam int NCL     = 4;    // clusters
  localparam int CL_W    = 2;    // cluster id width
  localparam int XLEN    = 64;   // data width
  localparam int PC_W    = 32;   // program counter width
  localparam int NLOG    = 32;   // logical integer registers
  localparam int LREG_W  = 5;
  localparam int PREGS   = 56;   // physical registers per cluster
  localparam int PREG_W  = 6;
  localparam int ROBN    = 128;  // reorder buffer entries
  localparam int ROB_W   = 7;
  localparam int GEN_W   = 3;    // issue generation tag (must exceed ICN depth)
  localparam int DC_W    = 16;   // DCOUNT counter width (signed)
  localparam int IMM_W   = 16;   // immediate field width (sign-extended)

  // ---- instruction set of the model ---------------------------------------
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,   // d = s0 + s1
    OP_SUB  = 3'd1,   // d = s0 - s1
    OP_AND  = 3'd2,   // d = s0 & s1
    OP_OR   = 3'd3,   // d = s0 | s1
    OP_XOR  = 3'd4,   // d = s0 ^ s1
    OP_ADDI = 3'd5,   // d = s0 + imm
    OP_LI   = 3'd6    // d = imm
  } alu_op_e;

  // Kinds of operations held in a cluster's issue queue.
  typedef enum logic [1:0] {
    K_ALU   = 2'd0,   // normal instruction
    K_COPY  = 2'd1,   // send a register to another cluster
    K_VCOPY = 2'd2    // verification-copy: compare with prediction, send on mismatch
  } op_kind_e;

  // Decoded instruction as it enters the rename/steer stage.
  typedef struct packed {
    logic [PC_W-1:0]             pc;
    alu_op_e                     op;
    logic                        dst_v;
    logic [LREG_W-1:0]           dst;
    logic [1:0]                  src_v;
    logic [1:0][LREG_W-1:0]      src;
    logic [IMM_W-1:0]            imm;
  } instr_t;

  // Source operand of a dispatched operation.
  typedef struct packed {
    logic                        used;
    logic [PREG_W-1:0]           tag;     // physical register in the op's cluster
    logic                        fresh;   // tag allocated in this rename group
    logic                        has_val; // val holds a value (prediction)
    logic [XLEN-1:0]             val;
  } opnd_t;

  // Operation sent from rename/steer to a cluster.
  typedef struct packed {
    op_kind_e                    kind;
    alu_op_e                     op;
    logic [IMM_W-1:0]            imm;
    logic [ROB_W-1:0]            rob;
    logic                        dst_v;
    logic [CL_W-1:0]             dst_cl;  // cluster of dst (remote for copies)
    logic [PREG_W-1:0]           dst;
    logic [XLEN-1:0]             pval;    // predicted value (verification-copy)
    opnd_t [1:0]                 src;
  } disp_t;

  // Result broadcast inside one cluster (tag and value).
  typedef struct packed {
    logic                        v;
    logic [PREG_W-1:0]           tag;
    logic [XLEN-1:0]             val;
  } bcast_t;

  // Completion report to the reorder buffer.
  typedef struct packed {
    logic                        v;
    logic [ROB_W-1:0]            rob;
    logic [GEN_W-1:0]            gen;
  } done_t;

  // Message on the inter-cluster bypass network.
  typedef struct packed {
    logic                        v;
    logic [CL_W-1:0]             dst_cl;
    logic [PREG_W-1:0]           tag;
    logic [XLEN-1:0]             val;
    logic [ROB_W-1:0]            rob;
    logic [GEN_W-1:0]            gen;
  } xmsg_t;

  // One map-table entry: one field per cluster plus the producing cluster.
  typedef struct packed {
    logic [NCL-1:0]              v;
    logic [NCL-1:0][PREG_W-1:0]  p;
    logic [CL_W-1:0]             home;
  } map_ent_t;

  // Reorder-buffer entry.
  typedef struct packed {
    op_kind_e                    kind;
    logic [CL_W-1:0]             cl;       // cluster holding the operation
    logic [PC_W-1:0]             pc;
    logic [1:0]                  src_used; // operands that train the predictor
    logic                        free_v;   // old mappings are freed at commit
    map_ent_t                    old;
  } rob_ent_t;

  // Physical register update made at dispatch time.
  typedef struct packed {
    logic                        v;
    logic                        preload;  // 1: write val and mark ready; 0: mark not ready
    logic [PREG_W-1:0]           tag;
    logic [XLEN-1:0]             val;
  } prf_upd_t;


  // Rename-group state passed from one rename slot to the next.
  typedef struct packed {
    map_ent_t [NLOG-1:0]              map;    // map table after the earlier slots
    logic [NCL-1:0][PREGS-1:0]        fresh;  // registers allocated earlier in this group
    logic signed [NCL-1:0][DC_W-1:0]  dc;     // DCOUNT after the earlier slots
    logic [NCL-1:0][5:0]              nalloc; // registers taken per cluster
    logic [NCL-1:0][5:0]              ndisp;  // operations dispatched per cluster
    logic [5:0]                       nrob;   // reorder-buffer entries taken
    logic                             stop;   // an earlier slot did not fit
  } rn_state_t;

  function automatic logic [XLEN-1:0] sext_imm(input logic [IMM_W-1:0] imm);
    return {{(XLEN-IMM_W){imm[IMM_W-1]}}, imm};
  endfunction

  function automatic logic [XLEN-1:0] alu_exec(input alu_op_e op, input logic [XLEN-1:0] a,
                                               input logic [XLEN-1:0] b,
                                               input logic [IMM_W-1:0] imm);
    unique case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_ADDI: return a + sext_imm(imm);
      OP_LI:   return sext_imm(imm);
      default: return '0;
    endcase
  endfunction

endpackage
