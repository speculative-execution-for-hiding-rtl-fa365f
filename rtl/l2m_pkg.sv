// l2m_pkg: types and constants shared by the L2miss speculative-replication blocks.
// The mechanism precomputes future instances of instructions that do not depend on a
// load missing in L2. Sizes follow the evaluated configuration: 64 logical registers
// (one Dependence Mask bit each), 4 replicas per instruction, a 4-way x 64-set
// Replication Maps table, 768 upper-level registers, MAX_AC = 2. Widths of PCs,
// addresses and data (32/32/64 bits) are this design's own choice.
package l2m_pkg;
  localparam int PC_W    = 32;
  localparam int ADDR_W  = 32;
  localparam int DATA_W  = 64;
  localparam int NLREG   = 64;
  localparam int LREG_W  = $clog2(NLREG);
  localparam int NREPL   = 4;                    // replicas per replicated instruction
  localparam int CNT_W   = $clog2(NREPL + 1);    // decode / commit / issue / NREGS fields
  localparam int RM_SETS = 64;
  localparam int RM_WAYS = 4;
  localparam int RM_N    = RM_SETS * RM_WAYS;
  localparam int RM_IDX_W = $clog2(RM_N);
  localparam int UREGS   = 768;                  // upper-level registers
  localparam int UREG_W  = $clog2(UREGS);
  localparam int USETS   = UREGS / NREPL;        // register sets of NREPL registers
  localparam int USET_W  = $clog2(USETS);
  localparam int MAX_AC  = 2;
  localparam int OP_W    = 8;
  localparam int NSPORT  = 2;                    // S-bit update ports (one per source)
  localparam int NPK     = 4;                    // RM producer lookup ports

  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [UREG_W-1:0] ureg_t;
  typedef logic [RM_IDX_W-1:0] rm_idx_t;

  typedef enum logic [2:0] {
    CLS_OTHER = 3'd0, CLS_LOAD = 3'd1, CLS_STORE = 3'd2, CLS_ALU = 3'd3, CLS_BRANCH = 3'd4
  } iclass_e;

  // Instruction as seen by the decode stage (one per cycle).
  typedef struct packed {
    logic    valid;
    pc_t     pc;
    iclass_e cls;
    logic [OP_W-1:0] op;
    logic    src1_v, src2_v, dst_v;
    lreg_t   src1, src2, dst;
    logic    src1_rdy, src2_rdy;   // operand value known at decode
    data_t   src1_val, src2_val;
  } dec_inst_t;

  // Instruction leaving the commit stage.
  typedef struct packed {
    logic    valid;
    pc_t     pc;
    iclass_e cls;
    logic    src1_v, src2_v, dst_v;
    lreg_t   src1, src2, dst;
    logic    l2miss;               // load that missed in L2
    pc_t [NSPORT-1:0] spc;         // StridedPCs kept in the ROB entry
    logic    reused;               // validated instruction: bump RM commit
    rm_idx_t rm_idx;
  } cmt_inst_t;

  // Stride predictor lookup result.
  typedef struct packed {
    logic  hit;
    logic  strided;                // stride confirmed
    logic  s;                      // selected for replication
    addr_t last_addr;
    addr_t stride;
  } sp_info_t;

  typedef struct packed {
    logic valid;
    pc_t  pc;
    logic set;                     // 1: set S, 0: clear S
  } s_upd_t;

  // Extended rename map table entry fields (besides the physical register id).
  typedef struct packed {
    pc_t  spc;                     // StridedPC
    pc_t  ppc;                     // producer PC
    logic r;                       // produced by a replicated instruction
  } rmap_ext_t;

  typedef enum logic [1:0] {RM_FREE = 2'd0, RM_LIVE = 2'd1, RM_DRAIN = 2'd2} rm_state_e;
  typedef enum logic {RK_LOAD = 1'b0, RK_ALU = 1'b1} rm_kind_e;

  typedef struct packed {
    rm_state_e st;
    pc_t       pc;
    rm_kind_e  kind;
    logic [OP_W-1:0] op;
    logic [USET_W-1:0] regs_id;     // register set: registers regs_id*NREPL + k
    logic [CNT_W-1:0] nregs, decode, commit, issue;
    pc_t       pc1, pc2;
    logic [CNT_W-1:0] off1, off2;       // replica of the producer's set paired with replica 0
    logic [USET_W-1:0] pset1, pset2;    // producers' register sets read by the replicas
    logic [1:0] ac;
    addr_t     range_first, range_last; // first and last replica address (loads)
    data_t     sr;                      // ALU: value of the non-replicated source; load: stride
  } rm_entry_t;

  // Allocation request for a new RM entry.
  typedef struct packed {
    logic     valid;
    pc_t      pc;
    rm_kind_e kind;
    logic [OP_W-1:0] op;
    pc_t      pc1, pc2;
    logic [CNT_W-1:0] off1, off2, nregs;
    logic [USET_W-1:0] pset1, pset2;
    addr_t    first;                // first replica address (loads)
    data_t    sr;
  } rm_alloc_t;

  // Replica micro-op.
  typedef struct packed {
    logic     valid;
    rm_kind_e kind;
    logic [OP_W-1:0] op;
    pc_t      pc;
    addr_t    addr;                 // load replicas
    logic     s1_ureg, s2_ureg;     // source read from the upper register file
    ureg_t    s1_reg, s2_reg;
    data_t    s1_val, s2_val;       // source given as a value
    ureg_t    dst;
    rm_idx_t  rm_idx;
  } replica_t;

  typedef struct packed {
    logic    valid;
    rm_idx_t rm_idx;
    ureg_t   dst;
    data_t   data;
  } rwb_t;

  typedef struct packed {
    logic  valid;
    addr_t addr;
  } st_commit_t;
endpackage
