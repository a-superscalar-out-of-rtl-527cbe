// ooo_pkg: sizes, types and small helper functions shared by the whole core.
// The sizes that come from the design description are: 64 physical registers,
// a 32-entry reorder buffer, a 4-bit branch mask (four unresolved branches in
// flight), 8-entry load and store queues, a 9-bit global history and a
// 2-entry return address stack. The bundle width is two instructions.
// Everything else here (field layout, encodings) is this implementation's own.
package ooo_pkg;

  localparam int XLEN       = 32;
  localparam int NUM_PREGS  = 64;
  localparam int PREG_W     = $clog2(NUM_PREGS);
  localparam int ROB_DEPTH  = 32;
  localparam int ROB_W      = $clog2(ROB_DEPTH);
  localparam int BR_MASK_W  = 4;
  localparam int BTAG_W     = $clog2(BR_MASK_W);
  localparam int LDQ_DEPTH  = 8;
  localparam int STQ_DEPTH  = 8;
  localparam int LDQ_W      = $clog2(LDQ_DEPTH);
  localparam int STQ_W      = $clog2(STQ_DEPTH);
  localparam int GHR_W      = 9;
  localparam int RAS_DEPTH  = 2;
  localparam int RAS_W      = $clog2(RAS_DEPTH);
  localparam int LINE_BITS  = 256;
  localparam int NUM_CDB    = 4;   // ALU, BRU, MDU, LSU

  typedef logic [PREG_W-1:0]    preg_t;
  typedef logic [4:0]           areg_t;
  typedef logic [ROB_W-1:0]     rob_idx_t;
  typedef logic [BR_MASK_W-1:0] bmask_t;
  typedef logic [BTAG_W-1:0]    btag_t;
  typedef logic [LDQ_W-1:0]     ldq_idx_t;
  typedef logic [STQ_W-1:0]     stq_idx_t;
  typedef logic [GHR_W-1:0]     ghr_t;
  typedef logic [RAS_W-1:0]     ras_ptr_t;

  typedef enum logic [1:0] {FU_ALU, FU_BRU, FU_MDU, FU_MEM} fu_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_LINK
  } alu_op_e;

  // One fetched instruction with the prediction state attached to it.
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic        pred_taken;
    logic [31:0] pred_target;
    ghr_t        ghr;        // global history before this instruction's prediction
    ras_ptr_t    ras_ptr;    // RAS state after this instruction's push/pop
    logic [31:0] ras_top;
  } fetch_slot_t;

  // Decoded instruction.
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    fu_e         fu;
    logic [3:0]  op;         // alu_op_e for ALU, funct3 for BRU/MDU/MEM
    logic        use_imm;
    logic        use_pc;
    logic        is_branch;  // conditional branch
    logic        is_jalr;
    logic        is_load;
    logic        is_store;
    logic [31:0] imm;
    areg_t       rs1;
    areg_t       rs2;
    areg_t       rd;
    logic        writes_rd;
    logic        pred_taken;
    logic [31:0] pred_target;
    ghr_t        ghr;
    ras_ptr_t    ras_ptr;
    logic [31:0] ras_top;
  } uop_t;

  // Renamed instruction as held in an issue queue.
  typedef struct packed {
    uop_t     uop;
    preg_t    pd;
    preg_t    ps1;
    preg_t    ps2;
    rob_idx_t rob;
    bmask_t   bmask;   // unresolved older branches
    btag_t    btag;    // own branch tag (BRU only)
    ldq_idx_t ldq;
    stq_idx_t stq;
  } iss_t;

  // Issued instruction with its operand values.
  typedef struct packed {
    logic        valid;
    iss_t        i;
    logic [31:0] a;
    logic [31:0] b;
  } exe_t;

  typedef struct packed {
    logic        valid;
    logic        wr;       // writes pd
    preg_t       pd;
    rob_idx_t    rob;
    logic [31:0] data;
  } cdb_t;

  // Branch resolution broadcast.
  typedef struct packed {
    logic   valid;
    logic   mispredict;
    bmask_t onehot;      // one-hot: the resolving branch's mask bit
    btag_t  tag;
  } br_t;

  typedef struct packed {
    logic  valid;
    preg_t tag;
  } wake_t;

  function automatic logic bm_killed(bmask_t m, br_t br);
    return br.valid && br.mispredict && ((m & br.onehot) != '0);
  endfunction

  function automatic bmask_t bm_upd(bmask_t m, br_t br);
    return br.valid ? (m & ~br.onehot) : m;
  endfunction

endpackage
