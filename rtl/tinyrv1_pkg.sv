// tinyrv1_pkg: types and constants shared by the in-order dual-issue
// TinyRV1 processor.
//
// TinyRV1 is the eight-instruction subset of RV32IM used by the design:
// add, addi, mul, lw, sw, jal, jr and bne, with the standard RISC-V
// encodings (jr is jalr with rd = x0 and imm = 0). The table of which pipe
// may execute which instruction (A: add, addi, mul, jal, jr, bne;
// B: add, addi, lw, sw, jal, jr) is the design's steering rule and is
// encoded here in can_use_a()/can_use_b(). Widths and the decoded-instruction
// layout are this design's own choices.
package tinyrv1_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // RISC-V major opcodes used by TinyRV1
  localparam logic [6:0] OPC_OP     = 7'b0110011; // add, mul
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011; // addi
  localparam logic [6:0] OPC_LOAD   = 7'b0000011; // lw
  localparam logic [6:0] OPC_STORE  = 7'b0100011; // sw
  localparam logic [6:0] OPC_JAL    = 7'b1101111; // jal
  localparam logic [6:0] OPC_JALR   = 7'b1100111; // jr
  localparam logic [6:0] OPC_BRANCH = 7'b1100011; // bne

  typedef enum logic [3:0] {
    OP_ILLEGAL = 4'd0,
    OP_ADD     = 4'd1,
    OP_ADDI    = 4'd2,
    OP_MUL     = 4'd3,
    OP_LW      = 4'd4,
    OP_SW      = 4'd5,
    OP_JAL     = 4'd6,
    OP_JR      = 4'd7,
    OP_BNE     = 4'd8
  } op_e;

  // One decoded instruction as it leaves a decoder.
  typedef struct packed {
    op_e      op;
    reg_idx_t rs1;
    reg_idx_t rs2;
    reg_idx_t rd;
    logic     uses_rs1;
    logic     uses_rs2;
    logic     writes_rd;  // writes a register other than x0
    word_t    imm;        // sign-extended immediate of the instruction's format
  } dinst_t;

  // What one pipe carries from D into its first execute stage.
  typedef struct packed {
    logic     valid;
    op_e      op;
    reg_idx_t rd;
    logic     writes_rd;
    word_t    pc;
    word_t    op1;        // bypassed R[rs1]
    word_t    op2;        // bypassed R[rs2]
    word_t    imm;
  } issue_t;

  // A result moving down a pipe towards W.
  typedef struct packed {
    logic     valid;
    logic     writes_rd;
    logic     is_load;
    reg_idx_t rd;
    word_t    value;
  } result_t;

  // Per-cycle events that show which pipeline mechanism acted.
  typedef struct packed {
    logic dual_issue;      // two instructions left D together
    logic single_issue;    // exactly one instruction left D
    logic swizzle;         // the older instruction was steered to the B pipe
    logic split_struct;    // pair split: both needed the same pipe
    logic split_raw;       // pair split: younger reads older's destination
    logic split_waw;       // pair split: both write the same register
    logic load_use_stall;  // D waited for a load in B0
    logic bypass;          // an operand was taken from a pipeline stage
    logic jump_redirect;   // jal/jr redirected fetch from D
    logic branch_redirect; // taken bne redirected fetch from A0
    logic squash_b0;       // taken bne killed a younger instruction in B0
    logic align_discard;   // fetch block's first slot dropped (odd target)
    logic jump_drop;       // slot 1 dropped behind an issued jal/jr in slot 0
  } events_t;

  function automatic logic can_use_a(op_e op);
    return op inside {OP_ADD, OP_ADDI, OP_MUL, OP_JAL, OP_JR, OP_BNE};
  endfunction

  function automatic logic can_use_b(op_e op);
    return op inside {OP_ADD, OP_ADDI, OP_LW, OP_SW, OP_JAL, OP_JR};
  endfunction

endpackage
