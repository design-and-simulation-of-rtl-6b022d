// ss_pkg: types and constants shared by the superscalar ARM-subset core.
//
// The core executes a reduced ARM instruction set: data-processing (ALU)
// instructions with a register or 8-bit immediate second operand and no
// shifter, word loads/stores with an immediate offset, branches, and three
// simulation instructions (NOP, HLT, REG). The instruction class comes from
// bits 27..25 of the instruction word: 00x ALU, 01x load/store, 101 branch,
// 111 special. The special sub-code in bits 1..0 (1 = HLT, 2 = REG, others
// NOP) follows the original model; the rest of the special encoding is this
// design's own choice.
//
// Sizes: 16 architectural registers, 64 physical registers and 64 holding
// slots, as in the original model. Physical register 0 is never allocated:
// it serves as the "no previous live range" marker of the colouring unit.
package ss_pkg;

  localparam int XLEN    = 32;
  localparam int NARCH   = 16;
  localparam int NPREG   = 64;
  localparam int PREG_W  = $clog2(NPREG);
  localparam int NSLOTS  = 64;
  localparam int SLOT_W  = $clog2(NSLOTS);
  localparam int NEXEC   = 3;  // execution units: ALU0, ALU1, load/store

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [3:0]        areg_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [SLOT_W-1:0] slot_t;

  // Status flags, packed as {N, Z, C, V}.
  typedef logic [3:0] flags_t;

  typedef enum logic [2:0] {
    CLS_NOP  = 3'd0,  // unsupported encodings and NOP: complete on entry
    CLS_ALU  = 3'd1,
    CLS_LS   = 3'd2,
    CLS_BR   = 3'd3,
    CLS_SPEC = 3'd4
  } iclass_t;

  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } alu_op_t;

  localparam logic [1:0] SPEC_HLT = 2'd1;
  localparam logic [1:0] SPEC_REG = 2'd2;

  // Decoded instruction, as latched at the feeder output. Register numbers
  // are architectural.
  typedef struct packed {
    iclass_t    cls;
    alu_op_t    op;
    logic       s;         // ALU: update flags
    logic [3:0] cond;      // predicate (only used for branches)
    logic       use_imm;   // ALU: operand 2 is the immediate
    word_t      imm;       // ALU immediate or load/store offset
    areg_t      rn;        // operand 1 (ALU Rn, load/store base)
    logic       rn_used;
    areg_t      rm;        // operand 2 (ALU Rm, store data register)
    logic       rm_used;
    areg_t      rd;        // destination
    logic       rd_write;
    logic       ls_load;   // load/store: 1 = LDR, 0 = STR
    logic       ls_up;     // load/store: add (1) or subtract (0) offset
    logic [1:0] special;   // special sub-code
    word_t      pc;        // address of this instruction
    logic       pred_taken;// branch: predictor said "taken"
    word_t      altaddr;   // branch: address to use if prediction is wrong
  } dec_t;

  // Operand reference after colouring: a physical register, or (arch = 1)
  // an architectural register whose number sits in the low four bits.
  typedef struct packed {
    preg_t num;
    logic  arch;
    logic  used;
  } opnd_t;

  // Coloured instruction, as written into a holding slot.
  typedef struct packed {
    dec_t  d;
    opnd_t o1;
    opnd_t o2;
    preg_t pd;        // physical destination
    logic  pd_valid;
  } col_t;

  // Per-slot state visible to the execution and retirement multiplexers.
  typedef struct packed {
    col_t   ins;
    logic   empty;
    logic   complete;
    flags_t flags;     // flags produced by execution
    flags_t fmask;     // which of {N,Z,C,V} the instruction sets
  } slot_view_t;

  // Notification of a physical register that is valid from the next cycle.
  typedef struct packed {
    logic  en;
    preg_t num;
  } notify_t;

  // Completion report from an execution unit to a slot.
  typedef struct packed {
    logic   en;
    slot_t  slot;
    flags_t flags;
    flags_t fmask;
  } compl_t;

  // ARM condition-code test. Returns 1 when the predicate holds for flags f.
  function automatic logic cond_pass(input logic [3:0] cond, input flags_t f);
    logic n, z, c, v;
    {n, z, c, v} = f;
    case (cond)
      4'h0: return z;                 // EQ
      4'h1: return !z;                // NE
      4'h2: return c;                 // CS
      4'h3: return !c;                // CC
      4'h4: return n;                 // MI
      4'h5: return !n;                // PL
      4'h6: return v;                 // VS
      4'h7: return !v;                // VC
      4'h8: return c && !z;           // HI
      4'h9: return !c || z;           // LS
      4'hA: return n == v;            // GE
      4'hB: return n != v;            // LT
      4'hC: return !z && (n == v);    // GT
      4'hD: return z || (n != v);     // LE
      4'hE: return 1'b1;              // AL
      default: return 1'b0;           // NV
    endcase
  endfunction

endpackage
