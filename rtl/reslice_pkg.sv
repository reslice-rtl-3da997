// reslice_pkg: types and sizes shared by the ReSlice blocks.
//
// ReSlice buffers the forward slice of a predicted value (the seed) while a
// speculative task runs, and later replays only that slice when the seed turns
// out to be mispredicted. The sizes below are the configuration of the design
// as evaluated: 16 slice descriptors of 16 entries, a 160-entry instruction
// buffer, an 80-entry live-in file, a 32-entry tag cache and undo log, and a
// re-execution unit with 16 registers.
//
// The decoded instruction format (40 bits, the width of an instruction buffer
// entry) and the opcode set are this design's own choice: the source only says
// the ISA is RISC, that ALU, store and branch instructions have two register
// sources, and that loads have one register and one memory source.
//   [39:36] opcode   [35:32] rd   [31:28] rs1   [27:24] rs2   [23:0] imm
// Loads are  rd <- MEM[rs1 + imm];  stores are MEM[rs1 + imm] <- rs2.
// The left source operand is rs1, the right one is rs2 (or the memory word for
// a load).
package reslice_pkg;

  localparam int unsigned XLEN         = 32;   // data and address width
  localparam int unsigned N_SLICES     = 16;   // slice descriptors = SliceTag bits
  localparam int unsigned SD_ENTRIES   = 16;   // entries per slice descriptor
  localparam int unsigned IB_ENTRIES   = 160;  // instruction buffer entries
  localparam int unsigned IB_WIDTH     = 40;   // bits per instruction buffer entry
  localparam int unsigned SLIF_ENTRIES = 80;   // slice live-in file entries
  localparam int unsigned AREGS        = 16;   // architectural registers (= REU registers)
  localparam int unsigned MAX_CONC     = 3;    // slices re-executed together at most

  localparam int unsigned IB_PTR_W   = $clog2(IB_ENTRIES);    // 8
  localparam int unsigned SLIF_PTR_W = $clog2(SLIF_ENTRIES);  // 7
  localparam int unsigned SD_IDX_W   = $clog2(SD_ENTRIES);    // 4
  localparam int unsigned SLICE_ID_W = $clog2(N_SLICES);      // 4
  localparam int unsigned AREG_W     = $clog2(AREGS);         // 4

  typedef logic [N_SLICES-1:0] slicetag_t;
  typedef logic [XLEN-1:0]     word_t;

  typedef enum logic [3:0] {
    OP_ADD = 4'd0,  OP_SUB = 4'd1,  OP_AND = 4'd2,  OP_OR  = 4'd3,
    OP_XOR = 4'd4,  OP_SLT = 4'd5,  OP_SLL = 4'd6,  OP_SRL = 4'd7,
    OP_LD  = 4'd8,  OP_ST  = 4'd9,  OP_BEQ = 4'd10, OP_BNE = 4'd11,
    OP_BLT = 4'd12, OP_JR  = 4'd13, OP_NOP = 4'd15
  } opcode_e;

  typedef struct packed {
    opcode_e           op;
    logic [AREG_W-1:0] rd;
    logic [AREG_W-1:0] rs1;
    logic [AREG_W-1:0] rs2;
    logic [23:0]       imm;
  } dinst_t;  // 40 bits

  // One slice descriptor entry: 8 + 7 + 3 = 18 bits.
  typedef struct packed {
    logic [IB_PTR_W-1:0]   ib;        // SD.IB: decoded instruction in the IB
    logic [SLIF_PTR_W-1:0] slif;      // SD.SLIF: live-in value in the SLIF
    logic                  taken;     // TakenBranch
    logic                  left_op;   // LeftOp: left source is in the SLIF
    logic                  right_op;  // RightOp: right source is in the SLIF
  } sd_entry_t;

  // Why a re-execution failed (the classes used to characterise re-executions).
  typedef enum logic [2:0] {
    FAIL_NONE      = 3'd0,
    FAIL_BRANCH    = 3'd1,  // branch outcome differs from TakenBranch
    FAIL_DANGLING  = 3'd2,  // Dangling load
    FAIL_INH_LOAD  = 3'd3,  // Inhibiting load
    FAIL_INH_STORE = 3'd4,  // Inhibiting store
    FAIL_MERGE     = 3'd5,  // undo not possible (Theorem 5 condition)
    FAIL_NOSLICE   = 3'd6   // slice not buffered / buffering aborted / too many slices
  } fail_e;

  function automatic logic is_mem(opcode_e op);
    return (op == OP_LD) || (op == OP_ST);
  endfunction

  function automatic logic is_branch(opcode_e op);
    return (op == OP_BEQ) || (op == OP_BNE) || (op == OP_BLT);
  endfunction

  // Effective address of a load or store.
  function automatic word_t eff_addr(word_t base, logic [23:0] imm);
    return base + word_t'({{(XLEN-24){imm[23]}}, imm});
  endfunction

  // ALU result for the two-register ALU operations.
  function automatic word_t alu(opcode_e op, word_t a, word_t b);
    unique case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLT:  return word_t'($signed(a) < $signed(b));
      OP_SLL:  return a << b[4:0];
      OP_SRL:  return a >> b[4:0];
      default: return '0;
    endcase
  endfunction

  // Branch outcome (taken) of a conditional branch.
  function automatic logic br_taken(opcode_e op, word_t a, word_t b);
    unique case (op)
      OP_BEQ:  return a == b;
      OP_BNE:  return a != b;
      OP_BLT:  return $signed(a) < $signed(b);
      default: return 1'b0;
    endcase
  endfunction

endpackage
