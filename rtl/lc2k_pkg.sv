// lc2k_pkg: types and constants shared by the five-stage LC2Kx pipeline.
//
// The LC2Kx machine word is 32 bits, two's complement. An instruction
// carries its opcode in bits 24..22, regA in bits 21..19, regB in bits
// 18..16, and either a 16-bit signed offset in bits 15..0 (lw, sw, beq)
// or a destination register in bits 2..0 (add, nand). The opcode, regB and
// destination bit positions are the ones the pipeline diagrams label; regA,
// the offset field and the opcode values are the usual LC2K encoding.
//
// The four pipeline-register structs hold exactly the fields drawn in the
// register slices of the pipeline diagram: IF/ID {PC+1, instruction},
// ID/EX {PC+1, valA, valB, offset, dest, op}, EX/Mem {target, eq?,
// ALU result, valB, dest, op} and Mem/WB {ALU result, mdata, dest, op}.
package lc2k_pkg;

  localparam int unsigned WORD_W   = 32;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [2:0]        reg_idx_t;

  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,
    OP_NAND = 3'b001,
    OP_LW   = 3'b010,
    OP_SW   = 3'b011,
    OP_BEQ  = 3'b100,
    OP_JALR = 3'b101,   // not part of this pipeline: executes as a noop
    OP_HALT = 3'b110,   // not part of this pipeline: executes as a noop
    OP_NOOP = 3'b111
  } opcode_e;

  typedef enum logic {
    ALU_ADD  = 1'b0,
    ALU_NAND = 1'b1
  } alu_op_e;

  typedef struct packed {
    word_t pc_plus1;
    word_t instr;
  } if_id_t;

  typedef struct packed {
    opcode_e  op;
    word_t    pc_plus1;
    word_t    val_a;
    word_t    val_b;
    word_t    offset;
    reg_idx_t dest;
  } id_ex_t;

  typedef struct packed {
    opcode_e  op;
    word_t    target;
    logic     eq;
    word_t    alu_result;
    word_t    val_b;
    reg_idx_t dest;
  } ex_mem_t;

  typedef struct packed {
    opcode_e  op;
    word_t    alu_result;
    word_t    mdata;
    reg_idx_t dest;
  } mem_wb_t;

  // A noop with every other field zero: what every pipeline register holds
  // after reset, and what a pipeline starting from an empty state contains.
  localparam word_t NOOP_INSTR = {7'd0, OP_NOOP, 22'd0};

  localparam if_id_t  IF_ID_RESET  = '{pc_plus1: '0, instr: NOOP_INSTR};
  localparam id_ex_t  ID_EX_RESET  = '{op: OP_NOOP, pc_plus1: '0, val_a: '0,
                                       val_b: '0, offset: '0, dest: '0};
  localparam ex_mem_t EX_MEM_RESET = '{op: OP_NOOP, target: '0, eq: 1'b0,
                                       alu_result: '0, val_b: '0, dest: '0};
  localparam mem_wb_t MEM_WB_RESET = '{op: OP_NOOP, alu_result: '0,
                                       mdata: '0, dest: '0};

  // Field extraction.
  function automatic opcode_e instr_op(word_t i);
    return opcode_e'(i[24:22]);
  endfunction
  function automatic reg_idx_t instr_rega(word_t i);
    return i[21:19];
  endfunction
  function automatic reg_idx_t instr_regb(word_t i);
    return i[18:16];
  endfunction
  function automatic reg_idx_t instr_dest(word_t i);
    return i[2:0];
  endfunction
  function automatic word_t instr_offset(word_t i);
    return {{(WORD_W-16){i[15]}}, i[15:0]};
  endfunction

  // Instruction assembly, used by testbenches and loaders.
  function automatic word_t enc_r(opcode_e op, reg_idx_t a, reg_idx_t b, reg_idx_t d);
    return {7'd0, op, a, b, 13'd0, d};
  endfunction
  function automatic word_t enc_i(opcode_e op, reg_idx_t a, reg_idx_t b, logic [15:0] off);
    return {7'd0, op, a, b, off};
  endfunction

endpackage
