// decode_stage: stage 2 of the LC2Kx pipeline.
//
// Reads the IF/ID register, sends the regA and regB fields to the register
// file's read ports, and forms the ID/EX contents: the opcode (bits
// 24..22), PC+1 passed on unchanged, the two register values, the 16-bit
// offset sign-extended to 32 bits, and the destination register picked by
// a mux: bits 2..0 for add and nand, bits 18..16 for every other opcode
// (lw, sw and beq name their second register there).
//
// Purely combinational; the register file is outside this module. Decoding
// is minimal: later stages derive their own controls from the opcode.
// The field positions, the sign extension and the destination mux follow
// the pipeline diagrams; the mux select for opcodes other than add, nand,
// lw and sw is this design's choice.
module decode_stage
  import lc2k_pkg::*;
(
  input  if_id_t   if_id,
  output reg_idx_t ra,
  output reg_idx_t rb,
  input  word_t    rdata_a,
  input  word_t    rdata_b,
  output id_ex_t   id_ex_d
);

  opcode_e  op;
  reg_idx_t dest;

  assign op = instr_op(if_id.instr);
  assign ra = instr_rega(if_id.instr);
  assign rb = instr_regb(if_id.instr);

  always_comb begin
    unique case (op)
      OP_ADD, OP_NAND: dest = instr_dest(if_id.instr);
      default:         dest = instr_regb(if_id.instr);
    endcase
  end

  assign id_ex_d = '{op:       op,
                     pc_plus1: if_id.pc_plus1,
                     val_a:    rdata_a,
                     val_b:    rdata_b,
                     offset:   instr_offset(if_id.instr),
                     dest:     dest};

endmodule
