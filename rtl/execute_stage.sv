// execute_stage: stage 3 of the LC2Kx pipeline.
//
// Reads the ID/EX register. The ALU's first input is valA; a mux gives its
// second input valB for add, nand and beq, and the sign-extended offset for
// lw and sw (and any other opcode). The ALU NANDs for nand and adds
// otherwise, and reports whether its inputs are equal. A separate adder
// forms PC+1+offset, the branch target. The EX/Mem contents are the target,
// eq?, the ALU result, valB (store data for sw), the destination register
// and the opcode.
//
// Purely combinational. The datapath (mux, ALU, target adder) follows the
// execute-stage diagram; which opcodes select which mux input and ALU
// operation is this design's reading of the instruction set.
module execute_stage
  import lc2k_pkg::*;
(
  input  id_ex_t  id_ex,
  output ex_mem_t ex_mem_d
);

  word_t   alu_b;
  word_t   alu_result;
  logic    alu_eq;
  alu_op_e alu_op;

  always_comb begin
    unique case (id_ex.op)
      OP_ADD, OP_NAND, OP_BEQ: alu_b = id_ex.val_b;
      default:                 alu_b = id_ex.offset;
    endcase
  end

  assign alu_op = (id_ex.op == OP_NAND) ? ALU_NAND : ALU_ADD;

  alu u_alu (
    .op     (alu_op),
    .a      (id_ex.val_a),
    .b      (alu_b),
    .result (alu_result),
    .eq     (alu_eq)
  );

  assign ex_mem_d = '{op:         id_ex.op,
                      target:     id_ex.pc_plus1 + id_ex.offset,
                      eq:         alu_eq,
                      alu_result: alu_result,
                      val_b:      id_ex.val_b,
                      dest:       id_ex.dest};

endmodule
