// alu: the execute-stage ALU of the LC2Kx pipeline.
//
// Computes a + b (ALU_ADD, used by add and by the lw/sw address
// calculation) or ~(a & b) (ALU_NAND), and raises eq when its two inputs
// are equal, the comparison a beq needs. Purely combinational.
//
// The two operations and the eq? output leaving the ALU follow the
// pipeline diagram; the one-bit operation encoding is this design's own.
module alu
  import lc2k_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    eq
);

  always_comb begin
    unique case (op)
      ALU_ADD:  result = a + b;
      ALU_NAND: result = ~(a & b);
      default:  result = a + b;
    endcase
  end

  assign eq = (a == b);

endmodule
