// writeback_stage: stage 5 of the LC2Kx pipeline.
//
// Reads the Mem/WB register and drives the register file's write port: a
// mux chooses the memory read data for lw and the ALU result for add and
// nand, the destination is the dest field, and the write enable is raised
// for those three opcodes only. The register file performs the write at
// the clock edge ending this cycle.
//
// Purely combinational; follows the writeback-stage description.
module writeback_stage
  import lc2k_pkg::*;
(
  input  mem_wb_t  mem_wb,
  output logic     rf_we,
  output reg_idx_t rf_wa,
  output word_t    rf_wdata
);

  always_comb begin
    unique case (mem_wb.op)
      OP_ADD, OP_NAND, OP_LW: rf_we = 1'b1;
      default:                rf_we = 1'b0;
    endcase
  end

  assign rf_wa    = mem_wb.dest;
  assign rf_wdata = (mem_wb.op == OP_LW) ? mem_wb.mdata : mem_wb.alu_result;

endmodule
