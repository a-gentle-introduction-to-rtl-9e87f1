// memory_stage: stage 4 of the LC2Kx pipeline.
//
// Reads the EX/Mem register. The opcode drives the data memory's controls:
// lw enables a read and sw a write, both at the address in the ALU result,
// sw writing valB. A beq whose eq? flag is set is taken here: take_branch
// switches the fetch stage's PC mux to the target PC+1+offset for the next
// edge. The instructions already fetched behind the branch are not
// cancelled. The Mem/WB contents are the ALU result, the memory read data
// (0 unless lw), the destination register and the opcode.
//
// Purely combinational; the data memory is outside this module. Resolving
// branches in this stage and the memory controls follow the description;
// leaving younger instructions to run is this design's reading of a
// pipeline that has no hazard handling yet.
module memory_stage
  import lc2k_pkg::*;
(
  input  ex_mem_t ex_mem,
  output logic    mem_en,
  output logic    mem_rw,
  output word_t   mem_addr,
  output word_t   mem_wdata,
  input  word_t   mem_rdata,
  output logic    take_branch,
  output word_t   branch_target,
  output mem_wb_t mem_wb_d
);

  assign mem_en        = (ex_mem.op == OP_LW) || (ex_mem.op == OP_SW);
  assign mem_rw        = (ex_mem.op == OP_SW);
  assign mem_addr      = ex_mem.alu_result;
  assign mem_wdata     = ex_mem.val_b;
  assign take_branch   = (ex_mem.op == OP_BEQ) && ex_mem.eq;
  assign branch_target = ex_mem.target;

  assign mem_wb_d = '{op:         ex_mem.op,
                      alu_result: ex_mem.alu_result,
                      mdata:      mem_rdata,
                      dest:       ex_mem.dest};

endmodule
