// tb_memory_stage: self-checking test of the memory stage. Random EX/Mem
// contents of every opcode; memory enable and R/W, address and store data,
// the taken-branch decision and target, and the Mem/WB fields are checked.
module tb_memory_stage;
  import lc2k_pkg::*;
  ex_mem_t ex_mem;
  logic mem_en, mem_rw, take_branch;
  word_t mem_addr, mem_wdata, mem_rdata, branch_target;
  mem_wb_t mem_wb_d;
  int checks = 0, failures = 0;

  memory_stage dut (.ex_mem, .mem_en, .mem_rw, .mem_addr, .mem_wdata, .mem_rdata,
                    .take_branch, .branch_target, .mem_wb_d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      automatic opcode_e op = opcode_e'(i % 8);
      ex_mem = '{op: op, target: $urandom, eq: 1'($urandom), alu_result: $urandom,
                 val_b: $urandom, dest: 3'($urandom)};
      mem_rdata = $urandom;
      #1;
      checks++;
      if (mem_en !== (op == OP_LW || op == OP_SW) || (mem_en && mem_rw !== (op == OP_SW)) ||
          mem_addr !== ex_mem.alu_result || mem_wdata !== ex_mem.val_b ||
          take_branch !== (op == OP_BEQ && ex_mem.eq) || branch_target !== ex_mem.target ||
          mem_wb_d.op !== op || mem_wb_d.alu_result !== ex_mem.alu_result ||
          mem_wb_d.mdata !== mem_rdata || mem_wb_d.dest !== ex_mem.dest) begin
        failures++;
        $display("FAIL op=%s en=%b rw=%b take=%b", op.name(), mem_en, mem_rw, take_branch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
