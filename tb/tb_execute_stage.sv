// tb_execute_stage: self-checking test of the execute stage. Random ID/EX
// contents of every opcode; the ALU input choice, add/nand result, eq?,
// branch target PC+1+offset and passed fields are checked against an
// independent computation.
module tb_execute_stage;
  import lc2k_pkg::*;
  id_ex_t id_ex;
  ex_mem_t ex_mem_d;
  int checks = 0, failures = 0;

  execute_stage dut (.id_ex, .ex_mem_d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(opcode_e op, word_t pcp1, word_t a, word_t b, word_t off);
    word_t bsel, exp_res;
    id_ex = '{op: op, pc_plus1: pcp1, val_a: a, val_b: b, offset: off, dest: 3'($urandom)};
    #1;
    bsel = (op == OP_ADD || op == OP_NAND || op == OP_BEQ) ? b : off;
    exp_res = (op == OP_NAND) ? ~(a & bsel) : a + bsel;
    checks++;
    if (ex_mem_d.op !== op || ex_mem_d.target !== pcp1 + off || ex_mem_d.eq !== (a == bsel) ||
        ex_mem_d.alu_result !== exp_res || ex_mem_d.val_b !== b || ex_mem_d.dest !== id_ex.dest) begin
      failures++;
      $display("FAIL op=%s res=%h/%h target=%h eq=%b", op.name(), ex_mem_d.alu_result, exp_res, ex_mem_d.target, ex_mem_d.eq);
    end
  endtask

  initial begin
    apply(OP_ADD, 1, 36, 9, 3);       // 45, target 4
    apply(OP_NAND, 2, 18, 7, 6);      // -3, target 8
    apply(OP_LW, 3, 9, 18, 20);       // 29, target 23
    apply(OP_SW, 5, 45, 22, 10);      // 55, target 15
    apply(OP_BEQ, 7, 5, 5, -32'sd3);  // equal
    for (int i = 0; i < 500; i++) begin
      automatic word_t a = $urandom;
      automatic word_t b = (i % 4 == 0) ? a : $urandom;
      apply(opcode_e'(i % 8), $urandom, a, b, word_t'(signed'(16'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
