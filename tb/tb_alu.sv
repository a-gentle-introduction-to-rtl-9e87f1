// tb_alu: self-checking test of the LC2Kx ALU. Random and corner operands
// for add and nand; eq compared with an independent equality test.
module tb_alu;
  import lc2k_pkg::*;
  alu_op_e op;
  word_t a, b, result;
  logic eq;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .result, .eq);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(alu_op_e o, word_t x, word_t y);
    word_t exp;
    op = o; a = x; b = y; #1;
    exp = (o == ALU_ADD) ? word_t'(64'(x) + 64'(y)) : ~(x & y);
    checks++;
    if (result !== exp || eq !== (x == y)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h result=%h exp=%h eq=%b", o, x, y, result, exp, eq);
    end
  endtask

  initial begin
    apply(ALU_ADD, 36, 9);            // 45
    apply(ALU_NAND, 18, 7);           // -3
    apply(ALU_ADD, 9, 20);            // 29
    apply(ALU_ADD, 32'hFFFF_FFFF, 1); // wraps to 0
    apply(ALU_NAND, 5, 5);
    apply(ALU_ADD, 7, 7);
    for (int i = 0; i < 500; i++) begin
      automatic word_t x = $urandom;
      automatic word_t y = (i % 7 == 0) ? x : $urandom;
      apply(alu_op_e'(i % 2), x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
