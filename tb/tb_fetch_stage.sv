// tb_fetch_stage: self-checking test of the fetch stage. Checks the reset
// PC, one PC increment per enabled cycle, hold while disabled, the branch
// target taken through the PC mux, and the IF/ID contents {PC+1, instr}.
module tb_fetch_stage;
  import lc2k_pkg::*;
  logic clk = 0, rst, en, take_branch;
  word_t branch_target, instr, pc;
  if_id_t if_id_d;
  int checks = 0, failures = 0;
  word_t exp_pc;

  fetch_stage dut (.clk, .rst, .en, .take_branch, .branch_target, .instr, .pc, .if_id_d);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (pc=%0d exp=%0d)", what, pc, exp_pc); end
  endtask

  initial begin
    rst = 1; en = 0; take_branch = 0; branch_target = 0; instr = 0;
    @(posedge clk); #1;
    exp_pc = 0;
    check(pc == 0, "reset PC");
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom % 4) != 0;
      take_branch = ($urandom % 5) == 0;
      branch_target = $urandom % 1000;
      instr = $urandom;
      #1;
      check(if_id_d.pc_plus1 == exp_pc + 1 && if_id_d.instr == instr, "IF/ID contents");
      @(posedge clk); #1;
      if (en) exp_pc = take_branch ? branch_target : exp_pc + 1;
      check(pc == exp_pc, "next PC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
