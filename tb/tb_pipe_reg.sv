// tb_pipe_reg: self-checking test of the pipeline register, instantiated
// as ID/EX. Checks the reset value (a noop), capture at the edge when
// enabled, hold when disabled, and that the output does not change
// between edges.
module tb_pipe_reg;
  import lc2k_pkg::*;
  logic clk = 0, rst, en;
  id_ex_t d, q, exp_q;
  int checks = 0, failures = 0;

  pipe_reg #(.T(id_ex_t)) dut (.clk, .rst, .en, .rst_val(ID_EX_RESET), .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic id_ex_t rand_id_ex();
    id_ex_t v;
    v.op = opcode_e'($urandom % 8);
    v.pc_plus1 = $urandom; v.val_a = $urandom; v.val_b = $urandom;
    v.offset = $urandom; v.dest = 3'($urandom);
    return v;
  endfunction

  initial begin
    rst = 1; en = 1; d = rand_id_ex();
    @(posedge clk); #1;
    checks++;
    if (q.op != OP_NOOP || q.pc_plus1 != 0 || q.val_a != 0 || q.val_b != 0 || q.offset != 0 || q.dest != 0) begin
      failures++; $display("FAIL reset value");
    end
    exp_q = q;
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom % 3) != 0;
      d = rand_id_ex();
      #2;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL changed between edges"); end
      @(posedge clk); #1;
      if (en) exp_q = d;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL capture en=%b", en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
