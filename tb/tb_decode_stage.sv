// tb_decode_stage: self-checking test of the decode stage. Random
// instruction words of every opcode; the register addresses, sign-extended
// offset, destination choice and passed-through fields are compared with
// values sliced directly from the instruction word.
module tb_decode_stage;
  import lc2k_pkg::*;
  if_id_t if_id;
  reg_idx_t ra, rb;
  word_t rdata_a, rdata_b;
  id_ex_t id_ex_d;
  int checks = 0, failures = 0;

  decode_stage dut (.if_id, .ra, .rb, .rdata_a, .rdata_b, .id_ex_d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(word_t instr);
    logic [2:0] op;
    word_t exp_off;
    logic [2:0] exp_dest;
    if_id.instr = instr; if_id.pc_plus1 = $urandom;
    rdata_a = $urandom; rdata_b = $urandom;
    #1;
    op = instr[24:22];
    exp_off = instr[15] ? {16'hFFFF, instr[15:0]} : {16'h0000, instr[15:0]};
    exp_dest = (op == 3'b000 || op == 3'b001) ? instr[2:0] : instr[18:16];
    checks++;
    if (ra !== instr[21:19] || rb !== instr[18:16] || id_ex_d.op !== opcode_e'(op) ||
        id_ex_d.pc_plus1 !== if_id.pc_plus1 || id_ex_d.val_a !== rdata_a ||
        id_ex_d.val_b !== rdata_b || id_ex_d.offset !== exp_off || id_ex_d.dest !== exp_dest) begin
      failures++;
      $display("FAIL instr=%h off=%h/%h dest=%0d/%0d", instr, id_ex_d.offset, exp_off, id_ex_d.dest, exp_dest);
    end
  endtask

  initial begin
    apply(32'h0000_A003);             // add 1 2 3
    apply(32'h0064_0006);             // nand 4 5 6
    apply(32'h0094_0014);             // lw 2 4 20
    apply(32'h00DF_000A);             // sw 3 7 10
    apply(32'h010A_FFFD);             // beq 1 2 -3
    for (int i = 0; i < 500; i++) apply({7'd0, 25'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
