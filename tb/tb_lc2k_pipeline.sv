// tb_lc2k_pipeline: end-to-end test of the five-stage LC2Kx pipeline at its
// default sizes.
//
// Program A is the five-instruction sample (add 1 2 3; nand 4 5 6;
// lw 2 4 20; add 2 5 5; sw 3 7 10) placed after a preamble that loads
// R1..R7 = 36, 9, 12, 18, 7, 41, 22 and three noops. Cycle by cycle, every
// pipeline-register field and register-file value is compared with the
// hand-worked trace of that program (PC values shifted by the preamble's
// length), which also checks the latency of four edges from fetch to
// Mem/WB and one completion per cycle.
//
// Program B exercises the rest: a taken beq (whose three following
// instructions still run), a beq not taken, a write to R0, an instruction
// that reads a register one instruction after it is written and so gets the
// old value, a store, and a pause of the run input in mid-program. Each of
// these mechanisms is counted and must occur at least once.
module tb_lc2k_pipeline;
  import lc2k_pkg::*;

  localparam int unsigned B = 10;   // address of the sample program

  logic    clk = 1'b0;
  logic    rst, run;
  logic    imem_we, dmem_we;
  logic [15:0] imem_addr, dmem_addr;
  word_t   imem_data, dmem_wdata, dmem_rdata;
  word_t   pc;
  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  int checks = 0, failures = 0;
  int n_add = 0, n_nand = 0, n_lw = 0, n_sw = 0, n_noop = 0;
  int n_taken = 0, n_not_taken = 0, n_r0_write = 0, n_stale = 0, n_pause = 0;
  int cycles = 0;

  lc2k_pipeline dut (
    .clk, .rst, .run,
    .imem_load_we (imem_we), .imem_load_addr (imem_addr), .imem_load_data (imem_data),
    .dmem_host_we (dmem_we), .dmem_host_addr (dmem_addr),
    .dmem_host_wdata (dmem_wdata), .dmem_host_rdata (dmem_rdata),
    .pc, .if_id, .id_ex, .ex_mem, .mem_wb
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycles, what);
    end
  endtask

  function automatic bit writes_reg(opcode_e op);
    return op == OP_ADD || op == OP_NAND || op == OP_LW;
  endfunction

  // The PC the fetch stage will load at the coming edge.
  word_t pc_next_seen;
  assign pc_next_seen = dut.u_fetch.pc_next;

  // Mechanism counters, sampled every cycle the machine runs.
  always @(posedge clk) if (!rst && run) begin
    cycles++;
    unique case (mem_wb.op)
      OP_ADD:  n_add++;
      OP_NAND: n_nand++;
      OP_LW:   n_lw++;
      OP_SW:   n_sw++;
      default: n_noop++;
    endcase
    // A taken branch is counted where it shows: the PC not advancing by one.
    if (ex_mem.op == OP_BEQ && ex_mem.eq && pc_next_seen != pc + 1) n_taken++;
    if (ex_mem.op == OP_BEQ && !ex_mem.eq) n_not_taken++;
    if (writes_reg(mem_wb.op) && mem_wb.dest == 3'd0) n_r0_write++;
    // An instruction in decode reading a register that an older instruction
    // still in the pipe has not yet written: it reads the old value.
    if (instr_op(if_id.instr) inside {OP_ADD, OP_NAND, OP_SW, OP_BEQ, OP_LW}) begin
      automatic reg_idx_t a = instr_rega(if_id.instr);
      automatic reg_idx_t b = instr_regb(if_id.instr);
      automatic bit rb_read = instr_op(if_id.instr) != OP_LW;
      if ((writes_reg(id_ex.op)  && id_ex.dest  != 0 && (id_ex.dest  == a || (rb_read && id_ex.dest  == b))) ||
          (writes_reg(ex_mem.op) && ex_mem.dest != 0 && (ex_mem.dest == a || (rb_read && ex_mem.dest == b))) ||
          (writes_reg(mem_wb.op) && mem_wb.dest != 0 && (mem_wb.dest == a || (rb_read && mem_wb.dest == b))))
        n_stale++;
    end
  end

  task automatic imem_write(input int unsigned a, input word_t d);
    imem_we = 1'b1; imem_addr = 16'(a); imem_data = d;
    @(posedge clk); #1;
    imem_we = 1'b0;
  endtask

  task automatic dmem_write(input int unsigned a, input word_t d);
    dmem_we = 1'b1; dmem_addr = 16'(a); dmem_wdata = d;
    @(posedge clk); #1;
    dmem_we = 1'b0;
  endtask

  function automatic word_t dmem_peek(input int unsigned a);
    return dut.u_dmem.mem[a];
  endfunction


  task automatic step();
    @(posedge clk); #1;
  endtask

  task automatic reset_and_fill_noops(input int unsigned n);
    rst = 1'b1; run = 1'b0;
    for (int unsigned i = 0; i < n; i++) imem_write(i, NOOP_INSTR);
    step();
    rst = 1'b0;
  endtask

  // Register-file contents as the design holds them.
  function automatic word_t r(input int unsigned i);
    return (i == 0) ? '0 : dut.u_rf.regs[i];
  endfunction

  localparam int SAMPLE_R [8] = '{0, 36, 9, 12, 18, 7, 41, 22};

  initial begin
    rst = 1'b1; run = 1'b0;
    imem_we = 1'b0; imem_addr = '0; imem_data = '0;
    dmem_we = 1'b0; dmem_addr = '0; dmem_wdata = '0;
    step(); step();

    // ------------------------------------------------ program A (sample)
    reset_and_fill_noops(64);
    rst = 1'b1;
    for (int i = 1; i <= 7; i++) begin
      imem_write(i - 1, enc_i(OP_LW, 3'd0, 3'(i), 16'(100 + i)));
      dmem_write(100 + i, word_t'(SAMPLE_R[i]));
    end
    imem_write(B + 0, enc_r(OP_ADD,  3'd1, 3'd2, 3'd3));
    imem_write(B + 1, enc_r(OP_NAND, 3'd4, 3'd5, 3'd6));
    imem_write(B + 2, enc_i(OP_LW,   3'd2, 3'd4, 16'd20));
    imem_write(B + 3, enc_r(OP_ADD,  3'd2, 3'd5, 3'd5));
    imem_write(B + 4, enc_i(OP_SW,   3'd3, 3'd7, 16'd10));
    dmem_write(29, 32'd99);
    dmem_write(55, 32'd0);
    step();
    check(pc == 0 && if_id.instr == NOOP_INSTR && id_ex.op == OP_NOOP &&
          ex_mem.op == OP_NOOP && mem_wb.op == OP_NOOP, "reset state: PC 0, all noops");
    rst = 1'b0; run = 1'b1;

    repeat (B) step();   // state after the preamble = "time 0" of the sample
    check(pc == B, "PC at start of sample");

    // time 1 (the last preamble load, lw into R7, writes at this edge)
    step();
    for (int i = 1; i <= 7; i++) check(r(i) == word_t'(SAMPLE_R[i]), $sformatf("preamble loaded R%0d", i));
    check(if_id.pc_plus1 == B + 1 && if_id.instr == enc_r(OP_ADD, 1, 2, 3), "t1 IF/ID add 1 2 3");
    // time 2
    step();
    check(if_id.pc_plus1 == B + 2 && if_id.instr == enc_r(OP_NAND, 4, 5, 6), "t2 IF/ID nand 4 5 6");
    check(id_ex.op == OP_ADD && id_ex.pc_plus1 == B + 1 && id_ex.val_a == 36 && id_ex.val_b == 9 &&
          id_ex.offset == 3 && id_ex.dest == 3, "t2 ID/EX add");
    // time 3
    step();
    check(if_id.pc_plus1 == B + 3 && if_id.instr == enc_i(OP_LW, 2, 4, 20), "t3 IF/ID lw 2 4 20");
    check(id_ex.op == OP_NAND && id_ex.pc_plus1 == B + 2 && id_ex.val_a == 18 && id_ex.val_b == 7 &&
          id_ex.offset == 6 && id_ex.dest == 6, "t3 ID/EX nand");
    check(ex_mem.op == OP_ADD && ex_mem.target == B + 4 && !ex_mem.eq && ex_mem.alu_result == 45 &&
          ex_mem.val_b == 9 && ex_mem.dest == 3, "t3 EX/Mem add");
    // time 4
    step();
    check(if_id.pc_plus1 == B + 4 && if_id.instr == enc_r(OP_ADD, 2, 5, 5), "t4 IF/ID add 2 5 5");
    check(id_ex.op == OP_LW && id_ex.pc_plus1 == B + 3 && id_ex.val_a == 9 && id_ex.val_b == 18 &&
          id_ex.offset == 20 && id_ex.dest == 4, "t4 ID/EX lw");
    check(ex_mem.op == OP_NAND && ex_mem.target == B + 8 && !ex_mem.eq && ex_mem.alu_result == -32'sd3 &&
          ex_mem.val_b == 7 && ex_mem.dest == 6, "t4 EX/Mem nand");
    check(mem_wb.op == OP_ADD && mem_wb.alu_result == 45 && mem_wb.mdata == 0 && mem_wb.dest == 3,
          "t4 Mem/WB add (latency: four edges from fetch)");
    check(r(3) == 12, "t4 R3 not yet written");
    // time 5
    step();
    check(if_id.pc_plus1 == B + 5 && if_id.instr == enc_i(OP_SW, 3, 7, 10), "t5 IF/ID sw 3 7 10");
    check(id_ex.op == OP_ADD && id_ex.pc_plus1 == B + 4 && id_ex.val_a == 9 && id_ex.val_b == 7 &&
          id_ex.offset == 5 && id_ex.dest == 5, "t5 ID/EX add 2 5 5");
    check(ex_mem.op == OP_LW && ex_mem.target == B + 23 && !ex_mem.eq && ex_mem.alu_result == 29 &&
          ex_mem.val_b == 18 && ex_mem.dest == 4, "t5 EX/Mem lw");
    check(mem_wb.op == OP_NAND && mem_wb.alu_result == -32'sd3 && mem_wb.mdata == 0 && mem_wb.dest == 6,
          "t5 Mem/WB nand");
    check(r(3) == 45, "t5 R3 = 45");
    // time 6
    step();
    check(id_ex.op == OP_SW && id_ex.pc_plus1 == B + 5 && id_ex.val_a == 45 && id_ex.val_b == 22 &&
          id_ex.offset == 10 && id_ex.dest == 7, "t6 ID/EX sw");
    check(ex_mem.op == OP_ADD && ex_mem.target == B + 9 && ex_mem.alu_result == 16 &&
          ex_mem.val_b == 7 && ex_mem.dest == 5, "t6 EX/Mem add 2 5 5");
    check(mem_wb.op == OP_LW && mem_wb.alu_result == 29 && mem_wb.mdata == 99 && mem_wb.dest == 4,
          "t6 Mem/WB lw");
    check(r(6) == -32'sd3, "t6 R6 = -3");
    // time 7
    step();
    check(ex_mem.op == OP_SW && ex_mem.target == B + 15 && ex_mem.alu_result == 55 &&
          ex_mem.val_b == 22 && ex_mem.dest == 7, "t7 EX/Mem sw");
    check(mem_wb.op == OP_ADD && mem_wb.alu_result == 16 && mem_wb.mdata == 0 && mem_wb.dest == 5,
          "t7 Mem/WB add 2 5 5");
    check(r(4) == 99, "t7 R4 = 99");
    check(dmem_peek(55) == 0, "t7 Mem[55] not yet written");
    // time 8
    step();
    check(mem_wb.op == OP_SW && mem_wb.alu_result == 55 && mem_wb.mdata == 0 && mem_wb.dest == 7,
          "t8 Mem/WB sw");
    check(r(5) == 16, "t8 R5 = 16");
    check(dmem_peek(55) == 22, "t8 Mem[55] = 22");
    dmem_addr = 16'd55; #1;
    check(dmem_rdata == 22, "host port reads Mem[55] = 22");
    // time 9: the sample has left the pipeline; nothing else changed
    step();
    check(r(1) == 36 && r(2) == 9 && r(3) == 45 && r(4) == 99 && r(5) == 16 &&
          r(6) == -32'sd3 && r(7) == 22, "final registers of the sample");

    // ---------------------------------- program B (branches, hazards, R0)
    run = 1'b0;
    reset_and_fill_noops(64);
    rst = 1'b1;
    imem_write(0,  enc_i(OP_LW,   3'd0, 3'd1, 16'd200));   // R1 = 5
    imem_write(1,  enc_i(OP_LW,   3'd0, 3'd2, 16'd201));   // R2 = 5
    imem_write(2,  enc_i(OP_LW,   3'd0, 3'd3, 16'd202));   // R3 = 1
    imem_write(6,  enc_i(OP_BEQ,  3'd1, 3'd2, 16'd4));     // taken -> 11
    imem_write(7,  enc_r(OP_ADD,  3'd1, 3'd3, 3'd4));      // runs after the beq: R4 = 6
    imem_write(10, enc_i(OP_SW,   3'd0, 3'd1, 16'd211));   // skipped: Mem[211] stays 0
    imem_write(11, enc_i(OP_BEQ,  3'd1, 3'd3, 16'd2));     // not taken
    imem_write(12, enc_r(OP_ADD,  3'd3, 3'd3, 3'd6));      // R6 = 2
    imem_write(15, enc_r(OP_NAND, 3'd1, 3'd3, 3'd7));      // R7 = ~(5 & 1)
    imem_write(16, enc_r(OP_ADD,  3'd1, 3'd3, 3'd0));      // write to R0: ignored
    imem_write(17, enc_r(OP_ADD,  3'd1, 3'd3, 3'd5));      // R5 = 6
    imem_write(18, enc_r(OP_ADD,  3'd5, 3'd5, 3'd6));      // reads old R5 (0): R6 = 0
    imem_write(21, enc_i(OP_SW,   3'd0, 3'd7, 16'd210));   // Mem[210] = R7
    imem_write(22, enc_i(OP_LW,   3'd0, 3'd2, 16'd202));   // R2 = 1
    dmem_write(200, 32'd5);
    dmem_write(201, 32'd5);
    dmem_write(202, 32'd1);
    dmem_write(210, 32'd0);
    dmem_write(211, 32'd0);
    step();
    rst = 1'b0; run = 1'b1;
    repeat (9) step();
    run = 1'b0;            // pause: nothing may move
    begin
      automatic word_t   pc_hold = pc;
      automatic ex_mem_t em_hold = ex_mem;
      repeat (3) step();
      check(pc == pc_hold && ex_mem == em_hold, "pause holds the pipeline");
      n_pause++;
    end
    run = 1'b1;
    repeat (30) step();
    check(r(0) == 0, "R0 stays 0");
    check(r(1) == 5, "B R1");
    check(r(2) == 1, "B R2 reloaded");
    check(r(3) == 1, "B R3");
    check(r(4) == 6, "B R4: instruction after the taken beq ran");
    check(r(5) == 6, "B R5");
    check(dmem_peek(211) == 0, "B Mem[211]: instruction at the skipped address did not run");
    check(r(6) == 0, "B R6: dependent add read the old R5");
    check(r(7) == 32'hFFFF_FFFE, "B R7 nand");
    check(dmem_peek(210) == 32'hFFFF_FFFE, "B Mem[210] stored");

    // ------------------------------------------------ mechanism coverage
    check(n_add > 0,       $sformatf("add completed %0d times", n_add));
    check(n_nand > 0,      $sformatf("nand completed %0d times", n_nand));
    check(n_lw > 0,        $sformatf("lw completed %0d times", n_lw));
    check(n_sw > 0,        $sformatf("sw completed %0d times", n_sw));
    check(n_noop > 0,      $sformatf("noop completed %0d times", n_noop));
    check(n_taken > 0,     $sformatf("beq taken %0d times", n_taken));
    check(n_not_taken > 0, $sformatf("beq not taken %0d times", n_not_taken));
    check(n_r0_write > 0,  $sformatf("write to R0 %0d times", n_r0_write));
    check(n_stale > 0,     $sformatf("read of a not-yet-written register %0d times", n_stale));
    check(n_pause > 0,     $sformatf("pause %0d times", n_pause));
    $display("mechanisms: add=%0d nand=%0d lw=%0d sw=%0d noop=%0d taken=%0d not_taken=%0d r0_write=%0d stale_read=%0d pause=%0d",
             n_add, n_nand, n_lw, n_sw, n_noop, n_taken, n_not_taken, n_r0_write, n_stale, n_pause);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
