// tb_lc2k_random: random-program test of the LC2Kx pipeline against an
// instruction-level reference model.
//
// Each round fills a 256-word instruction memory with random instructions
// of every opcode (hazards and branches anywhere, including inside the
// three slots after another branch) and a 256-word data memory with random
// words, runs the pipeline for a fixed number of cycles, stops it, and
// compares PC, all registers and all of data memory with the model.
//
// The model executes instructions in fetch order and encodes the pipeline's
// visibility rules, not an ideal sequential machine: instruction j sees a
// register written by instruction k only if k <= j-4; a taken beq at k
// redirects the fetch of instruction k+4; memory is accessed in program
// order. After C cycles, register writes of instructions 0..C-5 and stores
// of instructions 0..C-4 have happened, and the next fetch is instruction C.
module tb_lc2k_random;
  import lc2k_pkg::*;

  localparam int unsigned WORDS  = 256;
  localparam int unsigned ROUNDS = 6;
  localparam int unsigned CYCLES = 400;

  logic    clk = 1'b0;
  logic    rst, run;
  logic    imem_we, dmem_we;
  logic [7:0] imem_addr, dmem_addr;
  word_t   imem_data, dmem_wdata, dmem_rdata;
  word_t   pc;
  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  int checks = 0, failures = 0;
  int n_taken = 0, n_stale = 0;

  lc2k_pipeline #(.IMEM_WORDS(WORDS), .DMEM_WORDS(WORDS)) dut (
    .clk, .rst, .run,
    .imem_load_we (imem_we), .imem_load_addr (imem_addr), .imem_load_data (imem_data),
    .dmem_host_we (dmem_we), .dmem_host_addr (dmem_addr),
    .dmem_host_wdata (dmem_wdata), .dmem_host_rdata (dmem_rdata),
    .pc, .if_id, .id_ex, .ex_mem, .mem_wb
  );

  always #5 clk = ~clk;

  initial begin
    repeat (ROUNDS * (CYCLES + 3 * WORDS + 20) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  // Reference state.
  word_t imem_m [WORDS];
  word_t dmem_m [WORDS];
  word_t regs_m [8];
  // Per dynamic instruction: pending register write and fetch redirects.
  bit    wr_en   [CYCLES];
  int    wr_dest [CYCLES];
  word_t wr_val  [CYCLES];
  bit    redir_v [CYCLES + 4];
  word_t redir_pc[CYCLES + 4];

  function automatic word_t rd(input int unsigned r);
    return (r == 0) ? '0 : regs_m[r];
  endfunction

  // Returns the PC of the instruction fetched after CYCLES cycles.
  function automatic word_t run_model();
    word_t pcm = '0;
    for (int i = 0; i < 8; i++) regs_m[i] = '0;
    for (int i = 0; i < CYCLES + 4; i++) redir_v[i] = 1'b0;
    for (int j = 0; j < int'(CYCLES); j++) begin
      word_t ins, a, b, off, addr;
      opcode_e op;
      if (j > 0) pcm = redir_v[j] ? redir_pc[j] : pcm + 1;
      if (j >= 4 && wr_en[j-4] && wr_dest[j-4] != 0) regs_m[wr_dest[j-4]] = wr_val[j-4];
      ins  = imem_m[pcm[7:0]];
      op   = opcode_e'(ins[24:22]);
      a    = rd(ins[21:19]);
      b    = rd(ins[18:16]);
      off  = {{16{ins[15]}}, ins[15:0]};
      addr = a + off;
      wr_en[j] = 1'b0; wr_dest[j] = 0; wr_val[j] = '0;
      unique case (op)
        OP_ADD:  begin wr_en[j] = 1'b1; wr_dest[j] = int'(ins[2:0]);   wr_val[j] = a + b;    end
        OP_NAND: begin wr_en[j] = 1'b1; wr_dest[j] = int'(ins[2:0]);   wr_val[j] = ~(a & b); end
        OP_LW:   begin wr_en[j] = 1'b1; wr_dest[j] = int'(ins[18:16]); wr_val[j] = dmem_m[addr[7:0]]; end
        OP_SW:   if (j <= int'(CYCLES) - 4) dmem_m[addr[7:0]] = b;
        OP_BEQ:  if (a == b) begin redir_v[j+4] = 1'b1; redir_pc[j+4] = pcm + 1 + off; end
        default: ;
      endcase
    end
    // The fetch after the last modelled one.
    return redir_v[CYCLES] ? redir_pc[CYCLES] : pcm + 1;
  endfunction

  function automatic word_t rand_instr();
    logic [2:0] op = 3'($urandom);
    logic [15:0] off;
    // Offsets kept small so loads, stores and branches land in interesting
    // places; any 16-bit value would be legal.
    off = 16'(signed'(int'($urandom % 64) - 32));
    if (op == OP_ADD || op == OP_NAND) return {7'd0, op, 3'($urandom), 3'($urandom), 13'd0, 3'($urandom)};
    return {7'd0, op, 3'($urandom), 3'($urandom), off};
  endfunction

  always @(posedge clk) if (!rst && run) begin
    if (ex_mem.op == OP_BEQ && ex_mem.eq) n_taken++;
    if (writes_any(id_ex) && id_ex.dest != 0 &&
        (id_ex.dest == if_id.instr[21:19] || id_ex.dest == if_id.instr[18:16])) n_stale++;
  end

  function automatic bit writes_any(input id_ex_t s);
    return s.op == OP_ADD || s.op == OP_NAND || s.op == OP_LW;
  endfunction

  initial begin
    rst = 1'b1; run = 1'b0;
    imem_we = 1'b0; imem_addr = '0; imem_data = '0;
    dmem_we = 1'b0; dmem_addr = '0; dmem_wdata = '0;
    step();
    for (int round = 0; round < int'(ROUNDS); round++) begin
      word_t pc_exp;
      rst = 1'b1; run = 1'b0;
      for (int i = 0; i < int'(WORDS); i++) begin
        imem_m[i] = rand_instr();
        dmem_m[i] = (i % 3 == 0) ? word_t'($urandom % 16) : $urandom;
        imem_we = 1'b1; imem_addr = 8'(i); imem_data = imem_m[i];
        dmem_we = 1'b1; dmem_addr = 8'(i); dmem_wdata = dmem_m[i];
        step();
      end
      imem_we = 1'b0; dmem_we = 1'b0;
      step();
      rst = 1'b0; run = 1'b1;
      repeat (CYCLES) step();
      run = 1'b0;
      pc_exp = run_model();
      check(pc == pc_exp, $sformatf("round %0d PC %0d, expected %0d", round, pc, pc_exp));
      for (int r = 1; r < 8; r++)
        check(dut.u_rf.regs[r] == regs_m[r],
              $sformatf("round %0d R%0d = %h, expected %h", round, r, dut.u_rf.regs[r], regs_m[r]));
      for (int i = 0; i < int'(WORDS); i++) begin
        dmem_addr = 8'(i); #1;
        check(dmem_rdata == dmem_m[i],
              $sformatf("round %0d Mem[%0d] = %h, expected %h", round, i, dmem_rdata, dmem_m[i]));
      end
    end
    check(n_taken > 0, $sformatf("taken branches: %0d", n_taken));
    check(n_stale > 0, $sformatf("reads of a register still being written: %0d", n_stale));
    $display("taken branches %0d, stale reads %0d", n_taken, n_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
