// tb_writeback_stage: self-checking test of the writeback stage. Random
// Mem/WB contents of every opcode; write enable (add, nand, lw only), the
// destination, and the data mux (memory data for lw, ALU result otherwise).
module tb_writeback_stage;
  import lc2k_pkg::*;
  mem_wb_t mem_wb;
  logic rf_we;
  reg_idx_t rf_wa;
  word_t rf_wdata;
  int checks = 0, failures = 0;

  writeback_stage dut (.mem_wb, .rf_we, .rf_wa, .rf_wdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      automatic opcode_e op = opcode_e'(i % 8);
      automatic bit exp_we = (op == OP_ADD || op == OP_NAND || op == OP_LW);
      mem_wb = '{op: op, alu_result: $urandom, mdata: $urandom, dest: 3'($urandom)};
      #1;
      checks++;
      if (rf_we !== exp_we || rf_wa !== mem_wb.dest ||
          (exp_we && rf_wdata !== ((op == OP_LW) ? mem_wb.mdata : mem_wb.alu_result))) begin
        failures++;
        $display("FAIL op=%s we=%b data=%h", op.name(), rf_we, rf_wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
