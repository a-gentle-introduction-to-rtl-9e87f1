// tb_instr_mem: self-checking test of the instruction memory. Loads random
// words through the load port, reads them back at PC addresses (upper
// address bits ignored), and checks the output is 0 while disabled.
module tb_instr_mem;
  import lc2k_pkg::*;
  localparam int unsigned WORDS = 1024;
  logic clk = 0, en, load_we;
  word_t addr, rdata, load_data;
  logic [9:0] load_addr;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.clk, .en, .addr, .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; addr = 0;
    for (int i = 0; i < WORDS; i++) begin
      load_we = 1; load_addr = 10'(i); load_data = $urandom; model[i] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int i = 0; i < 400; i++) begin
      automatic int unsigned k = $urandom % WORDS;
      en = (i % 5) != 0;
      addr = word_t'(k) | (word_t'($urandom % 4) << 10);
      #1;
      checks++;
      if (rdata !== (en ? model[k] : '0)) begin
        failures++; $display("FAIL addr=%0d en=%b rdata=%h exp=%h", addr, en, rdata, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
