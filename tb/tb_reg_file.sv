// tb_reg_file: self-checking test of the eight-register file against a
// reference array. Random writes and reads on both ports; checks reset
// clears everything, R0 reads 0 after a write to it, and a read in the
// cycle of a write returns the old value.
module tb_reg_file;
  import lc2k_pkg::*;
  logic clk = 0, rst, we;
  logic [2:0] ra, rb, wa;
  word_t rdata_a, rdata_b, wdata;
  word_t model [8];
  int checks = 0, failures = 0;

  reg_file dut (.clk, .rst, .ra, .rb, .rdata_a, .rdata_b, .we, .wa, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; wa = 0; wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 8; i++) begin
      model[i] = 0;
      ra = 3'(i); #1;
      checks++;
      if (rdata_a !== 0) begin failures++; $display("FAIL reset R%0d", i); end
    end
    for (int i = 0; i < 600; i++) begin
      we = ($urandom % 3) != 0;
      wa = (i % 11 == 0) ? 3'd0 : 3'($urandom);
      wdata = $urandom;
      ra = (i % 4 == 0) ? wa : 3'($urandom);
      rb = 3'($urandom);
      #1;
      checks++;
      if (rdata_a !== model[ra] || rdata_b !== model[rb]) begin
        failures++; $display("FAIL read ra=%0d %h/%h rb=%0d %h/%h", ra, rdata_a, model[ra], rb, rdata_b, model[rb]);
      end
      @(posedge clk); #1;
      if (we && wa != 0) model[wa] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
