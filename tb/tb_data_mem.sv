// tb_data_mem: self-checking test of the data memory against a reference
// array. Random reads and writes through the pipeline port (en, R/W) and
// the host port; checks read data is 0 unless a read is enabled, that a
// write lands at the clock edge, and that the pipeline write wins a clash.
module tb_data_mem;
  import lc2k_pkg::*;
  localparam int unsigned WORDS = 256;
  logic clk = 0, en, rw, host_we;
  word_t addr, wdata, rdata, host_wdata, host_rdata;
  logic [7:0] host_addr;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk, .en, .rw, .addr, .wdata, .rdata,
                                 .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; rw = 0; addr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      host_we = 1; host_addr = 8'(i); host_wdata = $urandom; model[i] = host_wdata;
      @(posedge clk); #1;
    end
    host_we = 0;
    for (int i = 0; i < 800; i++) begin
      en = ($urandom % 4) != 0;
      rw = $urandom % 2;
      addr = word_t'($urandom % WORDS) | (word_t'($urandom % 2) << 20);
      wdata = $urandom;
      host_we = ($urandom % 4) == 0;
      host_addr = (i % 9 == 0) ? addr[7:0] : 8'($urandom);
      host_wdata = $urandom;
      #1;
      checks++;
      if (rdata !== ((en && !rw) ? model[addr[7:0]] : '0) || host_rdata !== model[host_addr]) begin
        failures++; $display("FAIL read en=%b rw=%b addr=%0d rdata=%h exp=%h", en, rw, addr[7:0], rdata, model[addr[7:0]]);
      end
      @(posedge clk); #1;
      if (en && rw) model[addr[7:0]] = wdata;
      else if (host_we) model[host_addr] = host_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
