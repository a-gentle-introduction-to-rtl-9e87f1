// data_mem: data memory of the LC2Kx pipeline.
//
// An array of WORDS 32-bit words with the memory stage's port: en enables
// an access, rw selects write (1) or read (0). A read returns the word at
// addr combinationally, so that it is captured in Mem/WB at the end of the
// memory cycle; when no read is enabled rdata is 0. A write lands at the
// rising clock edge. Only the low $clog2(WORDS) address bits are used.
//
// A second, host port (host_we/host_addr/host_wdata/host_rdata) loads and
// inspects data while the pipeline is held; if both ports write the same
// cycle, the pipeline's write wins. The en and R/W controls follow the
// memory-stage diagram; the size of 65536 words and the host port are this
// design's choices.
module data_mem
  import lc2k_pkg::*;
#(
  parameter int unsigned WORDS  = 65536,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              rw,
  input  word_t             addr,
  input  word_t             wdata,
  output word_t             rdata,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  word_t             host_wdata,
  output word_t             host_rdata
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && rw)     mem[addr[ADDR_W-1:0]] <= wdata;
    else if (host_we) mem[host_addr]        <= host_wdata;
  end

  assign rdata      = (en && !rw) ? mem[addr[ADDR_W-1:0]] : '0;
  assign host_rdata = mem[host_addr];

endmodule
