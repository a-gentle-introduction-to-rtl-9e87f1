// instr_mem: instruction memory of the LC2Kx pipeline.
//
// An array of WORDS 32-bit words, read combinationally at the address the
// PC supplies so that the fetched word is captured in IF/ID at the next
// clock edge. While en is low the read port returns 0. A separate write
// port (load_we/load_addr/load_data), written at the clock edge, lets a
// host place a program in memory while the pipeline is held; the pipeline
// itself never writes here.
//
// Only the low $clog2(WORDS) bits of the address are used. The size of
// 65536 words and the load port are this design's choices; the pipeline
// diagrams give the memory, its PC address and its enable.
module instr_mem
  import lc2k_pkg::*;
#(
  parameter int unsigned WORDS  = 65536,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              en,
  input  word_t             addr,
  output word_t             rdata,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  word_t             load_data
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign rdata = en ? mem[addr[ADDR_W-1:0]] : '0;

endmodule
