// reg_file: the eight-register file of the LC2Kx pipeline.
//
// Two read ports, addressed by the regA and regB fields of the instruction
// in decode, return register contents combinationally. One write port,
// driven by writeback (destination register, data, enable), updates a
// register at the rising clock edge that ends the writeback cycle. A read
// in that same cycle still sees the old value: there is no write-through,
// which is why an instruction reading a register fewer than four
// instructions after the one writing it gets a stale value.
//
// R0 always reads 0 and ignores writes, as the register-file drawings show
// it as a fixed 0. Reset (synchronous, active high) clears every register;
// that is this design's choice.
module reg_file
  import lc2k_pkg::*;
#(
  parameter int unsigned NUM_REGS = 8,
  parameter int unsigned IDX_W    = $clog2(NUM_REGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IDX_W-1:0] ra,
  input  logic [IDX_W-1:0] rb,
  output word_t            rdata_a,
  output word_t            rdata_b,
  input  logic             we,
  input  logic [IDX_W-1:0] wa,
  input  word_t            wdata
);

  word_t regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NUM_REGS); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wdata;
    end
  end

  assign rdata_a = (ra == '0) ? '0 : regs[ra];
  assign rdata_b = (rb == '0) ? '0 : regs[rb];

endmodule
