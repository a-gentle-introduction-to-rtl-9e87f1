// fetch_stage: stage 1 of the LC2Kx pipeline.
//
// Holds the program counter, which addresses the instruction memory every
// cycle. An incrementer forms PC+1, and a two-way mux in front of the PC
// picks the next PC: PC+1 normally, or the branch target PC+1+offset that
// the memory stage sends back when a beq is taken there. The instruction
// word read this cycle and PC+1 together form the next IF/ID contents.
//
// Interface: pc drives the instruction memory address; instr is the word it
// returns in the same cycle (asynchronous read). if_id_d is registered by
// the IF/ID pipeline register at the same edge that loads the PC.
// Timing: the PC is edge-triggered, loads when en is high, and is 0 after
// the synchronous, active-high reset.
//
// The PC, incrementer, PC mux and their connections follow the fetch-stage
// diagram. Driving the mux select from the memory stage's "taken beq"
// decision, and the reset value 0, are this design's choices.
module fetch_stage
  import lc2k_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  logic   take_branch,
  input  word_t  branch_target,
  input  word_t  instr,
  output word_t  pc,
  output if_id_t if_id_d
);

  word_t pc_plus1;
  word_t pc_next;

  assign pc_plus1 = pc + word_t'(1);
  assign pc_next  = take_branch ? branch_target : pc_plus1;

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pc_next;
  end

  assign if_id_d = '{pc_plus1: pc_plus1, instr: instr};

endmodule
