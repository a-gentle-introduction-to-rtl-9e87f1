// lc2k_pipeline: five-stage pipelined LC2Kx processor.
//
// The instruction's execution is cut into five stages, each with its own
// datapath, separated by four edge-triggered pipeline registers:
//   fetch    PC -> instruction memory, PC+1          -> IF/ID
//   decode   register file read, sign extend, dest   -> ID/EX
//   execute  ALU (regB or offset), PC+1+offset, eq?  -> EX/Mem
//   memory   data memory (lw/sw), branch decision    -> Mem/WB
//   writeback  register file write (ALU result or memory data)
// A new instruction enters every cycle, so up to five are in flight and the
// cycles per instruction approach one. An instruction fetched at edge n is
// in IF/ID after edge n, ID/EX after n+1, EX/Mem after n+2, Mem/WB after
// n+3, and its register write lands at edge n+4.
//
// There is no hazard handling. An instruction that reads a register less
// than four instructions after the one writing it reads the old value, and
// a taken beq changes the PC only when it reaches the memory stage: the
// three instructions fetched after it still run. Programs place noops or
// independent instructions accordingly. jalr and halt run as noops.
//
// Interface: clk; rst (synchronous, active high) sets PC to 0, fills the
// pipeline registers with noops and clears the registers. run advances the
// whole machine; while it is low, nothing changes except what the host
// ports write: imem_load_* writes the instruction memory and dmem_host_*
// reads and writes the data memory. pc and the four pipeline-register
// outputs expose the state shown in a pipeline diagram.
//
// The stages, pipeline-register fields and connections follow the
// pipelined LC2Kx datapath; the run input, the host ports, the memory
// sizes and the reset are this design's own.
module lc2k_pipeline
  import lc2k_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 65536,
  parameter int unsigned DMEM_WORDS = 65536,
  parameter int unsigned IMEM_AW    = $clog2(IMEM_WORDS),
  parameter int unsigned DMEM_AW    = $clog2(DMEM_WORDS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               run,
  input  logic               imem_load_we,
  input  logic [IMEM_AW-1:0] imem_load_addr,
  input  word_t              imem_load_data,
  input  logic               dmem_host_we,
  input  logic [DMEM_AW-1:0] dmem_host_addr,
  input  word_t              dmem_host_wdata,
  output word_t              dmem_host_rdata,
  output word_t              pc,
  output if_id_t             if_id,
  output id_ex_t             id_ex,
  output ex_mem_t            ex_mem,
  output mem_wb_t            mem_wb
);

  if_id_t   if_id_d;
  id_ex_t   id_ex_d;
  ex_mem_t  ex_mem_d;
  mem_wb_t  mem_wb_d;

  word_t    instr;
  logic     take_branch;
  word_t    branch_target;

  reg_idx_t rf_ra, rf_rb, rf_wa;
  word_t    rf_rdata_a, rf_rdata_b, rf_wdata;
  logic     rf_we;

  logic     dm_en, dm_rw;
  word_t    dm_addr, dm_wdata, dm_rdata;

  // ---------------------------------------------------------------- fetch
  fetch_stage u_fetch (
    .clk           (clk),
    .rst           (rst),
    .en            (run),
    .take_branch   (take_branch),
    .branch_target (branch_target),
    .instr         (instr),
    .pc            (pc),
    .if_id_d       (if_id_d)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .en        (run),
    .addr      (pc),
    .rdata     (instr),
    .load_we   (imem_load_we),
    .load_addr (imem_load_addr),
    .load_data (imem_load_data)
  );

  pipe_reg #(.T(if_id_t)) u_if_id (
    .clk (clk), .rst (rst), .en (run),
    .rst_val (IF_ID_RESET), .d (if_id_d), .q (if_id)
  );

  // --------------------------------------------------------------- decode
  decode_stage u_decode (
    .if_id   (if_id),
    .ra      (rf_ra),
    .rb      (rf_rb),
    .rdata_a (rf_rdata_a),
    .rdata_b (rf_rdata_b),
    .id_ex_d (id_ex_d)
  );

  reg_file u_rf (
    .clk     (clk),
    .rst     (rst),
    .ra      (rf_ra),
    .rb      (rf_rb),
    .rdata_a (rf_rdata_a),
    .rdata_b (rf_rdata_b),
    .we      (rf_we && run),
    .wa      (rf_wa),
    .wdata   (rf_wdata)
  );

  pipe_reg #(.T(id_ex_t)) u_id_ex (
    .clk (clk), .rst (rst), .en (run),
    .rst_val (ID_EX_RESET), .d (id_ex_d), .q (id_ex)
  );

  // -------------------------------------------------------------- execute
  execute_stage u_execute (
    .id_ex    (id_ex),
    .ex_mem_d (ex_mem_d)
  );

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (
    .clk (clk), .rst (rst), .en (run),
    .rst_val (EX_MEM_RESET), .d (ex_mem_d), .q (ex_mem)
  );

  // --------------------------------------------------------------- memory
  memory_stage u_memory (
    .ex_mem        (ex_mem),
    .mem_en        (dm_en),
    .mem_rw        (dm_rw),
    .mem_addr      (dm_addr),
    .mem_wdata     (dm_wdata),
    .mem_rdata     (dm_rdata),
    .take_branch   (take_branch),
    .branch_target (branch_target),
    .mem_wb_d      (mem_wb_d)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk        (clk),
    .en         (dm_en && run),
    .rw         (dm_rw),
    .addr       (dm_addr),
    .wdata      (dm_wdata),
    .rdata      (dm_rdata),
    .host_we    (dmem_host_we),
    .host_addr  (dmem_host_addr),
    .host_wdata (dmem_host_wdata),
    .host_rdata (dmem_host_rdata)
  );

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (
    .clk (clk), .rst (rst), .en (run),
    .rst_val (MEM_WB_RESET), .d (mem_wb_d), .q (mem_wb)
  );

  // ------------------------------------------------------------ writeback
  writeback_stage u_writeback (
    .mem_wb   (mem_wb),
    .rf_we    (rf_we),
    .rf_wa    (rf_wa),
    .rf_wdata (rf_wdata)
  );

endmodule
