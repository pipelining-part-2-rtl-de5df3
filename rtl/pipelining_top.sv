// pipelining_top: the two pipelined processors side by side.
//
//  * addq_* : the four-stage pipeline that executes only "addq rA, rB"
//    (fetch, decode, execute, writeback) and stalls in fetch on a data
//    hazard.
//  * y86_*  : the five-stage Y86-64 pipeline (fetch, decode, execute,
//    memory, writeback) that stalls for data hazards, waits in fetch for
//    conditional jumps and ret, and stops when Stat leaves AOK.
// The two share nothing but the clock and reset; each brings out its own
// load, debug and observation ports, named as in the processor modules with
// the prefix of the processor. Reset is synchronous and active high.
module pipelining_top
  import y86_pkg::*;
#(
  parameter int unsigned ADDQ_IMEM_BYTES = 1024,
  parameter int unsigned Y86_IMEM_BYTES  = 4096,
  parameter int unsigned Y86_DMEM_BYTES  = 4096
) (
  input  logic        clk,
  input  logic        rst,
  // four-stage addq pipeline
  input  logic        addq_imem_we,
  input  word_t       addq_imem_addr,
  input  logic [7:0]  addq_imem_data,
  input  logic        addq_reg_dbg_we,
  input  reg_id_t     addq_reg_dbg_waddr,
  input  word_t       addq_reg_dbg_wdata,
  input  reg_id_t     addq_reg_dbg_raddr,
  output word_t       addq_reg_dbg_rdata,
  output word_t       addq_obs_pc,
  output reg_id_t     addq_obs_D_rA,
  output reg_id_t     addq_obs_D_rB,
  output word_t       addq_obs_E_valA,
  output word_t       addq_obs_E_valB,
  output reg_id_t     addq_obs_E_dstE,
  output word_t       addq_obs_W_valE,
  output reg_id_t     addq_obs_W_dstE,
  output logic        addq_obs_stall,
  // five-stage Y86-64 pipeline
  input  logic        y86_imem_we,
  input  word_t       y86_imem_addr,
  input  logic [7:0]  y86_imem_data,
  input  logic        y86_dmem_we,
  input  word_t       y86_dmem_addr,
  input  logic [7:0]  y86_dmem_data,
  input  word_t       y86_dmem_dbg_addr,
  output word_t       y86_dmem_dbg_rdata,
  input  logic        y86_reg_dbg_we,
  input  reg_id_t     y86_reg_dbg_waddr,
  input  word_t       y86_reg_dbg_wdata,
  input  reg_id_t     y86_reg_dbg_raddr,
  output word_t       y86_reg_dbg_rdata,
  output stat_t       y86_stat,
  output cc_t         y86_obs_cc,
  output word_t       y86_obs_f_pc,
  output icode_t      y86_obs_D_icode,
  output icode_t      y86_obs_E_icode,
  output icode_t      y86_obs_M_icode,
  output icode_t      y86_obs_W_icode,
  output logic        y86_obs_data_stall,
  output logic        y86_obs_fetch_wait,
  output logic        y86_obs_freeze,
  output logic        y86_obs_mem_read,
  output logic        y86_obs_mem_write
);

  addq_pipe #(.IMEM_BYTES(ADDQ_IMEM_BYTES)) u_addq (
    .clk, .rst,
    .imem_we(addq_imem_we), .imem_addr(addq_imem_addr), .imem_data(addq_imem_data),
    .reg_dbg_we(addq_reg_dbg_we), .reg_dbg_waddr(addq_reg_dbg_waddr),
    .reg_dbg_wdata(addq_reg_dbg_wdata), .reg_dbg_raddr(addq_reg_dbg_raddr),
    .reg_dbg_rdata(addq_reg_dbg_rdata),
    .obs_pc(addq_obs_pc), .obs_D_rA(addq_obs_D_rA), .obs_D_rB(addq_obs_D_rB),
    .obs_E_valA(addq_obs_E_valA), .obs_E_valB(addq_obs_E_valB), .obs_E_dstE(addq_obs_E_dstE),
    .obs_W_valE(addq_obs_W_valE), .obs_W_dstE(addq_obs_W_dstE), .obs_stall(addq_obs_stall));

  y86_pipe #(.IMEM_BYTES(Y86_IMEM_BYTES), .DMEM_BYTES(Y86_DMEM_BYTES)) u_y86 (
    .clk, .rst,
    .imem_we(y86_imem_we), .imem_addr(y86_imem_addr), .imem_data(y86_imem_data),
    .dmem_we(y86_dmem_we), .dmem_addr(y86_dmem_addr), .dmem_data(y86_dmem_data),
    .dmem_dbg_addr(y86_dmem_dbg_addr), .dmem_dbg_rdata(y86_dmem_dbg_rdata),
    .reg_dbg_we(y86_reg_dbg_we), .reg_dbg_waddr(y86_reg_dbg_waddr),
    .reg_dbg_wdata(y86_reg_dbg_wdata), .reg_dbg_raddr(y86_reg_dbg_raddr),
    .reg_dbg_rdata(y86_reg_dbg_rdata),
    .stat(y86_stat), .obs_cc(y86_obs_cc), .obs_f_pc(y86_obs_f_pc),
    .obs_D_icode(y86_obs_D_icode), .obs_E_icode(y86_obs_E_icode),
    .obs_M_icode(y86_obs_M_icode), .obs_W_icode(y86_obs_W_icode),
    .obs_data_stall(y86_obs_data_stall), .obs_fetch_wait(y86_obs_fetch_wait),
    .obs_freeze(y86_obs_freeze), .obs_mem_read(y86_obs_mem_read),
    .obs_mem_write(y86_obs_mem_write));

endmodule
