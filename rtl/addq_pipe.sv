// addq_pipe: four-stage pipelined processor that executes only "addq rA, rB".
//
// Every instruction is two bytes, rA in the high nibble and rB in the low
// nibble of the second byte, and does R[rB] <- R[rA] + R[rB]; there is no
// icode decoding. The stages and the registers between them are:
//   fetch     PC register (pP), instruction memory, "split" into f_rA/f_rB,
//             next PC = PC + 2
//   fD        rA, rB                     (bubble: REG_NONE, REG_NONE)
//   decode    read R[D_rA], R[D_rB]; d_dstE = D_rB
//   dE        valA, valB, dstE           (bubble: 0, 0, REG_NONE)
//   execute   valE = valA + valB
//   eW        valE, dstE                 (bubble: 0, REG_NONE)
//   writeback R[W_dstE] <- W_valE        (the dstM port is tied to REG_NONE)
// Data hazards are resolved by stalling in fetch (addq_stall): while the
// instruction being fetched reads a register that the instruction in decode
// or execute will write, the PC is held and a bubble enters fD. A dependent
// pair of back-to-back addqs therefore costs two stall cycles; independent
// instructions complete one per cycle with a latency of four cycles.
// The stage structure, register contents and bubble values follow the
// source; memory size and the load/debug ports are this design's choices.
//
// Only the register byte of the fetch window is used and there is no status
// output, so the other fetch bytes and imem_error are left unconnected.
//
// Interface: clk, rst (synchronous); imem_* loads program bytes; reg_dbg_*
// preloads and reads registers; the obs_* outputs show the pipeline
// registers and the stall signal for observation.
module addq_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [63:0] imem_addr,
  input  logic [7:0]  imem_data,
  input  logic        reg_dbg_we,
  input  reg_id_t     reg_dbg_waddr,
  input  word_t       reg_dbg_wdata,
  input  reg_id_t     reg_dbg_raddr,
  output word_t       reg_dbg_rdata,
  output word_t       obs_pc,
  output reg_id_t     obs_D_rA,
  output reg_id_t     obs_D_rB,
  output word_t       obs_E_valA,
  output word_t       obs_E_valB,
  output reg_id_t     obs_E_dstE,
  output word_t       obs_W_valE,
  output reg_id_t     obs_W_dstE,
  output logic        obs_stall
);

  typedef struct packed { reg_id_t rA; reg_id_t rB; }                 fd_t;
  typedef struct packed { word_t valA; word_t valB; reg_id_t dstE; }  de_t;
  typedef struct packed { word_t valE; reg_id_t dstE; }               ew_t;

  localparam fd_t FD_BUBBLE = '{rA: REG_NONE, rB: REG_NONE};
  localparam de_t DE_BUBBLE = '{valA: '0, valB: '0, dstE: REG_NONE};
  localparam ew_t EW_BUBBLE = '{valE: '0, dstE: REG_NONE};

  // ---- fetch ----
  word_t       pc, p_pc;
  logic [79:0] i10bytes;
  logic        imem_error;
  fd_t         f_out, D;
  logic        stall;

  pipe_reg #(.T(word_t), .BUBBLE('0)) u_pP (
    .clk, .rst, .stall(stall), .bubble(1'b0), .d(p_pc), .q(pc));

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .pc, .i10bytes, .imem_error,
    .load_we(imem_we), .load_addr(imem_addr), .load_data(imem_data));

  assign p_pc     = pc + 64'd2;
  assign f_out.rA = i10bytes[15:12];
  assign f_out.rB = i10bytes[11:8];

  pipe_reg #(.T(fd_t), .BUBBLE(FD_BUBBLE)) u_fD (
    .clk, .rst, .stall(1'b0), .bubble(stall), .d(f_out), .q(D));

  // ---- decode ----
  de_t   d_out, E;
  ew_t   e_out, W;
  word_t rf_valA, rf_valB;

  regfile u_rf (
    .clk, .rst,
    .srcA(D.rA), .srcB(D.rB), .valA(rf_valA), .valB(rf_valB),
    .dstE(W.dstE), .valE(W.valE), .dstM(REG_NONE), .valM('0),
    .dbg_we(reg_dbg_we), .dbg_waddr(reg_dbg_waddr), .dbg_wdata(reg_dbg_wdata),
    .dbg_raddr(reg_dbg_raddr), .dbg_rdata(reg_dbg_rdata));

  assign d_out.valA = rf_valA;
  assign d_out.valB = rf_valB;
  assign d_out.dstE = D.rB;

  addq_stall u_stall (
    .f_rA(f_out.rA), .f_rB(f_out.rB), .d_dstE(d_out.dstE), .e_dstE(E.dstE),
    .stall(stall));

  pipe_reg #(.T(de_t), .BUBBLE(DE_BUBBLE)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(d_out), .q(E));

  // ---- execute ----
  assign e_out.valE = E.valA + E.valB;
  assign e_out.dstE = E.dstE;

  pipe_reg #(.T(ew_t), .BUBBLE(EW_BUBBLE)) u_eW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(e_out), .q(W));

  // ---- writeback: the register file write port is driven by W ----

  assign obs_pc     = pc;
  assign obs_D_rA   = D.rA;
  assign obs_D_rB   = D.rB;
  assign obs_E_valA = E.valA;
  assign obs_E_valB = E.valB;
  assign obs_E_dstE = E.dstE;
  assign obs_W_valE = W.valE;
  assign obs_W_dstE = W.dstE;
  assign obs_stall  = stall;

endmodule
