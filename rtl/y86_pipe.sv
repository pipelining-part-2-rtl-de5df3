// y86_pipe: five-stage pipelined Y86-64 processor that resolves every hazard
// by stalling.
//
// Stages and the pipeline registers in front of them (F, D, E, M, W):
//   fetch     instruction memory, instruction split and length, most of the
//             PC computation. The PC is F_predPC, except that it is the
//             outcome of a conditional jump that has reached memory (M_cnd ?
//             M_valC : M_valP) or the return address of a ret in writeback
//             (W_valM). Unconditional jmp and call go straight to valC.
//   decode    reads the register file; chooses srcA/srcB/dstE/dstM per icode
//             (pushq: valA <- R[rA], valB <- R[%rsp], dstE <- %rsp)
//   execute   ALU (valE), condition codes read (jXX, cmovXX) and written
//             (OPq); "taken" (cnd) is passed on through the M register
//   memory    data memory read or write, chosen by M_icode
//   writeback register file writes R[dstE] <- valE, R[dstM] <- valM, and the
//             Stat register
// Control (y86_pipe_ctrl): a decode source that an instruction in execute,
// memory or writeback will write stalls fetch and decode and bubbles
// execute; a conditional jump makes fetch wait two cycles and a ret three;
// a non-AOK status in writeback freezes the pipeline. The condition codes are
// not changed, the data memory is not written and the register file is not
// written once an older instruction has a non-AOK status.
// The stage assignment, the waiting for jumps and ret and the writing of
// Stat in writeback follow the source; the instruction encodings are the
// standard Y86-64 ones; memory sizes and the absence of forwarding for %rsp
// before ret are this design's choices.
//
// Interface: clk, rst (synchronous, loads bubbles and PC 0); imem_*/dmem_*
// load the memories and reg_dbg_* set up registers while rst is held;
// stat is the Stat register; obs_* expose pipeline state for observation.
module y86_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 4096,
  parameter int unsigned DMEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  word_t       imem_addr,
  input  logic [7:0]  imem_data,
  input  logic        dmem_we,
  input  word_t       dmem_addr,
  input  logic [7:0]  dmem_data,
  input  word_t       dmem_dbg_addr,
  output word_t       dmem_dbg_rdata,
  input  logic        reg_dbg_we,
  input  reg_id_t     reg_dbg_waddr,
  input  word_t       reg_dbg_wdata,
  input  reg_id_t     reg_dbg_raddr,
  output word_t       reg_dbg_rdata,
  output stat_t       stat,
  output cc_t         obs_cc,
  output word_t       obs_f_pc,
  output icode_t      obs_D_icode,
  output icode_t      obs_E_icode,
  output icode_t      obs_M_icode,
  output icode_t      obs_W_icode,
  output logic        obs_data_stall,
  output logic        obs_fetch_wait,
  output logic        obs_freeze,
  output logic        obs_mem_read,
  output logic        obs_mem_write
);

  // ---------------------------------------------------------------------
  // pipeline registers
  word_t  F_predPC, f_predPC;
  d_reg_t D, f_out;
  e_reg_t E, d_out;
  m_reg_t M, e_out;
  w_reg_t W, m_out;
  logic   F_stall, D_stall, D_bubble, E_bubble, freeze, data_stall, fetch_wait;

  pipe_reg #(.T(word_t),  .BUBBLE('0))       u_F (.clk, .rst, .stall(F_stall), .bubble(1'b0),     .d(f_predPC), .q(F_predPC));
  pipe_reg #(.T(d_reg_t), .BUBBLE(D_BUBBLE)) u_D (.clk, .rst, .stall(D_stall), .bubble(D_bubble), .d(f_out),    .q(D));
  pipe_reg #(.T(e_reg_t), .BUBBLE(E_BUBBLE)) u_E (.clk, .rst, .stall(freeze),  .bubble(E_bubble), .d(d_out),    .q(E));
  pipe_reg #(.T(m_reg_t), .BUBBLE(M_BUBBLE)) u_M (.clk, .rst, .stall(freeze),  .bubble(1'b0),     .d(e_out),    .q(M));
  pipe_reg #(.T(w_reg_t), .BUBBLE(W_BUBBLE)) u_W (.clk, .rst, .stall(freeze),  .bubble(1'b0),     .d(m_out),    .q(W));

  // ---------------------------------------------------------------------
  // fetch
  word_t       f_pc;
  logic [79:0] i10bytes;
  logic        imem_error, f_valid;
  icode_t      f_icode;
  logic [3:0]  f_ifun;
  logic        need_regids, need_valC;

  always_comb begin
    if (M.cjump)              f_pc = M.cnd ? M.valC : M.valP;
    else if (W.icode == I_RET) f_pc = W.valM;
    else                      f_pc = F_predPC;
  end

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .pc(f_pc), .i10bytes, .imem_error,
    .load_we(imem_we), .load_addr(imem_addr), .load_data(imem_data));

  assign f_icode = icode_t'(i10bytes[7:4]);
  assign f_ifun  = i10bytes[3:0];
  assign f_valid = (i10bytes[7:4] <= 4'hB);
  assign need_regids = f_icode inside {I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
                                       I_OPQ, I_PUSHQ, I_POPQ};
  assign need_valC   = f_icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

  always_comb begin
    f_out.icode = f_icode;
    f_out.ifun  = f_ifun;
    f_out.rA    = need_regids ? reg_id_t'(i10bytes[15:12]) : REG_NONE;
    f_out.rB    = need_regids ? reg_id_t'(i10bytes[11:8])  : REG_NONE;
    f_out.valC  = need_regids ? i10bytes[79:16] : i10bytes[71:8];
    f_out.valP  = f_pc + 64'(1) + (need_regids ? 64'(1) : 64'(0)) + (need_valC ? 64'(8) : 64'(0));
    if (imem_error)                f_out.stat = STAT_ADR;
    else if (!f_valid)             f_out.stat = STAT_INS;
    else if (f_icode == I_HALT)    f_out.stat = STAT_HLT;
    else                           f_out.stat = STAT_AOK;
    if (imem_error || !f_valid) begin
      f_out.icode = I_NOP;
      f_out.rA    = REG_NONE;
      f_out.rB    = REG_NONE;
    end
    // next PC: jmp and call go to their target, everything else to valP
    if ((f_icode == I_JXX && f_ifun == C_YES) || f_icode == I_CALL) f_predPC = f_out.valC;
    else                                                             f_predPC = f_out.valP;
  end

  // ---------------------------------------------------------------------
  // decode
  reg_id_t d_srcA, d_srcB;
  word_t   rf_valA, rf_valB;
  logic    D_cjump, E_cjump;

  always_comb begin
    unique case (D.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: d_srcA = D.rA;
      I_POPQ, I_RET:                      d_srcA = REG_RSP;
      default:                            d_srcA = REG_NONE;
    endcase
    unique case (D.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:          d_srcB = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     d_srcB = REG_RSP;
      default:                            d_srcB = REG_NONE;
    endcase
    d_out.stat  = D.stat;
    d_out.icode = D.icode;
    d_out.ifun  = D.ifun;
    d_out.valC  = D.valC;
    d_out.valP  = D.valP;
    d_out.valA  = rf_valA;
    d_out.valB  = rf_valB;
    unique case (D.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ:          d_out.dstE = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     d_out.dstE = REG_RSP;
      default:                            d_out.dstE = REG_NONE;
    endcase
    d_out.dstM = (D.icode == I_MRMOVQ || D.icode == I_POPQ) ? D.rA : REG_NONE;
  end

  // register file: written from writeback unless that instruction faulted
  reg_id_t w_dstE, w_dstM;
  assign w_dstE = (W.stat == STAT_AOK) ? W.dstE : REG_NONE;
  assign w_dstM = (W.stat == STAT_AOK) ? W.dstM : REG_NONE;

  regfile u_rf (
    .clk, .rst,
    .srcA(d_srcA), .srcB(d_srcB), .valA(rf_valA), .valB(rf_valB),
    .dstE(w_dstE), .valE(W.valE), .dstM(w_dstM), .valM(W.valM),
    .dbg_we(reg_dbg_we), .dbg_waddr(reg_dbg_waddr), .dbg_wdata(reg_dbg_wdata),
    .dbg_raddr(reg_dbg_raddr), .dbg_rdata(reg_dbg_rdata));

  assign D_cjump = (D.icode == I_JXX) && (D.ifun != C_YES);
  assign E_cjump = (E.icode == I_JXX) && (E.ifun != C_YES);

  y86_pipe_ctrl u_ctrl (
    .d_srcA, .d_srcB,
    .E_dstE(E.dstE), .E_dstM(E.dstM), .M_dstE(M.dstE), .M_dstM(M.dstM),
    .W_dstE(W.dstE), .W_dstM(W.dstM),
    .D_cjump, .E_cjump,
    .D_ret(D.icode == I_RET), .E_ret(E.icode == I_RET), .M_ret(M.icode == I_RET),
    .D_exc(D.stat != STAT_AOK), .E_exc(E.stat != STAT_AOK),
    .M_exc(M.stat != STAT_AOK), .W_exc(W.stat != STAT_AOK),
    .F_stall, .D_stall, .D_bubble, .E_bubble, .freeze, .data_stall, .fetch_wait);

  // ---------------------------------------------------------------------
  // execute
  word_t      aluA, aluB, e_valE;
  logic [3:0] alufun;
  cc_t        CC, alu_cc;
  logic       e_cnd, set_cc;
  stat_t      m_stat;

  always_comb begin
    unique case (E.icode)
      I_RRMOVQ, I_OPQ:              aluA = E.valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: aluA = E.valC;
      I_CALL, I_PUSHQ:              aluA = -64'sd8;
      I_RET, I_POPQ:                aluA = 64'd8;
      default:                      aluA = '0;
    endcase
    unique case (E.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_PUSHQ, I_RET, I_POPQ: aluB = E.valB;
      default:                                                   aluB = '0;
    endcase
    alufun = (E.icode == I_OPQ) ? E.ifun : ALU_ADD;
  end

  y86_alu u_alu (.aluA, .aluB, .alufun, .valE(e_valE), .cc(alu_cc));

  // condition codes: written by OPq unless an older instruction faulted
  assign set_cc = (E.icode == I_OPQ) && (m_stat == STAT_AOK) && (W.stat == STAT_AOK);

  always_ff @(posedge clk) begin
    if (rst)         CC <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) CC <= alu_cc;
  end

  assign e_cnd = cond_met(E.ifun, CC);

  always_comb begin
    e_out.stat  = E.stat;
    e_out.icode = E.icode;
    e_out.cjump = E_cjump;
    e_out.cnd   = e_cnd;
    e_out.valE  = e_valE;
    e_out.valA  = E.valA;
    e_out.valP  = E.valP;
    e_out.valC  = E.valC;
    e_out.dstE  = (E.icode == I_RRMOVQ && !e_cnd) ? REG_NONE : E.dstE;
    e_out.dstM  = E.dstM;
  end

  // ---------------------------------------------------------------------
  // memory
  word_t mem_addr, mem_wdata, m_valM;
  logic  dmem_error, mem_read, mem_write;

  assign mem_addr  = (M.icode == I_POPQ || M.icode == I_RET) ? M.valA : M.valE;
  assign mem_wdata = (M.icode == I_CALL) ? M.valP : M.valA;

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .icode(M.icode), .addr(mem_addr), .wdata(mem_wdata),
    .inhibit(M.stat != STAT_AOK || W.stat != STAT_AOK || freeze),
    .rdata(m_valM), .mem_read, .mem_write, .dmem_error,
    .load_we(dmem_we), .load_addr(dmem_addr), .load_data(dmem_data),
    .dbg_addr(dmem_dbg_addr), .dbg_rdata(dmem_dbg_rdata));

  assign m_stat = (M.stat == STAT_AOK && dmem_error) ? STAT_ADR : M.stat;

  always_comb begin
    m_out.stat  = m_stat;
    m_out.icode = M.icode;
    m_out.valE  = M.valE;
    m_out.valM  = m_valM;
    m_out.dstE  = M.dstE;
    m_out.dstM  = M.dstM;
  end

  // ---------------------------------------------------------------------
  // writeback: register file (above) and the Stat register
  stat_t stat_q;
  always_ff @(posedge clk) begin
    if (rst) stat_q <= STAT_AOK;
    else     stat_q <= W.stat;
  end
  assign stat = stat_q;

  assign obs_cc         = CC;
  assign obs_f_pc       = f_pc;
  assign obs_D_icode    = D.icode;
  assign obs_E_icode    = E.icode;
  assign obs_M_icode    = M.icode;
  assign obs_W_icode    = W.icode;
  assign obs_data_stall = data_stall;
  assign obs_fetch_wait = fetch_wait;
  assign obs_freeze     = freeze;
  assign obs_mem_read   = mem_read;
  assign obs_mem_write  = mem_write && !(M.stat != STAT_AOK || W.stat != STAT_AOK || freeze);

endmodule
