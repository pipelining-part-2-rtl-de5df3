// y86_pkg: types and constants shared by the two pipelined processors.
//
// Holds the Y86-64 instruction codes (icode), function codes, register
// numbers and status codes, and the structs that make up the pipeline
// registers of the five-stage processor. Register 0xF is "no register"
// (REG_NONE); a pipeline register loaded with a bubble carries icode NOP and
// REG_NONE destinations, so it changes no state. The numeric encodings are
// the standard Y86-64 ones; only REG_NONE = 0xF, the 2-byte addq and the
// nibble positions of icode, rA and rB are spelled out in the source notes.
package y86_pkg;

  typedef logic [3:0]  reg_id_t;
  typedef logic [63:0] word_t;

  localparam reg_id_t REG_RSP  = 4'h4;
  localparam reg_id_t REG_NONE = 4'hF;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // ALU functions (ifun of OPq)
  localparam logic [3:0] ALU_ADD = 4'h0;
  localparam logic [3:0] ALU_SUB = 4'h1;
  localparam logic [3:0] ALU_AND = 4'h2;
  localparam logic [3:0] ALU_XOR = 4'h3;

  // Branch / conditional-move conditions (ifun of jXX and cmovXX)
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  // Processor status (the Stat register)
  typedef enum logic [1:0] {
    STAT_AOK = 2'd0,
    STAT_HLT = 2'd1,
    STAT_ADR = 2'd2,
    STAT_INS = 2'd3
  } stat_t;

  // Condition codes
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // --- pipeline registers of the five-stage processor -------------------
  // Decode receives (D_...)
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    reg_id_t rA;
    reg_id_t rB;
    word_t   valC;
    word_t   valP;
  } d_reg_t;

  // Execute receives (E_...)
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    word_t   valC;
    word_t   valP;
    word_t   valA;
    word_t   valB;
    reg_id_t dstE;
    reg_id_t dstM;
  } e_reg_t;

  // Memory receives (M_...)
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic    cjump;    // conditional jump: fetch waits for its outcome
    logic    cnd;      // "taken", sent from execute towards fetch
    word_t   valE;
    word_t   valA;
    word_t   valP;
    word_t   valC;
    reg_id_t dstE;
    reg_id_t dstM;
  } m_reg_t;

  // Writeback receives (W_...)
  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    word_t   valE;
    word_t   valM;
    reg_id_t dstE;
    reg_id_t dstM;
  } w_reg_t;

  localparam d_reg_t D_BUBBLE = '{stat: STAT_AOK, icode: I_NOP, ifun: 4'h0,
                                  rA: REG_NONE, rB: REG_NONE, valC: '0, valP: '0};
  localparam e_reg_t E_BUBBLE = '{stat: STAT_AOK, icode: I_NOP, ifun: 4'h0,
                                  valC: '0, valP: '0, valA: '0, valB: '0,
                                  dstE: REG_NONE, dstM: REG_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: STAT_AOK, icode: I_NOP, cjump: 1'b0, cnd: 1'b0,
                                  valE: '0, valA: '0, valP: '0, valC: '0,
                                  dstE: REG_NONE, dstM: REG_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: STAT_AOK, icode: I_NOP, valE: '0, valM: '0,
                                  dstE: REG_NONE, dstM: REG_NONE};

  // Branch condition from the condition codes
  function automatic logic cond_met(input logic [3:0] fn, input cc_t cc);
    unique case (fn)
      C_YES:   return 1'b1;
      C_LE:    return (cc.sf ^ cc.of) | cc.zf;
      C_L:     return cc.sf ^ cc.of;
      C_E:     return cc.zf;
      C_NE:    return ~cc.zf;
      C_GE:    return ~(cc.sf ^ cc.of);
      C_G:     return ~(cc.sf ^ cc.of) & ~cc.zf;
      default: return 1'b0;
    endcase
  endfunction

endpackage
