// y86_alu: ALU of the execute stage.
//
// Computes valE = aluB OP aluA for OP = add, sub (aluB - aluA), and, xor,
// selected by alufun (the ifun of OPq; other instructions use add to form
// addresses and stack pointers). It also gives the condition codes the
// result would set: ZF (zero), SF (negative) and OF (signed overflow of add
// or sub; 0 for and and xor). Whether they are stored is decided by the
// execute stage. Purely combinational.
module y86_alu
  import y86_pkg::*;
(
  input  word_t      aluA,
  input  word_t      aluB,
  input  logic [3:0] alufun,
  output word_t      valE,
  output cc_t        cc
);

  always_comb begin
    unique case (alufun)
      ALU_SUB: valE = aluB - aluA;
      ALU_AND: valE = aluB & aluA;
      ALU_XOR: valE = aluB ^ aluA;
      default: valE = aluB + aluA;
    endcase
    cc.zf = (valE == '0);
    cc.sf = valE[63];
    unique case (alufun)
      ALU_ADD: cc.of = (aluA[63] == aluB[63]) && (valE[63] != aluB[63]);
      ALU_SUB: cc.of = (aluA[63] != aluB[63]) && (valE[63] != aluB[63]);
      default: cc.of = 1'b0;
    endcase
  end

endmodule
