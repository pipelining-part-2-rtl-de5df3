// addq_stall: stalling logic of the four-stage addq pipeline.
//
// The register file is written at the end of the writeback cycle and read in
// decode, so an instruction must not reach decode while an older instruction
// that writes one of its source registers is still in decode or execute.
// This logic looks at the instruction being fetched (f_rA, f_rB) and at the
// destination registers of the two instructions ahead of it: the one in
// decode (d_dstE, which is D_rB) and the one in execute (E_dstE). If a
// fetched source equals either destination, "stall" is raised: the PC is not
// changed and a bubble (rA = rB = REG_NONE) goes into the fetch/decode
// register. An instruction in writeback needs no stall, because its write
// happens at the edge before the fetched instruction reaches decode.
// REG_NONE (0xF) never matches. Purely combinational.
module addq_stall
  import y86_pkg::*;
(
  input  reg_id_t f_rA,
  input  reg_id_t f_rB,
  input  reg_id_t d_dstE,
  input  reg_id_t e_dstE,
  output logic    stall
);

  function automatic logic hit(input reg_id_t src, input reg_id_t dst);
    return (src != REG_NONE) && (src == dst);
  endfunction

  assign stall = hit(f_rA, d_dstE) || hit(f_rA, e_dstE) ||
                 hit(f_rB, d_dstE) || hit(f_rB, e_dstE);

endmodule
