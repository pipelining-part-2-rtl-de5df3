// y86_pipe_ctrl: stall and bubble control of the five-stage processor.
//
// There is no forwarding: every hazard is resolved by waiting. In priority
// order:
//  1. Halt. When the instruction in writeback has a status other than AOK
//     (halt, bad address, bad instruction), every pipeline register is
//     stalled, so the processor stops with that instruction in writeback and
//     nothing after it changes state.
//  2. Data hazard. If a source register read in decode (srcA, srcB; not
//     REG_NONE) is a destination (dstE or dstM) of the instruction in
//     execute, memory or writeback, the register file does not yet hold its
//     value: the fetch and decode registers are stalled and a bubble goes
//     into execute.
//  3. Fetch wait. The next PC is unknown while a conditional jump is in
//     decode or execute (its outcome is sent from execute through the memory
//     register) and while a ret is in decode, execute or memory (its return
//     address is loaded in memory and used from the writeback register).
//     Fetch also stops once an instruction with a status other than AOK is
//     on its way. Then the PC register is held and a bubble goes into
//     decode.
// Purely combinational.
module y86_pipe_ctrl
  import y86_pkg::*;
(
  input  reg_id_t d_srcA,
  input  reg_id_t d_srcB,
  input  reg_id_t E_dstE,
  input  reg_id_t E_dstM,
  input  reg_id_t M_dstE,
  input  reg_id_t M_dstM,
  input  reg_id_t W_dstE,
  input  reg_id_t W_dstM,
  input  logic    D_cjump,   // conditional jump in decode
  input  logic    E_cjump,   // conditional jump in execute
  input  logic    D_ret,
  input  logic    E_ret,
  input  logic    M_ret,
  input  logic    D_exc,     // status not AOK in decode
  input  logic    E_exc,
  input  logic    M_exc,
  input  logic    W_exc,
  output logic    F_stall,
  output logic    D_stall,
  output logic    D_bubble,
  output logic    E_bubble,
  output logic    freeze,      // stall every register (halted)
  output logic    data_stall,  // reason 2 is active
  output logic    fetch_wait   // reason 3 is active
);

  function automatic logic uses(input reg_id_t src, input reg_id_t dst);
    return (src != REG_NONE) && (src == dst);
  endfunction

  function automatic logic pending(input reg_id_t src);
    return uses(src, E_dstE) || uses(src, E_dstM) || uses(src, M_dstE) ||
           uses(src, M_dstM) || uses(src, W_dstE) || uses(src, W_dstM);
  endfunction

  always_comb begin
    freeze     = W_exc;
    data_stall = !freeze && (pending(d_srcA) || pending(d_srcB));
    fetch_wait = !freeze && !data_stall &&
                 (D_cjump || E_cjump || D_ret || E_ret || M_ret || D_exc || E_exc || M_exc);
    F_stall  = freeze || data_stall || fetch_wait;
    D_stall  = freeze || data_stall;
    D_bubble = fetch_wait;
    E_bubble = data_stall;
  end

endmodule
