// regfile: the processor's register file.
//
// Fifteen 64-bit registers, numbered 0 to 14; number 0xF (REG_NONE) is "no
// register": reading it gives 0 and writing it does nothing. Two read ports
// (srcA -> R[srcA], srcB -> R[srcB]) are combinational. Two write ports
// (dstE with next R[dstE], dstM with next R[dstM]) write at the rising clock
// edge; if both name the same register, the dstM write wins. A write is seen
// by reads only after that edge: a register written during cycle n can be
// read in cycle n+1, not in cycle n, which is the reason the pipelines must
// stall. Reset blocks the two write ports but does not clear the registers,
// so that their contents can be set up while the pipeline is held in reset:
// the third write port (dbg_*) writes one register per cycle, also during
// reset, with priority over the other ports, and dbg_raddr/dbg_rdata reads
// one register out. Registers that are never written hold no defined value.
module regfile
  import y86_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  reg_id_t srcA,
  input  reg_id_t srcB,
  output word_t   valA,
  output word_t   valB,
  input  reg_id_t dstE,
  input  word_t   valE,
  input  reg_id_t dstM,
  input  word_t   valM,
  input  logic    dbg_we,
  input  reg_id_t dbg_waddr,
  input  word_t   dbg_wdata,
  input  reg_id_t dbg_raddr,
  output word_t   dbg_rdata
);

  word_t r [15];

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (dstE != REG_NONE) r[dstE] <= valE;
      if (dstM != REG_NONE) r[dstM] <= valM;
    end
    if (dbg_we && dbg_waddr != REG_NONE) r[dbg_waddr] <= dbg_wdata;
  end

  assign valA      = (srcA == REG_NONE) ? '0 : r[srcA];
  assign valB      = (srcB == REG_NONE) ? '0 : r[srcB];
  assign dbg_rdata = (dbg_raddr == REG_NONE) ? '0 : r[dbg_raddr];

endmodule
