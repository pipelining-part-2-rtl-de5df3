// data_mem: byte-addressed data memory of the five-stage processor.
//
// Words are 8 bytes, little-endian, at any byte address. Whether the memory
// is read or written is a function of the icode of the instruction in the
// memory stage ("is read?" / "is write?"): mrmovq, popq and ret read;
// rmmovq, pushq and call write. A read is combinational (valM in the same
// cycle); a write happens at the rising clock edge. "inhibit" suppresses the
// write, so that an instruction that follows a faulting or halting one
// changes no memory. An access that would run past the end of the memory is
// not performed and raises dmem_error. Size is this design's choice.
// A byte-wide load port and a 64-bit debug read port serve test benches.
module data_mem
  import y86_pkg::*;
#(
  parameter int unsigned BYTES = 4096
) (
  input  logic        clk,
  input  icode_t      icode,
  input  word_t       addr,
  input  word_t       wdata,
  input  logic        inhibit,
  output word_t       rdata,
  output logic        mem_read,
  output logic        mem_write,
  output logic        dmem_error,
  input  logic        load_we,
  input  word_t       load_addr,
  input  logic [7:0]  load_data,
  input  word_t       dbg_addr,
  output word_t       dbg_rdata
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];
  logic       in_range;

  assign mem_read  = (icode == I_MRMOVQ) || (icode == I_POPQ) || (icode == I_RET);
  assign mem_write = (icode == I_RMMOVQ) || (icode == I_PUSHQ) || (icode == I_CALL);
  assign in_range  = (addr <= 64'(BYTES - 8));
  assign dmem_error = (mem_read || mem_write) && !in_range;

  always_ff @(posedge clk) begin
    if (mem_write && in_range && !inhibit)
      for (int i = 0; i < 8; i++) mem[AW'(addr + 64'(i))] <= wdata[8*i +: 8];
    if (load_we && load_addr < 64'(BYTES)) mem[load_addr[AW-1:0]] <= load_data;
  end

  always_comb begin
    rdata     = '0;
    dbg_rdata = '0;
    for (int i = 0; i < 8; i++) begin
      if (mem_read && in_range) rdata[8*i +: 8] = mem[AW'(addr + 64'(i))];
      if (dbg_addr + 64'(i) < 64'(BYTES)) dbg_rdata[8*i +: 8] = mem[AW'(dbg_addr + 64'(i))];
    end
  end

endmodule
