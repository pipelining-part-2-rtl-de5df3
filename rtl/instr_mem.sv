// instr_mem: byte-addressed instruction memory.
//
// The fetch stage reads the 10 bytes starting at the PC in one
// combinational read, as one 80-bit word "i10bytes": byte PC is bits [7:0],
// byte PC+1 is bits [15:8], and so on, so icode is bits [7:4], rA bits
// [15:12] and rB bits [11:8]. Bytes past the end of the memory read as zero
// and raise "imem_error". The memory is loaded through a byte-wide write
// port (load_we/load_addr/load_data) that is written on the rising clock
// edge; the processors never write it. Its size is this design's choice.
//
// Timing: read is combinational (same cycle); load writes take effect at the
// next rising edge.
module instr_mem #(
  parameter int unsigned BYTES = 4096
) (
  input  logic        clk,
  input  logic [63:0] pc,
  output logic [79:0] i10bytes,
  output logic        imem_error,
  input  logic        load_we,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (load_we && load_addr < 64'(BYTES)) mem[load_addr[$clog2(BYTES)-1:0]] <= load_data;
  end

  always_comb begin
    imem_error = (pc > 64'(BYTES - 10));
    for (int i = 0; i < 10; i++) begin
      logic [63:0] a;
      a = pc + 64'(i);
      i10bytes[8*i +: 8] = (a < 64'(BYTES)) ? mem[a[$clog2(BYTES)-1:0]] : 8'h00;
    end
  end

endmodule
