// instr_mem_tb: loads random bytes and checks the 10-byte fetch window
// (little-endian byte order) and the out-of-range flag at random PCs.
module instr_mem_tb;
  localparam int unsigned BYTES = 128;
  logic clk = 0;
  logic [63:0] pc = 0;
  logic [79:0] i10bytes;
  logic imem_error;
  logic load_we = 0; logic [63:0] load_addr = 0; logic [7:0] load_data = 0;
  logic [7:0] ref_mem [BYTES];
  int checks = 0, failures = 0;

  instr_mem #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < BYTES; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 64'(a); load_data = 8'($urandom); ref_mem[a] = load_data;
    end
    @(negedge clk);
    load_we = 0;
    for (int i = 0; i < 500; i++) begin
      logic [79:0] exp;
      pc = (i < 3) ? 64'(BYTES - 10 + i) : 64'($urandom_range(0, BYTES + 5));
      for (int b = 0; b < 10; b++)
        exp[8*b +: 8] = (pc + 64'(b) < 64'(BYTES)) ? ref_mem[pc + 64'(b)] : 8'h00;
      #1;
      checks++;
      if (i10bytes !== exp) begin failures++; $display("FAIL pc=%0d got %h exp %h", pc, i10bytes, exp); end
      checks++;
      if (imem_error !== (pc + 10 > 64'(BYTES))) begin failures++; $display("FAIL error flag pc=%0d", pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
