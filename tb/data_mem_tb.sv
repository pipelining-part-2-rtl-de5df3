// data_mem_tb: random loads and stores by icode against a byte-array model.
// Checks which icodes read and write, little-endian 8-byte words at any
// alignment, the inhibit input, and the out-of-range error near the end.
module data_mem_tb;
  import y86_pkg::*;
  localparam int unsigned BYTES = 256;
  logic clk = 0;
  icode_t icode = I_NOP;
  word_t addr = 0, wdata = 0, rdata;
  logic inhibit = 0, mem_read, mem_write, dmem_error;
  logic load_we = 0; word_t load_addr = 0; logic [7:0] load_data = 0;
  word_t dbg_addr = 0, dbg_rdata;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  data_mem #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    icode_t codes [12] = '{I_HALT, I_NOP, I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
                           I_OPQ, I_JXX, I_CALL, I_RET, I_PUSHQ, I_POPQ};
    for (int a = 0; a < BYTES; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 64'(a); load_data = 8'($urandom); model[a] = load_data;
    end
    @(negedge clk);
    load_we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic rd, wr, inr;
      word_t e;
      icode = codes[$urandom_range(0, 11)];
      addr = ($urandom_range(0, 9) == 0) ? 64'($urandom_range(BYTES - 12, BYTES + 3)) : 64'($urandom_range(0, BYTES - 8));
      wdata = {$urandom, $urandom};
      inhibit = ($urandom_range(0, 5) == 0);
      dbg_addr = 64'($urandom_range(0, BYTES - 8));
      rd = icode inside {I_MRMOVQ, I_POPQ, I_RET};
      wr = icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
      inr = (addr + 8 <= BYTES);
      #1;
      chk("mem_read", mem_read, rd);
      chk("mem_write", mem_write, wr);
      chk("error", dmem_error, (rd || wr) && !inr);
      for (int b = 0; b < 8; b++) e[8*b +: 8] = (rd && inr) ? model[addr + b] : 8'h00;
      chk("rdata", rdata, e);
      for (int b = 0; b < 8; b++) e[8*b +: 8] = model[dbg_addr + b];
      chk("dbg_rdata", dbg_rdata, e);
      @(posedge clk);
      if (wr && inr && !inhibit) for (int b = 0; b < 8; b++) model[addr + b] = wdata[8*b +: 8];
      @(negedge clk);
    end
    for (int a = 0; a < BYTES - 8; a += 8) begin
      word_t e;
      dbg_addr = 64'(a); #1;
      for (int b = 0; b < 8; b++) e[8*b +: 8] = model[a + b];
      chk("final contents", dbg_rdata, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
