// regfile_tb: random reads and writes against a reference array. Checks
// that REG_NONE reads 0 and is never written, that a write is visible only
// after the clock edge, that dstM wins over dstE on the same register, and
// that reset blocks the write ports but not the preload port.
module regfile_tb;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  reg_id_t srcA = 0, srcB = 0, dstE = REG_NONE, dstM = REG_NONE;
  word_t valA, valB, valE = 0, valM = 0;
  logic dbg_we = 0; reg_id_t dbg_waddr = 0; word_t dbg_wdata = 0;
  reg_id_t dbg_raddr = 0; word_t dbg_rdata;
  word_t model [15];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mread(input reg_id_t r);
    return (r == REG_NONE) ? '0 : model[r];
  endfunction

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    // preload under reset; the E/M ports must do nothing during reset
    for (int r = 0; r < 15; r++) begin
      @(negedge clk);
      dbg_we = 1; dbg_waddr = reg_id_t'(r); dbg_wdata = 64'($urandom) << 8 | 64'(r);
      model[r] = dbg_wdata;
      dstE = reg_id_t'((r + 1) % 15); valE = 64'hDEAD;
    end
    @(negedge clk);
    dbg_we = 0; dstE = REG_NONE;
    for (int r = 0; r < 16; r++) begin
      dbg_raddr = reg_id_t'(r); #1;
      chk("preload", dbg_rdata, mread(reg_id_t'(r)));
    end
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      srcA = reg_id_t'($urandom); srcB = reg_id_t'($urandom);
      dstE = reg_id_t'($urandom); dstM = ($urandom_range(0, 3) == 0) ? dstE : reg_id_t'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      #1;
      chk("valA before edge", valA, mread(srcA));
      chk("valB before edge", valB, mread(srcB));
      @(posedge clk);
      if (dstE != REG_NONE) model[dstE] = valE;
      if (dstM != REG_NONE) model[dstM] = valM;
      #1;
      chk("valA after edge", valA, mread(srcA));
      chk("valB after edge", valB, mread(srcB));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
