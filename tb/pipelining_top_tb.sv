// pipelining_top_tb: end-to-end test of both processors at their default
// sizes, running at the same time from one reset.
//
// The addq pipeline runs the four-instruction hazard exercise followed by a
// dependent pair, with R[i] = 100*i at the start; its final registers and
// its number of stall cycles (1 + 2) are checked. The Y86-64 pipeline runs a
// program that exercises every mechanism (data-hazard stall, taken and
// not-taken conditional jumps, call and ret, pushq/popq, loads and stores,
// halt), then random programs, each compared with the instruction-set
// reference model. Every mechanism is counted and must have occurred.
module pipelining_top_tb;
  import y86_pkg::*;

  localparam int TB_IMEM = 4096;
  localparam int TB_DMEM = 4096;
  localparam int ADDQ_IMEM = 1024;
  `include "y86_tb_util.svh"

  logic clk = 0, rst = 1;
  logic addq_imem_we = 0; word_t addq_imem_addr = 0; logic [7:0] addq_imem_data = 0;
  logic addq_reg_dbg_we = 0; reg_id_t addq_reg_dbg_waddr = 0; word_t addq_reg_dbg_wdata = 0;
  reg_id_t addq_reg_dbg_raddr = 0; word_t addq_reg_dbg_rdata;
  word_t addq_obs_pc, addq_obs_E_valA, addq_obs_E_valB, addq_obs_W_valE;
  reg_id_t addq_obs_D_rA, addq_obs_D_rB, addq_obs_E_dstE, addq_obs_W_dstE;
  logic addq_obs_stall;
  logic y86_imem_we = 0; word_t y86_imem_addr = 0; logic [7:0] y86_imem_data = 0;
  logic y86_dmem_we = 0; word_t y86_dmem_addr = 0; logic [7:0] y86_dmem_data = 0;
  word_t y86_dmem_dbg_addr = 0, y86_dmem_dbg_rdata;
  logic y86_reg_dbg_we = 0; reg_id_t y86_reg_dbg_waddr = 0; word_t y86_reg_dbg_wdata = 0;
  reg_id_t y86_reg_dbg_raddr = 0; word_t y86_reg_dbg_rdata;
  stat_t y86_stat; cc_t y86_obs_cc; word_t y86_obs_f_pc;
  icode_t y86_obs_D_icode, y86_obs_E_icode, y86_obs_M_icode, y86_obs_W_icode;
  logic y86_obs_data_stall, y86_obs_fetch_wait, y86_obs_freeze, y86_obs_mem_read, y86_obs_mem_write;

  pipelining_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  int n_addq_stall = 0, n_data_stall = 0, n_wait_jump = 0, n_wait_ret = 0, n_freeze = 0;
  int n_memw = 0, n_memr = 0, n_halt = 0;

  always @(posedge clk) if (!rst) begin
    n_addq_stall += addq_obs_stall;
    n_data_stall += y86_obs_data_stall;
    n_freeze     += y86_obs_freeze;
    n_memw       += y86_obs_mem_write;
    n_memr       += y86_obs_mem_read;
    if (y86_obs_fetch_wait && (y86_obs_D_icode == I_JXX || y86_obs_E_icode == I_JXX)) n_wait_jump++;
    if (y86_obs_fetch_wait && (y86_obs_D_icode == I_RET || y86_obs_E_icode == I_RET ||
                               y86_obs_M_icode == I_RET)) n_wait_ret++;
  end

  // addq program: hazard exercise, then the dependent pair on r12/r13
  logic [7:0] addq_prog [6] = '{8'h89, 8'hAB, 8'h98, 8'hBA, 8'hCD, 8'hDC};

  task automatic load_both(input bit with_addq);
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < TB_IMEM; a++) begin
      y86_imem_we = 1; y86_imem_addr = 64'(a); y86_imem_data = (a < prog.size()) ? prog[a] : 8'h00;
      y86_dmem_we = 1; y86_dmem_addr = 64'(a); y86_dmem_data = init_mem[a];
      addq_imem_we = with_addq && (a < ADDQ_IMEM); addq_imem_addr = 64'(a);
      addq_imem_data = (a % 2 == 0) ? 8'h60 : ((a / 2 < 6) ? addq_prog[a / 2] : 8'hFF);
      @(negedge clk);
    end
    y86_imem_we = 0; y86_dmem_we = 0; addq_imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      y86_reg_dbg_we = 1; y86_reg_dbg_waddr = reg_id_t'(r); y86_reg_dbg_wdata = init_reg[r];
      addq_reg_dbg_we = with_addq; addq_reg_dbg_waddr = reg_id_t'(r); addq_reg_dbg_wdata = 64'(100 * r);
      @(negedge clk);
    end
    y86_reg_dbg_we = 0; addq_reg_dbg_we = 0;
  endtask

  task automatic run_y86(input int max_cycles);
    int c = 0;
    @(negedge clk);
    rst = 0;
    while (y86_stat == STAT_AOK && c < max_cycles) begin @(negedge clk); c++; end
    while (c < 30) begin @(negedge clk); c++; end     // let the addq program finish too
    check("y86 program finished", (y86_stat != STAT_AOK), 1);
    if (y86_stat == STAT_HLT) n_halt++;
  endtask

  task automatic compare_y86(input string tag);
    ref_run(100000);
    check({tag, " Stat"}, y86_stat, ref_stat);
    check({tag, " CC"}, {y86_obs_cc.zf, y86_obs_cc.sf, y86_obs_cc.of}, ref_cc);
    for (int r = 0; r < 15; r++) begin
      y86_reg_dbg_raddr = reg_id_t'(r); #1;
      check($sformatf("%s R[%0d]", tag, r), y86_reg_dbg_rdata, ref_reg[r]);
    end
    for (int a = 0; a < TB_DMEM; a += 8) begin
      longint e;
      y86_dmem_dbg_addr = 64'(a); #1;
      for (int i = 0; i < 8; i++) e[8*i +: 8] = ref_mem[a + i];
      check($sformatf("%s M[%0d]", tag, a), y86_dmem_dbg_rdata, e);
    end
  endtask

  task automatic chk_addq(input reg_id_t r, input longint e);
    addq_reg_dbg_raddr = r; #1;
    check($sformatf("addq R[%0d]", r), addq_reg_dbg_rdata, e);
  endtask

  initial begin
    int a_j1, a_j2, a_l1, a_l2, a_call, a_f;
    // ---- directed Y86-64 program ----
    for (int a = 0; a < TB_DMEM; a++) init_mem[a] = 8'($urandom);
    for (int r = 0; r < 15; r++) init_reg[r] = 64'(r);
    prog.delete();
    emit_irmovq(64'd2048, 4'h4);             // %rsp
    emit_irmovq(64'd512, 4'h5);              // %rbp
    emit_irmovq(64'd10, 4'h8);
    emit_rr(4'h6, 4'h0, 4'h8, 4'h9);         // addq %r8,%r9 (data stall)
    emit_rr(4'h6, 4'h1, 4'h9, 4'h9);         // subq %r9,%r9 -> ZF
    a_j1 = prog.size(); emit_jxx(4'h3, 0);   // je (taken)
    emit_irmovq(64'd99, 4'h0);               // skipped
    a_l1 = prog.size();
    emit_rmmovq(4'h8, 64'd16, 4'h5);         // M[528] <- 10
    emit_mrmovq(64'd16, 4'h5, 4'h1);         // %rcx <- 10
    emit_rr(4'h6, 4'h0, 4'h1, 4'h8);         // addq %rcx,%r8 -> 20, ZF=0
    a_j2 = prog.size(); emit_jxx(4'h3, 0);   // je (not taken)
    emit_pushq(4'h8);
    a_call = prog.size(); emit_call(0);
    emit_popq(4'h2);                         // %rdx <- 20
    emit_halt();
    a_l2 = prog.size(); emit_halt();
    a_f = prog.size();
    emit_rr(4'h6, 4'h0, 4'h8, 4'h3);         // subroutine: addq %r8,%rbx
    emit_ret();
    patch64(a_j1 + 1, 64'(a_l1));
    patch64(a_j2 + 1, 64'(a_l2));
    patch64(a_call + 1, 64'(a_f));
    load_both(1);
    run_y86(2000);
    compare_y86("directed");
    y86_reg_dbg_raddr = 4'h2; #1; check("directed: popq result", y86_reg_dbg_rdata, 20);
    check("addq stall cycles", n_addq_stall, 3);
    chk_addq(8, 2500); chk_addq(9, 1700); chk_addq(10, 3100); chk_addq(11, 2100);
    chk_addq(12, 1200 + 2500); chk_addq(13, 2500);

    // ---- random Y86-64 programs ----
    for (int t = 0; t < 6; t++) begin
      for (int a = 0; a < TB_DMEM; a++) init_mem[a] = 8'($urandom);
      for (int r = 0; r < 15; r++) init_reg[r] = {$urandom, $urandom};
      gen_random($urandom_range(20, 60));
      load_both(0);
      run_y86(5000);
      compare_y86($sformatf("random %0d", t));
    end

    check("mechanism: addq stall",        n_addq_stall > 0, 1);
    check("mechanism: y86 data stall",    n_data_stall > 0, 1);
    check("mechanism: wait for jump",     n_wait_jump > 0, 1);
    check("mechanism: wait for ret",      n_wait_ret > 0, 1);
    check("mechanism: memory write",      n_memw > 0, 1);
    check("mechanism: memory read",       n_memr > 0, 1);
    check("mechanism: halt and freeze",   (n_halt > 0) && (n_freeze > 0), 1);
    $display("addq stalls %0d; y86 data stalls %0d, jump waits %0d, ret waits %0d, halts %0d",
             n_addq_stall, n_data_stall, n_wait_jump, n_wait_ret, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
