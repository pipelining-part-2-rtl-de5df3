// y86_pipe_tb: self-checking test of the five-stage Y86-64 pipeline.
//
// Directed programs check the timing of each hazard: a conditional jump
// makes fetch wait two cycles (the target is fetched three cycles after the
// jump), a ret makes it wait three (the return address is fetched four
// cycles after the ret), a register read right after its write stalls decode
// three cycles, and a halt, a bad address and a bad instruction stop the
// processor with the matching Stat and with no later instruction changing
// state. Random programs (forward conditional jumps, calls, pushq/popq,
// loads/stores, cmov, all OPq functions) are then run and the final
// registers, condition codes, Stat and the whole data memory are compared
// with an instruction-set reference model.
module y86_pipe_tb;
  import y86_pkg::*;

  localparam int TB_IMEM = 1024;
  localparam int TB_DMEM = 4096;
  `include "y86_tb_util.svh"

  logic clk = 0, rst = 1;
  logic imem_we = 0; word_t imem_addr = 0; logic [7:0] imem_data = 0;
  logic dmem_we = 0; word_t dmem_addr = 0; logic [7:0] dmem_data = 0;
  word_t dmem_dbg_addr = 0, dmem_dbg_rdata;
  logic reg_dbg_we = 0; reg_id_t reg_dbg_waddr = 0; word_t reg_dbg_wdata = 0;
  reg_id_t reg_dbg_raddr = 0; word_t reg_dbg_rdata;
  stat_t stat; cc_t obs_cc; word_t obs_f_pc;
  icode_t obs_D_icode, obs_E_icode, obs_M_icode, obs_W_icode;
  logic obs_data_stall, obs_fetch_wait, obs_freeze, obs_mem_read, obs_mem_write;

  y86_pipe #(.IMEM_BYTES(TB_IMEM), .DMEM_BYTES(TB_DMEM)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (3000000) @(posedge clk);
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

  // mechanism counters over the whole run
  int n_data_stall = 0, n_fetch_wait = 0, n_cjump = 0, n_ret = 0, n_freeze = 0;
  int n_memw = 0, n_memr = 0, n_hlt = 0, n_adr = 0, n_ins = 0;

  // per run: accepted fetches (cycle, pc)
  int    f_cyc [$];
  longint f_pc [$];
  int    cycles, ds_run;

  task automatic load_and_reset();
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < TB_IMEM; a++) begin
      imem_we = 1; imem_addr = 64'(a); imem_data = (a < prog.size()) ? prog[a] : 8'h00;
      @(negedge clk);
    end
    imem_we = 0;
    for (int a = 0; a < TB_DMEM; a++) begin
      dmem_we = 1; dmem_addr = 64'(a); dmem_data = init_mem[a];
      @(negedge clk);
    end
    dmem_we = 0;
    for (int r = 0; r < 15; r++) begin
      reg_dbg_we = 1; reg_dbg_waddr = reg_id_t'(r); reg_dbg_wdata = init_reg[r];
      @(negedge clk);
    end
    reg_dbg_we = 0;
  endtask

  task automatic randomize_state();
    for (int a = 0; a < TB_DMEM; a++) init_mem[a] = 8'($urandom);
    for (int r = 0; r < 15; r++) init_reg[r] = {$urandom, $urandom};
  endtask

  // run from reset until Stat leaves AOK; cycle 0 is the first after reset
  task automatic run(input int max_cycles);
    f_cyc.delete(); f_pc.delete();
    ds_run = 0;
    @(negedge clk);
    rst = 0;
    cycles = 0;
    while (stat == STAT_AOK && cycles < max_cycles) begin
      if (!obs_fetch_wait && !obs_data_stall && !obs_freeze) begin
        f_cyc.push_back(cycles); f_pc.push_back(obs_f_pc);
      end
      n_data_stall += obs_data_stall; ds_run += obs_data_stall;
      n_fetch_wait += obs_fetch_wait;
      n_freeze     += obs_freeze;
      n_memw       += obs_mem_write;
      n_memr       += obs_mem_read;
      if (obs_M_icode == I_JXX) n_cjump++;
      if (obs_W_icode == I_RET && !obs_freeze) n_ret++;
      @(negedge clk);
      cycles++;
    end
    check("finished", (stat != STAT_AOK), 1);
    if (stat == STAT_HLT) n_hlt++;
    if (stat == STAT_ADR) n_adr++;
    if (stat == STAT_INS) n_ins++;
    repeat (3) @(negedge clk);     // frozen: nothing may change any more
  endtask

  function automatic int fetch_cycle(input longint pc);
    foreach (f_pc[i]) if (f_pc[i] == pc) return f_cyc[i];
    return -1000;
  endfunction

  task automatic compare_with_ref(input string tag);
    ref_run(100000);
    check({tag, " Stat"}, stat, ref_stat);
    check({tag, " CC"}, {obs_cc.zf, obs_cc.sf, obs_cc.of}, ref_cc);
    for (int r = 0; r < 15; r++) begin
      reg_dbg_raddr = reg_id_t'(r); #1;
      check($sformatf("%s R[%0d]", tag, r), reg_dbg_rdata, ref_reg[r]);
    end
    for (int a = 0; a < TB_DMEM; a += 8) begin
      longint e;
      dmem_dbg_addr = 64'(a); #1;
      for (int i = 0; i < 8; i++) e[8*i +: 8] = ref_mem[a + i];
      checks++;
      if (dmem_dbg_rdata != e) begin
        failures++;
        $display("FAIL %s M[%0d]: %h vs %h", tag, a, dmem_dbg_rdata, e);
      end
    end
  endtask

  initial begin
    int a_subq, a_je, a_label, a_next, a_ret, a_after;

    // ---- conditional jump, taken: target fetched 3 cycles after the jump
    randomize_state();
    prog.delete();
    emit_irmovq(64'd5, 4'h8); emit_nop(); emit_nop(); emit_nop();
    a_subq = prog.size(); emit_rr(4'h6, 4'h1, 4'h8, 4'h8);     // subq %r8,%r8
    a_je = prog.size();   emit_jxx(4'h3, 0);                    // je label
    a_next = prog.size(); emit_irmovq(64'd1, 4'h0);
    a_label = prog.size(); emit_irmovq(64'd2, 4'h3);             // label: irmovq
    emit_halt();
    patch64(a_je + 1, 64'(a_label));
    load_and_reset(); run(200);
    check("je: fetched one cycle after subq", fetch_cycle(a_je) - fetch_cycle(a_subq), 1);
    check("je taken: target three cycles after je", fetch_cycle(a_label) - fetch_cycle(a_je), 3);
    check("je taken: fall-through not fetched", fetch_cycle(a_next), -1000);
    compare_with_ref("je taken");

    // ---- conditional jump, not taken
    randomize_state();
    prog.delete();
    emit_irmovq(64'd5, 4'h8); emit_irmovq(64'd6, 4'h9); emit_nop(); emit_nop(); emit_nop();
    emit_rr(4'h6, 4'h1, 4'h8, 4'h9);                             // subq %r8,%r9 -> 1
    a_je = prog.size();   emit_jxx(4'h3, 0);
    a_next = prog.size(); emit_irmovq(64'd1, 4'h0);
    a_label = prog.size(); emit_halt();
    patch64(a_je + 1, 64'(a_label));
    load_and_reset(); run(200);
    check("je not taken: next three cycles after je", fetch_cycle(a_next) - fetch_cycle(a_je), 3);
    compare_with_ref("je not taken");

    // ---- ret: return address fetched 4 cycles after ret
    randomize_state();
    prog.delete();
    emit_irmovq(64'd2048, 4'h4); emit_nop(); emit_nop(); emit_nop();
    emit_call(0);
    a_after = prog.size(); emit_irmovq(64'd7, 4'h0); emit_halt();
    patch64(a_after - 8, 64'(prog.size()));
    emit_nop(); emit_nop(); emit_nop();
    a_ret = prog.size(); emit_ret();
    load_and_reset(); run(200);
    check("ret: return address four cycles after ret", fetch_cycle(a_after) - fetch_cycle(a_ret), 4);
    check("ret: no data stall", ds_run, 0);
    compare_with_ref("ret");

    // ---- call immediately followed by ret: %rsp dependence adds stalls
    randomize_state();
    prog.delete();
    emit_irmovq(64'd2048, 4'h4); emit_nop(); emit_nop(); emit_nop();
    emit_call(0);
    a_after = prog.size(); emit_rr(4'h6, 4'h0, 4'h8, 4'h9); emit_halt();
    patch64(a_after - 8, 64'(prog.size()));
    a_ret = prog.size(); emit_ret();
    load_and_reset(); run(200);
    check("call;ret: ret waits for %rsp three cycles", ds_run, 3);
    check("call;ret: return fetched seven cycles after ret", fetch_cycle(a_after) - fetch_cycle(a_ret), 7);
    compare_with_ref("call-ret");

    // ---- data hazard: read right after write stalls decode 3 cycles
    randomize_state();
    prog.delete();
    emit_irmovq(64'd5, 4'h0); a_next = prog.size(); emit_rr(4'h6, 4'h0, 4'h0, 4'h3); emit_halt();
    load_and_reset(); run(200);
    check("data hazard: stall cycles", ds_run, 3);
    compare_with_ref("data hazard");

    // ---- pushq as in the stage table: M[R[%rsp]-8] <- R[rA], %rsp -= 8
    randomize_state();
    prog.delete();
    emit_irmovq(64'd1000, 4'h4); emit_irmovq(64'h1234_5678_9abc_def0, 4'h2); emit_pushq(4'h2); emit_halt();
    load_and_reset(); run(200);
    reg_dbg_raddr = 4'h4; #1; check("pushq: %rsp", reg_dbg_rdata, 992);
    dmem_dbg_addr = 992;  #1; check("pushq: M[992]", dmem_dbg_rdata, 64'h1234_5678_9abc_def0);
    compare_with_ref("pushq");

    // ---- bad data address: ADR, and the store after it has no effect
    randomize_state();
    prog.delete();
    emit_irmovq(64'd8, 4'h3); emit_nop(); emit_nop(); emit_nop();
    emit_mrmovq(64'h10_0000, 4'h3, 4'h0);     // address out of range
    emit_rmmovq(4'h3, 64'd0, 4'h3);           // must not be performed
    emit_rr(4'h6, 4'h0, 4'h3, 4'h3);          // must not change R or CC
    emit_halt();
    load_and_reset(); run(200);
    check("bad address: Stat", stat, STAT_ADR);
    compare_with_ref("bad address");

    // ---- bad instruction: INS
    randomize_state();
    prog.delete();
    emit_nop(); emit8(8'hC0); emit_halt();
    load_and_reset(); run(200);
    check("bad instruction: Stat", stat, STAT_INS);
    compare_with_ref("bad instruction");

    // ---- independent instructions: one per cycle, five-cycle latency
    randomize_state();
    prog.delete();
    for (int i = 0; i < 8; i++) emit_irmovq(64'(i), 4'(i < 4 ? i : i + 4));
    a_next = prog.size(); emit_halt();
    load_and_reset(); run(200);
    check("throughput: halt fetched 8 cycles after the first", fetch_cycle(a_next) - fetch_cycle(0), 8);
    check("throughput: no stall", ds_run, 0);
    // halt fetched at cycle 8 reaches writeback at 12; Stat changes at 13
    check("latency: Stat set five cycles after fetch of halt", cycles - fetch_cycle(a_next), 5);
    compare_with_ref("throughput");

    // ---- example programs of the notes, as written ----
    // subq %r8,%r8; je label; label: irmovq ...  (fetch waits two cycles)
    randomize_state();
    prog.delete();
    a_subq = prog.size(); emit_rr(4'h6, 4'h1, 4'h8, 4'h8);
    a_je = prog.size();   emit_jxx(4'h3, 0);
    a_label = prog.size(); emit_irmovq(64'd3, 4'h0); emit_halt();
    patch64(a_je + 1, 64'(a_label));
    load_and_reset(); run(200);
    check("example jCC: je fetched at time 2", fetch_cycle(a_je) - fetch_cycle(a_subq), 1);
    check("example jCC: irmovq fetched at time 5", fetch_cycle(a_label) - fetch_cycle(a_subq), 4);
    compare_with_ref("example jCC");

    // call empty; addq %r8,%r9; (halt;) empty: ret   with %rsp preset
    randomize_state();
    init_reg[4] = 64'd2048;
    prog.delete();
    emit_call(0);
    a_after = prog.size(); emit_rr(4'h6, 4'h0, 4'h8, 4'h9); emit_halt();
    patch64(1, 64'(prog.size()));
    a_ret = prog.size(); emit_ret();
    load_and_reset(); run(200);
    check("example ret: ret fetched at time 2", fetch_cycle(a_ret) - fetch_cycle(0), 1);
    // without forwarding, ret waits three cycles in decode for the new %rsp
    check("example ret: addq fetched at time 6 + 3", fetch_cycle(a_after) - fetch_cycle(0), 5 + 3);
    compare_with_ref("example ret");

    // addq %r8,%r9; je 0xFFFF; addq %r10,%r11, taken: target beyond memory
    randomize_state();
    init_reg[8] = 64'd800; init_reg[9] = -64'sd800;
    prog.delete();
    emit_rr(4'h6, 4'h0, 4'h8, 4'h9); emit_jxx(4'h3, 64'hFFFF); emit_rr(4'h6, 4'h0, 4'hA, 4'hB); emit_halt();
    load_and_reset(); run(200);
    check("example je 0xFFFF taken: Stat", stat, STAT_ADR);
    compare_with_ref("example je 0xFFFF taken");
    // ... and not taken (R[8] + R[9] != 0)
    randomize_state();
    init_reg[8] = 64'd800; init_reg[9] = 64'd900;
    load_and_reset(); run(200);
    check("example je 0xFFFF not taken: Stat", stat, STAT_HLT);
    reg_dbg_raddr = 4'h9; #1; check("example je 0xFFFF not taken: R[9]", reg_dbg_rdata, 1700);
    compare_with_ref("example je 0xFFFF not taken");

    // ---- random programs against the reference model
    for (int t = 0; t < 40; t++) begin
      randomize_state();
      gen_random($urandom_range(5, 50));
      load_and_reset(); run(5000);
      compare_with_ref($sformatf("random %0d", t));
    end

    check("mechanism: data stall seen",   n_data_stall > 0, 1);
    check("mechanism: fetch wait seen",   n_fetch_wait > 0, 1);
    check("mechanism: jump seen",   n_cjump > 0, 1);
    check("mechanism: ret seen",          n_ret > 0, 1);
    check("mechanism: memory write seen", n_memw > 0, 1);
    check("mechanism: memory read seen",  n_memr > 0, 1);
    check("mechanism: freeze seen",       n_freeze > 0, 1);
    check("mechanism: halt seen",         n_hlt > 0, 1);
    check("mechanism: bad address seen",  n_adr > 0, 1);
    check("mechanism: bad instr seen",    n_ins > 0, 1);
    $display("data stalls %0d, fetch waits %0d, jumps %0d, rets %0d, halts %0d",
             n_data_stall, n_fetch_wait, n_cjump, n_ret, n_hlt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
