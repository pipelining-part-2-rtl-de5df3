// addq_pipe_tb: self-checking test of the four-stage addq pipeline.
//
// Registers start as R[i] = 100*i. Three programs are checked cycle by
// cycle against hand-worked pipeline tables: four independent addqs (no
// stall), a dependent pair "addq %r8,%r9; addq %r9,%r8" (two stalls), and
// the four-instruction hazard exercise (one stall). Then random programs run
// and are compared with a sequential reference model: final register values,
// number of stall cycles, and the cycle of the last register write, both
// predicted by an issue-time model (an instruction may reach decode only
// three cycles after any older instruction that writes one of its sources).
module addq_pipe_tb;
  import y86_pkg::*;

  localparam int unsigned IMEM = 256;
  localparam logic [3:0] N = 4'hF;   // REG_NONE in the tables

  logic clk = 0, rst = 1;
  logic imem_we = 0; logic [63:0] imem_addr = 0; logic [7:0] imem_data = 0;
  logic reg_dbg_we = 0; reg_id_t reg_dbg_waddr = 0; word_t reg_dbg_wdata = 0;
  reg_id_t reg_dbg_raddr = 0; word_t reg_dbg_rdata;
  word_t obs_pc, obs_E_valA, obs_E_valB, obs_W_valE;
  reg_id_t obs_D_rA, obs_D_rB, obs_E_dstE, obs_W_dstE;
  logic obs_stall;
  int checks = 0, failures = 0;
  int cyc = 0;

  addq_pipe #(.IMEM_BYTES(IMEM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // load program (pairs of register nibbles), pad with REG_NONE pairs,
  // preload R[i] = 100*i; leaves the pipeline in reset
  task automatic load(input logic [7:0] regs[$]);
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < IMEM; a++) begin
      imem_we = 1; imem_addr = 64'(a);
      if (a % 2 == 0) imem_data = 8'h60;
      else imem_data = (a / 2 < regs.size()) ? regs[a / 2] : 8'hFF;
      @(negedge clk);
    end
    imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      reg_dbg_we = 1; reg_dbg_waddr = reg_id_t'(r); reg_dbg_wdata = 64'(100 * r);
      @(negedge clk);
    end
    reg_dbg_we = 0;
  endtask

  task automatic start();
    @(negedge clk);
    rst = 0;          // the next cycle is cycle 0
    cyc = 0;
  endtask

  // sample the state of the current cycle, then move to the next one
  task automatic step();
    @(negedge clk);
    cyc++;
  endtask

  task automatic chk_reg(input string what, input reg_id_t r, input longint exp);
    reg_dbg_raddr = r;
    #1;
    check(what, reg_dbg_rdata, exp);
  endtask

  task automatic chk_pc(input int c, input word_t pc);
    check($sformatf("cycle %0d PC", c), obs_pc, pc);
  endtask
  task automatic chk_D(input int c, input reg_id_t a, input reg_id_t b);
    check($sformatf("cycle %0d D_rA", c), obs_D_rA, a);
    check($sformatf("cycle %0d D_rB", c), obs_D_rB, b);
  endtask
  task automatic chk_E(input int c, input longint a, input longint b, input reg_id_t d, input bit vals);
    if (vals) begin
      check($sformatf("cycle %0d E_valA", c), obs_E_valA, a);
      check($sformatf("cycle %0d E_valB", c), obs_E_valB, b);
    end
    check($sformatf("cycle %0d E_dstE", c), obs_E_dstE, d);
  endtask
  task automatic chk_W(input int c, input longint v, input reg_id_t d, input bit vals);
    if (vals) check($sformatf("cycle %0d W_valE", c), obs_W_valE, v);
    check($sformatf("cycle %0d W_dstE", c), obs_W_dstE, d);
  endtask

  int stalls_seen;
  always @(posedge clk) if (!rst && obs_stall) stalls_seen++;

  // ---- random programs against a reference model ----
  task automatic random_program(input int n);
    logic [7:0] p[$];
    longint ref_r[15];
    int t[$];          // cycle each instruction is in decode
    int tlast, exp_stalls, last_write_cycle, seen_write;
    reg_id_t a, b;
    for (int r = 0; r < 15; r++) ref_r[r] = 100 * r;
    for (int i = 0; i < n; i++) begin
      a = reg_id_t'($urandom_range(8, 14));
      b = reg_id_t'($urandom_range(8, 14));
      p.push_back({a, b});
    end
    // issue model
    tlast = 0;
    exp_stalls = 0;
    for (int k = 0; k < n; k++) begin
      int tk;
      tk = (k == 0) ? 1 : t[k-1] + 1;
      for (int j = 0; j < k; j++) begin
        reg_id_t dj;
        dj = p[j][3:0];
        if (dj == p[k][7:4] || dj == p[k][3:0]) if (t[j] + 3 > tk) tk = t[j] + 3;
      end
      if (k > 0) exp_stalls += tk - (t[k-1] + 1);
      t.push_back(tk);
      ref_r[p[k][3:0]] = ref_r[p[k][7:4]] + ref_r[p[k][3:0]];
    end
    last_write_cycle = t[n-1] + 2;   // in writeback two cycles after decode
    load(p);
    stalls_seen = 0;
    start();
    seen_write = -1;
    for (int c = 0; c < last_write_cycle + 6; c++) begin
      if (obs_W_dstE != N) seen_write = c;
      step();
    end
    check("random: stall cycles", stalls_seen, exp_stalls);
    check("random: last writeback cycle", seen_write, last_write_cycle);
    for (int r = 8; r < 15; r++)
      chk_reg($sformatf("random: R[%0d]", r), reg_id_t'(r), ref_r[r]);
  endtask

  initial begin
    // ---- program 1: addq timing table (no hazard) ----
    load('{8'h89, 8'hAB, 8'hCD, 8'h98});
    start();
    chk_pc(0, 0);                                                            step();
    chk_pc(1, 2); chk_D(1, 8, 9);                                            check("c1 stall", obs_stall, 0); step();
    chk_pc(2, 4); chk_D(2, 10, 11); chk_E(2, 800, 900, 9, 1);                step();
    chk_pc(3, 6); chk_D(3, 12, 13); chk_E(3, 1000, 1100, 11, 1); chk_W(3, 1700, 9, 1);  step();
    chk_D(4, 9, 8); chk_E(4, 1200, 1300, 13, 1); chk_W(4, 2100, 11, 1);      check("c4 stall", obs_stall, 0); step();
    chk_E(5, 1700, 800, 8, 1); chk_W(5, 2500, 13, 1);                        step();
    chk_W(6, 2500, 8, 1);                                                    step();
    chk_reg("prog1 R[8]", 8, 2500);
    chk_reg("prog1 R[9]", 9, 1700);
    chk_reg("prog1 R[11]", 11, 2100);
    chk_reg("prog1 R[13]", 13, 2500);

    // ---- program 2: data hazard stall table ----
    load('{8'h89, 8'h98, 8'hAB});
    start();
    chk_pc(0, 0);                                                            step();
    chk_pc(1, 2); chk_D(1, 8, 9);         check("c1 stall", obs_stall, 1);   step();
    chk_pc(2, 2); chk_D(2, N, N); chk_E(2, 800, 900, 9, 1);   check("c2 stall", obs_stall, 1); step();
    chk_pc(3, 2); chk_D(3, N, N); chk_E(3, 0, 0, N, 0); chk_W(3, 1700, 9, 1); check("c3 stall", obs_stall, 0); step();
    chk_pc(4, 4); chk_D(4, 9, 8); chk_E(4, 0, 0, N, 0); chk_W(4, 0, N, 0);   step();
    chk_D(5, 10, 11); chk_E(5, 1700, 800, 8, 1); chk_W(5, 0, N, 0);          step();
    chk_E(6, 1000, 1100, 11, 1); chk_W(6, 2500, 8, 1);                       step();
    step();
    chk_reg("prog2 R[8]", 8, 2500);
    chk_reg("prog2 R[9]", 9, 1700);
    chk_reg("prog2 R[11]", 11, 2100);

    // ---- program 3: hazard exercise, one stall ----
    load('{8'h89, 8'hAB, 8'h98, 8'hBA});
    stalls_seen = 0;
    start();
    repeat (12) step();
    check("exercise stalls", stalls_seen, 1);
    chk_reg("exercise R[8]", 8, 2500);
    chk_reg("exercise R[10]", 10, 1000 + 2100);

    for (int i = 0; i < 30; i++) random_program($urandom_range(3, 40));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
