// y86_pipe_ctrl_tb: random inputs against an independent statement of the
// control rules: halt freezes everything; a decode source that a later
// stage will write stalls F and D and bubbles E; otherwise a conditional
// jump in D/E, a ret in D/E/M or a faulting instruction in D/E/M holds F and
// bubbles D. Also checks that stall and bubble never reach one register
// together.
module y86_pipe_ctrl_tb;
  import y86_pkg::*;
  reg_id_t d_srcA, d_srcB, E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM;
  logic D_cjump, E_cjump, D_ret, E_ret, M_ret, D_exc, E_exc, M_exc, W_exc;
  logic F_stall, D_stall, D_bubble, E_bubble, freeze, data_stall, fetch_wait;
  int checks = 0, failures = 0;

  y86_pipe_ctrl dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic reg_id_t rr();
    return ($urandom_range(0, 2) == 0) ? REG_NONE : reg_id_t'($urandom_range(0, 5));
  endfunction

  initial begin
    int n [3] = '{0, 0, 0};
    for (int i = 0; i < 50000; i++) begin
      logic hz, wt, fr;
      reg_id_t dsts [6];
      d_srcA = rr(); d_srcB = rr();
      E_dstE = rr(); E_dstM = rr(); M_dstE = rr(); M_dstM = rr(); W_dstE = rr(); W_dstM = rr();
      {D_cjump, E_cjump, D_ret, E_ret, M_ret} = 5'($urandom) & 5'($urandom) & 5'($urandom);
      {D_exc, E_exc, M_exc} = 3'($urandom) & 3'($urandom) & 3'($urandom);
      W_exc = ($urandom_range(0, 7) == 0);
      dsts = '{E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM};
      hz = 0;
      foreach (dsts[k]) begin
        if (d_srcA != 4'hF && d_srcA == dsts[k]) hz = 1;
        if (d_srcB != 4'hF && d_srcB == dsts[k]) hz = 1;
      end
      fr = W_exc;
      hz = hz && !fr;
      wt = !fr && !hz && (D_cjump || E_cjump || D_ret || E_ret || M_ret || D_exc || E_exc || M_exc);
      n[0] += fr; n[1] += hz; n[2] += wt;
      #1;
      checks++;
      if ({freeze, data_stall, fetch_wait, F_stall, D_stall, D_bubble, E_bubble} !==
          {fr, hz, wt, fr || hz || wt, fr || hz, wt, hz}) begin
        failures++;
        if (failures < 10) $display("FAIL case %0d", i);
      end
      checks++;
      if (D_stall && D_bubble) failures++;
    end
    checks++;
    if (n[0] == 0 || n[1] == 0 || n[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
