// addq_stall_tb: exhaustive check of the fetch-stage stall condition of the
// addq pipeline: stall exactly when a fetched source register (not
// REG_NONE) equals the destination in decode or in execute.
module addq_stall_tb;
  import y86_pkg::*;
  reg_id_t f_rA, f_rB, d_dstE, e_dstE;
  logic stall;
  int checks = 0, failures = 0;

  addq_stall dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_stall = 0;
    for (int i = 0; i < 65536; i++) begin
      logic exp;
      {f_rA, f_rB, d_dstE, e_dstE} = 16'(i);
      exp = 1'b0;
      if (f_rA != 4'hF && (f_rA == d_dstE || f_rA == e_dstE)) exp = 1'b1;
      if (f_rB != 4'hF && (f_rB == d_dstE || f_rB == e_dstE)) exp = 1'b1;
      #1;
      checks++;
      n_stall += stall;
      if (stall !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h %h: %b", f_rA, f_rB, d_dstE, e_dstE, stall);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
