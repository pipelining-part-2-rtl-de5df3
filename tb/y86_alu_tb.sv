// y86_alu_tb: random and corner operands for all four functions; results
// and ZF/SF/OF are compared with values computed from 65-bit arithmetic.
module y86_alu_tb;
  import y86_pkg::*;
  word_t aluA, aluB, valE;
  logic [3:0] alufun;
  cc_t cc;
  int checks = 0, failures = 0;

  y86_alu dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint corner [6] = '{0, 1, -1, 64'h7FFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000, 100};
    for (int i = 0; i < 20000; i++) begin
      logic signed [64:0] wide;
      word_t e;
      logic zf, sf, of;
      alufun = 4'(i % 4);
      aluA = (i < 144) ? corner[(i / 4) % 6] : {$urandom, $urandom};
      aluB = (i < 144) ? corner[(i / 24) % 6] : {$urandom, $urandom};
      case (alufun)
        4'h0: begin wide = $signed({aluB[63], aluB}) + $signed({aluA[63], aluA}); e = wide[63:0]; of = (wide[64] != wide[63]); end
        4'h1: begin wide = $signed({aluB[63], aluB}) - $signed({aluA[63], aluA}); e = wide[63:0]; of = (wide[64] != wide[63]); end
        4'h2: begin e = aluB & aluA; of = 0; end
        default: begin e = aluB ^ aluA; of = 0; end
      endcase
      zf = (e == 0); sf = e[63];
      #1;
      checks++;
      if (valE !== e || cc.zf !== zf || cc.sf !== sf || cc.of !== of) begin
        failures++;
        if (failures < 10) $display("FAIL fn=%0d A=%h B=%h: %h %b%b%b vs %h %b%b%b", alufun, aluA, aluB,
                                    valE, cc.zf, cc.sf, cc.of, e, zf, sf, of);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
