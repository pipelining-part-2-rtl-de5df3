// y86_tb_util.svh: test-bench helpers for the five-stage Y86-64 processor,
// included inside a test-bench module that defines TB_IMEM and TB_DMEM.
//
//  * a small assembler: each emit_* call appends one instruction's bytes to
//    "prog" (standard Y86-64 encodings, little-endian constants);
//  * random program generation with forward conditional jumps, a called
//    subroutine, pushq/popq and memory accesses, always terminating in halt;
//  * an instruction-set reference model (ref_run) that executes "prog"
//    one instruction at a time on ref_reg/ref_mem/ref_cc and gives the
//    architectural state the pipeline must end in.

logic [7:0]  prog [$];
longint      ref_reg [15];
logic [7:0]  ref_mem [TB_DMEM];
logic [7:0]  init_mem [TB_DMEM];
longint      init_reg [15];
logic [2:0]  ref_cc;          // {zf, sf, of}
int          ref_stat;        // 0 AOK 1 HLT 2 ADR 3 INS
int          ref_steps;

function automatic void emit8(input logic [7:0] b);
  prog.push_back(b);
endfunction
function automatic void emit64(input longint v);
  for (int i = 0; i < 8; i++) prog.push_back(v[8*i +: 8]);
endfunction
function automatic void emit_halt();                  emit8(8'h00); endfunction
function automatic void emit_nop();                   emit8(8'h10); endfunction
function automatic void emit_rr(input logic [3:0] icode, input logic [3:0] fn,
                                input logic [3:0] ra, input logic [3:0] rb);
  emit8({icode, fn}); emit8({ra, rb});
endfunction
function automatic void emit_irmovq(input longint v, input logic [3:0] rb);
  emit8(8'h30); emit8({4'hF, rb}); emit64(v);
endfunction
function automatic void emit_rmmovq(input logic [3:0] ra, input longint d, input logic [3:0] rb);
  emit8(8'h40); emit8({ra, rb}); emit64(d);
endfunction
function automatic void emit_mrmovq(input longint d, input logic [3:0] rb, input logic [3:0] ra);
  emit8(8'h50); emit8({ra, rb}); emit64(d);
endfunction
function automatic void emit_jxx(input logic [3:0] fn, input longint dest);
  emit8({4'h7, fn}); emit64(dest);
endfunction
function automatic void emit_call(input longint dest);
  emit8(8'h80); emit64(dest);
endfunction
function automatic void emit_ret();                   emit8(8'h90); endfunction
function automatic void emit_pushq(input logic [3:0] ra); emit8(8'hA0); emit8({ra, 4'hF}); endfunction
function automatic void emit_popq(input logic [3:0] ra);  emit8(8'hB0); emit8({ra, 4'hF}); endfunction

// patch the 8-byte constant that starts at byte offset "at"
function automatic void patch64(input int at, input longint v);
  for (int i = 0; i < 8; i++) prog[at + i] = v[8*i +: 8];
endfunction

function automatic longint rd64(input longint a);
  longint v;
  for (int i = 0; i < 8; i++) v[8*i +: 8] = ref_mem[a + i];
  return v;
endfunction
function automatic void wr64(input longint a, input longint v);
  for (int i = 0; i < 8; i++) ref_mem[a + i] = v[8*i +: 8];
endfunction
function automatic logic [7:0] pbyte(input longint a);
  return (a >= 0 && a < prog.size()) ? prog[a] : 8'h00;
endfunction

function automatic logic cond(input logic [3:0] fn, input logic [2:0] cc);
  logic zf, sf, of;
  {zf, sf, of} = cc;
  case (fn)
    4'h0: return 1'b1;
    4'h1: return (sf ^ of) | zf;
    4'h2: return sf ^ of;
    4'h3: return zf;
    4'h4: return !zf;
    4'h5: return !(sf ^ of);
    4'h6: return !(sf ^ of) && !zf;
    default: return 1'b0;
  endcase
endfunction

// reference model: execute prog from address 0 until a non-AOK status
function automatic void ref_run(input int max_steps);
  longint pc = 0;
  for (int r = 0; r < 15; r++) ref_reg[r] = init_reg[r];
  for (int a = 0; a < TB_DMEM; a++) ref_mem[a] = init_mem[a];
  ref_cc = 3'b100;
  ref_stat = 0;
  ref_steps = 0;
  while (ref_stat == 0 && ref_steps < max_steps) begin
    logic [3:0] ic, fn, ra, rb;
    longint valC8, valC9, a, b, v, sp;
    ic = pbyte(pc)[7:4]; fn = pbyte(pc)[3:0];
    ra = pbyte(pc + 1)[7:4]; rb = pbyte(pc + 1)[3:0];
    for (int i = 0; i < 8; i++) begin
      valC9[8*i +: 8] = pbyte(pc + 1 + i);
      valC8[8*i +: 8] = pbyte(pc + 2 + i);
    end
    if (pc + 10 > TB_IMEM) begin ref_stat = 2; break; end
    ref_steps++;
    case (ic)
      4'h0: begin ref_stat = 1; end
      4'h1: pc += 1;
      4'h2: begin if (cond(fn, ref_cc)) ref_reg[rb] = ref_reg[ra]; pc += 2; end
      4'h3: begin ref_reg[rb] = valC8; pc += 10; end
      4'h4: begin
        a = ref_reg[rb] + valC8;
        if (a < 0 || a > TB_DMEM - 8) begin ref_stat = 2; break; end
        wr64(a, ref_reg[ra]); pc += 10;
      end
      4'h5: begin
        a = ref_reg[rb] + valC8;
        if (a < 0 || a > TB_DMEM - 8) begin ref_stat = 2; break; end
        ref_reg[ra] = rd64(a); pc += 10;
      end
      4'h6: begin
        a = ref_reg[ra]; b = ref_reg[rb];
        case (fn)
          4'h0: v = b + a;
          4'h1: v = b - a;
          4'h2: v = b & a;
          default: v = b ^ a;
        endcase
        ref_cc[2] = (v == 0);
        ref_cc[1] = v[63];
        ref_cc[0] = (fn == 0) ? (a[63] == b[63] && v[63] != b[63]) :
                    (fn == 1) ? (a[63] != b[63] && v[63] != b[63]) : 1'b0;
        ref_reg[rb] = v; pc += 2;
      end
      4'h7: pc = cond(fn, ref_cc) ? valC9 : pc + 9;
      4'h8: begin
        sp = ref_reg[4] - 8;
        if (sp < 0 || sp > TB_DMEM - 8) begin ref_stat = 2; break; end
        wr64(sp, pc + 9); ref_reg[4] = sp; pc = valC9;
      end
      4'h9: begin
        sp = ref_reg[4];
        if (sp < 0 || sp > TB_DMEM - 8) begin ref_stat = 2; break; end
        pc = rd64(sp); ref_reg[4] = sp + 8;
      end
      4'hA: begin
        v = ref_reg[ra]; sp = ref_reg[4] - 8;
        if (sp < 0 || sp > TB_DMEM - 8) begin ref_stat = 2; break; end
        wr64(sp, v); ref_reg[4] = sp; pc += 2;
      end
      4'hB: begin
        sp = ref_reg[4];
        if (sp < 0 || sp > TB_DMEM - 8) begin ref_stat = 2; break; end
        v = rd64(sp); ref_reg[4] = sp + 8; ref_reg[ra] = v; pc += 2;
      end
      default: ref_stat = 3;
    endcase
  end
endfunction

// random data registers: never %rsp (4) or %rbp (5, the memory base)
function automatic logic [3:0] rnd_reg();
  logic [3:0] r;
  r = 4'($urandom_range(0, 12));
  if (r >= 4) r += 2;
  return r;
endfunction

// random terminating program: main part with forward jumps and calls,
// halt, then one subroutine ending in ret. %rbp = 1024 and %rsp = 2048
// are set by the program itself.
function automatic void gen_random(input int n);
  int jump_at [$];     // byte offsets of jump constants to patch
  int jump_min [$];    // instruction index the jump must pass
  int call_at [$];
  int starts [$];
  prog.delete();
  emit_irmovq(64'd1024, 4'h5);
  emit_irmovq(64'd2048, 4'h4);
  for (int i = 0; i < n; i++) begin
    int k;
    starts.push_back(prog.size());
    k = $urandom_range(0, 19);
    case (k)
      0, 1, 2, 3: emit_rr(4'h6, 4'($urandom_range(0, 3)), rnd_reg(), rnd_reg());
      4:          emit_rr(4'h2, 4'($urandom_range(0, 6)), rnd_reg(), rnd_reg());
      5, 6:       emit_irmovq({$urandom, $urandom} >>> $urandom_range(0, 60), rnd_reg());
      7, 8:       emit_rmmovq(rnd_reg(), 64'(8 * $urandom_range(0, 100)), 4'h5);
      9, 10:      emit_mrmovq(64'(8 * $urandom_range(0, 100)), 4'h5, rnd_reg());
      11, 12: begin
        jump_at.push_back(prog.size() + 1);
        jump_min.push_back(i + 1);
        emit_jxx(4'($urandom_range(0, 6)), 0);
      end
      13: begin call_at.push_back(prog.size() + 1); emit_call(0); end
      14:         emit_pushq(rnd_reg());
      15:         emit_popq(rnd_reg());
      16:         emit_nop();
      default:    emit_rr(4'h6, 4'h0, rnd_reg(), rnd_reg());
    endcase
  end
  starts.push_back(prog.size());   // the halt
  emit_halt();
  for (int j = 0; j < jump_at.size(); j++)
    patch64(jump_at[j], 64'(starts[$urandom_range(jump_min[j], n)]));
  // subroutine
  for (int j = 0; j < call_at.size(); j++) patch64(call_at[j], 64'(prog.size()));
  for (int i = 0; i < 4; i++) emit_rr(4'h6, 4'($urandom_range(0, 3)), rnd_reg(), rnd_reg());
  emit_ret();
endfunction
