// y86_asm_pkg: testbench helpers for the Y86-64 pipeline.
//
// A tiny assembler that builds a program in the byte array prog[] (one emit
// function per instruction, each returning the address it placed the
// instruction at), and an instruction-level reference model that runs the same
// program one instruction at a time, the way the instruction set defines it,
// with no notion of a pipeline. The model also predicts the pipeline's cycle
// count from the hazard rules: one cycle per instruction plus 4 to fill the
// pipeline, plus 1 per load/use pair, 2 per not-taken conditional jump and 3 per
// ret.
package y86_asm_pkg;

  localparam int PROG_MAX = 1024;
  localparam int DMEM_MAX = 1024;

  byte unsigned prog [PROG_MAX];
  int unsigned  plen;

  // reference model state
  longint unsigned ref_reg [15];
  byte unsigned    ref_mem [DMEM_MAX];
  bit              ref_zf, ref_sf, ref_of;
  int              ref_stat;      // 1 HLT, 2 ADR, 3 INS
  int unsigned     ref_instrs;    // executed instructions including halt
  int unsigned     ref_loaduse, ref_mispred, ref_rets;

  function automatic void clear();
    for (int i = 0; i < PROG_MAX; i++) prog[i] = 8'h00;
    plen = 0;
  endfunction

  function automatic void put8(byte unsigned b);
    prog[plen] = b;
    plen++;
  endfunction

  function automatic void put64(longint unsigned v);
    for (int i = 0; i < 8; i++) put8(byte'(v >> (8 * i)));
  endfunction

  function automatic int unsigned e_halt();
    int unsigned a = plen; put8(8'h00); return a;
  endfunction
  function automatic int unsigned e_nop();
    int unsigned a = plen; put8(8'h10); return a;
  endfunction
  // cmovXX / rrmovq (fn = 0)
  function automatic int unsigned e_rrmovq(int fn, int ra, int rb);
    int unsigned a = plen; put8(8'(8'h20 | fn)); put8(8'((ra << 4) | rb)); return a;
  endfunction
  function automatic int unsigned e_irmovq(longint unsigned v, int rb);
    int unsigned a = plen; put8(8'h30); put8(8'(8'hF0 | rb)); put64(v); return a;
  endfunction
  function automatic int unsigned e_rmmovq(int ra, longint unsigned d, int rb);
    int unsigned a = plen; put8(8'h40); put8(8'((ra << 4) | rb)); put64(d); return a;
  endfunction
  function automatic int unsigned e_mrmovq(longint unsigned d, int rb, int ra);
    int unsigned a = plen; put8(8'h50); put8(8'((ra << 4) | rb)); put64(d); return a;
  endfunction
  // fn: 0 add, 1 sub, 2 and, 3 xor
  function automatic int unsigned e_opq(int fn, int ra, int rb);
    int unsigned a = plen; put8(8'(8'h60 | fn)); put8(8'((ra << 4) | rb)); return a;
  endfunction
  function automatic int unsigned e_jxx(int fn, longint unsigned dest);
    int unsigned a = plen; put8(8'(8'h70 | fn)); put64(dest); return a;
  endfunction
  function automatic int unsigned e_call(longint unsigned dest);
    int unsigned a = plen; put8(8'h80); put64(dest); return a;
  endfunction
  function automatic int unsigned e_ret();
    int unsigned a = plen; put8(8'h90); return a;
  endfunction
  function automatic int unsigned e_pushq(int ra);
    int unsigned a = plen; put8(8'hA0); put8(8'((ra << 4) | 4'hF)); return a;
  endfunction
  function automatic int unsigned e_popq(int ra);
    int unsigned a = plen; put8(8'hB0); put8(8'((ra << 4) | 4'hF)); return a;
  endfunction
  // set the 8-byte destination of a jXX or call emitted at address at
  function automatic void patch(int unsigned at, longint unsigned dest);
    for (int i = 0; i < 8; i++) prog[at + 1 + i] = byte'(dest >> (8 * i));
  endfunction

  function automatic longint unsigned rd64(int unsigned at);
    longint unsigned v = 0;
    for (int i = 7; i >= 0; i--) v = (v << 8) | longint'(prog[at + i]);
    return v;
  endfunction

  function automatic longint unsigned mload(longint unsigned ad);
    longint unsigned v = 0;
    for (int i = 7; i >= 0; i--) v = (v << 8) | longint'(ref_mem[int'(ad) + i]);
    return v;
  endfunction

  function automatic void mstore(longint unsigned ad, longint unsigned v);
    for (int i = 0; i < 8; i++) ref_mem[int'(ad) + i] = byte'(v >> (8 * i));
  endfunction

  function automatic bit cond(int fn);
    bit lt = ref_sf ^ ref_of;
    case (fn)
      0: return 1;
      1: return lt | ref_zf;
      2: return lt;
      3: return ref_zf;
      4: return !ref_zf;
      5: return !lt;
      6: return !lt && !ref_zf;
      default: return 0;
    endcase
  endfunction

  function automatic longint unsigned rget(int r);
    return (r < 15) ? ref_reg[r] : 64'd0;
  endfunction
  function automatic void rset(int r, longint unsigned v);
    if (r < 15) ref_reg[r] = v;
  endfunction

  // run the program in prog[] from address 0 for at most max_steps instructions
  function automatic void ref_run(int max_steps);
    longint unsigned pc = 0;
    int prev_load_dst = 15;   // dstM of the previous instruction if it was a load
    for (int i = 0; i < 15; i++) ref_reg[i] = 0;
    for (int i = 0; i < DMEM_MAX; i++) ref_mem[i] = 0;
    ref_zf = 1; ref_sf = 0; ref_of = 0;
    ref_stat = 0; ref_instrs = 0; ref_loaduse = 0; ref_mispred = 0; ref_rets = 0;
    for (int step = 0; step < max_steps && ref_stat == 0; step++) begin
      int ic = int'(prog[int'(pc)]) >> 4;
      int fn = int'(prog[int'(pc)]) & 32'hF;
      int ra = int'(prog[int'(pc) + 1]) >> 4;
      int rb = int'(prog[int'(pc) + 1]) & 32'hF;
      int srcA = 15, srcB = 15, load_dst = 15;
      longint unsigned va, vb, ve;
      ref_instrs++;
      case (ic)
        0: begin ref_stat = 1; end
        1: pc += 1;
        2: begin srcA = ra; if (cond(fn)) rset(rb, rget(ra)); pc += 2; end
        3: begin rset(rb, rd64(int'(pc) + 2)); pc += 10; end
        4: begin srcA = ra; srcB = rb; mstore(rget(rb) + rd64(int'(pc) + 2), rget(ra)); pc += 10; end
        5: begin srcB = rb; rset(ra, mload(rget(rb) + rd64(int'(pc) + 2))); load_dst = ra; pc += 10; end
        6: begin
          srcA = ra; srcB = rb;
          va = rget(ra); vb = rget(rb);
          case (fn)
            1: ve = vb - va;
            2: ve = vb & va;
            3: ve = vb ^ va;
            default: ve = vb + va;
          endcase
          ref_zf = (ve == 0);
          ref_sf = ve[63];
          ref_of = (fn == 0) ? (va[63] == vb[63] && ve[63] != vb[63]) :
                   (fn == 1) ? (va[63] != vb[63] && ve[63] != vb[63]) : 1'b0;
          rset(rb, ve);
          pc += 2;
        end
        7: begin
          if (cond(fn)) pc = rd64(int'(pc) + 1);
          else begin pc += 9; ref_mispred++; end
        end
        8: begin srcB = 4; rset(4, rget(4) - 8); mstore(rget(4), pc + 9); pc = rd64(int'(pc) + 1); end
        9: begin srcA = 4; srcB = 4; pc = mload(rget(4)); rset(4, rget(4) + 8); ref_rets++; end
        10: begin srcA = ra; srcB = 4; va = rget(ra); rset(4, rget(4) - 8); mstore(rget(4), va); pc += 2; end
        11: begin srcA = 4; srcB = 4; va = mload(rget(4)); rset(4, rget(4) + 8); rset(ra, va); load_dst = ra; pc += 2; end
        default: ref_stat = 3;
      endcase
      if (prev_load_dst != 15 && (srcA == prev_load_dst || srcB == prev_load_dst))
        ref_loaduse++;
      prev_load_dst = load_dst;
    end
  endfunction

  // expected cycles from the first fetch until halt reaches writeback
  function automatic int unsigned ref_cycles();
    return ref_instrs - 1 + 4 + ref_loaduse + 2 * ref_mispred + 3 * ref_rets;
  endfunction

endpackage
