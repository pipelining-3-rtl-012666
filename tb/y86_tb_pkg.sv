// y86_tb_pkg: test helpers for the Y86-64 pipeline testbenches.
//
// y86_asm   a tiny assembler: each method appends one instruction's bytes
//           (standard Y86-64 encoding, little-endian constants) and returns
//           the address it was placed at; patch64() fills in a jump or call
//           target once the label's address is known.
// y86_iss   an instruction-at-a-time reference model of the same ISA. It
//           runs a program to halt or to an error and counts, per the
//           pipeline's hazard rules, how many cycles a five-stage pipeline
//           with forwarding and always-taken prediction needs: one per
//           instruction, +1 for a load followed at once by a use of the
//           loaded register, +2 for a conditional jump that is not taken,
//           +3 for a ret.
package y86_tb_pkg;
  import y86_pkg::*;

  class y86_asm;
    logic [7:0] b[$];

    function automatic int unsigned here();
      return b.size();
    endfunction

    function automatic void put64(word_t v);
      for (int i = 0; i < 8; i++) b.push_back(v[8*i +: 8]);
    endfunction

    function automatic void patch64(int unsigned at, word_t v);
      for (int i = 0; i < 8; i++) b[at + i] = v[8*i +: 8];
    endfunction

    function automatic int unsigned ins(icode_t ic, logic [3:0] fn);
      int unsigned a = here();
      b.push_back({ic, fn});
      return a;
    endfunction

    function automatic int unsigned halt();  return ins(I_HALT, 0); endfunction
    function automatic int unsigned nop();   return ins(I_NOP, 0);  endfunction
    function automatic int unsigned ret();   return ins(I_RET, 0);  endfunction

    function automatic int unsigned rr(icode_t ic, logic [3:0] fn, reg_t ra, reg_t rb);
      int unsigned a = ins(ic, fn);
      b.push_back({ra, rb});
      return a;
    endfunction

    function automatic int unsigned rrmovq(reg_t ra, reg_t rb);  return rr(I_RRMOVQ, 0, ra, rb); endfunction
    function automatic int unsigned cmovxx(logic [3:0] c, reg_t ra, reg_t rb); return rr(I_RRMOVQ, c, ra, rb); endfunction
    function automatic int unsigned opq(logic [3:0] fn, reg_t ra, reg_t rb); return rr(I_OPQ, fn, ra, rb); endfunction
    function automatic int unsigned pushq(reg_t ra); return rr(I_PUSHQ, 0, ra, R_NONE); endfunction
    function automatic int unsigned popq(reg_t ra);  return rr(I_POPQ, 0, ra, R_NONE);  endfunction

    function automatic int unsigned irmovq(word_t v, reg_t rb);
      int unsigned a = rr(I_IRMOVQ, 0, R_NONE, rb);
      put64(v);
      return a;
    endfunction
    // rmmovq rA, d(rB)
    function automatic int unsigned rmmovq(reg_t ra, word_t d, reg_t rb);
      int unsigned a = rr(I_RMMOVQ, 0, ra, rb);
      put64(d);
      return a;
    endfunction
    // mrmovq d(rB), rA
    function automatic int unsigned mrmovq(word_t d, reg_t rb, reg_t ra);
      int unsigned a = rr(I_MRMOVQ, 0, ra, rb);
      put64(d);
      return a;
    endfunction
    // jXX / call; the returned address + 1 is where the target goes.
    function automatic int unsigned jxx(logic [3:0] c, word_t dest);
      int unsigned a = ins(I_JXX, c);
      put64(dest);
      return a;
    endfunction
    function automatic int unsigned call(word_t dest);
      int unsigned a = ins(I_CALL, 0);
      put64(dest);
      return a;
    endfunction
  endclass

  class y86_iss;
    word_t      r[15];
    logic [7:0] m[];
    cc_t        cc;
    stat_t      st;
    word_t      pc;
    bit         trace;
    int         n_instr, n_mispredict, n_taken, n_ret, n_load_use, cycles;

    function new(int unsigned dmem_bytes);
      m = new[dmem_bytes];
      foreach (r[i]) r[i] = '0;
      cc = '{zf: 1'b1, sf: 1'b0, of: 1'b0};
      st = S_AOK;
      pc = '0;
      n_instr = 0; n_mispredict = 0; n_taken = 0; n_ret = 0; n_load_use = 0; cycles = 0;
    endfunction

    function automatic word_t rd(reg_t x);
      return (x == R_NONE) ? '0 : r[x];
    endfunction
    function automatic void wr(reg_t x, word_t v);
      if (x != R_NONE) r[x] = v;
    endfunction
    function automatic logic mem_ok(word_t a);
      word_t msz;
      msz = m.size();
      return a <= msz - 8;
    endfunction
    function automatic word_t ld(word_t a);
      word_t v;
      for (int i = 0; i < 8; i++) v[8*i +: 8] = m[a + i];
      return v;
    endfunction
    function automatic void st8(word_t a, word_t v);
      for (int i = 0; i < 8; i++) m[a + i] = v[8*i +: 8];
    endfunction
    function automatic logic cond(logic [3:0] c);
      case (c)
        C_YES: return 1'b1;
        C_LE:  return (cc.sf ^ cc.of) | cc.zf;
        C_L:   return cc.sf ^ cc.of;
        C_E:   return cc.zf;
        C_NE:  return !cc.zf;
        C_GE:  return !(cc.sf ^ cc.of);
        C_G:   return !(cc.sf ^ cc.of) && !cc.zf;
        default: return 1'b0;
      endcase
    endfunction

    // Registers an instruction reads in decode (for the load/use rule).
    static function automatic void srcs(icode_t ic, reg_t ra, reg_t rb, output reg_t sa, output reg_t sb);
      case (ic)
        I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: sa = ra;
        I_POPQ, I_RET:                      sa = R_RSP;
        default:                            sa = R_NONE;
      endcase
      case (ic)
        I_OPQ, I_RMMOVQ, I_MRMOVQ:          sb = rb;
        I_PUSHQ, I_POPQ, I_CALL, I_RET:     sb = R_RSP;
        default:                            sb = R_NONE;
      endcase
    endfunction

    // Run the program in prog (instruction memory image) to completion.
    function automatic void run(input logic [7:0] prog[$], input int max_steps);
      reg_t last_load;
      word_t psz;
      psz = prog.size();
      last_load = R_NONE;
      for (int step = 0; step < max_steps && st == S_AOK; step++) begin
        logic [7:0] b0, b1;
        icode_t ic;
        logic [3:0] fn;
        reg_t ra, rb, sa, sb;
        word_t vc, valp, a, bv, res;
        int len, ip;
        if (pc >= psz) begin st = S_ADR; break; end
        ip = int'(pc);
        b0 = prog[ip];
        b1 = (pc + 1 < psz) ? prog[ip + 1] : 8'h00;
        ic = icode_t'(b0[7:4]);
        fn = b0[3:0];
        if (b0[7:4] > 4'hB) begin st = S_INS; n_instr++; break; end
        ra = R_NONE; rb = R_NONE;
        len = 1;
        if (ic inside {I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ}) begin
          ra = b1[7:4]; rb = b1[3:0]; len = 2;
        end
        vc = '0;
        if (ic inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL}) begin
          for (int i = 0; i < 8; i++) vc[8*i +: 8] = prog[ip + len + i];
          len += 8;
        end
        valp = pc + 64'(len);
        if (trace) $display("iss pc=%0d icode=%0h fn=%0h ra=%0h rb=%0h valc=%0h", pc, ic, fn, ra, rb, vc);
        // timing
        n_instr++;
        srcs(ic, ra, rb, sa, sb);
        if (last_load != R_NONE && (last_load == sa || last_load == sb)) n_load_use++;
        last_load = R_NONE;
        if (ic == I_HALT) begin st = S_HLT; break; end
        a = rd(ra); bv = rd(rb);
        pc = valp;
        case (ic)
          I_NOP: ;
          I_RRMOVQ: if (cond(fn)) wr(rb, a);
          I_IRMOVQ: wr(rb, vc);
          I_RMMOVQ: begin
            if (!mem_ok(bv + vc)) begin st = S_ADR; break; end
            st8(bv + vc, a);
          end
          I_MRMOVQ: begin
            if (!mem_ok(bv + vc)) begin st = S_ADR; break; end
            wr(ra, ld(bv + vc)); last_load = ra;
          end
          I_OPQ: begin
            case (fn)
              A_ADD: res = bv + a;
              A_SUB: res = bv - a;
              A_AND: res = bv & a;
              default: res = bv ^ a;
            endcase
            cc.zf = (res == 0);
            cc.sf = res[63];
            cc.of = (fn == A_ADD) ? (a[63] == bv[63] && res[63] != bv[63]) :
                    (fn == A_SUB) ? (a[63] != bv[63] && res[63] != bv[63]) : 1'b0;
            wr(rb, res);
          end
          I_JXX: begin
            if (cond(fn)) begin pc = vc; n_taken++; end
            else n_mispredict++;
          end
          I_CALL: begin
            word_t sp = rd(R_RSP) - 8;
            if (!mem_ok(sp)) begin st = S_ADR; break; end
            st8(sp, valp); wr(R_RSP, sp); pc = vc;
          end
          I_RET: begin
            word_t sp = rd(R_RSP);
            if (!mem_ok(sp)) begin st = S_ADR; break; end
            pc = ld(sp); wr(R_RSP, sp + 8); n_ret++;
          end
          I_PUSHQ: begin
            word_t sp = rd(R_RSP) - 8;
            if (!mem_ok(sp)) begin st = S_ADR; break; end
            st8(sp, a); wr(R_RSP, sp);
          end
          I_POPQ: begin
            word_t sp = rd(R_RSP);
            if (!mem_ok(sp)) begin st = S_ADR; break; end
            wr(R_RSP, sp + 8); wr(ra, ld(sp)); last_load = ra;
          end
          default: begin st = S_INS; break; end
        endcase
      end
      cycles = n_instr + 2 * n_mispredict + 3 * n_ret + n_load_use;
    endfunction
  endclass

endpackage
