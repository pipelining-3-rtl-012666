// tb_y86_execute: ALU operands and results, condition codes and
// conditions. Random instructions of every icode run through the stage;
// results are compared with the ISA's definitions, overflow is worked out
// with 128-bit signed arithmetic, the condition-code register must change
// only for OPq with cc_en high, and Cnd must match the condition table for
// the current codes. A cmov whose condition fails must cancel dstE.
`timescale 1ns/1ps
module tb_y86_execute;
  import y86_pkg::*;
  logic clk = 0, rst = 1, cc_en, e_cnd;
  ereg_t e;
  mreg_t e_out;
  reg_t e_dste;
  word_t e_vale;
  cc_t cc, mcc;
  int checks = 0, failures = 0;
  int n_cnd[2] = '{0, 0};
  int n_of = 0;

  y86_execute dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    e = '0;
    cc_en = 0;
    @(negedge clk);
    rst = 0;
    mcc = '{zf: 1, sf: 0, of: 0};
    chk(cc == mcc, "reset codes");
    for (int t = 0; t < 8000; t++) begin
      word_t a, b, res;
      logic [3:0] fn;
      logic signed [127:0] wide;
      logic c, of;
      e.stat  = S_AOK;
      e.icode = icode_t'($urandom_range(1, 11));
      e.ifun  = (e.icode == I_OPQ) ? 4'($urandom_range(0, 3)) : 4'($urandom_range(0, 6));
      e.valc  = {$urandom, $urandom};
      e.vala  = ($urandom_range(0, 3) == 0) ? {1'b0, {63{1'b1}}} : {$urandom, $urandom};
      e.valb  = ($urandom_range(0, 3) == 0) ? e.vala : {$urandom, $urandom};
      e.dste  = reg_t'($urandom_range(0, 14));
      e.dstm  = reg_t'($urandom_range(0, 15));
      cc_en   = ($urandom_range(0, 5) != 0);
      fn = (e.icode == I_OPQ) ? e.ifun : A_ADD;
      case (e.icode)
        I_RRMOVQ, I_OPQ:              a = e.vala;
        I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: a = e.valc;
        I_CALL, I_PUSHQ:              a = 64'hFFFF_FFFF_FFFF_FFF8;
        I_RET, I_POPQ:                a = 64'd8;
        default:                      a = '0;
      endcase
      b = (e.icode inside {I_RRMOVQ, I_IRMOVQ, I_NOP, I_HALT, I_JXX}) ? '0 : e.valb;
      case (fn)
        A_ADD: begin res = b + a; wide = $signed({{64{b[63]}}, b}) + $signed({{64{a[63]}}, a}); end
        A_SUB: begin res = b - a; wide = $signed({{64{b[63]}}, b}) - $signed({{64{a[63]}}, a}); end
        A_AND: begin res = b & a; wide = '0; end
        default: begin res = b ^ a; wide = '0; end
      endcase
      of = (fn == A_ADD || fn == A_SUB) &&
           (wide > 128'sh7FFF_FFFF_FFFF_FFFF || wide < -128'sh8000_0000_0000_0000);
      case (e.ifun)
        4'd0: c = 1;
        4'd1: c = (mcc.sf != mcc.of) || mcc.zf;
        4'd2: c = (mcc.sf != mcc.of);
        4'd3: c = mcc.zf;
        4'd4: c = !mcc.zf;
        4'd5: c = (mcc.sf == mcc.of);
        4'd6: c = (mcc.sf == mcc.of) && !mcc.zf;
        default: c = 0;
      endcase
      #1;
      if (e.icode inside {I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_PUSHQ, I_RET, I_POPQ})
        chk(e_vale == res, $sformatf("valE icode %0d fn %0d", e.icode, fn));
      chk(e_cnd == c, $sformatf("cond %0d", e.ifun));
      if (e.icode inside {I_JXX, I_RRMOVQ}) n_cnd[c]++;
      chk(e_dste == ((e.icode == I_RRMOVQ && !c) ? R_NONE : e.dste), "dstE / cmov cancel");
      chk(e_out.cnd == e_cnd && e_out.vala == e.vala && e_out.dstm == e.dstm &&
          e_out.vale == e_vale && e_out.icode == e.icode, "M register fields");
      @(negedge clk);
      if (e.icode == I_OPQ && cc_en) begin
        mcc = '{zf: (res == 0), sf: res[63], of: of};
        n_of += int'(of);
      end
      chk(cc == mcc, $sformatf("codes after icode %0d fn %0d en %0d", e.icode, fn, cc_en));
    end
    chk(n_cnd[0] > 0 && n_cnd[1] > 0 && n_of > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
