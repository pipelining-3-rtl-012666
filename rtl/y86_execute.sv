// y86_execute: execute stage - ALU, condition codes and condition check.
//
// The ALU adds, subtracts (valB - valA), ANDs or XORs. Its inputs depend on
// icode: OPq and rrmovq use valA, irmovq/rmmovq/mrmovq use valC, call/pushq
// use -8 and ret/popq +8 (stack pointer updates); the second input is valB,
// or 0 for rrmovq and irmovq. The condition-code register (ZF, SF, OF) is
// the only state here: an OPq writes it at the end of the cycle when
// cc_en is high (the control logic drops cc_en once an exception is on its
// way to writeback). The condition (ifun) of jXX and cmovXX is checked
// against the current codes, giving Cnd; a cmov whose condition fails has
// its dstE cancelled (0xF). Cnd travels on to the memory stage, where the
// fetch stage uses it to detect a mispredicted jump.
//
// The lecture places computation and condition-code reading and writing in
// execute, and passes "taken?" on in the execute-to-memory register. The
// ALU operand table, the flag and condition formulas and the reset value of
// the codes (ZF=1, SF=0, OF=0) are the usual Y86-64 ones.
module y86_execute
  import y86_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  ereg_t e,          // E pipeline register
  input  logic  cc_en,      // from control: OPq may update the codes
  output mreg_t e_out,      // next value of the M register
  output reg_t  e_dste,     // for forwarding
  output word_t e_vale,
  output logic  e_cnd,
  output cc_t   cc          // current condition codes
);

  word_t      alua, alub, res;
  logic [3:0] alufun;
  cc_t        new_cc;
  logic       set_cc;

  always_comb begin
    unique case (e.icode)
      I_RRMOVQ, I_OPQ:              alua = e.vala;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: alua = e.valc;
      I_CALL, I_PUSHQ:              alua = -64'sd8;
      I_RET, I_POPQ:                alua = 64'd8;
      default:                      alua = '0;
    endcase
    unique case (e.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_PUSHQ, I_RET, I_POPQ: alub = e.valb;
      default:                                                   alub = '0;
    endcase
    alufun = (e.icode == I_OPQ) ? e.ifun : A_ADD;
  end

  always_comb begin
    unique case (alufun)
      A_SUB:   res = alub - alua;
      A_AND:   res = alub & alua;
      A_XOR:   res = alub ^ alua;
      default: res = alub + alua;
    endcase
    new_cc.zf = (res == '0);
    new_cc.sf = res[63];
    unique case (alufun)
      A_ADD:   new_cc.of = (alua[63] == alub[63]) && (res[63] != alub[63]);
      A_SUB:   new_cc.of = (alua[63] != alub[63]) && (res[63] != alub[63]);
      default: new_cc.of = 1'b0;
    endcase
  end

  assign set_cc = (e.icode == I_OPQ) && cc_en;

  always_ff @(posedge clk) begin
    if (rst)         cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= new_cc;
  end

  always_comb begin
    unique case (e.ifun)
      C_YES:   e_cnd = 1'b1;
      C_LE:    e_cnd = (cc.sf ^ cc.of) | cc.zf;
      C_L:     e_cnd = cc.sf ^ cc.of;
      C_E:     e_cnd = cc.zf;
      C_NE:    e_cnd = !cc.zf;
      C_GE:    e_cnd = !(cc.sf ^ cc.of);
      C_G:     e_cnd = !(cc.sf ^ cc.of) && !cc.zf;
      default: e_cnd = 1'b0;
    endcase
  end

  assign e_vale = res;
  assign e_dste = (e.icode == I_RRMOVQ && !e_cnd) ? R_NONE : e.dste;

  always_comb begin
    e_out.stat  = e.stat;
    e_out.icode = e.icode;
    e_out.cnd   = e_cnd;
    e_out.vale  = res;
    e_out.vala  = e.vala;
    e_out.dste  = e_dste;
    e_out.dstm  = e.dstm;
  end

endmodule
